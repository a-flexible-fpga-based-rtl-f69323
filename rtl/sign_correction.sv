// sign_correction: completes the negation of each Booth partial product.
//
// The selector inverts the multiplicand for a negative digit; adding the
// digit's S (neg) bit here turns that one's complement into the two's
// complement value, already sign-extended to PP_W bits, so the partial
// products can be summed by a plain signed adder tree.  The thesis places
// this step between the Booth front end and the adder tree and realises it
// with constant '1' and inverted-sign bits inside the PP matrix; here each
// partial product is corrected on its own instead, because the tree adds
// the PPs of one sub-word at a time.
//
// Purely combinational.
module sign_correction
  import npu_pkg::*;
(
  input  logic [PP_W-1:0] pp_raw [NDIG],
  input  logic [NDIG-1:0] neg,
  output logic [PP_W-1:0] pp     [NDIG]
);

  always_comb begin
    for (int k = 0; k < NDIG; k++)
      pp[k] = pp_raw[k] + PP_W'(neg[k]);
  end

endmodule
