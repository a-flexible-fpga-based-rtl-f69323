// booth_selector: forms the eight raw radix-4 Booth partial products.
//
// Digit k multiplies one signed sub-word of the multiplicand a.  The
// pairing follows the precision table of the thesis: in 4x4 mode the
// digits of b[3:0] multiply a[15:12], those of b[7:4] multiply a[11:8], and
// so on; in 8x8 mode the digits of b[7:0] multiply a[15:8] and those of
// b[15:8] multiply a[7:0]; in 16x16 mode every digit multiplies all of a.
// The sub-word is sign-extended to 17 bits, doubled for a +/-2 digit, and
// inverted (one's complement) for a negative digit; the +1 that completes
// the negation is left to sign_correction through neg.
//
// Purely combinational.
module booth_selector
  import npu_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  prec_t             prec,
  input  booth_digit_t      digit  [NDIG],
  output logic [PP_W-1:0]   pp_raw [NDIG],
  output logic [NDIG-1:0]   neg
);

  always_comb begin
    for (int k = 0; k < NDIG; k++) begin
      logic signed [PP_W-1:0] m;    // selected multiplicand, sign-extended
      logic [PP_W-1:0]        mag;
      case (prec)
        PREC8:   m = PP_W'($signed(a[8*(1 - k/4) +: 8]));
        PREC4:   m = PP_W'($signed(a[4*(3 - k/2) +: 4]));
        default: m = PP_W'($signed(a));
      endcase
      if (digit[k].two)      mag = PP_W'(m <<< 1);
      else if (digit[k].one) mag = m;
      else                   mag = '0;
      pp_raw[k] = digit[k].neg ? ~mag : mag;
      neg[k]    = digit[k].neg;
    end
  end

endmodule
