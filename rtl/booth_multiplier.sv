// booth_multiplier: Booth front end of the precision-scalable multiplier.
//
// Chains the configurable radix-4 encoder (on the weight operand b), the
// partial-product selector (on the input operand a) and the sign
// correction, producing the eight signed partial products PP0..PP7.  PPk
// carries the weight 4^k inside its own sub-word: pp_adder_tree adds them
// as PP(2j) + 4*PP(2j+1) and so on.
//
// Purely combinational; the PP registers are in pp_adder_tree.
module booth_multiplier
  import npu_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  prec_t             prec,
  output logic [PP_W-1:0]   pp [NDIG]
);

  booth_digit_t    digit  [NDIG];
  logic [PP_W-1:0] pp_raw [NDIG];
  logic [NDIG-1:0] neg;

  booth_encoder   u_enc (.b(b), .prec(prec), .digit(digit));
  booth_selector  u_sel (.a(a), .prec(prec), .digit(digit), .pp_raw(pp_raw), .neg(neg));
  sign_correction u_sc  (.pp_raw(pp_raw), .neg(neg), .pp(pp));

endmodule
