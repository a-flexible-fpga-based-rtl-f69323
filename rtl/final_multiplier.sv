// final_multiplier: precision-scalable signed multiplier of one PE.
//
// a (input operand) and b (weight operand) each hold one 16-bit, two 8-bit
// or four 4-bit two's complement values, chosen by prec:
//   PREC16: out16      = a*b
//   PREC8 : out8[31:16] = a[15:8]*b[7:0],    out8[15:0] = a[7:0]*b[15:8]
//   PREC4 : out4[31:24] = a[15:12]*b[3:0],   out4[23:16] = a[11:8]*b[7:4],
//           out4[15:8]  = a[7:4]*b[11:8],    out4[7:0]   = a[3:0]*b[15:12]
// which is the operand organisation of the thesis' precision table,
// with each product kept apart (sum-apart) rather than summed.
// Booth front end (combinational) -> PP registers (pp_en) -> adder tree ->
// output registers (out_en): a product is visible two cycles after the
// operands are applied with pp_en, then out_en.
module final_multiplier
  import npu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  prec_t             prec,
  input  logic              pp_en,
  input  logic              out_en,
  output logic [PROD_W-1:0] out4,
  output logic [PROD_W-1:0] out8,
  output logic [PROD_W-1:0] out16
);

  logic [PP_W-1:0] pp [NDIG];

  booth_multiplier u_booth (.a(a), .b(b), .prec(prec), .pp(pp));

  pp_adder_tree u_tree (
    .clk(clk), .rst(rst), .prec(prec), .pp_en(pp_en), .out_en(out_en),
    .pp(pp), .out4(out4), .out8(out8), .out16(out16)
  );

endmodule
