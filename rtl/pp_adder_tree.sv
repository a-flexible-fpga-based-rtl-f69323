// pp_adder_tree: the partial-product summing half of the multiplier.
//
// The eight partial products are first registered (pp_en).  They are then
// added in three levels, each level shifting its upper operand:
//   level 1: s1[j] = PP(2j)   + PP(2j+1) << 2   -> four 4x4 products (21 b)
//   level 2: s2[i] = s1[2i]   + s1[2i+1] << 4   -> two 8x8 products  (26 b)
//   level 3: s3    = s2[0]    + s2[1]    << 8   -> one 16x16 product (32 b)
// The widths 21/26 follow the multiplier figure of the thesis; the last
// level keeps only the 32 bits of the product.  The deeper levels are fed
// zeros when the precision does not need them (4 bits: levels 2 and 3;
// 8 bits: level 3), which the thesis names as the reason 4-bit work draws
// less power ("only zeros will reach the two innermost adders").  On
// out_en the result of the selected precision is loaded into its output
// register (Output_8bit, Output_16bit or Output_32bit) and the other two
// are loaded with zero, as the zero-inputs of the output multiplexers in
// the figure do.  Packing: product of digit group g (Booth sub-word g of
// the weight) goes to lane N-1-g, so out4[31:24] = a[15:12]*b[3:0],
// out8[31:16] = a[15:8]*b[7:0], as in the multiplication traces.
//
// Timing: PP registers load one cycle, output registers the next.
module pp_adder_tree
  import npu_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  prec_t               prec,
  input  logic                pp_en,
  input  logic                out_en,
  input  logic [PP_W-1:0]     pp [NDIG],
  output logic [PROD_W-1:0]   out4,
  output logic [PROD_W-1:0]   out8,
  output logic [PROD_W-1:0]   out16
);

  logic [PP_W-1:0]   pp_q [NDIG];
  logic signed [20:0] s1 [4];
  logic signed [25:0] s2 [2];
  logic signed [31:0] s3;      // only the 32 product bits are kept
  logic [PROD_W-1:0] p4, p8, p16;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NDIG; k++) pp_q[k] <= '0;
    end else if (pp_en) begin
      pp_q <= pp;
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++)
      s1[j] = 21'($signed(pp_q[2*j])) + (21'($signed(pp_q[2*j+1])) <<< 2);
    // Levels a precision does not use see zeros: at 4 bits the two inner
    // levels, at 8 bits the last one.
    for (int i = 0; i < 2; i++)
      s2[i] = (prec == PREC4) ? '0 : 26'(s1[2*i]) + (26'(s1[2*i+1]) <<< 4);
    s3 = (prec != PREC16) ? '0 : 32'(s2[0]) + (32'(s2[1]) <<< 8);
    for (int g = 0; g < 4; g++) p4[8*(3-g) +: 8]  = s1[g][7:0];
    for (int g = 0; g < 2; g++) p8[16*(1-g) +: 16] = s2[g][15:0];
    p16 = s3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out4  <= '0;
      out8  <= '0;
      out16 <= '0;
    end else if (out_en) begin
      out4  <= (prec == PREC4)  ? p4  : '0;
      out8  <= (prec == PREC8)  ? p8  : '0;
      out16 <= (prec == PREC16) ? p16 : '0;
    end
  end

endmodule
