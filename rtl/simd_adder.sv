// simd_adder: the configurable adder of a PE, with its registers.
//
// Eight adder4 slices form, according to lanes, eight 4-bit, four 8-bit,
// two 16-bit or one 32-bit addition of operand X (bits 31:0) and operand Y
// (bits 63:32).  Operand sources:
//   add_ext = 1: X and Y from the 64-bit external input, through the input
//                register (the thesis' register for external operands);
//   add_ext = 0: X is the multiplier product (through the same input
//                register), Y is the MAC register (accumulation).
// Each result width has its own output register, selected by osel:
//   OSEL_5   out5[i]  = {carry, sum} of slice i                 (8 x 5 bit)
//   OSEL_9   out9[i]  = {carry, sum} of slices 2i+1..2i         (4 x 9 bit)
//   OSEL_17  out17[i] = {carry, sum} of slices 4i+3..4i         (2 x 17 bit)
//   OSEL_33  out33    = {carry, sum}                            (33 bit)
//   OSEL_MAC out_mac  = sum without carries                     (32 bit)
// The extra top bit is the unsigned carry-out of the lane.  The MAC
// register is cleared by acc_clr; with a partition narrower than 32 bits
// each lane wraps on its own, so packed 8x8 or 4x4 products accumulate
// independently.
//
// Timing: in_en loads the input register; out_en, on a later cycle,
// writes the sum into the selected output register.
module simd_adder
  import npu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [63:0]       ext_in,
  input  logic [31:0]       mult_in,
  input  logic              add_ext,
  input  logic              in_en,
  input  logic              out_en,
  input  lanes_t            lanes,
  input  osel_t             osel,
  input  logic              acc_clr,
  output logic [7:0][4:0]   out5,
  output logic [3:0][8:0]   out9,
  output logic [1:0][16:0]  out17,
  output logic [32:0]       out33,
  output logic [31:0]       out_mac
);

  logic [31:0] x_q, y_q;
  logic        ext_q;       // source of the operands held in x_q/y_q
  logic [31:0] x, y, s;
  logic [7:0]  chain, cout;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q   <= '0;
      y_q   <= '0;
      ext_q <= 1'b0;
    end else if (in_en) begin
      x_q   <= add_ext ? ext_in[31:0] : mult_in;
      y_q   <= ext_in[63:32];
      ext_q <= add_ext;
    end
  end

  assign x = x_q;
  assign y = ext_q ? y_q : out_mac;

  always_comb begin
    for (int u = 0; u < 8; u++) begin
      case (lanes)
        LANE4:   chain[u] = 1'b0;
        LANE8:   chain[u] = (u % 2) != 0;
        LANE16:  chain[u] = (u % 4) != 0;
        default: chain[u] = (u != 0);
      endcase
    end
  end

  for (genvar u = 0; u < 8; u++) begin : g_slice
    adder4 u_add (
      .x(x[4*u +: 4]), .y(y[4*u +: 4]), .chain(chain[u]),
      .cin_prev(u == 0 ? 1'b0 : cout[(u + 7) % 8]),
      .s(s[4*u +: 4]), .cout(cout[u])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out5    <= '0;
      out9    <= '0;
      out17   <= '0;
      out33   <= '0;
      out_mac <= '0;
    end else begin
      if (out_en) begin
        case (osel)
          OSEL_5:  for (int i = 0; i < 8; i++) out5[i]  <= {cout[i], s[4*i +: 4]};
          OSEL_9:  for (int i = 0; i < 4; i++) out9[i]  <= {cout[2*i+1], s[8*i +: 8]};
          OSEL_17: for (int i = 0; i < 2; i++) out17[i] <= {cout[4*i+3], s[16*i +: 16]};
          OSEL_33: out33 <= {cout[7], s};
          default: out_mac <= s;
        endcase
      end
      if (acc_clr) out_mac <= '0;
    end
  end

endmodule
