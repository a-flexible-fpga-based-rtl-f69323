// mac_pe: processing element, a precision-scalable multiplier feeding a
// configurable adder.
//
// The PE works as a parallel multiplier (one 16x16, two 8x8 or four 4x4
// signed products in out16/out8/out4), as a parallel adder of external
// operands (out5/out9/out17/out33/out_mac), or as a MAC: the product of the
// selected precision is added lane by lane to the MAC register out_mac.
// For the MAC the product lanes are taken in Booth sub-word order, lane g
// holding a[sub-word N-1-g] * b[sub-word g]; this is the reverse of the
// multiplier output packing and matches the MAC traces of the thesis
// (e.g. 8x8 product 0x00090003 accumulates as 0x00030009).
//
// Pipeline, all steps enabled by the control word:
//   pp_en -> PP registers; mout_en -> multiplier outputs;
//   add_in_en -> adder input register; add_out_en -> adder output register.
module mac_pe
  import npu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  pe_ctrl_t          ctrl,
  input  logic [DATA_W-1:0] in_a,
  input  logic [DATA_W-1:0] in_w,
  input  logic [63:0]       ext_add,
  output logic [PROD_W-1:0] out4,
  output logic [PROD_W-1:0] out8,
  output logic [PROD_W-1:0] out16,
  output logic [7:0][4:0]   out5,
  output logic [3:0][8:0]   out9,
  output logic [1:0][16:0]  out17,
  output logic [32:0]       out33,
  output logic [31:0]       out_mac
);

  logic [31:0] mac_operand;

  final_multiplier u_mult (
    .clk(clk), .rst(rst), .a(in_a), .b(in_w), .prec(ctrl.prec),
    .pp_en(ctrl.pp_en), .out_en(ctrl.mout_en),
    .out4(out4), .out8(out8), .out16(out16)
  );

  // Product of the active precision, in Booth sub-word (MAC lane) order.
  always_comb begin
    case (ctrl.prec)
      PREC4:   mac_operand = {out4[7:0], out4[15:8], out4[23:16], out4[31:24]};
      PREC8:   mac_operand = {out8[15:0], out8[31:16]};
      default: mac_operand = out16;
    endcase
  end

  simd_adder u_add (
    .clk(clk), .rst(rst), .ext_in(ext_add), .mult_in(mac_operand),
    .add_ext(ctrl.add_ext), .in_en(ctrl.add_in_en), .out_en(ctrl.add_out_en),
    .lanes(ctrl.lanes), .osel(ctrl.osel), .acc_clr(ctrl.acc_clr),
    .out5(out5), .out9(out9), .out17(out17), .out33(out33), .out_mac(out_mac)
  );

endmodule
