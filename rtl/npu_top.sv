// npu_top: flexible neural processing unit, control unit plus datapath.
//
// A 4x4 array of precision-scalable PEs runs, on 16-bit operand words that
// hold one 16-bit, two 8-bit or four 4-bit signed values:
//   select_operation = 000: 16 parallel multiplications, additions of
//                           external 64-bit operand pairs, or MACs;
//                      001: 4x4 matrix multiplication C = A x W;
//                      010/011/100: valid convolution of a 4x4 input with
//                           a 2x2/3x3/4x4 kernel (top-left of weight_matrix).
// config_mac_mult_adder selects precision ([4:2]: 000 16x16, 010 8x8,
// 001 4x4), adder partition ([7:5]) and adder source ([1:0]: 00 multiply,
// 01 external add, 11 MAC).  Raise start with the commands; done pulses
// for one cycle in the S_DONE state, and the results stay in the output
// registers: products in out_mult4/8/16, sums in out_sum5/9/17/33, MAC,
// matrix product and convolution results in out_mac (PE (r,c) holds C[r][c];
// convolution output pixel p is in PE p in row-major order).
// state exposes the control unit's present state.
module npu_top
  import npu_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              start,
  input  logic [2:0]                        select_operation,
  input  logic [7:0]                        config_mac_mult_adder,
  input  logic [3:0][3:0][15:0]             input_matrix,
  input  logic [3:0][3:0][15:0]             weight_matrix,
  input  logic [3:0][3:0][63:0]             ext_add_in,
  output logic [3:0][3:0][31:0]             out_mult4,
  output logic [3:0][3:0][31:0]             out_mult8,
  output logic [3:0][3:0][31:0]             out_mult16,
  output logic [3:0][3:0][7:0][4:0]         out_sum5,
  output logic [3:0][3:0][3:0][8:0]         out_sum9,
  output logic [3:0][3:0][1:0][16:0]        out_sum17,
  output logic [3:0][3:0][32:0]             out_sum33,
  output logic [3:0][3:0][31:0]             out_mac,
  output logic                              done,
  output cu_state_t                         state
);

  pe_ctrl_t   pctrl;
  dp_ctrl_t   dctrl;
  logic [3:0] cnt1, cnt2;

  control_unit u_cu (
    .clk(clk), .rst(rst), .start(start), .select_operation(select_operation),
    .config_mac_mult_adder(config_mac_mult_adder), .cnt1(cnt1), .cnt2(cnt2),
    .pctrl(pctrl), .dctrl(dctrl), .done(done), .state(state)
  );

  datapath u_dp (
    .clk(clk), .rst(rst), .dctrl(dctrl), .pctrl(pctrl),
    .input_matrix(input_matrix), .weight_matrix(weight_matrix), .ext_add_in(ext_add_in),
    .cnt1(cnt1), .cnt2(cnt2),
    .out4(out_mult4), .out8(out_mult8), .out16(out_mult16),
    .out5(out_sum5), .out9(out_sum9), .out17(out_sum17), .out33(out_sum33), .out_mac(out_mac)
  );

endmodule
