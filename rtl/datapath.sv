// datapath: operand schedulers, operation multiplexer and PE array.
//
// The user matrices input_matrix (A / X) and weight_matrix (W / kernel)
// feed four schedulers: input_adjustment + load_input for matrix
// multiplication (Counter_1), and input_generation + load_conv for the 2x2
// (Counter_1), 3x3 and 4x4 (Counter_2) convolutions.  The operation
// multiplexer, steered by select_operation, hands the PE array either the
// user operands themselves (simple operations) or the registered step of
// one scheduler.  The structure follows the thesis' datapath figure;
// the kernel of a convolution is read from the top-left KxK corner of
// weight_matrix (this design's choice).
module datapath
  import npu_pkg::*;
(
  input  logic                                    clk,
  input  logic                                    rst,
  input  dp_ctrl_t                                dctrl,
  input  pe_ctrl_t                                pctrl,
  input  logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] input_matrix,
  input  logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] weight_matrix,
  input  logic [ARR_N-1:0][ARR_N-1:0][63:0]       ext_add_in,
  output logic [3:0]                              cnt1,
  output logic [3:0]                              cnt2,
  output logic [ARR_N-1:0][ARR_N-1:0][31:0]       out4,
  output logic [ARR_N-1:0][ARR_N-1:0][31:0]       out8,
  output logic [ARR_N-1:0][ARR_N-1:0][31:0]       out16,
  output logic [ARR_N-1:0][ARR_N-1:0][7:0][4:0]   out5,
  output logic [ARR_N-1:0][ARR_N-1:0][3:0][8:0]   out9,
  output logic [ARR_N-1:0][ARR_N-1:0][1:0][16:0]  out17,
  output logic [ARR_N-1:0][ARR_N-1:0][32:0]       out33,
  output logic [ARR_N-1:0][ARR_N-1:0][31:0]       out_mac
);

  typedef logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] mat_t;

  logic [MM_STEPS-1:0][ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] sched_a, sched_w;
  logic [8:0][3:0][DATA_W-1:0]  win2;
  logic [3:0][DATA_W-1:0]       ker2;
  logic [3:0][8:0][DATA_W-1:0]  win3;
  logic [8:0][DATA_W-1:0]       ker3;
  logic [0:0][15:0][DATA_W-1:0] win4;
  logic [15:0][DATA_W-1:0]      ker4;
  mat_t mm_a, mm_w, c2_a, c2_w, c3_a, c3_w, c4_a, c4_w, arr_a, arr_w;

  step_counter #(.WIDTH(4)) u_cnt1 (.clk(clk), .rst(rst), .clr(dctrl.cnt1_clr), .inc(dctrl.cnt1_inc), .cnt(cnt1));
  step_counter #(.WIDTH(4)) u_cnt2 (.clk(clk), .rst(rst), .clr(dctrl.cnt2_clr), .inc(dctrl.cnt2_inc), .cnt(cnt2));

  input_adjustment u_adj (
    .clk(clk), .rst(rst), .en(dctrl.gen_mm), .a(input_matrix), .w(weight_matrix),
    .sched_a(sched_a), .sched_w(sched_w)
  );
  load_input u_ld_mm (
    .clk(clk), .rst(rst), .load(dctrl.load_mm), .cnt(cnt1[1:0]),
    .sched_a(sched_a), .sched_w(sched_w), .arr_a(mm_a), .arr_w(mm_w)
  );

  input_generation #(.K(2)) u_gen2 (.clk(clk), .rst(rst), .en(dctrl.gen_c2), .x(input_matrix), .w(weight_matrix), .win(win2), .ker(ker2));
  input_generation #(.K(3)) u_gen3 (.clk(clk), .rst(rst), .en(dctrl.gen_c3), .x(input_matrix), .w(weight_matrix), .win(win3), .ker(ker3));
  input_generation #(.K(4)) u_gen4 (.clk(clk), .rst(rst), .en(dctrl.gen_c4), .x(input_matrix), .w(weight_matrix), .win(win4), .ker(ker4));

  load_conv #(.K(2)) u_ld_c2 (.clk(clk), .rst(rst), .load(dctrl.load_c2), .cnt(cnt1), .win(win2), .ker(ker2), .arr_a(c2_a), .arr_w(c2_w));
  load_conv #(.K(3)) u_ld_c3 (.clk(clk), .rst(rst), .load(dctrl.load_c3), .cnt(cnt2), .win(win3), .ker(ker3), .arr_a(c3_a), .arr_w(c3_w));
  load_conv #(.K(4)) u_ld_c4 (.clk(clk), .rst(rst), .load(dctrl.load_c4), .cnt(cnt2), .win(win4), .ker(ker4), .arr_a(c4_a), .arr_w(c4_w));

  // Operation multiplexer (select_operation).
  always_comb begin
    case (dctrl.op)
      OP_MM:    begin arr_a = mm_a; arr_w = mm_w; end
      OP_CONV2: begin arr_a = c2_a; arr_w = c2_w; end
      OP_CONV3: begin arr_a = c3_a; arr_w = c3_w; end
      OP_CONV4: begin arr_a = c4_a; arr_w = c4_w; end
      default:  begin arr_a = input_matrix; arr_w = weight_matrix; end
    endcase
  end

  pe_array #(.ROWS(ARR_N), .COLS(ARR_N)) u_array (
    .clk(clk), .rst(rst), .ctrl(pctrl), .in_a(arr_a), .in_w(arr_w), .ext_add(ext_add_in),
    .out4(out4), .out8(out8), .out16(out16), .out5(out5), .out9(out9),
    .out17(out17), .out33(out33), .out_mac(out_mac)
  );

endmodule
