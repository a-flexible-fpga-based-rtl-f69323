// datapath_tb: drives the datapath with hand-written control sequences.
//
// Without the control unit, the test plays the state sequence of a matrix
// multiplication (generate, then per step load / MAC / wait / wait /
// enable / disable / increment) and of a 3x3 convolution, then a direct
// multiplication on the user operands, and compares the PE outputs with
// the reference arithmetic.  This exercises the operation multiplexer,
// both counters and each scheduler.
module datapath_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0, rst;
  dp_ctrl_t dctrl;
  pe_ctrl_t pctrl;
  logic [3:0][3:0][15:0] im, wm;
  logic [3:0][3:0][63:0] ext;
  logic [3:0] cnt1, cnt2;
  logic [3:0][3:0][31:0] o4, o8, o16, omac;
  logic [3:0][3:0][7:0][4:0] s5;
  logic [3:0][3:0][3:0][8:0] s9;
  logic [3:0][3:0][1:0][16:0] s17;
  logic [3:0][3:0][32:0] s33;
  int checks = 0, failures = 0;

  datapath dut (.clk(clk), .rst(rst), .dctrl(dctrl), .pctrl(pctrl), .input_matrix(im),
                .weight_matrix(wm), .ext_add_in(ext), .cnt1(cnt1), .cnt2(cnt2),
                .out4(o4), .out8(o8), .out16(o16), .out5(s5), .out9(s9), .out17(s17),
                .out33(s33), .out_mac(omac));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  task automatic base(op_t op, logic [2:0] p);
    dctrl = '0; dctrl.op = op;
    pctrl = '0; pctrl.prec = prec_t'(p); pctrl.lanes = lanes_of_prec(prec_t'(p)); pctrl.osel = OSEL_MAC;
  endtask

  // steps of a scheduled operation; which = 0 MM, 3 conv3
  task automatic scheduled(op_t op, logic [2:0] p, int nsteps);
    @(negedge clk);
    base(op, p);
    if (op == OP_MM) begin dctrl.gen_mm = 1; dctrl.cnt1_clr = 1; end
    else begin dctrl.gen_c3 = 1; dctrl.cnt2_clr = 1; end
    pctrl.acc_clr = 1;
    for (int s = 0; s < nsteps; s++) begin
      @(negedge clk); base(op, p);
      if (op == OP_MM) dctrl.load_mm = 1; else dctrl.load_c3 = 1;
      @(negedge clk); base(op, p); pctrl.pp_en = 1;
      @(negedge clk); base(op, p); pctrl.mout_en = 1;
      @(negedge clk); base(op, p); pctrl.add_in_en = 1;
      @(negedge clk); base(op, p); pctrl.add_out_en = 1;
      @(negedge clk); base(op, p);
      if (s != nsteps - 1) begin
        @(negedge clk); base(op, p);
        if (op == OP_MM) dctrl.cnt1_inc = 1; else dctrl.cnt2_inc = 1;
      end
    end
    @(negedge clk); base(op, p);
  endtask

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  initial begin
    rst = 1'b1; base(OP_SIMPLE, P16); ext = '0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin im[r][c] = '0; wm[r][c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    foreach (PRECS[i]) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        im[r][c] = 16'($urandom); wm[r][c] = 16'($urandom);
      end
      scheduled(OP_MM, PRECS[i], 4);
      check("cnt1 at end", longint'(cnt1), 3);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] e;
          e = '0;
          for (int k = 0; k < 4; k++) e = mac_ref(PRECS[i], e, im[r][k], wm[k][c]);
          check("mm", longint'(omac[r][c]), longint'(e));
        end
      scheduled(OP_CONV3, PRECS[i], 9);
      check("cnt2 at end", longint'(cnt2), 8);
      for (int p = 0; p < 16; p++) begin
        logic [31:0] e;
        e = '0;
        if (p < 4)
          for (int k = 0; k < 9; k++) e = mac_ref(PRECS[i], e, im[p / 2 + k / 3][p % 2 + k % 3], wm[k / 3][k % 3]);
        check("conv3", longint'(omac[p / 4][p % 4]), longint'(e));
      end
      // direct multiplication on the user operands
      @(negedge clk); base(OP_SIMPLE, PRECS[i]); pctrl.pp_en = 1;
      @(negedge clk); base(OP_SIMPLE, PRECS[i]); pctrl.mout_en = 1;
      @(negedge clk); base(OP_SIMPLE, PRECS[i]);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          check("mult", longint'({32'd0, (PRECS[i] == P4) ? o4[r][c] : (PRECS[i] == P8) ? o8[r][c] : o16[r][c]}),
                longint'(mult_ref(PRECS[i], im[r][c], wm[r][c])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
