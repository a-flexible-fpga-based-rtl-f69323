// mac_pe_tb: checks one processing element in its three roles.
//
// The control word is driven as the control unit would: multiplication
// (pp_en, mout_en), addition of external operands (add_in_en, add_out_en)
// and MAC (pp_en, mout_en, add_in_en, add_out_en over four cycles).  The
// MAC results of the thesis' traces are reproduced (8x8: 0x0303 x
// 0x0103 then 0x0103 x 0x0103 -> 0x0006000C; 4x4: 0x1213 x 0x0311 then
// 0x0203 x 0x0111 -> 0x00030401), then random MAC chains are compared with
// the reference accumulation.
module mac_pe_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0, rst;
  pe_ctrl_t ctrl;
  logic [15:0] in_a, in_w;
  logic [63:0] ext_add;
  logic [31:0] out4, out8, out16, out_mac;
  logic [7:0][4:0] out5;
  logic [3:0][8:0] out9;
  logic [1:0][16:0] out17;
  logic [32:0] out33;
  int checks = 0, failures = 0;

  mac_pe dut (.clk(clk), .rst(rst), .ctrl(ctrl), .in_a(in_a), .in_w(in_w), .ext_add(ext_add),
              .out4(out4), .out8(out8), .out16(out16), .out5(out5), .out9(out9), .out17(out17),
              .out33(out33), .out_mac(out_mac));

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

  function automatic pe_ctrl_t idle_ctrl(logic [2:0] p);
    pe_ctrl_t c;
    c = '0;
    c.prec = prec_t'(p);
    c.lanes = lanes_of_prec(prec_t'(p));
    c.osel = OSEL_MAC;
    return c;
  endfunction

  task automatic mac(logic [2:0] p, logic clr, logic [15:0] a, logic [15:0] w);
    @(negedge clk);
    ctrl = idle_ctrl(p); ctrl.pp_en = 1'b1; ctrl.acc_clr = clr; in_a = a; in_w = w;
    @(negedge clk);
    ctrl = idle_ctrl(p); ctrl.mout_en = 1'b1;
    @(negedge clk);
    ctrl = idle_ctrl(p); ctrl.add_in_en = 1'b1;
    @(negedge clk);
    ctrl = idle_ctrl(p); ctrl.add_out_en = 1'b1;
    @(negedge clk);
    ctrl = idle_ctrl(p);
  endtask

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  initial begin
    rst = 1'b1; ctrl = idle_ctrl(P16); in_a = '0; in_w = '0; ext_add = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // traces of the thesis
    mac(P8, 1'b1, 16'h0303, 16'h0103);
    check("trace 8x8 mult", longint'(out8), 64'h00090003);
    check("trace 8x8 first MAC", longint'(out_mac), 64'h00030009);
    mac(P8, 1'b0, 16'h0103, 16'h0103);
    check("trace 8x8 second MAC", longint'(out_mac), 64'h0006000C);
    mac(P4, 1'b1, 16'h1213, 16'h0311);
    check("trace 4x4 first MAC", longint'(out_mac), 64'h00030201);
    mac(P4, 1'b0, 16'h0203, 16'h0111);
    check("trace 4x4 second MAC", longint'(out_mac), 64'h00030401);
    mac(P16, 1'b1, 16'h0003, 16'h0001);
    mac(P16, 1'b0, 16'h0002, 16'h0001);
    check("trace 16x16 MAC", longint'(out_mac), 64'h5);
    // random MAC chains
    for (int it = 0; it < 200; it++) begin
      foreach (PRECS[i]) begin
        logic [31:0] e;
        e = '0;
        for (int k = 0; k < 4; k++) begin
          logic [15:0] a, w;
          a = 16'($urandom); w = 16'($urandom);
          mac(PRECS[i], k == 0, a, w);
          e = mac_ref(PRECS[i], e, a, w);
          check("mult", longint'({32'd0, (PRECS[i] == P4) ? out4 : (PRECS[i] == P8) ? out8 : out16}),
                longint'(mult_ref(PRECS[i], a, w)));
        end
        check("mac chain", longint'(out_mac), longint'(e));
      end
    end
    // external addition, 4-bit lanes
    for (int it = 0; it < 100; it++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      @(negedge clk);
      ctrl = idle_ctrl(P16); ctrl.add_ext = 1'b1; ctrl.lanes = LANE4; ctrl.osel = OSEL_5;
      ctrl.add_in_en = 1'b1; ext_add = {y, x};
      @(negedge clk);
      ctrl.add_in_en = 1'b0; ctrl.add_out_en = 1'b1;
      @(negedge clk);
      ctrl = idle_ctrl(P16);
      for (int l = 0; l < 8; l++) check("sum5", longint'(out5[l]), lane_sum(x, y, 4, l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
