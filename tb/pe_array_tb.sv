// pe_array_tb: checks that every PE of the 4x4 array computes on its own
// operands under the shared control word (multiplication at all three
// precisions, then a two-step MAC).
module pe_array_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0, rst;
  pe_ctrl_t ctrl;
  logic [3:0][3:0][15:0] in_a, in_w;
  logic [3:0][3:0][63:0] ext_add;
  logic [3:0][3:0][31:0] out4, out8, out16, out_mac;
  logic [3:0][3:0][7:0][4:0] out5;
  logic [3:0][3:0][3:0][8:0] out9;
  logic [3:0][3:0][1:0][16:0] out17;
  logic [3:0][3:0][32:0] out33;
  int checks = 0, failures = 0;

  pe_array dut (.clk(clk), .rst(rst), .ctrl(ctrl), .in_a(in_a), .in_w(in_w), .ext_add(ext_add),
                .out4(out4), .out8(out8), .out16(out16), .out5(out5), .out9(out9),
                .out17(out17), .out33(out33), .out_mac(out_mac));

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

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  task automatic step(pe_ctrl_t c);
    @(negedge clk) ctrl = c;
  endtask

  initial begin
    rst = 1'b1; ctrl = '0; in_a = '0; in_w = '0; ext_add = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int it = 0; it < 50; it++) begin
      foreach (PRECS[i]) begin
        pe_ctrl_t c;
        logic [3:0][3:0][15:0] a0, w0;
        logic [3:0][3:0][31:0] e;
        c = '0; c.prec = prec_t'(PRECS[i]); c.lanes = lanes_of_prec(c.prec); c.osel = OSEL_MAC;
        for (int r = 0; r < 4; r++)
          for (int q = 0; q < 4; q++) begin
            in_a[r][q] = 16'($urandom); in_w[r][q] = 16'($urandom);
          end
        a0 = in_a; w0 = in_w;
        c.pp_en = 1; c.acc_clr = 1; step(c); c.pp_en = 0; c.acc_clr = 0;
        c.mout_en = 1; step(c); c.mout_en = 0;
        c.add_in_en = 1; step(c); c.add_in_en = 0;
        for (int r = 0; r < 4; r++)
          for (int q = 0; q < 4; q++)
            check("mult", longint'({32'd0, (PRECS[i] == P4) ? out4[r][q] : (PRECS[i] == P8) ? out8[r][q] : out16[r][q]}),
                  longint'(mult_ref(PRECS[i], a0[r][q], w0[r][q])));
        c.add_out_en = 1; step(c); c.add_out_en = 0;
        // second step
        for (int r = 0; r < 4; r++)
          for (int q = 0; q < 4; q++) begin
            in_a[r][q] = 16'($urandom); in_w[r][q] = 16'($urandom);
          end
        c.pp_en = 1; step(c); c.pp_en = 0;
        c.mout_en = 1; step(c); c.mout_en = 0;
        c.add_in_en = 1; step(c); c.add_in_en = 0;
        c.add_out_en = 1; step(c); c.add_out_en = 0;
        step(c);
        for (int r = 0; r < 4; r++)
          for (int q = 0; q < 4; q++) begin
            e[r][q] = mac_ref(PRECS[i], mac_ref(PRECS[i], 32'd0, a0[r][q], w0[r][q]), in_a[r][q], in_w[r][q]);
            check("mac", longint'(out_mac[r][q]), longint'(e[r][q]));
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
