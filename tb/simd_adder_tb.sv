// simd_adder_tb: checks the configurable adder and its registers.
//
// External operands at every partition: each lane's {carry, sum} must land
// in its output register (5, 9, 17, 33 bit; 32-bit without carry in the MAC
// register).  Then accumulation: a series of random 32-bit values is added
// into the MAC register with 4x8-, 2x16- and 1x32-bit lanes, each lane
// wrapping on its own, and acc_clr must clear it.
module simd_adder_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0, rst;
  logic [63:0] ext_in;
  logic [31:0] mult_in;
  logic add_ext, in_en, out_en, acc_clr;
  lanes_t lanes;
  osel_t osel;
  logic [7:0][4:0] out5;
  logic [3:0][8:0] out9;
  logic [1:0][16:0] out17;
  logic [32:0] out33;
  logic [31:0] out_mac;
  int checks = 0, failures = 0;

  simd_adder dut (.clk(clk), .rst(rst), .ext_in(ext_in), .mult_in(mult_in), .add_ext(add_ext),
                  .in_en(in_en), .out_en(out_en), .lanes(lanes), .osel(osel), .acc_clr(acc_clr),
                  .out5(out5), .out9(out9), .out17(out17), .out33(out33), .out_mac(out_mac));

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

  // one addition: cycle 1 in_en, cycle 2 out_en
  task automatic add_op(logic ext, lanes_t l, osel_t o);
    @(negedge clk);
    add_ext = ext; lanes = l; osel = o; in_en = 1'b1;
    @(negedge clk);
    in_en = 1'b0; out_en = 1'b1;
    ext_in = ~ext_in; mult_in = ~mult_in;     // must not matter any more
    @(negedge clk);
    out_en = 1'b0;
  endtask

  initial begin
    rst = 1'b1; in_en = 0; out_en = 0; acc_clr = 0; add_ext = 1; ext_in = '0; mult_in = '0;
    lanes = LANE32; osel = OSEL_MAC;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int it = 0; it < 500; it++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (it == 0) begin x = 32'hFFFF_FFFF; y = 32'h0000_0001; end
      ext_in = {y, x};
      add_op(1'b1, LANE4, OSEL_5);
      for (int l = 0; l < 8; l++) check("sum5", longint'(out5[l]), lane_sum(x, y, 4, l));
      ext_in = {y, x};
      add_op(1'b1, LANE8, OSEL_9);
      for (int l = 0; l < 4; l++) check("sum9", longint'(out9[l]), lane_sum(x, y, 8, l));
      ext_in = {y, x};
      add_op(1'b1, LANE16, OSEL_17);
      for (int l = 0; l < 2; l++) check("sum17", longint'(out17[l]), lane_sum(x, y, 16, l));
      ext_in = {y, x};
      add_op(1'b1, LANE32, OSEL_33);
      check("sum33", longint'(out33), lane_sum(x, y, 32, 0));
      ext_in = {y, x};
      add_op(1'b1, LANE32, OSEL_MAC);
      check("sum32", longint'(out_mac), longint'(32'(x + y)));
    end
    // accumulation
    begin
      static lanes_t ls [3] = '{LANE8, LANE16, LANE32};
      static int lws [3] = '{8, 16, 32};
      foreach (ls[i]) begin
        logic [31:0] e;
        @(negedge clk) acc_clr = 1'b1;
        @(negedge clk) acc_clr = 1'b0;
        check("cleared", longint'(out_mac), 0);
        e = '0;
        for (int k = 0; k < 20; k++) begin
          mult_in = $urandom;
          for (int l = 0; l < 32 / lws[i]; l++) begin
            longint v;
            v = lane_sum(e, mult_in, lws[i], l);
            for (int t = 0; t < lws[i]; t++) e[l * lws[i] + t] = v[t];
          end
          add_op(1'b0, ls[i], OSEL_MAC);
          check("accumulate", longint'(out_mac), longint'(e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
