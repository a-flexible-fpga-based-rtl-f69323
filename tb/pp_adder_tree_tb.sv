// pp_adder_tree_tb: checks the partial-product adder tree and its registers.
//
// Random 18-bit partial products are loaded with pp_en and the output
// registers with out_en one cycle later.  The selected output must hold,
// lane by lane, sum(PP(k) * 4^(k-k0)) over the digit group, truncated to
// the lane width and placed at lane N-1-g; the other two outputs must be
// zero.  Registers must not change without their enable.
module pp_adder_tree_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0, rst;
  prec_t prec;
  logic pp_en, out_en;
  logic [PP_W-1:0] pp [NDIG];
  logic [31:0] out4, out8, out16;
  int checks = 0, failures = 0;

  pp_adder_tree dut (.clk(clk), .rst(rst), .prec(prec), .pp_en(pp_en), .out_en(out_en),
                     .pp(pp), .out4(out4), .out8(out8), .out16(out16));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s prec=%b got %h expected %h", what, prec, got, exp);
    end
  endtask

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  initial begin
    rst = 1'b1; pp_en = 1'b0; out_en = 1'b0; prec = PREC16;
    for (int k = 0; k < NDIG; k++) pp[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int it = 0; it < 1000; it++) begin
      foreach (PRECS[i]) begin
        int n, dpg, lw;
        logic [31:0] e, old4;
        logic [PP_W-1:0] ppl [NDIG];
        @(negedge clk);
        prec = prec_t'(PRECS[i]);
        for (int k = 0; k < NDIG; k++) begin
          pp[k] = PP_W'($urandom);
          ppl[k] = pp[k];
        end
        pp_en = 1'b1;
        @(negedge clk);
        pp_en = 1'b0;
        for (int k = 0; k < NDIG; k++) pp[k] = PP_W'($urandom);   // must be ignored
        old4 = out4;
        out_en = 1'b0;
        @(negedge clk);
        check("hold without out_en", out4, old4);
        out_en = 1'b1;
        @(negedge clk);
        out_en = 1'b0;
        n = int'(nlanes(PRECS[i]));
        dpg = 8 / n;
        lw = 32 / n;
        e = '0;
        for (int g = 0; g < n; g++) begin
          longint acc;
          acc = 0;
          for (int d = dpg - 1; d >= 0; d--) acc = acc * 4 + longint'($signed(ppl[g * dpg + d]));
          for (int t = 0; t < lw; t++) e[(n - 1 - g) * lw + t] = acc[t];
        end
        check("out16", out16, (PRECS[i] == P16) ? e : 32'd0);
        check("out8",  out8,  (PRECS[i] == P8)  ? e : 32'd0);
        check("out4",  out4,  (PRECS[i] == P4)  ? e : 32'd0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
