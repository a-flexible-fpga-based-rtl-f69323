// final_multiplier_tb: checks the precision-scalable multiplier end to end.
//
// Applies the operand pairs of the thesis' multiplication traces
// (e.g. 8x8: 0x0203 x 0x0301 -> 0x00020009; 4x4: 0x3112 x 0x2112 ->
// 0x06010104) and random operands at all three precisions, pulsing pp_en
// then out_en; the product must appear two cycles after the operands.
module final_multiplier_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0, rst;
  logic [15:0] a, b;
  prec_t prec;
  logic pp_en, out_en;
  logic [31:0] out4, out8, out16;
  int checks = 0, failures = 0;

  final_multiplier dut (.clk(clk), .rst(rst), .a(a), .b(b), .prec(prec), .pp_en(pp_en),
                        .out_en(out_en), .out4(out4), .out8(out8), .out16(out16));

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
      $display("FAIL %s a=%h b=%h prec=%b got %h expected %h", what, a, b, prec, got, exp);
    end
  endtask

  // Apply one operation: cycle 1 pp_en, cycle 2 out_en, result after cycle 2.
  task automatic mul(logic [2:0] p, logic [15:0] x, logic [15:0] y);
    @(negedge clk);
    prec = prec_t'(p); a = x; b = y; pp_en = 1'b1;
    @(negedge clk);
    pp_en = 1'b0; out_en = 1'b1; a = ~x;      // operands no longer matter
    @(negedge clk);
    out_en = 1'b0;
    a = x;
  endtask

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  initial begin
    rst = 1'b1; pp_en = 1'b0; out_en = 1'b0; a = '0; b = '0; prec = PREC16;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // values from the simulation traces of the thesis
    mul(P16, 16'h0005, 16'h0004); check("trace 16x16", out16, 32'h00000014);
    mul(P8,  16'h0303, 16'h0103); check("trace 8x8",   out8,  32'h00090003);
    mul(P8,  16'h0203, 16'h0301); check("trace 8x8",   out8,  32'h00020009);
    mul(P4,  16'h1213, 16'h0311); check("trace 4x4",   out4,  32'h01020300);
    mul(P4,  16'h3112, 16'h2112); check("trace 4x4",   out4,  32'h06010104);
    for (int it = 0; it < 1500; it++) begin
      foreach (PRECS[i]) begin
        logic [15:0] x, y;
        x = 16'($urandom); y = 16'($urandom);
        mul(PRECS[i], x, y);
        check("out16", out16, (PRECS[i] == P16) ? mult_ref(PRECS[i], x, y) : 32'd0);
        check("out8",  out8,  (PRECS[i] == P8)  ? mult_ref(PRECS[i], x, y) : 32'd0);
        check("out4",  out4,  (PRECS[i] == P4)  ? mult_ref(PRECS[i], x, y) : 32'd0);
      end
    end
    // latency: the output must not change after the first cycle alone
    @(negedge clk);
    prec = PREC16; a = 16'd3; b = 16'd7; pp_en = 1'b1;
    @(negedge clk);
    pp_en = 1'b0;
    check("not visible after one cycle", out16 == 32'd21 ? 32'd1 : 32'd0, 32'd0);
    out_en = 1'b1;
    @(negedge clk);
    out_en = 1'b0;
    check("visible after two cycles", out16, 32'd21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
