// load_conv_tb: checks the convolution load blocks for K = 2, 3, 4.
//
// For each step cnt, PE p (row-major) must receive window value p[cnt] and
// kernel value [cnt] if p is one of the (5-K)^2 output pixels, and zero
// otherwise; the registers hold while load is low.
module load_conv_tb;
  import npu_pkg::*;

  logic clk = 1'b0, rst, load;
  logic [3:0] cnt;
  logic [8:0][3:0][15:0] win2;
  logic [3:0][15:0] ker2;
  logic [3:0][8:0][15:0] win3;
  logic [8:0][15:0] ker3;
  logic [0:0][15:0][15:0] win4;
  logic [15:0][15:0] ker4;
  logic [3:0][3:0][15:0] a2, w2, a3, w3, a4, w4;
  int checks = 0, failures = 0;

  load_conv #(.K(2)) dut2 (.clk(clk), .rst(rst), .load(load), .cnt(cnt), .win(win2), .ker(ker2), .arr_a(a2), .arr_w(w2));
  load_conv #(.K(3)) dut3 (.clk(clk), .rst(rst), .load(load), .cnt(cnt), .win(win3), .ker(ker3), .arr_a(a3), .arr_w(w3));
  load_conv #(.K(4)) dut4 (.clk(clk), .rst(rst), .load(load), .cnt(cnt), .win(win4), .ker(ker4), .arr_a(a4), .arr_w(w4));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; cnt = '0;
    for (int p = 0; p < 9; p++) for (int e = 0; e < 4; e++) win2[p][e] = 16'($urandom);
    for (int p = 0; p < 4; p++) for (int e = 0; e < 9; e++) win3[p][e] = 16'($urandom);
    for (int e = 0; e < 16; e++) win4[0][e] = 16'($urandom);
    for (int e = 0; e < 4; e++) ker2[e] = 16'($urandom);
    for (int e = 0; e < 9; e++) ker3[e] = 16'($urandom);
    for (int e = 0; e < 16; e++) ker4[e] = 16'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int step = 0; step < 16; step++) begin
      cnt = 4'(step); load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int p = 0; p < 16; p++) begin
        if (step < 4) begin
          check("c2 in", a2[p / 4][p % 4], (p < 9) ? win2[p][step] : 16'd0);
          check("c2 w",  w2[p / 4][p % 4], (p < 9) ? ker2[step] : 16'd0);
        end
        if (step < 9) begin
          check("c3 in", a3[p / 4][p % 4], (p < 4) ? win3[p][step] : 16'd0);
          check("c3 w",  w3[p / 4][p % 4], (p < 4) ? ker3[step] : 16'd0);
        end
        check("c4 in", a4[p / 4][p % 4], (p < 1) ? win4[0][step] : 16'd0);
        check("c4 w",  w4[p / 4][p % 4], (p < 1) ? ker4[step] : 16'd0);
      end
      cnt = 4'(step + 5);
      @(negedge clk);
      check("hold", a4[0][0], win4[0][step]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
