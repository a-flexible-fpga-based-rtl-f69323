// step_counter_tb: checks clear, increment, hold and wrap of the counter.
module step_counter_tb;
  logic clk = 1'b0, rst, clr, inc;
  logic [3:0] cnt;
  int checks = 0, failures = 0;
  int model;

  step_counter #(.WIDTH(4)) dut (.clk(clk), .rst(rst), .clr(clr), .inc(inc), .cnt(cnt));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; inc = 1'b0; model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int it = 0; it < 2000; it++) begin
      clr = ($urandom_range(0, 15) == 0);
      inc = 1'($urandom);
      @(negedge clk);
      if (clr) model = 0;
      else if (inc) model = (model + 1) % 16;
      checks++;
      if (cnt !== 4'(model)) begin
        failures++;
        $display("FAIL cnt=%0d expected %0d", cnt, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
