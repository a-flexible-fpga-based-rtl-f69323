// load_input_tb: checks that load_input registers the schedule step chosen
// by the counter, and holds it while load is low.
module load_input_tb;
  import npu_pkg::*;

  logic clk = 1'b0, rst, load;
  logic [1:0] cnt;
  logic [3:0][3:0][3:0][15:0] sa, sw;
  logic [3:0][3:0][15:0] aa, aw;
  int checks = 0, failures = 0;

  load_input dut (.clk(clk), .rst(rst), .load(load), .cnt(cnt), .sched_a(sa), .sched_w(sw),
                  .arr_a(aa), .arr_w(aw));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; cnt = '0;
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          sa[k][r][c] = 16'($urandom); sw[k][r][c] = 16'($urandom);
        end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    checks++;
    if (aa !== '0) failures++;
    for (int it = 0; it < 400; it++) begin
      logic [1:0] k;
      logic [3:0][3:0][15:0] prev;
      k = 2'($urandom);
      cnt = k; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      checks++;
      if (aa !== sa[k] || aw !== sw[k]) begin
        failures++;
        $display("FAIL step %0d", k);
      end
      prev = aa;
      cnt = k + 2'd1;
      @(negedge clk);
      checks++;
      if (aa !== prev) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
