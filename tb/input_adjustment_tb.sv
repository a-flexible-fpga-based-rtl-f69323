// input_adjustment_tb: checks the matrix-multiplication schedule.
//
// Uses the thesis' example first (A rows 3 5 1 0 / 0 4 7 0 / 0 0 1 1 /
// 1 1 1 1, W rows 1 4 7 1 / 1 0 0 1 / ...): step 0 must send the columns
// (3,0,0,1) of A repeated and row (1,4,7,1) of W repeated.  Then random
// matrices; the schedule must hold while en is low.
module input_adjustment_tb;
  import npu_pkg::*;

  logic clk = 1'b0, rst, en;
  logic [3:0][3:0][15:0] a, w;
  logic [3:0][3:0][3:0][15:0] sa, sw;
  int checks = 0, failures = 0;

  input_adjustment dut (.clk(clk), .rst(rst), .en(en), .a(a), .w(w), .sched_a(sa), .sched_w(sw));

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

  task automatic verify(logic [3:0][3:0][15:0] ra, logic [3:0][3:0][15:0] rw);
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          check("input", sa[k][r][c], ra[r][k]);
          check("weight", sw[k][r][c], rw[k][c]);
        end
  endtask

  initial begin
    logic [3:0][3:0][15:0] ka, kw;
    static int ea [4][4] = '{'{3,5,1,0}, '{0,4,7,0}, '{0,0,1,1}, '{1,1,1,1}};
    static int ew [4][4] = '{'{1,4,7,1}, '{1,0,0,1}, '{2,6,9,1}, '{0,0,1,1}};
    rst = 1'b1; en = 1'b0; a = '0; w = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        a[r][c] = 16'(ea[r][c]); w[r][c] = 16'(ew[r][c]);
      end
    en = 1'b1;
    @(negedge clk) en = 1'b0;
    for (int r = 0; r < 4; r++) begin
      check("example step 0 input", sa[0][r][2], 16'(ea[r][0]));
      check("example step 1 input", sa[1][r][0], 16'(ea[r][1]));
    end
    check("example step 0 weight", sw[0][3][1], 16'd4);
    check("example step 1 weight", sw[1][2][3], 16'd1);
    for (int it = 0; it < 200; it++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          a[r][c] = 16'($urandom); w[r][c] = 16'($urandom);
        end
      ka = a; kw = w;
      en = 1'b1;
      @(negedge clk) en = 1'b0;
      a = ~a; w = ~w;
      @(negedge clk);
      verify(ka, kw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
