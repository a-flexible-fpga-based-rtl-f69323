// input_generation_tb: checks the convolution schedules for K = 2, 3, 4.
//
// With X[i][j] = 16*i + j (the element names "ij" of the thesis' 2x2
// example table), row p of the K=2 schedule must list the window of pixel p:
// row 0 = 00 01 10 11, row 4 = 11 12 21 22, row 8 = 22 23 32 33.  All rows
// of all three instances, and the captured kernels, are then checked
// against a direct window computation on random matrices.
module input_generation_tb;
  import npu_pkg::*;

  logic clk = 1'b0, rst, en;
  logic [3:0][3:0][15:0] x, w;
  logic [8:0][3:0][15:0] win2;
  logic [3:0][15:0] ker2;
  logic [3:0][8:0][15:0] win3;
  logic [8:0][15:0] ker3;
  logic [0:0][15:0][15:0] win4;
  logic [15:0][15:0] ker4;
  int checks = 0, failures = 0;

  input_generation #(.K(2)) dut2 (.clk(clk), .rst(rst), .en(en), .x(x), .w(w), .win(win2), .ker(ker2));
  input_generation #(.K(3)) dut3 (.clk(clk), .rst(rst), .en(en), .x(x), .w(w), .win(win3), .ker(ker3));
  input_generation #(.K(4)) dut4 (.clk(clk), .rst(rst), .en(en), .x(x), .w(w), .win(win4), .ker(ker4));

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

  function automatic logic [15:0] winv(logic [3:0][3:0][15:0] m, int k, int p, int e);
    int ow;
    ow = 5 - k;
    return m[p / ow + e / k][p % ow + e % k];
  endfunction

  initial begin
    rst = 1'b1; en = 1'b0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin x[i][j] = 16'(16 * i + j); w[i][j] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    en = 1'b1;
    @(negedge clk) en = 1'b0;
    check("row0 e0", win2[0][0], 16'h00);
    check("row0 e1", win2[0][1], 16'h01);
    check("row0 e2", win2[0][2], 16'h10);
    check("row0 e3", win2[0][3], 16'h11);
    check("row4 e0", win2[4][0], 16'h11);
    check("row4 e3", win2[4][3], 16'h22);
    check("row8 e0", win2[8][0], 16'h22);
    check("row8 e3", win2[8][3], 16'h33);
    for (int it = 0; it < 200; it++) begin
      logic [3:0][3:0][15:0] kx, kw;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin x[i][j] = 16'($urandom); w[i][j] = 16'($urandom); end
      kx = x; kw = w;
      en = 1'b1;
      @(negedge clk) en = 1'b0;
      x = ~x;
      @(negedge clk);
      for (int p = 0; p < 9; p++)
        for (int e = 0; e < 4; e++) check("win2", win2[p][e], winv(kx, 2, p, e));
      for (int p = 0; p < 4; p++)
        for (int e = 0; e < 9; e++) check("win3", win3[p][e], winv(kx, 3, p, e));
      for (int e = 0; e < 16; e++) check("win4", win4[0][e], winv(kx, 4, 0, e));
      for (int e = 0; e < 4; e++)  check("ker2", ker2[e], kw[e / 2][e % 2]);
      for (int e = 0; e < 9; e++)  check("ker3", ker3[e], kw[e / 3][e % 3]);
      for (int e = 0; e < 16; e++) check("ker4", ker4[e], kw[e / 4][e % 4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
