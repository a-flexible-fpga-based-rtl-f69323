// adder4_tb: exhaustive check of the 4-bit adder slice and its carry mux.
module adder4_tb;
  logic clk = 1'b0;
  logic [3:0] x, y, s;
  logic chain, cin_prev, cout;
  int checks = 0, failures = 0;

  adder4 dut (.x(x), .y(y), .chain(chain), .cin_prev(cin_prev), .s(s), .cout(cout));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int m = 0; m < 4; m++) begin
          int e;
          x = 4'(i); y = 4'(j); chain = m[1]; cin_prev = m[0];
          #1;
          e = i + j + ((m == 3) ? 1 : 0);
          checks++;
          if ({cout, s} !== 5'(e)) begin
            failures++;
            $display("FAIL %0d+%0d chain=%b cin=%b got %0d", i, j, chain, cin_prev, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
