// booth_multiplier_tb: checks the partial products of the Booth front end.
//
// Random operands at every precision: inside each digit group g, the
// partial products weighted by 4^i must add up to the signed product of
// a's sub-word N-1-g and b's sub-word g.  Extreme values (-8, -128,
// -32768, maximum positive) are included.
module booth_multiplier_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0;
  logic [15:0] a, b;
  prec_t prec;
  logic [PP_W-1:0] pp [NDIG];
  int checks = 0, failures = 0;

  booth_multiplier dut (.a(a), .b(b), .prec(prec), .pp(pp));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};
  localparam logic [15:0] EDGE [4] = '{16'h8888, 16'h8080, 16'h8000, 16'h7777};

  initial begin
    for (int it = 0; it < 3000; it++) begin
      foreach (PRECS[i]) begin
        int n, w, dpg;
        prec = prec_t'(PRECS[i]);
        a = (it < 4) ? EDGE[it] : 16'($urandom);
        b = (it < 4) ? EDGE[3 - it] : 16'($urandom);
        if (it == 4) begin a = 16'h8000; b = 16'h8000; end
        #1;
        n = int'(nlanes(PRECS[i]));
        w = 16 / n;
        dpg = w / 2;
        for (int g = 0; g < n; g++) begin
          longint acc;
          acc = 0;
          for (int d = dpg - 1; d >= 0; d--)
            acc = acc * 4 + longint'($signed(pp[g * dpg + d]));
          checks++;
          if (acc != sub(a, n - 1 - g, w) * sub(b, g, w)) begin
            failures++;
            $display("FAIL a=%h b=%h prec=%b group %0d got %0d", a, b, prec, g, acc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
