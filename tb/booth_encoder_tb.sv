// booth_encoder_tb: checks the configurable radix-4 Booth encoder.
//
// For every precision and random operands, the digits of each sub-word,
// weighted by 4^i inside the sub-word, must add up to the signed sub-word
// value, and every digit must be a legal {neg,one,two} code.  The eight
// triplet codes of the radix-4 table are also checked one by one.
module booth_encoder_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0;
  logic [15:0] b;
  prec_t prec;
  booth_digit_t digit [NDIG];
  int checks = 0, failures = 0;

  booth_encoder dut (.b(b), .prec(prec), .digit(digit));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dval(booth_digit_t d);
    longint v;
    v = d.two ? 2 : d.one ? 1 : 0;
    return d.neg ? -v : v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: b=%h prec=%b got %0d expected %0d", what, b, prec, got, exp);
    end
  endtask

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};
  // radix-4 table: triplet -> digit value
  localparam longint TABLE [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    // table, through digit 1 in 16x16 mode (triplet b[3], b[2], b[1])
    for (int t = 0; t < 8; t++) begin
      prec = PREC16;
      b = 16'(t << 1);
      #1;
      check("table", dval(digit[1]), TABLE[t]);
    end
    for (int it = 0; it < 2000; it++) begin
      foreach (PRECS[i]) begin
        int n, w, dpg;
        prec = prec_t'(PRECS[i]);
        b = 16'($urandom);
        if (it == 0) b = 16'h8888;
        if (it == 1) b = 16'h7777;
        #1;
        n = int'(nlanes(PRECS[i]));
        w = 16 / n;
        dpg = w / 2;
        for (int g = 0; g < n; g++) begin
          longint acc;
          acc = 0;
          for (int d = dpg - 1; d >= 0; d--) acc = acc * 4 + dval(digit[g * dpg + d]);
          check("sub-word value", acc, sub(b, g, w));
        end
        for (int k = 0; k < NDIG; k++) begin
          checks++;
          if (digit[k].one && digit[k].two) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
