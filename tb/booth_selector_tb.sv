// booth_selector_tb: checks the raw partial products of the selector.
//
// Random multiplicands and random legal digits, every precision: PPk must
// be (|digit| x sub-word) sign-extended to 18 bits, bit-inverted when the
// digit is negative, where the sub-word is a's sub-word N-1-g for digit
// group g; neg must copy the digit's sign.
module booth_selector_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0;
  logic [15:0] a;
  prec_t prec;
  booth_digit_t digit [NDIG];
  logic [PP_W-1:0] pp_raw [NDIG];
  logic [NDIG-1:0] neg;
  int checks = 0, failures = 0;

  booth_selector dut (.a(a), .prec(prec), .digit(digit), .pp_raw(pp_raw), .neg(neg));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  initial begin
    for (int it = 0; it < 2000; it++) begin
      foreach (PRECS[i]) begin
        int n, w, dpg;
        int mag [NDIG];
        prec = prec_t'(PRECS[i]);
        a = 16'($urandom);
        for (int k = 0; k < NDIG; k++) begin
          mag[k] = $urandom_range(0, 2);
          digit[k].one = (mag[k] == 1);
          digit[k].two = (mag[k] == 2);
          digit[k].neg = 1'($urandom);
        end
        #1;
        n = int'(nlanes(PRECS[i]));
        w = 16 / n;
        dpg = w / 2;
        for (int k = 0; k < NDIG; k++) begin
          longint v;
          logic [PP_W-1:0] e;
          v = longint'(mag[k]) * sub(a, n - 1 - k / dpg, w);
          e = PP_W'(v);
          if (digit[k].neg) e = ~e;
          checks++;
          if (pp_raw[k] !== e || neg[k] !== digit[k].neg) begin
            failures++;
            $display("FAIL k=%0d a=%h prec=%b got %h expected %h", k, a, prec, pp_raw[k], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
