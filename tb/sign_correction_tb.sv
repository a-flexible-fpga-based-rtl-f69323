// sign_correction_tb: checks that sign correction completes the negation.
//
// For random values v and random signs, the raw input is v or ~v (the
// selector's one's complement); the output must be v or -v in 18-bit two's
// complement.
module sign_correction_tb;
  import npu_pkg::*;

  logic clk = 1'b0;
  logic [PP_W-1:0] pp_raw [NDIG];
  logic [NDIG-1:0] neg;
  logic [PP_W-1:0] pp [NDIG];
  int checks = 0, failures = 0;

  sign_correction dut (.pp_raw(pp_raw), .neg(neg), .pp(pp));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int v [NDIG];
      for (int k = 0; k < NDIG; k++) begin
        v[k] = $urandom_range(0, 65536);
        neg[k] = 1'($urandom);
        pp_raw[k] = neg[k] ? ~PP_W'(v[k]) : PP_W'(v[k]);
      end
      #1;
      for (int k = 0; k < NDIG; k++) begin
        checks++;
        if (pp[k] !== (neg[k] ? PP_W'(-v[k]) : PP_W'(v[k]))) begin
          failures++;
          $display("FAIL k=%0d v=%0d neg=%b got %h", k, v[k], neg[k], pp[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
