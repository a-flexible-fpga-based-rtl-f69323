// input_adjustment: builds the matrix-multiplication schedule.
//
// PE (r,c) of the array computes element (r,c) of C = A x W by one MAC per
// step.  At step k it needs A[r][k] and W[k][c], so the schedule holds, for
// each of the four steps, two 4x4 matrices: sched_a[k][r][c] = A[r][k]
// (column k of A repeated along each row) and sched_w[k][r][c] = W[k][c]
// (row k of W repeated down each column).  This is the arrangement of the
// thesis' example, where the first step sends rows (3 3 3 3)...(1 1 1 1)
// and (1 4 7 1) repeated.  Smaller matrices are multiplied by padding A
// and W with zeros.
//
// The schedule is captured in registers when en is high (the control
// unit's INPUT_GENERATION state) and held afterwards.
module input_adjustment
  import npu_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst,
  input  logic                                      en,
  input  logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0]   a,
  input  logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0]   w,
  output logic [MM_STEPS-1:0][ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] sched_a,
  output logic [MM_STEPS-1:0][ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] sched_w
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sched_a <= '0;
      sched_w <= '0;
    end else if (en) begin
      for (int k = 0; k < MM_STEPS; k++)
        for (int r = 0; r < ARR_N; r++)
          for (int c = 0; c < ARR_N; c++) begin
            sched_a[k][r][c] <= a[r][k];
            sched_w[k][r][c] <= w[k][c];
          end
    end
  end

endmodule
