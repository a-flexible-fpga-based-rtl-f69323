// load_input: sends one step of the matrix-multiplication schedule to the
// array.
//
// When load is high (LOAD_MM state) the step selected by Counter_1 is
// copied from the input_adjustment schedule into the array operand
// registers, which then hold it for the MAC of that step.
module load_input
  import npu_pkg::*;
(
  input  logic                                      clk,
  input  logic                                      rst,
  input  logic                                      load,
  input  logic [1:0]                                cnt,
  input  logic [MM_STEPS-1:0][ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] sched_a,
  input  logic [MM_STEPS-1:0][ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] sched_w,
  output logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0]   arr_a,
  output logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0]   arr_w
);

  always_ff @(posedge clk) begin
    if (rst) begin
      arr_a <= '0;
      arr_w <= '0;
    end else if (load) begin
      arr_a <= sched_a[cnt];
      arr_w <= sched_w[cnt];
    end
  end

endmodule
