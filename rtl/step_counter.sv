// step_counter: schedule step counter (Counter_1 and Counter_2).
//
// Counts the MAC steps of a matrix multiplication or convolution: cleared
// when a schedule is generated (clr), incremented in the control unit's
// INC_CNT states (inc); clr wins.  Counter_1 serves the matrix
// multiplication and the 2x2 convolution (4 steps), Counter_2 the 3x3 and
// 4x4 convolutions (9 and 16 steps).  The width is this design's choice,
// the smallest that holds 16 steps.
module step_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] cnt
);

  always_ff @(posedge clk) begin
    if (rst || clr) cnt <= '0;
    else if (inc)   cnt <= cnt + 1'b1;
  end

endmodule
