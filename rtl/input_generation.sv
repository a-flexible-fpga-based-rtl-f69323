// input_generation: builds the convolution schedule for a KxK kernel.
//
// The input is a 4x4 matrix X, the kernel the top-left KxK corner of the
// weight matrix W.  There are P = (5-K)^2 output pixels, one per PE: nine
// PEs for K=2, four for K=3, one for K=4, as in the thesis.  Row p of the
// schedule lists, in row-major order, the K*K input values of pixel p's
// window: win[p][kr*K+kc] = X[pr+kr][pc+kc] with p = pr*(5-K)+pc.  For K=2
// row 0 is X00 X01 X10 X11, row 1 X01 X02 X11 X12, and so on, the table
// printed in the thesis.  ker[kr*K+kc] = W[kr][kc].  The kernel is not
// flipped (cross-correlation, as the thesis' results show).
//
// Captured in registers while en is high (INPUT_GENERATION_<K>X state).
module input_generation
  import npu_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic                                    en,
  input  logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] x,
  input  logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] w,
  output logic [(5-K)*(5-K)-1:0][K*K-1:0][DATA_W-1:0] win,
  output logic [K*K-1:0][DATA_W-1:0]              ker
);

  localparam int unsigned OW = 5 - K;   // output width of the valid convolution

  always_ff @(posedge clk) begin
    if (rst) begin
      win <= '0;
      ker <= '0;
    end else if (en) begin
      for (int pr = 0; pr < OW; pr++)
        for (int pc = 0; pc < OW; pc++)
          for (int kr = 0; kr < K; kr++)
            for (int kc = 0; kc < K; kc++)
              win[pr*OW + pc][kr*K + kc] <= x[pr + kr][pc + kc];
      for (int kr = 0; kr < K; kr++)
        for (int kc = 0; kc < K; kc++)
          ker[kr*K + kc] <= w[kr][kc];
    end
  end

endmodule
