// load_conv: sends one step of a KxK convolution schedule to the array
// (the thesis' Load C2, Load C3 and Load C4 blocks).
//
// When load is high, PE p (row-major index r*4+c) receives the input value
// win[p][cnt] and the kernel value ker[cnt]; PEs beyond the (5-K)^2 output
// pixels receive zero, so their MAC adds nothing.  The result of output
// pixel p therefore accumulates in PE p: PEs 0..8 for K=2, PEs 0..3 for
// K=3, PE 0 for K=4.
module load_conv
  import npu_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic                                    load,
  input  logic [3:0]                              cnt,
  input  logic [(5-K)*(5-K)-1:0][K*K-1:0][DATA_W-1:0] win,
  input  logic [K*K-1:0][DATA_W-1:0]              ker,
  output logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] arr_a,
  output logic [ARR_N-1:0][ARR_N-1:0][DATA_W-1:0] arr_w
);

  localparam int unsigned NPIX = (5 - K) * (5 - K);

  always_ff @(posedge clk) begin
    if (rst) begin
      arr_a <= '0;
      arr_w <= '0;
    end else if (load) begin
      for (int p = 0; p < ARR_N * ARR_N; p++) begin
        arr_a[p / ARR_N][p % ARR_N] <= '0;
        arr_w[p / ARR_N][p % ARR_N] <= '0;
      end
      if (int'(cnt) < K * K) begin
        for (int p = 0; p < NPIX; p++) begin
          arr_a[p / ARR_N][p % ARR_N] <= win[p][cnt];
          arr_w[p / ARR_N][p % ARR_N] <= ker[cnt];
        end
      end
    end
  end

endmodule
