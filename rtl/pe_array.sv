// pe_array: ROWS x COLS array of mac_pe processing elements.
//
// All PEs share one control word from the control unit and so always run
// the same operation at the same precision; each PE has its own operands
// and output registers.  The thesis' array is 4x4 (16 PEs); ROWS and
// COLS default to that.
module pe_array
  import npu_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  pe_ctrl_t                             ctrl,
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0] in_a,
  input  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0] in_w,
  input  logic [ROWS-1:0][COLS-1:0][63:0]       ext_add,
  output logic [ROWS-1:0][COLS-1:0][31:0]       out4,
  output logic [ROWS-1:0][COLS-1:0][31:0]       out8,
  output logic [ROWS-1:0][COLS-1:0][31:0]       out16,
  output logic [ROWS-1:0][COLS-1:0][7:0][4:0]   out5,
  output logic [ROWS-1:0][COLS-1:0][3:0][8:0]   out9,
  output logic [ROWS-1:0][COLS-1:0][1:0][16:0]  out17,
  output logic [ROWS-1:0][COLS-1:0][32:0]       out33,
  output logic [ROWS-1:0][COLS-1:0][31:0]       out_mac
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mac_pe u_pe (
        .clk(clk), .rst(rst), .ctrl(ctrl),
        .in_a(in_a[r][c]), .in_w(in_w[r][c]), .ext_add(ext_add[r][c]),
        .out4(out4[r][c]), .out8(out8[r][c]), .out16(out16[r][c]),
        .out5(out5[r][c]), .out9(out9[r][c]), .out17(out17[r][c]),
        .out33(out33[r][c]), .out_mac(out_mac[r][c])
      );
    end
  end

endmodule
