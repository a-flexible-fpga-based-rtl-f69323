// booth_encoder: precision-configurable radix-4 Booth encoder.
//
// The 16-bit multiplier operand b is cut into eight overlapping triplets
// (b[2k+1], b[2k], b[2k-1]); each triplet becomes one digit in
// {-2,-1,0,+1,+2} following the radix-4 table of the thesis
// (000->0, 001/010->+1, 011->+2, 100->-2, 101/110->-1, 111->0).
// To split the operand into independent signed sub-words, the lower bit
// b[2k-1] of the first digit of each sub-word is forced to 0: digit 0 in
// 16x16 mode, digits 0 and 4 in 8x8 mode, digits 0, 2, 4 and 6 in 4x4 mode.
// The thesis states this as the job of the configuration blocks in front
// of the encoder; how the boundary is cut is this design's own reading.
//
// Purely combinational.
module booth_encoder
  import npu_pkg::*;
(
  input  logic [DATA_W-1:0] b,
  input  prec_t             prec,
  output booth_digit_t      digit [NDIG]
);

  always_comb begin
    for (int k = 0; k < NDIG; k++) begin
      logic boundary;
      logic [2:0] trip;
      case (prec)
        PREC8:   boundary = (k % 4) == 0;
        PREC4:   boundary = (k % 2) == 0;
        default: boundary = (k == 0);
      endcase
      trip[2] = b[2*k+1];
      trip[1] = b[2*k];
      trip[0] = boundary ? 1'b0 : b[(2*k+15) % 16];
      digit[k].neg = trip[2] & ~(trip[1] & trip[0]);
      digit[k].one = trip[1] ^ trip[0];
      digit[k].two = (trip == 3'b011) || (trip == 3'b100);
    end
  end

endmodule
