// adder4: one 4-bit slice of the PE adder.
//
// Adds two 4-bit operands and a carry-in.  A multiplexer picks the carry-in:
// 0 when the slice starts a lane (chain = 0), or the carry-out of the slice
// below when the slice extends a wider lane (chain = 1).  This carry
// multiplexer is the thesis' mechanism for joining slices into 8-, 16-
// and 32-bit adders.  The thesis also chains a 'valid' signal so a slice
// waits for the carry of the previous one; in this synchronous design the
// ripple settles within the clock cycle, so no valid chain is needed.
//
// Purely combinational.
module adder4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       chain,
  input  logic       cin_prev,
  output logic [3:0] s,
  output logic       cout
);

  logic cin;

  always_comb begin
    cin         = chain ? cin_prev : 1'b0;
    {cout, s}   = {1'b0, x} + {1'b0, y} + {4'b0, cin};
  end

endmodule
