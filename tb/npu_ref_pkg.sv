// npu_ref_pkg: reference arithmetic for the NPU testbenches.
//
// Computes, with plain integer arithmetic and independently of the RTL
// structure, the packed products, the packed MAC accumulation and the
// lane-wise sums the NPU must produce.
package npu_ref_pkg;

  // Precision codes (config_mac_mult_adder[4:2]).
  localparam logic [2:0] P16 = 3'b000, P8 = 3'b010, P4 = 3'b001;

  function automatic int unsigned nlanes(logic [2:0] p);
    return (p == P4) ? 4 : (p == P8) ? 2 : 1;
  endfunction

  // Signed value of sub-word i (width w) of x.
  function automatic longint sub(logic [15:0] x, int i, int w);
    longint v;
    v = (64'(x) >> (i * w)) & ((64'd1 << w) - 1);
    if (v >= (64'sd1 << (w - 1))) v = v - (64'sd1 << w);
    return v;
  endfunction

  // Product of lane j of the multiplier output (lane j at bits j*W2 up):
  // a's sub-word j times b's sub-word N-1-j.
  function automatic logic [31:0] mult_ref(logic [2:0] p, logic [15:0] a, logic [15:0] b);
    int n, w;
    logic [31:0] r;
    longint prod;
    n = int'(nlanes(p));
    w = 16 / n;
    r = '0;
    for (int j = 0; j < n; j++) begin
      prod = sub(a, j, w) * sub(b, n - 1 - j, w);
      for (int t = 0; t < 2 * w; t++) r[j * 2 * w + t] = prod[t];
    end
    return r;
  endfunction

  // One MAC step: lane g of the accumulator (bits g*32/N up) adds
  // a's sub-word N-1-g times b's sub-word g, wrapping inside the lane.
  function automatic logic [31:0] mac_ref(logic [2:0] p, logic [31:0] acc,
                                          logic [15:0] a, logic [15:0] b);
    int n, w, lw;
    logic [31:0] r;
    longint prod, lane;
    n  = int'(nlanes(p));
    w  = 16 / n;
    lw = 32 / n;
    r  = '0;
    for (int g = 0; g < n; g++) begin
      prod = sub(a, n - 1 - g, w) * sub(b, g, w);
      lane = longint'((64'(acc) >> (g * lw)) & ((64'd1 << lw) - 1)) + prod;
      for (int t = 0; t < lw; t++) r[g * lw + t] = lane[t];
    end
    return r;
  endfunction

  // Unsigned lane sum of x and y with lane width lw: {carry, sum} of lane i.
  function automatic longint lane_sum(logic [31:0] x, logic [31:0] y, int lw, int i);
    longint m;
    m = (64'd1 << lw) - 1;
    return ((longint'(x) >> (i * lw)) & m) + ((longint'(y) >> (i * lw)) & m);
  endfunction

endpackage
