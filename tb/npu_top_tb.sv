// npu_top_tb: end-to-end test of the NPU at its default size.
//
// Runs every operation the control unit offers, at each precision, on
// random operands: parallel multiplication, parallel addition in the five
// adder configurations, two chained MACs, 4x4 matrix multiplication and
// 2x2/3x3/4x4 convolutions, plus an invalid command.  Every output
// register is compared with npu_ref_pkg arithmetic, and the cycle count
// from the first state of an operation to S_DONE is checked against the
// latencies of the design (2, 2, 28, 28, 63, 112; 4 per chained MAC).
// Each mechanism (lane wrap of a packed accumulation, carry-out of an
// unsigned lane sum, MAC continuation, rejected command, each counter)
// is counted and must occur at least once.  The matrix multiplication and
// convolution examples published with the original design are replayed
// and their printed result words compared.
module npu_top_tb;
  import npu_pkg::*;
  import npu_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic start;
  logic [2:0] sel;
  logic [7:0] cfg;
  logic [3:0][3:0][15:0] im, wm;
  logic [3:0][3:0][63:0] ext;
  logic [3:0][3:0][31:0] o4, o8, o16, omac;
  logic [3:0][3:0][7:0][4:0]  s5;
  logic [3:0][3:0][3:0][8:0]  s9;
  logic [3:0][3:0][1:0][16:0] s17;
  logic [3:0][3:0][32:0]      s33;
  logic done;
  cu_state_t st;

  int checks = 0, failures = 0;
  int n_mult = 0, n_add = 0, n_mac_chain = 0, n_mm = 0, n_conv = 0;
  int n_wrap = 0, n_carry = 0, n_reject = 0, n_cnt1 = 0, n_cnt2 = 0, n_example = 0;
  longint cycle = 0;

  npu_top dut (
    .clk(clk), .rst(rst), .start(start), .select_operation(sel),
    .config_mac_mult_adder(cfg), .input_matrix(im), .weight_matrix(wm), .ext_add_in(ext),
    .out_mult4(o4), .out_mult8(o8), .out_mult16(o16), .out_sum5(s5), .out_sum9(s9),
    .out_sum17(s17), .out_sum33(s33), .out_mac(omac), .done(done), .state(st)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) begin
    if (st == INC_CNT1) n_cnt1++;
    if (st == INC_CNT2) n_cnt2++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] rnd16();
    return 16'($urandom);
  endfunction

  // Issue a command, wait for done, return cycles from first state to S_DONE.
  task automatic run(logic [2:0] s, logic [7:0] c, output int lat);
    longint t0;
    @(negedge clk);
    sel = s; cfg = c; start = 1'b1;
    do begin @(posedge clk); #1; end while (st == IDLE);
    t0 = cycle;
    start = 1'b0;
    while (!done) begin @(posedge clk); #1; end
    lat = int'(cycle - t0);
  endtask

  task automatic randomize_inputs();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        im[r][c]  = rnd16();
        wm[r][c]  = rnd16();
        ext[r][c] = {$urandom, $urandom};
      end
  endtask

  localparam logic [2:0] PRECS [3] = '{P16, P8, P4};

  task automatic test_mult();
    int lat;
    foreach (PRECS[i]) begin
      randomize_inputs();
      run(3'b000, {3'b000, PRECS[i], 2'b00}, lat);
      check("mult latency", 64'(lat), 64'd2);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] e;
          e = mult_ref(PRECS[i], im[r][c], wm[r][c]);
          check("mult16", 64'(o16[r][c]), (PRECS[i] == P16) ? 64'(e) : 64'd0);
          check("mult8",  64'(o8[r][c]),  (PRECS[i] == P8)  ? 64'(e) : 64'd0);
          check("mult4",  64'(o4[r][c]),  (PRECS[i] == P4)  ? 64'(e) : 64'd0);
        end
      n_mult++;
    end
  endtask

  task automatic test_add();
    int lat;
    logic [2:0] codes [5] = '{3'b000, 3'b001, 3'b011, 3'b010, 3'b110};
    foreach (codes[i]) begin
      randomize_inputs();
      run(3'b000, {codes[i], 3'b000, 2'b01}, lat);
      check("add latency", 64'(lat), 64'd2);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] x, y;
          longint v;
          x = ext[r][c][31:0];
          y = ext[r][c][63:32];
          case (codes[i])
            3'b000: for (int l = 0; l < 8; l++) begin
                      v = lane_sum(x, y, 4, l); check("sum5", 64'(s5[r][c][l]), 64'(v));
                      if (v[4]) n_carry++;
                    end
            3'b001: for (int l = 0; l < 4; l++) begin
                      v = lane_sum(x, y, 8, l); check("sum9", 64'(s9[r][c][l]), 64'(v));
                    end
            3'b011: for (int l = 0; l < 2; l++) begin
                      v = lane_sum(x, y, 16, l); check("sum17", 64'(s17[r][c][l]), 64'(v));
                    end
            3'b110: begin v = lane_sum(x, y, 32, 0); check("sum33", 64'(s33[r][c]), 64'(v)); end
            default: begin v = lane_sum(x, y, 32, 0); check("sum32", 64'(omac[r][c]), 64'(v[31:0])); end
          endcase
        end
      n_add++;
    end
  endtask

  // Two chained MACs: the first restarts the accumulator (adder field
  // 010), the second continues it (100) while start stays high.
  task automatic test_mac();
    foreach (PRECS[i]) begin
      logic [3:0][3:0][15:0] a1, w1;
      longint t0, t1;
      randomize_inputs();
      a1 = im; w1 = wm;
      @(negedge clk);
      sel = 3'b000; cfg = {3'b010, PRECS[i], 2'b11}; start = 1'b1;
      do begin @(posedge clk); #1; end while (st == IDLE);
      t0 = cycle;
      while (st != EN_REG) begin @(posedge clk); #1; end
      check("first MAC to EN_REG", 64'(cycle - t0), 64'd3);
      randomize_inputs();
      cfg = {3'b100, PRECS[i], 2'b11};
      @(posedge clk); #1;
      check("second MAC starts", 64'(st == SINGLE_MAC16 || st == SINGLE_MAC8 || st == SINGLE_MAC4), 64'd1);
      t1 = cycle;
      start = 1'b0;
      while (!done) begin @(posedge clk); #1; end
      check("second MAC to S_DONE", 64'(cycle - t1), 64'd4);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] e;
          e = mac_ref(PRECS[i], 32'd0, a1[r][c], w1[r][c]);
          e = mac_ref(PRECS[i], e, im[r][c], wm[r][c]);
          check("mac", 64'(omac[r][c]), 64'(e));
        end
      n_mac_chain++;
    end
  endtask

  task automatic test_mm();
    int lat;
    foreach (PRECS[i]) begin
      randomize_inputs();
      run(3'b001, {3'b000, PRECS[i], 2'b11}, lat);
      check("mm latency", 64'(lat), 64'd28);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          logic [31:0] e, plain;
          e = '0;
          for (int k = 0; k < 4; k++) e = mac_ref(PRECS[i], e, im[r][k], wm[k][c]);
          check("mm", 64'(omac[r][c]), 64'(e));
          // a wrapped lane: the 64-bit sum of the products differs from the lane
          if (PRECS[i] == P4) begin
            longint tot;
            tot = 0;
            for (int k = 0; k < 4; k++) tot += sub(im[r][k], 3, 4) * sub(wm[k][c], 0, 4);
            plain = 32'(tot);
            if (tot > 127 || tot < -128) n_wrap++;
            if (plain[7:0] != e[7:0]) failures++;
          end
        end
      n_mm++;
    end
    // 4x4 precision with every value -8: each lane sums 4 x 64 = 256 and wraps to 0
    im = {16{16'h8888}};
    wm = {16{16'h8888}};
    run(3'b001, {3'b000, P4, 2'b11}, lat);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        check("mm wrap", 64'(omac[r][c]), 64'd0);
        if (omac[r][c] == 32'd0) n_wrap++;
      end
  endtask

  task automatic test_conv(int k);
    int lat, ow;
    logic [2:0] code;
    code = (k == 2) ? 3'b010 : (k == 3) ? 3'b011 : 3'b100;
    ow = 5 - k;
    foreach (PRECS[i]) begin
      randomize_inputs();
      run(code, {3'b000, PRECS[i], 2'b11}, lat);
      check("conv latency", 64'(lat), (k == 2) ? 64'd28 : (k == 3) ? 64'd63 : 64'd112);
      for (int p = 0; p < 16; p++) begin
        logic [31:0] e;
        e = '0;
        if (p < ow * ow)
          for (int kr = 0; kr < k; kr++)
            for (int kc = 0; kc < k; kc++)
              e = mac_ref(PRECS[i], e, im[p / ow + kr][p % ow + kc], wm[kr][kc]);
        check("conv", 64'(omac[p / 4][p % 4]), 64'(e));
      end
      n_conv++;
    end
  endtask

  // The published examples: the 16x16 matrix multiplication, the 3x3
  // convolution at 16x16 and the 2x2 convolution at 8x8, with the result
  // words printed in their simulation traces.
  task automatic set_mats(input int a [4][4], input int w [4][4]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        im[r][c] = 16'(a[r][c]);
        wm[r][c] = 16'(w[r][c]);
      end
  endtask

  task automatic test_examples();
    int lat;
    int a_ex [4][4] = '{'{3, 5, 1, 0}, '{0, 4, 7, 0}, '{0, 0, 1, 1}, '{1, 1, 1, 1}};
    int w_mm [4][4] = '{'{1, 4, 7, 1}, '{1, 0, 0, 1}, '{2, 6, 9, 1}, '{0, 0, 1, 1}};
    int k_c3 [4][4] = '{'{1, 2, 3, 0}, '{1, 2, 3, 0}, '{1, 2, 3, 0}, '{0, 0, 0, 0}};
    int a_c2 [4][4] = '{'{'h0303, 'h0203, 'h0303, 'h0000}, '{'h0105, 'h0004, 'h0302, 'h0303},
                        '{'h0101, 'h0202, 'h0100, 'h0103}, '{'h0001, 'h0703, 'h0200, 'h0303}};
    int k_c2 [4][4] = '{'{'h0101, 'h0302, 0, 0}, '{'h0101, 'h0202, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0}};
    // matrix multiplication at 16x16
    set_mats(a_ex, w_mm);
    run(3'b001, 8'b000_000_11, lat);
    check("example mm [0][0]", 64'(omac[0][0]), 64'h0a);
    check("example mm [0][1]", 64'(omac[0][1]), 64'h12);
    check("example mm [0][2]", 64'(omac[0][2]), 64'h1e);
    check("example mm [0][3]", 64'(omac[0][3]), 64'h09);
    check("example mm [1][0]", 64'(omac[1][0]), 64'h12);
    check("example mm [1][1]", 64'(omac[1][1]), 64'h2a);
    check("example mm [1][2]", 64'(omac[1][2]), 64'h3f);
    n_example++;
    // 3x3 convolution at 16x16, kernel rows (1 2 3)
    set_mats(a_ex, k_c3);
    run(3'b011, 8'b010_000_11, lat);
    check("example conv3 p0", 64'(omac[0][0]), 64'h30);
    check("example conv3 p1", 64'(omac[0][1]), 64'h1e);
    check("example conv3 p2", 64'(omac[0][2]), 64'h26);
    check("example conv3 p3", 64'(omac[0][3]), 64'h1d);
    n_example++;
    // 2x2 convolution at 8x8
    set_mats(a_c2, k_c2);
    run(3'b010, 8'b010_010_11, lat);
    check("example conv2 p0", 64'(omac[0][0]), 64'h00190008);
    check("example conv2 p1", 64'(omac[0][1]), 64'h0014000e);
    check("example conv2 p2", 64'(omac[0][2]), 64'h000b000c);
    n_example++;
  endtask

  task automatic test_reject();
    while (st != IDLE) @(negedge clk);
    @(negedge clk);
    sel = 3'b101; cfg = 8'h03; start = 1'b1;        // no such operation
    @(posedge clk); #1;
    check("invalid operation stays idle", 64'(st == IDLE), 64'd1);
    @(negedge clk);
    sel = 3'b000; cfg = {3'b000, 3'b111, 2'b00};    // no such precision
    @(posedge clk); #1;
    check("invalid precision stays idle", 64'(st == IDLE), 64'd1);
    start = 1'b0;
    n_reject++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; sel = '0; cfg = '0; im = '0; wm = '0; ext = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    test_mult();
    test_add();
    test_mac();
    test_mm();
    test_conv(2);
    test_conv(3);
    test_conv(4);
    test_examples();
    test_reject();
    // every mechanism must have happened
    check("multiplications", 64'(n_mult > 0), 64'd1);
    check("additions", 64'(n_add > 0), 64'd1);
    check("lane carry-out", 64'(n_carry > 0), 64'd1);
    check("MAC continuation", 64'(n_mac_chain > 0), 64'd1);
    check("matrix multiplications", 64'(n_mm > 0), 64'd1);
    check("packed lane wrap", 64'(n_wrap > 0), 64'd1);
    check("convolutions", 64'(n_conv > 0), 64'd1);
    check("Counter_1 steps", 64'(n_cnt1 > 0), 64'd1);
    check("Counter_2 steps", 64'(n_cnt2 > 0), 64'd1);
    check("rejected commands", 64'(n_reject > 0), 64'd1);
    check("published examples", 64'(n_example == 3), 64'd1);
    $display("mult=%0d add=%0d mac=%0d mm=%0d conv=%0d wrap=%0d carry=%0d cnt1=%0d cnt2=%0d reject=%0d examples=%0d",
             n_mult, n_add, n_mac_chain, n_mm, n_conv, n_wrap, n_carry, n_cnt1, n_cnt2, n_reject, n_example);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
