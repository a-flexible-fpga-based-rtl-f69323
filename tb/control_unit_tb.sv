// control_unit_tb: checks the state sequences and commands of the control unit.
//
// The two step counters are modelled in the test from the unit's own
// clear/increment commands.  For each operation and precision the visited
// states are compared, cycle by cycle, with the sequence listed in the
// thesis' state descriptions (e.g. INPUT_GENERATION, then LOAD_MM,
// MAC_8, WAIT1, WAIT2, EN_REG, DIS_REG, INC_CNT1, ... S_DONE), which also
// fixes the latencies: 3 cycles for a multiplication or an addition, 29
// for a matrix multiplication or a 2x2 convolution, 64 for 3x3 and 113 for
// 4x4, counted up to and including S_DONE.  Key commands are checked in
// their states, and invalid commands must leave the unit in IDLE.
module control_unit_tb;
  import npu_pkg::*;

  logic clk = 1'b0, rst, start;
  logic [2:0] sel;
  logic [7:0] cfg;
  logic [3:0] cnt1 = '0, cnt2 = '0;
  pe_ctrl_t pctrl;
  dp_ctrl_t dctrl;
  logic done;
  cu_state_t state;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .rst(rst), .start(start), .select_operation(sel),
                    .config_mac_mult_adder(cfg), .cnt1(cnt1), .cnt2(cnt2), .pctrl(pctrl),
                    .dctrl(dctrl), .done(done), .state(state));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dctrl.cnt1_clr) cnt1 <= '0; else if (dctrl.cnt1_inc) cnt1 <= cnt1 + 1'b1;
    if (dctrl.cnt2_clr) cnt2 <= '0; else if (dctrl.cnt2_inc) cnt2 <= cnt2 + 1'b1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  // Check that a cycle's commands fit its state.
  task automatic check_cmds();
    case (state)
      MULT_16, MULT_8, MULT_4, SINGLE_MAC16, SINGLE_MAC8, SINGLE_MAC4, MAC_16, MAC_8, MAC_4:
        check("pp_en", pctrl.pp_en, 1'b1);
      WAIT_MULT1, WAIT1: check("mout_en", pctrl.mout_en, 1'b1);
      RES_SUM_5, RES_SUM_8, RES_SUM_16, RES_SUM_32: check("add_in_en ext", pctrl.add_in_en & pctrl.add_ext, 1'b1);
      WAIT2: check("add_in_en mult", pctrl.add_in_en & ~pctrl.add_ext, 1'b1);
      WAIT_ADDER, EN_REG: check("add_out_en", pctrl.add_out_en, 1'b1);
      INPUT_GENERATION: check("gen_mm", dctrl.gen_mm & pctrl.acc_clr, 1'b1);
      LOAD_MM: check("load_mm", dctrl.load_mm, 1'b1);
      LOAD_C2: check("load_c2", dctrl.load_c2, 1'b1);
      LOAD_C3: check("load_c3", dctrl.load_c3, 1'b1);
      LOAD_C4: check("load_c4", dctrl.load_c4, 1'b1);
      DIS_REG: check("disabled", pctrl.add_out_en | pctrl.pp_en, 1'b0);
      default: ;
    endcase
    check("done only in S_DONE", done, state == S_DONE);
  endtask

  // Issue a command and compare the visited states with exp.
  task automatic run(logic [2:0] s, logic [7:0] c, cu_state_t exp [$]);
    @(negedge clk);
    sel = s; cfg = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    foreach (exp[i]) begin
      checks++;
      if (state != exp[i]) begin
        failures++;
        $display("FAIL sel=%b cfg=%b step %0d: state %s expected %s", s, c, i, state.name(), exp[i].name());
      end
      check_cmds();
      @(negedge clk);
    end
    check("back to IDLE", state == IDLE, 1'b1);
  endtask

  function automatic cu_state_t mac_state(logic [2:0] p);
    return (p == 3'b000) ? MAC_16 : (p == 3'b010) ? MAC_8 : MAC_4;
  endfunction

  task automatic sched(logic [2:0] s, logic [2:0] p, cu_state_t gen, cu_state_t ld, cu_state_t inc, int n);
    cu_state_t q [$];
    q = {gen};
    for (int i = 0; i < n; i++) begin
      q = {q, ld, mac_state(p), WAIT1, WAIT2, EN_REG, DIS_REG};
      if (i != n - 1) q.push_back(inc);
    end
    q.push_back(S_DONE);
    run(s, {3'b000, p, 2'b11}, q);
  endtask

  localparam logic [2:0] PRECS [3] = '{3'b000, 3'b010, 3'b001};

  initial begin
    cu_state_t q [$];
    rst = 1'b1; start = 1'b0; sel = '0; cfg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(3'b000, 8'b000_000_00, '{MULT_16, WAIT_MULT1, S_DONE});
    run(3'b000, 8'b000_010_00, '{MULT_8, WAIT_MULT1, S_DONE});
    run(3'b000, 8'b000_001_00, '{MULT_4, WAIT_MULT1, S_DONE});
    run(3'b000, 8'b000_000_01, '{RES_SUM_5, WAIT_ADDER, S_DONE});
    run(3'b000, 8'b001_000_01, '{RES_SUM_8, WAIT_ADDER, S_DONE});
    run(3'b000, 8'b011_000_01, '{RES_SUM_16, WAIT_ADDER, S_DONE});
    run(3'b000, 8'b010_000_01, '{RES_SUM_32, WAIT_ADDER, S_DONE});
    run(3'b000, 8'b110_000_01, '{RES_SUM_32, WAIT_ADDER, S_DONE});
    run(3'b000, 8'b010_000_11, '{SINGLE_MAC16, WAIT1, WAIT2, EN_REG, S_DONE});
    run(3'b000, 8'b010_010_11, '{SINGLE_MAC8, WAIT1, WAIT2, EN_REG, S_DONE});
    run(3'b000, 8'b010_001_11, '{SINGLE_MAC4, WAIT1, WAIT2, EN_REG, S_DONE});
    foreach (PRECS[i]) begin
      sched(3'b001, PRECS[i], INPUT_GENERATION, LOAD_MM, INC_CNT1, 4);
      sched(3'b010, PRECS[i], INPUT_GENERATION_2X, LOAD_C2, INC_CNT1, 4);
      sched(3'b011, PRECS[i], INPUT_GENERATION_3X, LOAD_C3, INC_CNT2, 9);
      sched(3'b100, PRECS[i], INPUT_GENERATION_4X, LOAD_C4, INC_CNT2, 16);
    end
    // chained MAC: start held high through EN_REG, accumulate field 100
    @(negedge clk);
    sel = 3'b000; cfg = 8'b010_010_11; start = 1'b1;
    @(negedge clk);
    check("chain first", state == SINGLE_MAC8, 1'b1);
    check("first MAC restarts", pctrl.acc_clr, 1'b1);
    cfg = 8'b100_010_11;
    repeat (3) @(negedge clk);
    check("EN_REG", state == EN_REG, 1'b1);
    @(negedge clk);
    start = 1'b0;
    check("chain second", state == SINGLE_MAC8, 1'b1);
    check("second MAC accumulates", pctrl.acc_clr, 1'b0);
    repeat (4) @(negedge clk);
    check("chain done", state == S_DONE, 1'b1);
    @(negedge clk);
    // invalid commands
    begin
      static logic [2:0] bad_sel [3] = '{3'b101, 3'b110, 3'b111};
      foreach (bad_sel[i]) begin
        @(negedge clk); sel = bad_sel[i]; cfg = 8'b000_000_11; start = 1'b1;
        @(negedge clk); check("bad operation", state == IDLE, 1'b1);
      end
      @(negedge clk); sel = 3'b000; cfg = 8'b000_111_00;
      @(negedge clk); check("bad precision", state == IDLE, 1'b1);
      @(negedge clk); sel = 3'b000; cfg = 8'b000_000_10;
      @(negedge clk); check("bad source", state == IDLE, 1'b1);
      @(negedge clk); sel = 3'b000; cfg = 8'b100_000_01;
      @(negedge clk); check("bad adder field", state == IDLE, 1'b1);
      start = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
