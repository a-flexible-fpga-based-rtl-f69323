// control_unit: Moore FSM that sequences every operation of the NPU.
//
// Commands: start (START), select_operation and config_mac_mult_adder
// ([1:0] adder source, [4:2] multiplier precision, [7:5] adder
// configuration).  In IDLE a start with a valid command latches the
// command and enters the first state of its sequence; an invalid command
// keeps the unit in IDLE.  Sequences (one state per clock):
//   multiplication : MULT_<p>  WAIT_MULT1 S_DONE                 (3 cycles)
//   addition       : RES_SUM_<w> WAIT_ADDER S_DONE               (3 cycles)
//   MAC            : SINGLE_MAC<p> WAIT1 WAIT2 EN_REG, repeated while start
//                    stays high, then S_DONE                      (4 per MAC)
//   matrix mult.   : INPUT_GENERATION, then 4 x (LOAD_MM MAC_<p> WAIT1
//                    WAIT2 EN_REG DIS_REG) with INC_CNT1 between, S_DONE
//   convolution K  : INPUT_GENERATION_<K>X, then K*K x (LOAD_C<K> MAC_<p>
//                    WAIT1 WAIT2 EN_REG DIS_REG) with INC_CNT1 (K=2) or
//                    INC_CNT2 (K=3,4) between, S_DONE
// so S_DONE comes 2, 2, 4n, 28, 28, 63 and 112 cycles after the first
// state.  S_DONE returns to IDLE; done is high in S_DONE.
// The state names and the per-state actions follow the thesis; the
// exact transition conditions, the latching of the command and the
// accumulate rule (in a simple MAC, adder field 100 keeps accumulating,
// any other value restarts from zero) are read from its simulation traces.
module control_unit
  import npu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [2:0] select_operation,
  input  logic [7:0] config_mac_mult_adder,
  input  logic [3:0] cnt1,
  input  logic [3:0] cnt2,
  output pe_ctrl_t   pctrl,
  output dp_ctrl_t   dctrl,
  output logic       done,
  output cu_state_t  state
);

  cu_state_t  nxt;
  logic [7:2] cfg_q;      // latched precision and adder fields
  op_t        op_q;
  logic       latch;      // latch the command on this transition

  prec_t   prec_i, prec_q;
  addcfg_t add_i, add_q;
  src_t    src_i;

  assign prec_i = prec_t'(config_mac_mult_adder[4:2]);
  assign add_i  = addcfg_t'(config_mac_mult_adder[7:5]);
  assign src_i  = src_t'(config_mac_mult_adder[1:0]);
  assign prec_q = prec_t'(cfg_q[4:2]);
  assign add_q  = addcfg_t'(cfg_q[7:5]);

  // First state of the sequence a command asks for (IDLE if invalid).
  function automatic cu_state_t first_state(logic [2:0] op, src_t src, prec_t p, addcfg_t ad,
                                            logic pv);
    cu_state_t st;
    st = IDLE;
    case (op)
      OP_SIMPLE: begin
        case (src)
          SRC_MULT_ONLY: if (pv) st = (p == PREC16) ? MULT_16 : (p == PREC8) ? MULT_8 : MULT_4;
          SRC_MAC:       if (pv) st = (p == PREC16) ? SINGLE_MAC16 : (p == PREC8) ? SINGLE_MAC8 : SINGLE_MAC4;
          SRC_EXTERNAL: begin
            case (ad)
              ADD_4:          st = RES_SUM_5;
              ADD_8:          st = RES_SUM_8;
              ADD_16:         st = RES_SUM_16;
              ADD_32, ADD_33: st = RES_SUM_32;
              default:        st = IDLE;
            endcase
          end
          default: st = IDLE;
        endcase
      end
      OP_MM:    if (pv) st = INPUT_GENERATION;
      OP_CONV2: if (pv) st = INPUT_GENERATION_2X;
      OP_CONV3: if (pv) st = INPUT_GENERATION_3X;
      OP_CONV4: if (pv) st = INPUT_GENERATION_4X;
      default:  st = IDLE;
    endcase
    return st;
  endfunction

  // Next state.
  always_comb begin
    cu_state_t cand;
    nxt   = state;
    latch = 1'b0;
    cand  = first_state(select_operation, src_i, prec_i, add_i, prec_valid(prec_i));
    case (state)
      IDLE: if (start && cand != IDLE) begin nxt = cand; latch = 1'b1; end
      MULT_16, MULT_8, MULT_4:                         nxt = WAIT_MULT1;
      WAIT_MULT1:                                      nxt = S_DONE;
      RES_SUM_5, RES_SUM_8, RES_SUM_16, RES_SUM_32:    nxt = WAIT_ADDER;
      WAIT_ADDER:                                      nxt = S_DONE;
      SINGLE_MAC16, SINGLE_MAC8, SINGLE_MAC4, MAC_16, MAC_8, MAC_4: nxt = WAIT1;
      WAIT1:                                           nxt = WAIT2;
      WAIT2:                                           nxt = EN_REG;
      EN_REG: begin
        if (op_q != OP_SIMPLE) nxt = DIS_REG;
        else if (start && select_operation == OP_SIMPLE && src_i == SRC_MAC && cand != IDLE) begin
          nxt = cand; latch = 1'b1;
        end else nxt = S_DONE;
      end
      DIS_REG: begin
        case (op_q)
          OP_MM:    nxt = (cnt1 == 4'(MM_STEPS - 1)) ? S_DONE : INC_CNT1;
          OP_CONV2: nxt = (cnt1 == 4'(C2_STEPS - 1)) ? S_DONE : INC_CNT1;
          OP_CONV3: nxt = (cnt2 == 4'(C3_STEPS - 1)) ? S_DONE : INC_CNT2;
          OP_CONV4: nxt = (cnt2 == 4'(C4_STEPS - 1)) ? S_DONE : INC_CNT2;
          default:  nxt = S_DONE;
        endcase
      end
      INC_CNT1:            nxt = (op_q == OP_MM) ? LOAD_MM : LOAD_C2;
      INC_CNT2:            nxt = (op_q == OP_CONV3) ? LOAD_C3 : LOAD_C4;
      INPUT_GENERATION:    nxt = LOAD_MM;
      INPUT_GENERATION_2X: nxt = LOAD_C2;
      INPUT_GENERATION_3X: nxt = LOAD_C3;
      INPUT_GENERATION_4X: nxt = LOAD_C4;
      LOAD_MM, LOAD_C2, LOAD_C3, LOAD_C4:
        nxt = (prec_q == PREC16) ? MAC_16 : (prec_q == PREC8) ? MAC_8 : MAC_4;
      S_DONE:              nxt = IDLE;
      default:             nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      cfg_q <= '0;
      op_q  <= OP_SIMPLE;
    end else begin
      state <= nxt;
      if (latch) begin
        cfg_q <= config_mac_mult_adder[7:2];
        op_q  <= op_t'(select_operation);
      end
    end
  end

  // Moore outputs.
  always_comb begin
    pctrl            = '0;
    pctrl.prec       = prec_q;
    pctrl.lanes      = LANE32;
    pctrl.osel       = OSEL_MAC;
    dctrl            = '0;
    dctrl.op         = op_q;
    done             = 1'b0;

    // Adder partition and output register: from the adder field for a
    // plain addition, from the precision for a MAC.
    if (state == RES_SUM_5 || state == RES_SUM_8 || state == RES_SUM_16 ||
        state == RES_SUM_32 || state == WAIT_ADDER) begin
      pctrl.add_ext = 1'b1;
      case (add_q)
        ADD_4:   begin pctrl.lanes = LANE4;  pctrl.osel = OSEL_5;   end
        ADD_8:   begin pctrl.lanes = LANE8;  pctrl.osel = OSEL_9;   end
        ADD_16:  begin pctrl.lanes = LANE16; pctrl.osel = OSEL_17;  end
        ADD_33:  begin pctrl.lanes = LANE32; pctrl.osel = OSEL_33;  end
        default: begin pctrl.lanes = LANE32; pctrl.osel = OSEL_MAC; end
      endcase
    end else begin
      pctrl.lanes = lanes_of_prec(prec_q);
    end

    case (state)
      MULT_16, MULT_8, MULT_4:                      pctrl.pp_en = 1'b1;
      WAIT_MULT1:                                   pctrl.mout_en = 1'b1;
      RES_SUM_5, RES_SUM_8, RES_SUM_16, RES_SUM_32: pctrl.add_in_en = 1'b1;
      WAIT_ADDER:                                   pctrl.add_out_en = 1'b1;
      SINGLE_MAC16, SINGLE_MAC8, SINGLE_MAC4: begin
        pctrl.pp_en   = 1'b1;
        pctrl.acc_clr = (add_q != ADD_ACC);
      end
      MAC_16, MAC_8, MAC_4:                         pctrl.pp_en = 1'b1;
      WAIT1:                                        pctrl.mout_en = 1'b1;
      WAIT2:                                        pctrl.add_in_en = 1'b1;
      EN_REG:                                       pctrl.add_out_en = 1'b1;
      INPUT_GENERATION: begin
        dctrl.gen_mm = 1'b1; dctrl.cnt1_clr = 1'b1; pctrl.acc_clr = 1'b1;
      end
      INPUT_GENERATION_2X: begin
        dctrl.gen_c2 = 1'b1; dctrl.cnt1_clr = 1'b1; pctrl.acc_clr = 1'b1;
      end
      INPUT_GENERATION_3X: begin
        dctrl.gen_c3 = 1'b1; dctrl.cnt2_clr = 1'b1; pctrl.acc_clr = 1'b1;
      end
      INPUT_GENERATION_4X: begin
        dctrl.gen_c4 = 1'b1; dctrl.cnt2_clr = 1'b1; pctrl.acc_clr = 1'b1;
      end
      LOAD_MM:  dctrl.load_mm  = 1'b1;
      LOAD_C2:  dctrl.load_c2  = 1'b1;
      LOAD_C3:  dctrl.load_c3  = 1'b1;
      LOAD_C4:  dctrl.load_c4  = 1'b1;
      INC_CNT1: dctrl.cnt1_inc = 1'b1;
      INC_CNT2: dctrl.cnt2_inc = 1'b1;
      S_DONE:   done = 1'b1;
      default: ;
    endcase
  end

endmodule
