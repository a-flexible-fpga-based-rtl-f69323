// npu_pkg: types and constants shared by the precision-scalable NPU.
//
// The NPU is a 4x4 array of processing elements (PEs).  Each PE holds a
// Booth multiplier that yields one 16x16, two 8x8 or four 4x4 signed
// products, and an adder built from eight 4-bit slices that yields eight
// 4-bit, four 8-bit, two 16-bit or one 32-bit sum, or accumulates the
// multiplier products (MAC).  A Moore control unit turns three user
// commands (START, select_operation, config_mac_mult_adder) into the
// per-cycle control word of the array and of the schedulers that feed it
// for matrix multiplication and convolution.
//
// The encodings of select_operation and of the three configuration fields
// follow the thesis' command description and simulation traces; the
// struct layouts are this implementation's own.
package npu_pkg;

  // Array geometry (4x4 PE array).
  localparam int unsigned ARR_N   = 4;
  localparam int unsigned DATA_W  = 16;   // operand width of a PE input
  localparam int unsigned PROD_W  = 32;   // packed product / accumulator width
  localparam int unsigned NDIG    = 8;    // radix-4 Booth digits of a 16-bit operand
  localparam int unsigned PP_W    = 18;   // width of one partial product

  // config_mac_mult_adder[4:2]: multiplier precision.
  typedef enum logic [2:0] {
    PREC16 = 3'b000,
    PREC8  = 3'b010,
    PREC4  = 3'b001
  } prec_t;

  // config_mac_mult_adder[7:5]: adder configuration.
  //   ADD_ACC continues an accumulation in simple-MAC mode (seen in the
  //   second operation of each MAC trace).
  typedef enum logic [2:0] {
    ADD_4   = 3'b000,   // 8 x (4+4)   -> 5-bit results
    ADD_8   = 3'b001,   // 4 x (8+8)   -> 9-bit results
    ADD_16  = 3'b011,   // 2 x (16+16) -> 17-bit results
    ADD_32  = 3'b010,   // 1 x (32+32) -> 32-bit result (MAC register)
    ADD_33  = 3'b110,   // 1 x (32+32) -> 33-bit result
    ADD_ACC = 3'b100    // simple MAC: keep accumulating
  } addcfg_t;

  // config_mac_mult_adder[1:0]: source of the adder operands.
  typedef enum logic [1:0] {
    SRC_MULT_ONLY = 2'b00,  // parallel multiplication, adder unused
    SRC_EXTERNAL  = 2'b01,  // parallel addition of external operands
    SRC_MAC       = 2'b11   // multiply-accumulate
  } src_t;

  // select_operation.
  typedef enum logic [2:0] {
    OP_SIMPLE = 3'b000,   // parallel mult / add / MAC on the user operands
    OP_MM     = 3'b001,   // 4x4 matrix multiplication
    OP_CONV2  = 3'b010,   // 4x4 input, 2x2 kernel
    OP_CONV3  = 3'b011,   // 4x4 input, 3x3 kernel
    OP_CONV4  = 3'b100    // 4x4 input, 4x4 kernel
  } op_t;

  // Carry-chain partition of the 32-bit adder.
  typedef enum logic [1:0] {
    LANE4  = 2'd0,
    LANE8  = 2'd1,
    LANE16 = 2'd2,
    LANE32 = 2'd3
  } lanes_t;

  // Which adder output register a sum is written to.
  typedef enum logic [2:0] {
    OSEL_5   = 3'd0,
    OSEL_9   = 3'd1,
    OSEL_17  = 3'd2,
    OSEL_33  = 3'd3,
    OSEL_MAC = 3'd4
  } osel_t;

  // Control word shared by every PE of the array.
  typedef struct packed {
    prec_t  prec;       // multiplier precision
    logic   pp_en;      // load the partial-product registers
    logic   mout_en;    // load the multiplier output registers
    logic   add_ext;    // 1: adder operands from the external input, 0: from the multiplier
    logic   add_in_en;  // load the adder input register
    logic   add_out_en; // load the selected adder output register
    lanes_t lanes;      // carry-chain partition
    osel_t  osel;       // output register to write
    logic   acc_clr;    // clear the MAC register
  } pe_ctrl_t;

  // Control word of the schedulers in the datapath.
  typedef struct packed {
    op_t  op;           // operand multiplexer select
    logic gen_mm;       // capture the matrix-multiplication schedule
    logic gen_c2;       // capture the 2x2 convolution schedule
    logic gen_c3;       // capture the 3x3 convolution schedule
    logic gen_c4;       // capture the 4x4 convolution schedule
    logic load_mm;      // register step cnt1 of the MM schedule
    logic load_c2;      // register step cnt1 of the 2x2 schedule
    logic load_c3;      // register step cnt2 of the 3x3 schedule
    logic load_c4;      // register step cnt2 of the 4x4 schedule
    logic cnt1_clr;
    logic cnt1_inc;
    logic cnt2_clr;
    logic cnt2_inc;
  } dp_ctrl_t;

  // Control-unit states (names as in the thesis' state list and traces).
  typedef enum logic [4:0] {
    IDLE, MULT_16, MULT_8, MULT_4, WAIT_MULT1,
    RES_SUM_5, RES_SUM_8, RES_SUM_16, RES_SUM_32, WAIT_ADDER,
    SINGLE_MAC16, SINGLE_MAC8, SINGLE_MAC4,
    INPUT_GENERATION, LOAD_MM,
    INPUT_GENERATION_2X, LOAD_C2,
    INPUT_GENERATION_3X, LOAD_C3,
    INPUT_GENERATION_4X, LOAD_C4,
    MAC_16, MAC_8, MAC_4,
    WAIT1, WAIT2, EN_REG, DIS_REG,
    INC_CNT1, INC_CNT2, S_DONE
  } cu_state_t;

  // Radix-4 Booth digit: value = (neg ? -1 : 1) * (two ? 2 : one ? 1 : 0).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  // Number of schedule steps of each operation.
  localparam int unsigned MM_STEPS = 4;
  localparam int unsigned C2_STEPS = 4;
  localparam int unsigned C3_STEPS = 9;
  localparam int unsigned C4_STEPS = 16;

  // Validity of the multiplier precision field.
  function automatic logic prec_valid(logic [2:0] p);
    return (p == PREC16) || (p == PREC8) || (p == PREC4);
  endfunction

  // Adder partition matching a multiplier precision (MAC lanes).
  function automatic lanes_t lanes_of_prec(prec_t p);
    case (p)
      PREC4:   return LANE8;
      PREC8:   return LANE16;
      default: return LANE32;
    endcase
  endfunction

endpackage
