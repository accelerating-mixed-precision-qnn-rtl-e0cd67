// star_pkg: types and constants shared by the STAR-MAC unit.
//
// The STAR-MAC unit replaces the 3-cycle "fast" multiplier of a small RISC-V
// core. It runs the RV32M multiplies (MUL, MULH, MULHSU, MULHU) and six
// precision-scalable multiply-accumulate operations that accumulate into a
// 104-bit MAC register (MAC-REG), plus a clear and a read-back of MAC-REG.
// This package holds the operation codes, the multiplier modes, the adder
// carry configurations and the select codes of the routing blocks R-A, R-B,
// R-ALU, R-MAC and R-O1/R-O2. The encodings are this design's own choice.
package star_pkg;

  // Operations the unit executes.
  typedef enum logic [3:0] {
    OP_NONE    = 4'd0,
    OP_MUL     = 4'd1,   // rd = (A*B)[31:0]           3 cycles
    OP_MULH    = 4'd2,   // signed x signed, upper word 4 cycles
    OP_MULHSU  = 4'd3,   // signed x unsigned           4 cycles
    OP_MULHU   = 4'd4,   // unsigned x unsigned         4 cycles
    OP_MAC16ST = 4'd5,   // 2 cycles each (Table 3 operations)
    OP_MAC8ST  = 4'd6,
    OP_MAC4ST  = 4'd7,
    OP_MAC16SA = 4'd8,
    OP_MAC8SA  = 4'd9,
    OP_MAC4SA  = 4'd10,
    OP_MACRST  = 4'd11,  // clear MAC-REG                1 cycle
    OP_RETR    = 4'd12   // read one MAC-REG chunk        1 cycle
  } star_op_e;

  // STAR multiplier configurations (Table 2). SA16 and ST16 are the same.
  typedef enum logic [2:0] {
    MM_16  = 3'd0,
    MM_ST8 = 3'd1,
    MM_ST4 = 3'd2,
    MM_SA8 = 3'd3,
    MM_SA4 = 3'd4
  } mult_mode_e;

  // Carry-chain configuration of the 52-bit adder.
  typedef enum logic [1:0] {
    AC_FULL = 2'd0,  // one 52-bit adder (standard multiply and ST operations)
    AC_SA16 = 2'd1,  // one 37-bit adder: 8+8+8+8+5
    AC_SA8  = 2'd2,  // two 21-bit adders
    AC_SA4  = 2'd3   // four 13-bit adders
  } add_cfg_e;

  // R-B extension of s[31:0] into the upper 20 adder bits.
  typedef enum logic [1:0] {
    RB_ZERO = 2'd0,  // unsigned product: zero extension
    RB_SEXT = 2'd1,  // one signed 32-bit product: s[31] everywhere
    RB_SA8  = 2'd2,  // two 21-bit lanes: s[15] and s[31]
    RB_SA4  = 2'd3   // four 13-bit lanes: s[7], s[15], s[23], s[31]
  } rb_sel_e;

  // R-A source of adder input A.
  typedef enum logic [2:0] {
    RA_ZERO  = 3'd0, // zero
    RA_ARSH  = 3'd1, // ALU-REG shifted right by 16 (ar[33:16])
    RA_AR    = 3'd2, // ALU-REG, sign-extended from ar[33]
    RA_MR_LO = 3'd3, // MAC-REG lower half mr[51:0]
    RA_MR_HI = 3'd4  // MAC-REG upper half mr[103:52]
  } ra_sel_e;

  // R-ALU write selection for ALU-REG.
  typedef enum logic [1:0] {
    AL_HOLD  = 2'd0, // keep
    AL_D     = 2'd1, // ar <= d[33:0]
    AL_SHIFT = 2'd2, // ar[31:16] <= d[15:0], ar[33:32] <= d[17:16], ar[15:0] kept
    AL_ALU   = 2'd3  // ar <= value from the ALU
  } alu_sel_e;

  // R-MAC write selection for MAC-REG.
  typedef enum logic [1:0] {
    MR_HOLD  = 2'd0,
    MR_LO    = 2'd1, // mr[51:0]   <= d
    MR_HI    = 2'd2, // mr[103:52] <= d
    MR_CLEAR = 2'd3  // mr <= 0
  } mr_sel_e;

  // R-O1 / R-O2 output selection.
  typedef enum logic [1:0] {
    OS_D   = 2'd0,   // o = d[31:0]
    OS_MUL = 2'd1,   // o = {d[15:0], ar[15:0]}   (last cycle of MUL)
    OS_AR  = 2'd2,   // o = ar[31:0]
    OS_RET = 2'd3    // o = selected MAC-REG chunk, sign-extended
  } out_sel_e;

  // Chunk format selected by a retrieve.
  typedef enum logic [2:0] {
    RF_ST_LO   = 3'd0, // mr[31:0]            (any ST accumulation)
    RF_ST_HI   = 3'd1, // sext(mr[47:32])     (upper part of mac16st sum)
    RF_SA16_LO = 3'd2, // lane[31:0] of a 37-bit SA16 lane
    RF_SA16_HI = 3'd3, // sext(lane[36:32])
    RF_SA8     = 3'd4, // sext of a 21-bit SA8 lane
    RF_SA4     = 3'd5  // sext of a 13-bit SA4 lane
  } ret_fmt_e;

  // Control word produced each cycle by star_ctrl.
  typedef struct packed {
    logic       a_hi;      // operand mux: use A[31:16] (else A[15:0])
    logic       b_hi;      // operand mux: use B[31:16]
    logic       sign_a;    // multiplier operand A signed
    logic       sign_b;    // multiplier operand B signed
    mult_mode_e mmode;
    add_cfg_e   acfg;
    rb_sel_e    rb;
    ra_sel_e    ra;
    logic       ra_sext;   // RA_ARSH: extend with ar[33:32] (else zeros)
    alu_sel_e   alu;
    mr_sel_e    mr;
    out_sel_e   osel;
  } star_ctrl_t;

endpackage
