// am2910_pkg: types and constants shared by the blocks of the Am2910
// microprogram address sequencer.
//
// The instruction numbers 0..15 and their names follow the sequencer's
// instruction set. The 2-bit control codes passed from the controller to
// the register/counter, the stack, the uPC and the output multiplexer are
// this design's own encodings: only the operation names (Hold/Load/Decrement,
// Hold/Clear/Pop/Push, Clear/Count, Data/RegCnt/uPC/Stack) and the 2-bit
// width are given for them.
package am2910_pkg;

  // Address width of D, Y and every internal address register.
  parameter int unsigned ADDR_W      = 12;
  // Number of words in the return-address stack.
  parameter int unsigned STACK_DEPTH = 5;

  // The sixteen sequencer instructions (input I).
  typedef enum logic [3:0] {
    I_JZ   = 4'd0,   // jump to zero (reset)
    I_CJS  = 4'd1,   // conditional jump to subroutine via pipeline (D)
    I_JMAP = 4'd2,   // jump via mapping PROM (D)
    I_CJP  = 4'd3,   // conditional jump via pipeline (D)
    I_PUSH = 4'd4,   // push uPC, conditionally load register/counter
    I_JSRP = 4'd5,   // conditional subroutine via register or pipeline
    I_CJV  = 4'd6,   // conditional jump via vector (D)
    I_JRP  = 4'd7,   // conditional jump via register or pipeline
    I_RFCT = 4'd8,   // repeat loop from top of stack while R != 0
    I_RPCT = 4'd9,   // repeat pipeline address while R != 0
    I_CRTN = 4'd10,  // conditional return
    I_CJPP = 4'd11,  // conditional jump via pipeline and pop
    I_LDCT = 4'd12,  // load register/counter and continue
    I_LOOP = 4'd13,  // test end of loop
    I_CONT = 4'd14,  // continue
    I_TWB  = 4'd15   // three-way branch
  } instr_e;

  // Register/counter operation (REG_CNTL -> regcnt OPS).
  typedef enum logic [1:0] {
    REG_HOLD = 2'd0,
    REG_LOAD = 2'd1,
    REG_DEC  = 2'd2
  } reg_op_e;

  // Stack operation (STK_CNTL -> stack OPS).
  typedef enum logic [1:0] {
    STK_HOLD  = 2'd0,
    STK_CLEAR = 2'd1,
    STK_POP   = 2'd2,
    STK_PUSH  = 2'd3
  } stk_op_e;

  // uPC operation (UPC_CNTL -> upc OPS).
  typedef enum logic [1:0] {
    UPC_COUNT = 2'd0,
    UPC_CLEAR = 2'd1
  } upc_op_e;

  // Output multiplexer source (MUX_CNTL -> mux_out SEL).
  typedef enum logic [1:0] {
    SEL_D   = 2'd0,   // direct data input
    SEL_R   = 2'd1,   // register/counter
    SEL_UPC = 2'd2,   // microprogram counter
    SEL_TOS = 2'd3    // top of stack
  } mux_sel_e;

  // Which external source the sequencer enables (one of three, active low).
  typedef enum logic [1:0] {
    EN_PL   = 2'd0,
    EN_MAP  = 2'd1,
    EN_VECT = 2'd2
  } src_en_e;

endpackage
