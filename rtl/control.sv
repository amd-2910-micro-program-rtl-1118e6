// control: the sequencer's instruction decoder (main controller).
//
// Purely combinational. From the 4-bit instruction INST, the condition test
// and the register/counter zero flag it chooses, for the current cycle:
//   REG_CNTL - hold, load or decrement the register/counter;
//   MUX_CNTL - which source drives Y (D, R, uPC or top of stack);
//   STK_CNTL - hold, clear, pop or push the stack;
//   UPC_CNTL - count, or clear (jump to zero);
// and drives exactly one of PL_BAR, MAP_BAR, VECT_BAR low to enable the
// external source of D: the pipeline register, the mapping PROM (JMAP) or the
// vector source (CJV).
//
// The condition inputs are active low. The test fails only when it is
// enabled (CON_CODE_ENABLE low) and the condition is false (COND_CODE high);
// otherwise it passes, so with the test disabled every conditional
// instruction takes its "pass" action.
//
// The decode table is the sequencer's sixteen-instruction table. One entry is
// this design's reading: CONT (14) holds the stack on both outcomes. The
// control encodings are those of am2910_pkg. The four control buses are two
// bits wide as specified; the uPC has only two operations, so the upper bit
// of UPC_CNTL is always zero.
module control
  import am2910_pkg::*;
(
  input  logic       ZERO,
  input  logic       COND_CODE,         // active low: low = condition true
  input  logic       CON_CODE_ENABLE,   // active low: low = test enabled
  input  logic [3:0] INST,
  output logic [1:0] REG_CNTL,
  output logic [1:0] MUX_CNTL,
  output logic [1:0] STK_CNTL,
  output logic [1:0] UPC_CNTL,
  output logic       MAP_BAR,
  output logic       PL_BAR,
  output logic       VECT_BAR
);

  logic     pass;
  reg_op_e  reg_op;
  mux_sel_e sel;
  stk_op_e  stk_op;
  upc_op_e  upc_op;
  src_en_e  src;

  assign pass = CON_CODE_ENABLE | ~COND_CODE;

  always_comb begin
    reg_op = REG_HOLD;
    sel    = SEL_UPC;
    stk_op = STK_HOLD;
    upc_op = UPC_COUNT;
    src    = EN_PL;
    unique case (instr_e'(INST))
      I_JZ: begin
        upc_op = UPC_CLEAR;          // Y = 0 through the uPC path
        stk_op = STK_CLEAR;
      end
      I_CJS: if (pass) begin
        sel    = SEL_D;
        stk_op = STK_PUSH;
      end
      I_JMAP: begin
        sel = SEL_D;
        src = EN_MAP;
      end
      I_CJP: if (pass) sel = SEL_D;
      I_PUSH: begin
        stk_op = STK_PUSH;
        if (pass) reg_op = REG_LOAD;
      end
      I_JSRP: begin
        sel    = pass ? SEL_D : SEL_R;
        stk_op = STK_PUSH;
      end
      I_CJV: begin
        if (pass) sel = SEL_D;
        src = EN_VECT;
      end
      I_JRP: sel = pass ? SEL_D : SEL_R;
      I_RFCT: begin
        if (!ZERO) begin
          sel    = SEL_TOS;
          reg_op = REG_DEC;
        end else begin
          stk_op = STK_POP;
        end
      end
      I_RPCT: begin
        if (!ZERO) begin
          sel    = SEL_D;
          reg_op = REG_DEC;
        end
      end
      I_CRTN: if (pass) begin
        sel    = SEL_TOS;
        stk_op = STK_POP;
      end
      I_CJPP: if (pass) begin
        sel    = SEL_D;
        stk_op = STK_POP;
      end
      I_LDCT: reg_op = REG_LOAD;
      I_LOOP: begin
        if (pass) stk_op = STK_POP;
        else      sel    = SEL_TOS;
      end
      I_CONT: ;
      I_TWB: begin
        if (pass)       stk_op = STK_POP;
        else if (ZERO) begin
          sel    = SEL_D;
          stk_op = STK_POP;
        end else begin
          sel    = SEL_TOS;
        end
        if (!ZERO) reg_op = REG_DEC;
      end
      default: ;
    endcase
  end

  assign REG_CNTL = reg_op;
  assign MUX_CNTL = sel;
  assign STK_CNTL = stk_op;
  assign UPC_CNTL = upc_op;
  assign PL_BAR   = (src != EN_PL);
  assign MAP_BAR  = (src != EN_MAP);
  assign VECT_BAR = (src != EN_VECT);

  // Exactly one external source is enabled in every cycle.
  always_comb begin
    assert ({PL_BAR, MAP_BAR, VECT_BAR} inside {3'b011, 3'b101, 3'b110})
      else $error("control: not exactly one source enable is low");
  end

endmodule
