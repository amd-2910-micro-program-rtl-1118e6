// stack: the sequencer's 5-word by 12-bit return-address stack.
//
// A small register file with a stack pointer that counts the nesting depth
// (0 = empty, DEPTH = full). The pointer always names the last word written,
// so STK_DATA (the top of stack) can be read for loops without popping.
// On each rising edge OPS (from the controller) does one of:
//   Hold  - nothing changes;
//   Clear - the depth becomes zero (the jump-to-zero instruction);
//   Pop   - the depth decreases by one; a pop from an empty stack leaves it
//           at zero and is otherwise harmless;
//   Push  - D_IN (the uPC value, the return linkage) is written above the
//           current top and the depth increases by one. On a full stack the
//           push overwrites the top word and the depth stays at DEPTH.
// FULL is high while the depth equals DEPTH.
//
// Follows the described block: depth 5, width 12, the four operations, the
// overwrite-on-full and safe-pop-on-empty rules. This design's own choices:
// the OPS encoding (am2910_pkg::stk_op_e), FULL active high (the top level
// also brings out the active-low FULL_BAR), no reset (Clear is the reset),
// and that an empty stack shows the bottom word on STK_DATA.
//
// Timing: the pointer and the file change on the rising CLOCK edge; the new
// top of stack is on STK_DATA in the cycle after a push or pop.
module stack
  import am2910_pkg::*;
#(
  parameter int unsigned W     = ADDR_W,
  parameter int unsigned DEPTH = STACK_DEPTH
) (
  input  logic         CLOCK,
  input  logic [1:0]   OPS,       // stk_op_e
  input  logic [W-1:0] D_IN,
  output logic         FULL,
  output logic [W-1:0] STK_DATA
);

  localparam int unsigned PW = $clog2(DEPTH + 1);

  logic [W-1:0]  file_q [DEPTH];
  logic [PW-1:0] sp_q;            // nesting depth, 0..DEPTH
  logic [PW-1:0] top_idx;         // file index of the top word

  assign FULL = (sp_q >= PW'(DEPTH));

  always_comb begin
    if (sp_q == '0)  top_idx = '0;
    else if (FULL)   top_idx = PW'(DEPTH - 1);
    else             top_idx = sp_q - PW'(1);
  end

  assign STK_DATA = file_q[top_idx];

  always_ff @(posedge CLOCK) begin
    unique case (stk_op_e'(OPS))
      STK_CLEAR: sp_q <= '0;
      STK_POP:   if (sp_q != '0) sp_q <= FULL ? PW'(DEPTH - 1) : sp_q - PW'(1);
      STK_PUSH: begin
        if (FULL) begin
          file_q[DEPTH-1] <= D_IN;
          sp_q            <= PW'(DEPTH);
        end else begin
          file_q[sp_q] <= D_IN;
          sp_q         <= sp_q + PW'(1);
        end
      end
      default: ;
    endcase
  end

endmodule
