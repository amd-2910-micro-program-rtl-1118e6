// am2910: 12-bit microprogram address sequencer (Am2910 architecture).
//
// Each clock cycle the sequencer puts the address of the next
// microinstruction on Y, picked from four sources: the direct input D (from
// the pipeline register, the mapping PROM or an interrupt vector), the
// register/counter R, the microprogram counter uPC, or the top of a 5-word
// return-address stack. A 4-bit instruction I plus one condition test chooses
// the source and the side effects: pushes and pops for subroutines and loops,
// loading or counting down R for counted loops, and which of the three
// external sources is enabled onto D (PL_BAR, MAP_BAR, VECT_BAR, active low).
//
// Blocks, wired as in the sequencer's system-level block diagram:
//   control  - instruction decoder;
//   regcnt   - register/counter and zero detector, loaded from D;
//   stack    - 5 x 12 stack, pushed with the uPC value;
//   upc      - incrementer and register, loaded with Y + CIN;
//   mux_out  - next-address multiplexer and three-state Y driver.
//
// Pins: CCEN, CC, RLD and OE are active low, as on the Am2910. FULL is the
// stack's active-high full flag; FULL_BAR is its active-low form. There is no
// reset pin: instruction 0 (JZ) puts address 0 on Y and empties the stack.
//
// Timing: Y, the enables and FULL settle combinationally from I, CC, CCEN, D
// and the current state; all state (R, uPC, stack) changes on the rising
// CLOCK edge. Y floats while OE is high, but the uPC still takes the
// internally chosen address + CIN.
module am2910
  import am2910_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH  = ADDR_W,
  parameter int unsigned STACK_WORDS = STACK_DEPTH
) (
  input  logic                  CLOCK,
  input  logic [3:0]            I,
  input  logic                  CCEN,
  input  logic                  CC,
  input  logic                  RLD,
  input  logic                  CIN,
  input  logic                  OE,
  input  logic [ADDR_WIDTH-1:0] D,
  output tri   [ADDR_WIDTH-1:0] Y,
  output logic                  PL_BAR,
  output logic                  MAP_BAR,
  output logic                  VECT_BAR,
  output logic                  FULL,
  output logic                  FULL_BAR
);

  logic                  zero;
  logic [1:0]            reg_cntl, mux_cntl, stk_cntl, upc_cntl;
  logic [ADDR_WIDTH-1:0] reg_data, stk_data, upc_data, mux_y;

  control u_control (
    .ZERO            (zero),
    .COND_CODE       (CC),
    .CON_CODE_ENABLE (CCEN),
    .INST            (I),
    .REG_CNTL        (reg_cntl),
    .MUX_CNTL        (mux_cntl),
    .STK_CNTL        (stk_cntl),
    .UPC_CNTL        (upc_cntl),
    .MAP_BAR         (MAP_BAR),
    .PL_BAR          (PL_BAR),
    .VECT_BAR        (VECT_BAR)
  );

  regcnt #(.W(ADDR_WIDTH)) u_regcnt (
    .CLOCK    (CLOCK),
    .LOAD     (RLD),
    .OPS      (reg_cntl),
    .D_IN     (D),
    .ZERO     (zero),
    .REG_DATA (reg_data)
  );

  stack #(.W(ADDR_WIDTH), .DEPTH(STACK_WORDS)) u_stack (
    .CLOCK    (CLOCK),
    .OPS      (stk_cntl),
    .D_IN     (upc_data),
    .FULL     (FULL),
    .STK_DATA (stk_data)
  );

  upc #(.W(ADDR_WIDTH)) u_upc (
    .CLOCK    (CLOCK),
    .OPS      (upc_cntl),
    .CIN      (CIN),
    .D_IN     (mux_y),
    .UPC_DATA (upc_data)
  );

  mux_out #(.W(ADDR_WIDTH)) u_mux_out (
    .ENABLE   (OE),
    .SEL      (mux_cntl),
    .DATA     (D),
    .REG_DATA (reg_data),
    .UPC_DATA (upc_data),
    .STK_DATA (stk_data),
    .DATA_OUT (Y),
    .MUX_OUT  (mux_y)
  );

  assign FULL_BAR = ~FULL;

endmodule
