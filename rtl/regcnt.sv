// regcnt: the sequencer's 12-bit register/counter with zero detector.
//
// A bank of D flip-flops on one clock. Each rising edge it holds, loads
// D_IN or counts down by one, as OPS (from the controller) says. LOAD is an
// active-low unconditional load: while it is low, D_IN is loaded whatever OPS
// says. ZERO is combinational and high while the stored value is zero; the
// controller uses it as the "R = 0" branch test. Loading N and looping while
// ZERO is low runs a loop body N + 1 times.
//
// Follows the described block: hold/load/decrement, LOW-active LOAD, ZERO
// flag, pin names and widths. This design's own choices: the OPS encoding
// (am2910_pkg::reg_op_e), LOAD taking priority over OPS, decrementing zero
// wraps to all ones, the unused fourth OPS code holds, and there is no reset
// (the device has none; the counter is meaningful once loaded).
//
// Timing: REG_DATA and ZERO change only after a rising CLOCK edge.
module regcnt
  import am2910_pkg::*;
#(
  parameter int unsigned W = ADDR_W
) (
  input  logic         CLOCK,
  input  logic         LOAD,      // active-low unconditional load
  input  logic [1:0]   OPS,       // reg_op_e
  input  logic [W-1:0] D_IN,
  output logic         ZERO,
  output logic [W-1:0] REG_DATA
);

  logic [W-1:0] count_q;

  always_ff @(posedge CLOCK) begin
    if (!LOAD) begin
      count_q <= D_IN;
    end else begin
      unique case (reg_op_e'(OPS))
        REG_LOAD: count_q <= D_IN;
        REG_DEC:  count_q <= count_q - W'(1);
        default:  count_q <= count_q;
      endcase
    end
  end

  assign REG_DATA = count_q;
  assign ZERO     = (count_q == '0);

endmodule
