// upc: the sequencer's microprogram counter (uPC).
//
// A 12-bit incrementer followed by a 12-bit register. On every rising edge
// the register takes D_IN + CIN, where D_IN is the address currently on Y:
// with CIN high the next sequential address (Y + 1) is stored, with CIN low
// the same address (Y) is stored, so one microinstruction can be repeated.
//
// OPS selects Count or Clear. Count is the behaviour above. Clear is what
// the controller issues for the jump-to-zero instruction; here it forces
// UPC_DATA to zero for that cycle (the output multiplexer has no zero input
// of its own, so JZ puts 0 on Y through the uPC path) while the register
// still takes D_IN + CIN, i.e. 0 + CIN. The meaning of Clear, the OPS
// encoding (am2910_pkg::upc_op_e) and the absence of a reset are this
// design's choices; the incrementer, CIN and the register follow the
// described block. The increment wraps from all ones to zero.
//
// Timing: the register changes on the rising CLOCK edge; UPC_DATA also
// depends combinationally on OPS.
module upc
  import am2910_pkg::*;
#(
  parameter int unsigned W = ADDR_W
) (
  input  logic         CLOCK,
  input  logic [1:0]   OPS,       // upc_op_e
  input  logic         CIN,
  input  logic [W-1:0] D_IN,
  output logic [W-1:0] UPC_DATA
);

  logic [W-1:0] upc_q;
  logic [W-1:0] inc;

  // Incrementer: passes D_IN unchanged when CIN is low.
  assign inc = D_IN + W'(CIN);

  always_ff @(posedge CLOCK) begin
    upc_q <= inc;
  end

  assign UPC_DATA = (upc_op_e'(OPS) == UPC_CLEAR) ? '0 : upc_q;

endmodule
