// mux_out: the sequencer's four-input next-address multiplexer and Y driver.
//
// SEL picks the direct data input (DATA), the register/counter (REG_DATA),
// the microprogram counter (UPC_DATA) or the top of stack (STK_DATA).
// The choice goes two ways: MUX_OUT always carries it back to the uPC
// incrementer, and DATA_OUT drives it onto the chip's Y pins through a
// three-state buffer. With ENABLE high the buffer is off and DATA_OUT floats,
// so test equipment can drive the address lines itself.
//
// Follows the described block: four sources, the two outputs, their names
// and widths. This design's own choices: the SEL encoding
// (am2910_pkg::mux_sel_e) and ENABLE being active low, as the sequencer's
// output enable pin is.
//
// Timing: purely combinational.
module mux_out
  import am2910_pkg::*;
#(
  parameter int unsigned W = ADDR_W
) (
  input  logic         ENABLE,    // active-low three-state enable
  input  logic [1:0]   SEL,       // mux_sel_e
  input  logic [W-1:0] DATA,
  input  logic [W-1:0] REG_DATA,
  input  logic [W-1:0] UPC_DATA,
  input  logic [W-1:0] STK_DATA,
  output tri   [W-1:0] DATA_OUT,
  output logic [W-1:0] MUX_OUT
);

  always_comb begin
    unique case (mux_sel_e'(SEL))
      SEL_D:   MUX_OUT = DATA;
      SEL_R:   MUX_OUT = REG_DATA;
      SEL_UPC: MUX_OUT = UPC_DATA;
      default: MUX_OUT = STK_DATA;
    endcase
  end

  assign DATA_OUT = ENABLE ? 'z : MUX_OUT;

endmodule
