// mux_out_tb: self-checking testbench for the next-address multiplexer.
//
// Applies random values on the four sources with every select code, checks
// MUX_OUT and, with the output enabled (ENABLE low), DATA_OUT. With ENABLE
// high the testbench drives the shared Y bus itself, as test equipment would,
// and checks that its own value is read back, i.e. the multiplexer has let
// go of the bus, while MUX_OUT keeps carrying the selection.
module mux_out_tb;
  import am2910_pkg::*;

  localparam int unsigned W = 12;

  logic         enable_n;
  logic [1:0]   sel;
  logic [W-1:0] data, reg_data, upc_data, stk_data, mux_out_v;
  logic [W-1:0] ext_val;
  logic         ext_drive;
  tri   [W-1:0] y_bus;
  logic [W-1:0] expect_v;

  int checks = 0;
  int failures = 0;

  mux_out dut (
    .ENABLE(enable_n), .SEL(sel), .DATA(data), .REG_DATA(reg_data),
    .UPC_DATA(upc_data), .STK_DATA(stk_data), .DATA_OUT(y_bus), .MUX_OUT(mux_out_v)
  );

  // External driver on the address lines, used only while the chip is off.
  assign y_bus = ext_drive ? ext_val : 'z;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_drive = 1'b0; ext_val = '0;
    for (int k = 0; k < 1000; k++) begin
      data     = W'($urandom());
      reg_data = W'($urandom());
      upc_data = W'($urandom());
      stk_data = W'($urandom());
      sel      = 2'(k % 4);
      enable_n = (k % 8) >= 4;
      ext_drive = enable_n;
      ext_val   = W'($urandom());
      case (k % 4)
        0: expect_v = data;
        1: expect_v = reg_data;
        2: expect_v = upc_data;
        default: expect_v = stk_data;
      endcase
      #1;
      checks++;
      if (mux_out_v != expect_v) begin
        failures++;
        $display("FAIL MUX_OUT sel=%0d got %0h expected %0h", sel, mux_out_v, expect_v);
      end
      checks++;
      if (!enable_n && y_bus != expect_v) begin
        failures++;
        $display("FAIL DATA_OUT sel=%0d got %0h expected %0h", sel, y_bus, expect_v);
      end else if (enable_n && y_bus != ext_val) begin
        failures++;
        $display("FAIL released bus reads %0h, external %0h", y_bus, ext_val);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
