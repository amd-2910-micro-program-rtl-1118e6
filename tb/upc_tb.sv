// upc_tb: self-checking testbench for the microprogram counter.
//
// Drives random addresses, carry-in and Count/Clear operations. After each
// edge UPC_DATA must equal the previous address plus carry-in (Y + 1 with
// CIN high, Y unchanged with CIN low); while Clear is applied UPC_DATA must
// read zero. Covers the wrap from all ones.
module upc_tb;
  import am2910_pkg::*;

  localparam int unsigned W = 12;

  logic         clk = 1'b0;
  logic [1:0]   ops;
  logic         cin;
  logic [W-1:0] d_in;
  logic [W-1:0] upc_data;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] expect_q;

  upc dut (.CLOCK(clk), .OPS(ops), .CIN(cin), .D_IN(d_in), .UPC_DATA(upc_data));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ops = UPC_COUNT; cin = 1'b1; d_in = '1;
    @(posedge clk); #1;
    checks++;
    if (upc_data != 12'd0) begin failures++; $display("FAIL wrap: %0h", upc_data); end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      cin  = 1'($urandom());
      d_in = W'($urandom());
      ops  = ($urandom_range(0, 4) == 0) ? UPC_CLEAR : UPC_COUNT;
      #1;
      if (ops == UPC_CLEAR) begin
        checks++;
        if (upc_data != '0) begin failures++; $display("FAIL clear output %0h", upc_data); end
      end
      expect_q = d_in + W'(cin);
      @(posedge clk);
      @(negedge clk);
      ops = UPC_COUNT;
      #1;
      checks++;
      if (upc_data != expect_q) begin
        failures++;
        $display("FAIL count: got %0h expected %0h", upc_data, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
