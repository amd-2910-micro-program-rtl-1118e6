// regcnt_tb: self-checking testbench for the register/counter.
//
// Drives random hold/load/decrement operations and random active-low LOAD
// pulses, and compares REG_DATA and ZERO after every edge with a reference
// value kept in the testbench. It then loads N and counts how many passes a
// loop that decrements while ZERO is low makes: it must be N + 1.
module regcnt_tb;
  import am2910_pkg::*;

  localparam int unsigned W = 12;

  logic         clk = 1'b0;
  logic         load_n;
  logic [1:0]   ops;
  logic [W-1:0] d_in;
  logic         zero;
  logic [W-1:0] reg_data;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] model;

  regcnt dut (
    .CLOCK(clk), .LOAD(load_n), .OPS(ops), .D_IN(d_in),
    .ZERO(zero), .REG_DATA(reg_data)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: reg_data=%0d zero=%0b model=%0d", what, reg_data, zero, model);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int passes;
    // Initialise by an unconditional load.
    load_n = 1'b0; ops = REG_HOLD; d_in = 12'd5;
    @(posedge clk); #1;
    model = 12'd5;
    check(reg_data == model && !zero, "RLD load");

    repeat (2000) begin
      @(negedge clk);
      load_n = ($urandom_range(0, 7) != 0);
      ops    = 2'($urandom_range(0, 3));
      d_in   = ($urandom_range(0, 3) == 0) ? W'($urandom_range(0, 2)) : W'($urandom());
      @(posedge clk);
      if (!load_n)                    model = d_in;
      else if (ops == REG_LOAD)       model = d_in;
      else if (ops == REG_DEC)        model = model - 1'b1;
      #1;
      check(reg_data == model, "value");
      check(zero == (model == 0), "zero flag");
    end

    // Loop termination: load N, loop "while R != 0, decrement".
    for (int n = 0; n < 6; n++) begin
      @(negedge clk);
      load_n = 1'b1; ops = REG_LOAD; d_in = W'(n);
      @(posedge clk); #1;
      passes = 0;
      forever begin
        @(negedge clk);
        passes++;
        if (zero) begin
          ops = REG_HOLD;
          break;
        end
        ops = REG_DEC;
        @(posedge clk);
      end
      check(passes == n + 1, "loop runs N+1 times");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
