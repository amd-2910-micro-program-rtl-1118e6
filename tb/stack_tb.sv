// stack_tb: self-checking testbench for the 5-word return-address stack.
//
// Keeps its own model of the stack as a depth and a list of words, drives
// random hold/clear/pop/push operations with random data, and after every
// edge compares FULL and, while the stack is not empty, the top of stack.
// Pushing biased towards filling makes the full-stack overwrite happen and
// popping biased towards emptying makes the pop-from-empty case happen; the
// testbench counts both and fails if either never occurred.
module stack_tb;
  import am2910_pkg::*;

  localparam int unsigned W = 12;
  localparam int unsigned DEPTH = 5;

  logic         clk = 1'b0;
  logic [1:0]   ops;
  logic [W-1:0] d_in;
  logic         full;
  logic [W-1:0] stk_data;

  int checks = 0;
  int failures = 0;
  int n_overwrite = 0, n_empty_pop = 0, n_full = 0;
  int depth;
  logic [W-1:0] words [DEPTH];

  stack dut (.CLOCK(clk), .OPS(ops), .D_IN(d_in), .FULL(full), .STK_DATA(stk_data));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (full != (depth == DEPTH)) begin
      failures++;
      $display("FAIL full=%0b depth=%0d", full, depth);
    end
    if (depth > 0) begin
      checks++;
      if (stk_data != words[depth-1]) begin
        failures++;
        $display("FAIL top: got %0h expected %0h depth=%0d", stk_data, words[depth-1], depth);
      end
    end
  endtask

  initial begin
    logic bias;
    ops = STK_CLEAR; d_in = '0;
    @(posedge clk); #1;
    depth = 0;
    compare();
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      bias = ((k / 200) % 2) == 1;    // alternate push-heavy and pop-heavy phases
      case ($urandom_range(0, 9))
        0:          ops = STK_HOLD;
        1:          ops = ($urandom_range(0, 9) == 0) ? STK_CLEAR : STK_HOLD;
        2, 3, 4, 5: ops = bias ? STK_POP : STK_PUSH;
        default:    ops = bias ? STK_PUSH : STK_POP;
      endcase
      d_in = W'($urandom());
      @(posedge clk);
      case (ops)
        STK_CLEAR: depth = 0;
        STK_POP: begin
          if (depth == 0) n_empty_pop++;
          else depth--;
        end
        STK_PUSH: begin
          if (depth == DEPTH) begin
            words[DEPTH-1] = d_in;
            n_overwrite++;
          end else begin
            words[depth] = d_in;
            depth++;
          end
        end
        default: ;
      endcase
      if (depth == DEPTH) n_full++;
      #1;
      compare();
    end
    checks++;
    if (n_overwrite == 0 || n_empty_pop == 0 || n_full == 0) begin
      failures++;
      $display("FAIL coverage: overwrite=%0d empty_pop=%0d full=%0d", n_overwrite, n_empty_pop, n_full);
    end
    $display("stack_tb: full-stack overwrites=%0d pops from empty=%0d cycles full=%0d",
             n_overwrite, n_empty_pop, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
