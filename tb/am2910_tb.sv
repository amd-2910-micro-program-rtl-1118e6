// am2910_tb: end-to-end self-checking testbench for the whole sequencer,
// at its default size (12-bit addresses, 5-word stack).
//
// A reference model of the sequencer, written in the testbench from the
// instruction summary (its own state: R, uPC, a stack list and a depth),
// runs beside the device; every cycle Y, the three source enables, FULL and
// FULL_BAR are compared with it.
//
// Part 1 drives random instructions, condition codes, data, RLD, CIN and OE.
// While OE is high the testbench drives the address lines itself and checks
// it reads its own value back. It counts every mechanism the sequencer has
// and fails if one never happened: each conditional instruction passing and
// failing, loop counters reaching zero, the full stack being overwritten, a
// pop from the empty stack, the RLD override, CIN low (repeat), the three-
// state release and each of the three enables.
//
// Part 2 runs a small microprogram from a behavioural microprogram memory
// through a pipeline register, as on a real board: a subroutine called from
// a counted RPCT loop (R loaded with 3, so 4 calls), then a PUSH/RFCT loop
// (R loaded with 2, so 3 passes), then a jump-to-self. It checks the pass
// counts and that the program reaches its final address at cycle 24.
module am2910_tb;
  import am2910_pkg::*;

  localparam int unsigned W = 12;
  localparam int unsigned DEPTH = 5;

  logic         clk = 1'b0;
  logic [3:0]   i_in;
  logic         ccen, cc, rld, cin, oe;
  logic [W-1:0] d_in;
  tri   [W-1:0] y_bus;
  logic         pl_bar, map_bar, vect_bar, full, full_bar;
  logic         ext_drive;
  logic [W-1:0] ext_val;

  int checks = 0;
  int failures = 0;

  am2910 dut (
    .CLOCK(clk), .I(i_in), .CCEN(ccen), .CC(cc), .RLD(rld), .CIN(cin), .OE(oe),
    .D(d_in), .Y(y_bus), .PL_BAR(pl_bar), .MAP_BAR(map_bar), .VECT_BAR(vect_bar),
    .FULL(full), .FULL_BAR(full_bar)
  );

  // Test equipment on the address lines while the sequencer is disabled.
  assign y_bus = ext_drive ? ext_val : 'z;

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  logic [W-1:0] m_r, m_upc;
  logic [W-1:0] m_stk [DEPTH];
  int           m_sp;
  // Outputs of the model for the current inputs.
  logic [W-1:0] m_y;
  logic [2:0]   m_en;          // {PL_BAR, MAP_BAR, VECT_BAR}
  // Planned state actions.
  int           a_stk;         // 0 hold, 1 clear, 2 pop, 3 push
  int           a_reg;         // 0 hold, 1 load, 2 decrement

  // Mechanism counters.
  int n_pass [16], n_fail [16];
  int n_zero_exit = 0, n_overwrite = 0, n_empty_pop = 0, n_rld = 0;
  int n_cin_low = 0, n_oe_off = 0, n_map = 0, n_vect = 0, n_pl = 0;

  function automatic logic [W-1:0] m_tos();
    return (m_sp == 0) ? m_stk[0] : m_stk[m_sp-1];
  endfunction

  // Combinational part: what Y and the enables are now, and what the edge
  // will do to the stack and the register.
  task automatic model_eval(input logic count_events);
    logic passed, z;
    passed = !(ccen == 1'b0 && cc == 1'b1);
    z      = (m_r == 0);
    m_en   = 3'b011;
    a_stk  = 0;
    a_reg  = 0;
    m_y    = m_upc;
    case (i_in)
      4'd0:  begin m_y = '0; a_stk = 1; end
      4'd1:  if (passed) begin m_y = d_in; a_stk = 3; end
      4'd2:  begin m_y = d_in; m_en = 3'b101; end
      4'd3:  if (passed) m_y = d_in;
      4'd4:  begin a_stk = 3; if (passed) a_reg = 1; end
      4'd5:  begin m_y = passed ? d_in : m_r; a_stk = 3; end
      4'd6:  begin if (passed) m_y = d_in; m_en = 3'b110; end
      4'd7:  m_y = passed ? d_in : m_r;
      4'd8:  if (!z) begin m_y = m_tos(); a_reg = 2; end else a_stk = 2;
      4'd9:  if (!z) begin m_y = d_in; a_reg = 2; end
      4'd10: if (passed) begin m_y = m_tos(); a_stk = 2; end
      4'd11: if (passed) begin m_y = d_in; a_stk = 2; end
      4'd12: a_reg = 1;
      4'd13: if (passed) a_stk = 2; else m_y = m_tos();
      4'd14: ;
      default: begin
        if (passed) a_stk = 2;
        else if (z) begin m_y = d_in; a_stk = 2; end
        else m_y = m_tos();
        if (!z) a_reg = 2;
      end
    endcase
    if (count_events) begin
      if (passed) n_pass[i_in]++; else n_fail[i_in]++;
      if (z && (i_in == 4'd8 || i_in == 4'd9 || i_in == 4'd15)) n_zero_exit++;
      if (a_stk == 3 && m_sp == DEPTH) n_overwrite++;
      if (a_stk == 2 && m_sp == 0) n_empty_pop++;
      if (!rld && a_reg != 1) n_rld++;
      if (!cin) n_cin_low++;
      if (oe) n_oe_off++;
      if (m_en == 3'b101) n_map++;
      if (m_en == 3'b110) n_vect++;
      if (m_en == 3'b011) n_pl++;
    end
  endtask

  // Sequential part, applied at the clock edge.
  task automatic model_step();
    case (a_stk)
      1: m_sp = 0;
      2: if (m_sp > 0) m_sp--;
      3: if (m_sp == DEPTH) m_stk[DEPTH-1] = m_upc;
         else begin m_stk[m_sp] = m_upc; m_sp++; end
      default: ;
    endcase
    if (!rld || a_reg == 1) m_r = d_in;
    else if (a_reg == 2)    m_r = m_r - 1'b1;
    m_upc = m_y + W'(cin);
  endtask

  task automatic compare(input string where);
    checks++;
    if (!oe) begin
      if (y_bus != m_y) begin
        failures++;
        $display("FAIL %s: I=%0d Y=%0h expected %0h", where, i_in, y_bus, m_y);
      end
    end else if (y_bus != ext_val) begin
      failures++;
      $display("FAIL %s: Y not released, reads %0h", where, y_bus);
    end
    checks++;
    if ({pl_bar, map_bar, vect_bar} != m_en) begin
      failures++;
      $display("FAIL %s: I=%0d enables %b expected %b", where, i_in,
               {pl_bar, map_bar, vect_bar}, m_en);
    end
    checks++;
    if (full != (m_sp == DEPTH) || full_bar != (m_sp != DEPTH)) begin
      failures++;
      $display("FAIL %s: FULL=%0b FULL_BAR=%0b depth=%0d", where, full, full_bar, m_sp);
    end
  endtask

  // ------------------------------------------------------- microprogram
  typedef struct packed {
    logic [3:0]   inst;
    logic         ccen;
    logic [W-1:0] d;
  } uword_t;

  function automatic uword_t rom(input logic [W-1:0] a);
    case (a)
      12'd0:  return '{I_LDCT, 1'b1, 12'd3};   // R = 3
      12'd1:  return '{I_CJS,  1'b1, 12'd10};  // call subroutine at 10
      12'd2:  return '{I_RPCT, 1'b1, 12'd1};   // back to 1 while R != 0
      12'd3:  return '{I_PUSH, 1'b1, 12'd2};   // push 4, R = 2
      12'd4:  return '{I_CONT, 1'b1, 12'd0};   // loop body
      12'd5:  return '{I_RFCT, 1'b1, 12'd0};   // back to 4 while R != 0
      12'd6:  return '{I_CJP,  1'b1, 12'd6};   // stay here
      12'd10: return '{I_CONT, 1'b1, 12'd0};   // subroutine body
      12'd11: return '{I_CRTN, 1'b1, 12'd0};   // return
      default: return '{I_JZ,  1'b1, 12'd0};
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uword_t pipe;
    int calls, body, done_cycle;
    logic [W-1:0] y_now;

    ext_drive = 1'b0; ext_val = '0;
    m_r = '0; m_upc = '0; m_sp = 0;
    foreach (m_stk[k]) m_stk[k] = '0;
    foreach (n_pass[k]) begin n_pass[k] = 0; n_fail[k] = 0; end

    // Start from a known state: load R through RLD, then JZ.
    i_in = I_JZ; ccen = 1'b1; cc = 1'b0; rld = 1'b0; cin = 1'b1; oe = 1'b0; d_in = '0;
    @(negedge clk);
    model_eval(1'b0);
    @(posedge clk); model_step();
    @(negedge clk);
    rld = 1'b1;
    model_eval(1'b0);
    @(posedge clk); model_step();
    // Write every stack word once, so even a read of the empty stack is a
    // known value, then empty it again.
    for (int k = 0; k < DEPTH + 1; k++) begin
      @(negedge clk);
      i_in = (k < DEPTH) ? I_PUSH : I_JZ;
      model_eval(1'b0);
      #1;
      compare("preamble");
      @(posedge clk); model_step();
    end

    // ---------------------------------------------------- part 1: random
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      i_in = 4'($urandom());
      // Keep JZ rare so the stack gets deep enough to fill.
      if (i_in == I_JZ && $urandom_range(0, 3) != 0) i_in = I_CONT;
      ccen = 1'($urandom());
      cc   = 1'($urandom());
      rld  = ($urandom_range(0, 15) != 0);
      cin  = ($urandom_range(0, 7) != 0);
      oe   = ($urandom_range(0, 15) == 0);
      d_in = ($urandom_range(0, 1) == 0) ? W'($urandom_range(0, 3)) : W'($urandom());
      ext_drive = oe;
      ext_val   = W'($urandom());
      model_eval(1'b1);
      #1;
      compare("random");
      @(posedge clk);
      model_step();
    end

    // ----------------------------------------------- part 2: microprogram
    @(negedge clk);
    oe = 1'b0; ext_drive = 1'b0; rld = 1'b1; cin = 1'b1; cc = 1'b1;
    pipe = '{I_JZ, 1'b1, 12'd0};
    calls = 0; body = 0; done_cycle = -1;
    for (int cyc = 0; cyc < 60; cyc++) begin
      i_in = pipe.inst; ccen = pipe.ccen; d_in = pipe.d;
      model_eval(1'b0);
      #1;
      compare("microprogram");
      y_now = y_bus;
      if (y_now == 12'd10) calls++;
      if (y_now == 12'd4)  body++;
      if (y_now == 12'd6 && done_cycle < 0) done_cycle = cyc;
      @(posedge clk);
      model_step();
      pipe = rom(y_now);               // pipeline register loads the new word
      @(negedge clk);
    end
    checks++;
    if (calls != 4) begin failures++; $display("FAIL subroutine calls %0d, expected 4", calls); end
    checks++;
    if (body != 3) begin failures++; $display("FAIL loop passes %0d, expected 3", body); end
    checks++;
    if (done_cycle != 24) begin failures++; $display("FAIL end reached at cycle %0d, expected 24", done_cycle); end

    // ------------------------------------------------- mechanism coverage
    for (int k = 1; k < 16; k++) begin
      if (k == 2 || k == 8 || k == 9 || k == 12 || k == 14) continue;  // no condition
      checks++;
      if (n_pass[k] == 0 || n_fail[k] == 0) begin
        failures++;
        $display("FAIL instruction %0d never passed or never failed", k);
      end
    end
    checks++;
    if (n_zero_exit == 0 || n_overwrite == 0 || n_empty_pop == 0 || n_rld == 0 ||
        n_cin_low == 0 || n_oe_off == 0 || n_map == 0 || n_vect == 0 || n_pl == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("am2910_tb: R=0 loop exits=%0d full-stack overwrites=%0d pops from empty=%0d",
             n_zero_exit, n_overwrite, n_empty_pop);
    $display("am2910_tb: RLD overrides=%0d CIN low=%0d Y released=%0d PL=%0d MAP=%0d VECT=%0d",
             n_rld, n_cin_low, n_oe_off, n_pl, n_map, n_vect);
    $display("am2910_tb: microprogram calls=%0d loop passes=%0d end at cycle %0d",
             calls, body, done_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
