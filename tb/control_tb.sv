// control_tb: exhaustive self-checking testbench for the instruction decoder.
//
// Applies all 128 combinations of instruction, condition enable, condition
// code and zero flag. The expected actions come from a table written out in
// the testbench row by row from the sequencer's instruction summary: for
// each instruction the Y source and stack action on fail and on pass, the
// register/counter action, and the enabled source. Instructions whose action
// depends on R = 0 (RFCT, RPCT, TWB) have one row per value of the flag.
// Y = 0 for JZ is checked as "uPC source with the uPC cleared".
module control_tb;
  import am2910_pkg::*;

  logic       zero, cc, ccen;
  logic [3:0] inst;
  logic [1:0] reg_cntl, mux_cntl, stk_cntl, upc_cntl;
  logic       map_bar, pl_bar, vect_bar;

  int checks = 0;
  int failures = 0;

  control dut (
    .ZERO(zero), .COND_CODE(cc), .CON_CODE_ENABLE(ccen), .INST(inst),
    .REG_CNTL(reg_cntl), .MUX_CNTL(mux_cntl), .STK_CNTL(stk_cntl), .UPC_CNTL(upc_cntl),
    .MAP_BAR(map_bar), .PL_BAR(pl_bar), .VECT_BAR(vect_bar)
  );

  // One row: Y and stack on fail, Y and stack on pass, register action on
  // fail and on pass, enabled source ("P", "M" or "V").
  typedef struct {
    string y_f;  string s_f;
    string y_p;  string s_p;
    string r_f;  string r_p;
    string en;
  } row_t;

  function automatic row_t table_row(input int i, input logic z);
    case (i)
      0:  return '{"0",   "CLR", "0",   "CLR", "H", "H", "P"};
      1:  return '{"PC",  "H",   "D",   "PSH", "H", "H", "P"};
      2:  return '{"D",   "H",   "D",   "H",   "H", "H", "M"};
      3:  return '{"PC",  "H",   "D",   "H",   "H", "H", "P"};
      4:  return '{"PC",  "PSH", "PC",  "PSH", "H", "L", "P"};
      5:  return '{"R",   "PSH", "D",   "PSH", "H", "H", "P"};
      6:  return '{"PC",  "H",   "D",   "H",   "H", "H", "V"};
      7:  return '{"R",   "H",   "D",   "H",   "H", "H", "P"};
      8:  return z ? '{"PC", "POP", "PC", "POP", "H", "H", "P"}
                   : '{"TOS", "H", "TOS", "H", "DEC", "DEC", "P"};
      9:  return z ? '{"PC", "H", "PC", "H", "H", "H", "P"}
                   : '{"D", "H", "D", "H", "DEC", "DEC", "P"};
      10: return '{"PC",  "H",   "TOS", "POP", "H", "H", "P"};
      11: return '{"PC",  "H",   "D",   "POP", "H", "H", "P"};
      12: return '{"PC",  "H",   "PC",  "H",   "L", "L", "P"};
      13: return '{"TOS", "H",   "PC",  "POP", "H", "H", "P"};
      14: return '{"PC",  "H",   "PC",  "H",   "H", "H", "P"};
      default: return z ? '{"D", "POP", "PC", "POP", "H", "H", "P"}
                        : '{"TOS", "H", "PC", "POP", "DEC", "DEC", "P"};
    endcase
  endfunction

  function automatic string y_name();
    if (upc_cntl == UPC_CLEAR && mux_cntl == SEL_UPC) return "0";
    case (mux_cntl)
      SEL_D:   return "D";
      SEL_R:   return "R";
      SEL_UPC: return "PC";
      default: return "TOS";
    endcase
  endfunction

  function automatic string s_name();
    case (stk_cntl)
      STK_HOLD:  return "H";
      STK_CLEAR: return "CLR";
      STK_POP:   return "POP";
      default:   return "PSH";
    endcase
  endfunction

  function automatic string r_name();
    case (reg_cntl)
      REG_HOLD: return "H";
      REG_LOAD: return "L";
      REG_DEC:  return "DEC";
      default:  return "?";
    endcase
  endfunction

  function automatic string en_name();
    case ({pl_bar, map_bar, vect_bar})
      3'b011:  return "P";
      3'b101:  return "M";
      3'b110:  return "V";
      default: return "?";
    endcase
  endfunction

  task automatic expect_eq(input string got, input string want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL I=%0d ccen=%0b cc=%0b zero=%0b %s: got %s expected %s",
               inst, ccen, cc, zero, what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t r;
    logic fail;
    for (int c = 0; c < 128; c++) begin
      inst = 4'(c >> 3);
      ccen = c[2];
      cc   = c[1];
      zero = c[0];
      #1;
      // Fail: test enabled (CCEN low) and condition false (CC high).
      fail = (ccen == 1'b0) && (cc == 1'b1);
      r = table_row(int'(inst), zero);
      expect_eq(y_name(),  fail ? r.y_f : r.y_p, "Y source");
      expect_eq(s_name(),  fail ? r.s_f : r.s_p, "stack");
      expect_eq(r_name(),  fail ? r.r_f : r.r_p, "register");
      expect_eq(en_name(), r.en,                 "enable");
      if (inst != 4'd0) expect_eq(upc_cntl == UPC_COUNT ? "CNT" : "CLR", "CNT", "uPC");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
