// Testbench of tap_fsm: random TMS walks compared with a reference of the 1149.1
// state diagram written here by state name; checks that five TMS=1 cycles reach
// Test-Logic-Reset from anywhere, that nTRST forces it, and that a low enable
// freezes the state. Counts the states visited and fails if any never occurred.
module tb_tap_fsm;
  import mstar_pkg::*;
  logic tck = 0, trst_n = 0, en = 1, tms = 1;
  tap_state_t state;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  tap_fsm dut (.tck, .trst_n, .en, .tms, .state);

  always #5 tck = ~tck;

  function automatic string nxt(input string s, input logic m);
    case (s)
      "TLR":  return m ? "TLR"  : "RTI";
      "RTI":  return m ? "SDR"  : "RTI";
      "SDR":  return m ? "SIR"  : "CDR";
      "CDR":  return m ? "E1DR" : "SHDR";
      "SHDR": return m ? "E1DR" : "SHDR";
      "E1DR": return m ? "UDR"  : "PDR";
      "PDR":  return m ? "E2DR" : "PDR";
      "E2DR": return m ? "UDR"  : "SHDR";
      "UDR":  return m ? "SDR"  : "RTI";
      "SIR":  return m ? "TLR"  : "CIR";
      "CIR":  return m ? "E1IR" : "SHIR";
      "SHIR": return m ? "E1IR" : "SHIR";
      "E1IR": return m ? "UIR"  : "PIR";
      "PIR":  return m ? "E2IR" : "PIR";
      "E2IR": return m ? "UIR"  : "SHIR";
      default: return m ? "SDR" : "RTI";  // UIR
    endcase
  endfunction

  function automatic string name(input tap_state_t s);
    case (s)
      TAP_RESET: return "TLR";       TAP_RUN_IDLE: return "RTI";
      TAP_SELECT_DR: return "SDR";   TAP_CAPTURE_DR: return "CDR";
      TAP_SHIFT_DR: return "SHDR";   TAP_EXIT1_DR: return "E1DR";
      TAP_PAUSE_DR: return "PDR";    TAP_EXIT2_DR: return "E2DR";
      TAP_UPDATE_DR: return "UDR";   TAP_SELECT_IR: return "SIR";
      TAP_CAPTURE_IR: return "CIR";  TAP_SHIFT_IR: return "SHIR";
      TAP_EXIT1_IR: return "E1IR";   TAP_PAUSE_IR: return "PIR";
      TAP_EXIT2_IR: return "E2IR";   default: return "UIR";
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string r;
    #12;
    checks++;
    if (state !== TAP_RESET) begin failures++; $display("nTRST did not reset"); end
    trst_n = 1;
    r = "TLR";
    for (int i = 0; i < 3000; i++) begin
      tms = ($urandom % 3) == 0;
      en  = ($urandom % 8) != 0;
      @(posedge tck); #1;
      if (en) r = nxt(r, tms);
      seen[state] = 1'b1;
      checks++;
      if (name(state) != r) begin
        failures++; $display("step %0d: %s want %s", i, name(state), r);
        r = name(state);
      end
      if (i % 500 == 499) begin
        en = 1;
        tms = 1;
        repeat (5) @(posedge tck);
        #1;
        r = "TLR";
        checks++;
        if (state !== TAP_RESET) begin failures++; $display("5xTMS did not reset"); end
      end
    end
    checks++;
    if (seen != 16'hFFFF) begin failures++; $display("states not visited: %b", ~seen); end
    // Asynchronous nTRST.
    tms = 0;
    repeat (3) @(posedge tck);
    #2 trst_n = 0;
    #1;
    checks++;
    if (state !== TAP_RESET) begin failures++; $display("async nTRST"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
