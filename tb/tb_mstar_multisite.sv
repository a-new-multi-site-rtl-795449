// End-to-end testbench of mstar_multisite at its default size (45 DUTs, 16-line
// TAM): runs the complete MSTAR test flow with the testbench as the tester.
//
// Embedded core test: for each core (1500 scan core, LBIST core, MBIST core) the
// STAR registers of all DUTs are loaded with that core selected and a DUT code
// that matches no chip ID, and the core is tested in all DUTs at once through
// the broadcast pins and TAM; no DUT may drive TDO meanwhile.
// Shared DUT test: for each DUT, the STAR registers are loaded with all cores
// selected and the DUT's chip ID, and one instruction scan and one data scan
// read the DUT's chip ID, the scan core's MISR signature, the LBIST signature
// and status and the MBIST status over the shared TDO. Expected values come from
// reference models written here. Counts how often each mechanism happened (STAR
// load, core bypass, DUT selection, silent TDO, multi-core chain, TAM scan,
// BIST runs, TAM activity while the scan core is deselected) and fails on one that never did, on TDO contention and on a
// driver other than the addressed DUT.
module tb_mstar_multisite;
  import mstar_pkg::*;
  localparam int NS = 45, W = 16, K = 8, LEN = 8, NWB = 8, NPAT = 256, DEPTH = 16, L = 3;
  localparam int NSCAN = 12 * (LEN + 1) + 4;

  jtag_bfm j ();
  logic por_n = 0;
  logic [W-1:0] tam = '0;
  logic [K-1:0] chip_id [NS];
  logic [NWB-1:0] func_in [NS];
  logic tdo_driven, contention;
  logic [NS-1:0] site_oe;
  tap_state_t st;
  int checks = 0, failures = 0;
  int n_star = 0, n_bypass = 0, n_select = 0, n_silent = 0, n_multi = 0, n_scan = 0,
      n_lbist = 0, n_mbist = 0, n_tam_gated = 0, n_contention = 0, n_wrong = 0;
  int addressed = -1;
  bit mon_on = 0;   // monitors start once nTRST has been applied with TCK running

  mstar_multisite dut (.tck(j.tck), .tms(j.tms), .tdi(j.tdi), .trst_n(j.trst_n), .por_n, .tam,
    .chip_id, .func_in, .tdo(j.tdo), .tdo_driven, .contention, .site_oe);
  assign j.tdo_oe = tdo_driven;

  // Tester-side copy of the TAP state, used to follow the scan protocol.
  tap_fsm u_ref_fsm (.tck(j.tck), .trst_n(j.trst_n), .en(1'b1), .tms(j.tms), .state(st));

  // Reference model of the wrapped core's scan chains and MISR.
  logic [W-1:0] m_sc [LEN];
  logic [W-1:0] m_sig;
  int m_cnt;
  bit scan_on = 0;

  always @(posedge j.tck) begin
    if (mon_on && contention) n_contention++;
    if (mon_on && tdo_driven && (addressed < 0 || site_oe != (NS'(1) << addressed))) n_wrong++;
    if (!tdo_driven && (st == TAP_SHIFT_DR || st == TAP_SHIFT_IR)) n_silent++;
    if (scan_on && st == TAP_RUN_IDLE) begin
      n_scan++;
      if (m_cnt < LEN) begin
        m_sig = {m_sig[W-2:0], 1'b0} ^ (m_sig[W-1] ? 16'h1021 : 16'h0) ^ m_sc[0];
        for (int i = 0; i < LEN - 1; i++) m_sc[i] = m_sc[i + 1];
        m_sc[LEN - 1] = tam;
        m_cnt++;
      end else begin
        logic [W-1:0] tmp [LEN];
        for (int i = 0; i < LEN; i++)
          for (int c = 0; c < W; c++) tmp[i][c] = m_sc[i][c] ^ m_sc[(i + 1) % LEN][(c + 1) % W];
        m_sc = tmp;
        m_cnt = 0;
      end
    end
  end

  function automatic logic [15:0] lbist_model();
    logic [15:0] p, s, o;
    p = 16'hACE1;
    s = '0;
    for (int i = 0; i < NPAT; i++) begin
      o = {p[7:0] ^ p[15:8], 8'(p[7:0] + p[15:8])};
      s = {s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0) ^ o;
      p = {p[14:0], p[15] ^ p[13] ^ p[12] ^ p[10]};
    end
    return s;
  endfunction

  task automatic expect_eq(input logic [255:0] got, input logic [255:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  task automatic star(input logic [L-1:0] sel, input logic [K-1:0] code);
    j.star_load({sel, code}, L + K);
    j.step(1'b0);   // Test-Logic-Reset -> Run-Test/Idle
    n_star++;
    if (sel != '1) n_bypass++;
    if ($countones(sel) > 1) n_multi++;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] o;
    int oe0;
    for (int s = 0; s < NS; s++) begin
      chip_id[s] = K'(s * 5 + 3);
      func_in[s] = NWB'($urandom);
    end
    j.trst_n = 0;
    j.idle(3);
    por_n = 1;
    mon_on = 1;

    // ---- Embedded core test, all DUTs in parallel, TDO silent ----
    for (int c = L - 1; c >= 0; c--) begin
      star(L'(1) << c, 8'h00);
      oe0 = j.oe_cycles;
      case (c)
        2: begin
          j.shift_ir({IR_BYPASS, WS_INTEST_SCAN}, 6, o);
          m_cnt = 0; m_sig = '0;
          for (int i = 0; i < LEN; i++) m_sc[i] = '0;
          scan_on = 1;
          for (int i = 0; i < NSCAN; i++) begin
            tam = W'($urandom);
            j.step(1'b0);
          end
          scan_on = 0;
        end
        1: begin
          j.shift_ir({IR_BYPASS, IR_USER}, 8, o);
          j.shift_dr({1'b0, 18'h1}, 19, o);
          // The TAM keeps toggling: the deselected scan core must ignore it.
          for (int i = 0; i < NPAT + 4; i++) begin
            tam = W'($urandom);
            j.step(1'b0);
            n_tam_gated++;
          end
          n_lbist++;
        end
        default: begin
          j.shift_ir({IR_BYPASS, IR_USER}, 8, o);
          j.shift_dr({1'b0, 3'b001}, 4, o);
          j.idle(10 * DEPTH + 4);
          n_mbist++;
        end
      endcase
      expect_eq(j.oe_cycles - oe0, 0, "TDO driven during parallel core test");
    end

    // ---- Shared DUT test: measure each DUT in turn ----
    for (int s = 0; s < NS; s++) begin
      star(3'b111, chip_id[s]);
      addressed = s;
      oe0 = j.oe_cycles;
      j.shift_ir({IR_USER, WS_READ_SIG, IR_USER, IR_USER}, 14, o);
      expect_eq(o[13:0], {IR_CAPTURE, 2'b01, IR_CAPTURE, IR_CAPTURE}, "IR capture chain");
      j.shift_dr('0, 45, o);
      expect_eq(o[2:0], 3'b010, "MBIST status");
      expect_eq(o[20:3], {lbist_model(), 2'b10}, "LBIST signature and status");
      expect_eq(o[36:21], m_sig, "scan MISR signature");
      expect_eq(o[44:37], chip_id[s], "chip ID of the driving DUT");
      expect_eq(j.oe_cycles - oe0, 14 + 45, "TDO enable cycles of the addressed DUT");
      if (j.oe_cycles - oe0 > 0) n_select++;
      addressed = -1;
    end
    // A code that matches no DUT leaves TDO undriven.
    star(3'b000, 8'hFF);
    oe0 = j.oe_cycles;
    j.shift_dr('0, 8, o);
    expect_eq(j.oe_cycles - oe0, 0, "no DUT addressed");

    expect_eq(n_contention, 0, "TDO contention cycles");
    expect_eq(n_wrong, 0, "cycles driven by a DUT not addressed");
    begin
      int cnt [9];
      string nm [9];
      cnt = '{n_star, n_bypass, n_select, n_silent, n_multi, n_scan, n_lbist, n_mbist, n_tam_gated};
      nm  = '{"STAR load", "core bypass", "DUT selection", "silent TDO", "multi-core chain",
              "TAM scan cycle", "LBIST run", "MBIST run", "TAM while gated"};
      for (int i = 0; i < 9; i++) begin
        $display("mechanism %-16s : %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("mechanism never happened: %s", nm[i]); end
      end
    end
    $display("tester cycles: %0d", j.cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
