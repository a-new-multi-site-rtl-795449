// Testbench of wrapper_1500: the wrapper serial port is driven from a TAP state
// machine as in the chip. Loads WS_INTEST_SCAN, applies random TAM words for a
// number of Run-Test/Idle cycles, reads the MISR signature with WS_READ_SIG and
// compares it with a reference model of the chains, capture and MISR written
// here. Also checks WBR capture of the functional terminals (WS_EXTEST), the
// one-bit WBY delay, the WIR capture pattern, the MISR clear on a new
// WS_INTEST_SCAN and that a disabled wrapper does not scan.
module tb_wrapper_1500;
  import mstar_pkg::*;
  localparam int W = 16, LEN = 8, NW = 8;
  jtag_bfm j ();
  tap_state_t st;
  logic [W-1:0] tam = '0, signature;
  logic [NW-1:0] func_in = '0;
  logic wrck_en = 1, por_n = 0;
  wir_t wir;
  int checks = 0, failures = 0, scan_cycles = 0, captures = 0;

  // Reference model.
  logic [W-1:0] m_sc [LEN];
  logic [W-1:0] m_sig;
  int m_cnt;
  bit model_on = 0;

  tap_fsm u_fsm (.tck(j.tck), .trst_n(j.trst_n), .en(1'b1), .tms(j.tms), .state(st));

  wrapper_1500 #(.TAM_W(W), .CHAIN_LEN(LEN), .NWBR(NW)) dut (
    .wrck(j.tck), .wrck_en, .wrstn(j.trst_n && st != TAP_RESET), .por_n,
    .selectwir(tap_in_ir_path(st)),
    .shiftwr(st == TAP_SHIFT_IR || st == TAP_SHIFT_DR),
    .capturewr(st == TAP_CAPTURE_IR || st == TAP_CAPTURE_DR),
    .updatewr(st == TAP_UPDATE_IR || st == TAP_UPDATE_DR),
    .scan_run(st == TAP_RUN_IDLE),
    .wsi(j.tdi), .wso(j.tdo), .tam_in(tam), .func_in, .wir, .signature);
  assign j.tdo_oe = 1'b0;

  task automatic model_clear();
    m_cnt = 0; m_sig = '0;
    for (int i = 0; i < LEN; i++) m_sc[i] = '0;
  endtask

  always @(posedge j.tck) begin
    if (model_on && wrck_en && st == TAP_RUN_IDLE) begin
      if (m_cnt < LEN) begin
        m_sig = {m_sig[W-2:0], 1'b0} ^ (m_sig[W-1] ? 16'h1021 : 16'h0) ^ m_sc[0];
        for (int i = 0; i < LEN - 1; i++) m_sc[i] = m_sc[i + 1];
        m_sc[LEN - 1] = tam;
        m_cnt++;
        scan_cycles++;
      end else begin
        logic [W-1:0] tmp [LEN];
        for (int i = 0; i < LEN; i++) begin
          logic [W-1:0] nx;
          nx = m_sc[(i + 1) % LEN];
          for (int c = 0; c < W; c++) tmp[i][c] = m_sc[i][c] ^ nx[(c + 1) % W];
        end
        m_sc = tmp;
        m_cnt = 0;
        captures++;
      end
    end
  end

  task automatic expect_eq(input logic [255:0] got, input logic [255:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  task automatic run_scan(input int n);
    logic [255:0] o;
    j.shift_ir(WS_INTEST_SCAN, 2, o);
    model_clear();
    model_on = 1;
    for (int i = 0; i < n; i++) begin
      tam = W'($urandom);
      j.step(1'b0);
    end
    j.shift_ir(WS_READ_SIG, 2, o);
    model_on = 0;
    j.shift_dr('0, W, o);
    expect_eq(o[W-1:0], m_sig, "MISR signature");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] o;
    j.trst_n = 0;
    j.idle(3);
    por_n = 1;
    j.trst_n = 1;
    j.reset_to_idle();
    expect_eq(wir, WS_BYPASS, "WIR after reset");
    j.shift_ir(WS_BYPASS, 2, o);
    expect_eq(o[1:0], 2'b01, "WIR capture");
    j.shift_dr(256'h2D, 8, o);
    expect_eq(o[7:0], 8'h5A, "WBY delay");
    run_scan(5 * (LEN + 1) + 3);
    run_scan(20 * (LEN + 1));
    // EXTEST: capture the functional terminals.
    func_in = 8'hA7;
    j.shift_ir(WS_EXTEST, 2, o);
    j.shift_dr(256'h00, NW, o);
    expect_eq(o[NW-1:0], 8'hA7, "WBR capture");
    // Disabled wrapper: signature must not move.
    j.shift_ir(WS_INTEST_SCAN, 2, o);
    j.shift_ir(WS_READ_SIG, 2, o);
    j.shift_dr('0, W, o);
    expect_eq(o[W-1:0], 16'h0, "cleared signature");
    wrck_en = 0;
    j.idle(20);
    wrck_en = 1;
    j.shift_dr('0, W, o);
    expect_eq(o[W-1:0], 16'h0, "disabled wrapper idle");
    checks++;
    if (captures == 0 || scan_cycles == 0) begin failures++; $display("no scan activity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
