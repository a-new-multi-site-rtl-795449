// IEEE 1500 wrapper around a scan-tested core, reached through the chip-level
// TAP controller and fed by the input-only TAM.
//
// Serial side (WSI to WSO): a WIR_W-bit wrapper instruction register (WIR), the
// one-bit wrapper bypass (WBY), a wrapper boundary register (WBR) of NWBR cells
// that capture the core's functional terminals, and a TAM_W-bit signature
// register through which the MISR is read. The wrapper serial port signals
// (SelectWIR, ShiftWR, CaptureWR, UpdateWR) are decoded from the chip-level TAP
// state, so the WIR lies in the instruction scan path and the selected wrapper
// data register in the data scan path. WSO is combinational from stage 0 of the
// selected register.
//
// Parallel side: the core holds TAM_W scan chains of CHAIN_LEN cells. Under
// WS_INTEST_SCAN, on every TCK the chip-level controller spends in
// Run-Test/Idle, the wrapper runs a fixed scan protocol: CHAIN_LEN shift cycles,
// in which every chain takes one bit from its TAM line and the bits leaving the
// chains are compacted in the MISR, then one capture cycle. There are no sink TAM
// lines: the response is only visible as the MISR signature. Loading WS_INTEST_SCAN
// into the WIR clears the MISR and the protocol counter. The MISR, chains and
// signature survive TAP resets; por_n clears them.
//
// The wrapper's parts (WIR, WBY, WBR, scan chains, MISR) follow the design; the
// instruction set, the scan protocol counter and the capture function of the core
// logic (each cell takes itself XOR the next chain's next cell, a stand-in for
// logic that is not described) are this design's own.
module wrapper_1500
  import mstar_pkg::*;
#(
  parameter int unsigned TAM_W     = TAM_W_DEF,
  parameter int unsigned CHAIN_LEN = 8,
  parameter int unsigned NWBR      = 8
) (
  input  logic             wrck,       // TCK
  input  logic             wrck_en,    // core clock enable (I-MSTARC selection)
  input  logic             wrstn,      // low: WIR reset to WS_BYPASS
  input  logic             por_n,      // power-on reset of chains and MISR
  input  logic             selectwir,
  input  logic             shiftwr,
  input  logic             capturewr,
  input  logic             updatewr,
  input  logic             scan_run,   // chip-level TAP in Run-Test/Idle
  input  logic             wsi,
  output logic             wso,
  input  logic [TAM_W-1:0] tam_in,
  input  logic [NWBR-1:0]  func_in,    // core functional terminals seen by the WBR
  output wir_t             wir,
  output logic [TAM_W-1:0] signature
);

  localparam int unsigned CNT_W = $clog2(CHAIN_LEN + 1);

  logic [WIR_W-1:0] wir_sr;
  logic             wby;
  logic [NWBR-1:0]  wbr;
  logic [TAM_W-1:0] sig_sr;
  logic [TAM_W-1:0] sc [CHAIN_LEN];   // sc[i] = cell i of every chain; cell 0 is the chain output
  logic [CNT_W-1:0] cnt;
  logic             scan_on, shift_cyc, misr_clr;

  // Wrapper instruction register.
  always_ff @(posedge wrck or negedge wrstn) begin
    if (!wrstn) begin
      wir    <= WS_BYPASS;
      wir_sr <= '0;
    end else if (wrck_en && selectwir) begin
      if (capturewr)     wir_sr <= 2'b01;
      else if (shiftwr)  wir_sr <= {wsi, wir_sr[WIR_W-1:1]};
      else if (updatewr) wir    <= wir_t'(wir_sr);
    end
  end

  // Wrapper data registers.
  always_ff @(posedge wrck) begin
    if (wrck_en && !selectwir) begin
      if (capturewr) begin
        wby <= 1'b0;
        if (wir == WS_EXTEST)   wbr    <= func_in;
        if (wir == WS_READ_SIG) sig_sr <= signature;
      end else if (shiftwr) begin
        unique case (wir)
          WS_EXTEST:   wbr    <= NWBR'({wsi, wbr} >> 1);
          WS_READ_SIG: sig_sr <= {wsi, sig_sr[TAM_W-1:1]};
          default:     wby    <= wsi;
        endcase
      end
    end
  end

  always_comb begin
    if (selectwir) wso = wir_sr[0];
    else unique case (wir)
      WS_EXTEST:   wso = wbr[0];
      WS_READ_SIG: wso = sig_sr[0];
      default:     wso = wby;
    endcase
  end

  // Scan test of the core through the input-only TAM.
  assign scan_on   = wrck_en && scan_run && (wir == WS_INTEST_SCAN);
  assign shift_cyc = (cnt != CNT_W'(CHAIN_LEN));
  assign misr_clr  = !por_n ||
                     (wrck_en && selectwir && updatewr && wir_t'(wir_sr) == WS_INTEST_SCAN);

  always_ff @(posedge wrck) begin
    if (misr_clr) begin
      cnt <= '0;
      for (int i = 0; i < CHAIN_LEN; i++) sc[i] <= '0;
    end else if (scan_on) begin
      if (shift_cyc) begin
        for (int i = 0; i < CHAIN_LEN - 1; i++) sc[i] <= sc[i + 1];
        sc[CHAIN_LEN - 1] <= tam_in;
        cnt <= cnt + 1'b1;
      end else begin
        for (int i = 0; i < CHAIN_LEN; i++)
          sc[i] <= sc[i] ^ {sc[(i + 1) % CHAIN_LEN][0], sc[(i + 1) % CHAIN_LEN][TAM_W-1:1]};
        cnt <= '0;
      end
    end
  end

  misr #(.W(TAM_W)) u_misr (
    .clk(wrck), .clr(misr_clr), .en(scan_on && shift_cyc), .d(sc[0]), .sig(signature)
  );

endmodule
