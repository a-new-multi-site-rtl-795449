// Test logic of one SoC (one DUT, one node of the star).
//
// Pins: the five IEEE 1149.1 pins (TCK, TMS, TDI, nTRST, TDO with its output
// enable) and an input-only TAM of TAM_W lines; there are no other test outputs.
// Inside:
//   - the chip-level TAP controller, whose USER register reads the chip ID;
//   - the MSTAR controller (I-MSTARC then E-MSTARC), loaded from TDI (or TMS,
//     STAR_FROM_TMS) while nTRST is low;
//   - three cores in a TDI-TDO daisy chain behind the chip-level controller:
//     core 2 an IEEE 1500-wrapped scan core fed by the TAM and controlled by the
//     chip-level TAP state, core 1 a TAPed core with logic BIST, core 0 a TAPed
//     core with memory BIST. I-MSTARC bit i includes or bypasses core i.
// Serial path: TDI -> chip TAP registers -> core 2 -> core 1 -> core 0 -> TDO.
// The end of the chain and the enable (chip TAP in Shift-IR/Shift-DR, AND-ed in
// E-MSTARC with the chip-ID match) are registered on the falling TCK edge, as
// 1149.1 requires for TDO; the pad itself is outside (tdo, tdo_oe).
//
// The structure follows the design; placing the chip-level controller first in
// the chain, the falling-edge output stage, the chip-ID read register and the
// choice of cores follow the figures and this design's own choices.
//
// nTRST is used both as the asynchronous reset of the TAP controllers and as the
// synchronous shift enable of the STAR register; lint reports this mixed use. It
// is intended: holding nTRST low is how the STAR register is loaded.
module mstar_dut
  import mstar_pkg::*;
#(
  parameter int unsigned TAM_W         = TAM_W_DEF,
  parameter int unsigned K             = CHIP_ID_W,
  parameter int unsigned CHAIN_LEN     = 8,
  parameter int unsigned NWBR          = 8,
  parameter int unsigned LBIST_NPAT    = 256,
  parameter int unsigned MEM_DEPTH     = 16,
  parameter bit          STAR_FROM_TMS = 1'b0,
  parameter logic [31:0] IDCODE        = 32'h1000_0001
) (
  input  logic             tck,
  input  logic             tms,
  input  logic             tdi,
  input  logic             trst_n,
  input  logic             por_n,     // on-chip power-on reset of the BIST engines and MISRs
  input  logic [TAM_W-1:0] tam,
  input  logic [K-1:0]     chip_id,   // from the chip ID storage (fuses)
  input  logic [NWBR-1:0]  func_in,   // functional terminals of the wrapped core
  output logic             tdo,
  output logic             tdo_oe,
  output logic [NUM_CORES-1:0] core_sel,
  output logic             match_n
);

  localparam int unsigned L = NUM_CORES;

  tap_state_t          st;
  logic [TAP_IR_W-1:0] chip_ir;
  logic                chip_tdo, chip_tdo_en, upd_stb_unused;
  logic [K-1:0]        upd_unused, dut_code_unused;
  logic                star_so_unused, chain_out, oe_comb;
  logic [L-1:0]        core_tdi, core_tdo, core_tck_en;
  logic [TAM_W-1:0]    core_tam [L];
  logic                lb_busy, lb_done, mb_busy, mb_done, mb_fail;
  logic [15:0]         lb_sig;
  wir_t                wir_unused;
  logic [TAM_W-1:0]    wsig_unused;

  tap_ctrl #(.USER_W(K), .IDCODE(IDCODE)) u_chip_tap (
    .tck, .trst_n, .tck_en(1'b1), .tms, .tdi, .tdo(chip_tdo), .tdo_en(chip_tdo_en),
    .state(st), .ir(chip_ir), .user_cap(chip_id), .user_upd(upd_unused),
    .user_upd_stb(upd_stb_unused)
  );

  mstarc #(.L(L), .K(K), .TAM_W(TAM_W)) u_mstarc (
    .tck, .trst_n, .sdi(STAR_FROM_TMS ? tms : tdi), .so(star_so_unused), .core_sel,
    .chain_in(chip_tdo), .core_tdi, .core_tdo, .chain_out, .core_tck_en,
    .tam, .core_tam, .chip_id, .tdo_en_tapc(chip_tdo_en),
    .dut_code(dut_code_unused), .match_n, .tdo_oe(oe_comb)
  );

  // Core 2: IEEE 1500 wrapped core, controlled by the chip-level TAP state.
  wrapper_1500 #(.TAM_W(TAM_W), .CHAIN_LEN(CHAIN_LEN), .NWBR(NWBR)) u_core2 (
    .wrck(tck), .wrck_en(core_tck_en[2]), .wrstn(trst_n && st != TAP_RESET), .por_n,
    .selectwir(tap_in_ir_path(st)),
    .shiftwr(st == TAP_SHIFT_IR || st == TAP_SHIFT_DR),
    .capturewr(st == TAP_CAPTURE_IR || st == TAP_CAPTURE_DR),
    .updatewr(st == TAP_UPDATE_IR || st == TAP_UPDATE_DR),
    .scan_run(st == TAP_RUN_IDLE),
    .wsi(core_tdi[2]), .wso(core_tdo[2]), .tam_in(core_tam[2]), .func_in,
    .wir(wir_unused), .signature(wsig_unused)
  );

  // Core 1: TAPed core with LBIST.
  lbist_core #(.NPAT(LBIST_NPAT)) u_core1 (
    .tck, .trst_n, .tck_en(core_tck_en[1]), .por_n, .tms, .tdi(core_tdi[1]),
    .tdo(core_tdo[1]), .busy(lb_busy), .done(lb_done), .signature(lb_sig)
  );

  // Core 0: TAPed core with MBIST.
  mbist_core #(.DEPTH(MEM_DEPTH)) u_core0 (
    .tck, .trst_n, .tck_en(core_tck_en[0]), .por_n, .tms, .tdi(core_tdi[0]),
    .tdo(core_tdo[0]), .busy(mb_busy), .done(mb_done), .fail(mb_fail)
  );

  // TDO output stage: changes on the falling edge of TCK.
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_oe <= 1'b0;
    end else begin
      tdo    <= chain_out;
      tdo_oe <= oe_comb;
    end
  end

endmodule
