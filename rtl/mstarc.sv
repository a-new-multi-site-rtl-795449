// MSTARC: the MSTAR controller of one DUT.
//
// Chains the internal controller (I-MSTARC, L core selection bits) and the
// external controller (E-MSTARC, K DUT selection bits) into one STAR register of
// L+K stages, fed from TDI or TMS and clocked by TCK while nTRST is low. The
// first bit shifted in ends in E-MSTARC stage 0, the last in I-MSTARC stage L-1,
// so a load takes exactly L+K TCK cycles with nTRST low. When nTRST goes high the
// stored bits select the cores (core_sel, the daisy-chain bypass) and the DUT
// (tdo_oe). Only the five 1149.1 pins are used.
//
// The chaining order I-MSTARC then E-MSTARC follows the controller as described.
module mstarc #(
  parameter int unsigned L     = mstar_pkg::NUM_CORES,
  parameter int unsigned K     = mstar_pkg::CHIP_ID_W,
  parameter int unsigned TAM_W = mstar_pkg::TAM_W_DEF
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             sdi,
  output logic             so,
  output logic [L-1:0]     core_sel,
  input  logic             chain_in,
  output logic [L-1:0]     core_tdi,
  input  logic [L-1:0]     core_tdo,
  output logic             chain_out,
  output logic [L-1:0]     core_tck_en,
  input  logic [TAM_W-1:0] tam,
  output logic [TAM_W-1:0] core_tam [L],
  input  logic [K-1:0]     chip_id,
  input  logic             tdo_en_tapc,
  output logic [K-1:0]     dut_code,
  output logic             match_n,
  output logic             tdo_oe
);

  logic i_so;

  i_mstarc #(.L(L), .TAM_W(TAM_W)) u_i (
    .tck, .trst_n, .sdi, .so(i_so), .core_sel,
    .chain_in, .core_tdi, .core_tdo, .chain_out, .core_tck_en,
    .tam, .core_tam
  );

  e_mstarc #(.K(K)) u_e (
    .tck, .trst_n, .sdi(i_so), .so, .chip_id, .tdo_en_tapc,
    .dut_code, .match_n, .tdo_oe
  );

endmodule
