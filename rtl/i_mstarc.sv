// I-MSTARC: internal MSTAR controller, the core selection logic.
//
// An L-bit STAR register is loaded through TDI/TMS while nTRST is low; bit i is
// the selection of core i. The cores' serial ports form a TDI-TDO daisy chain in
// the order core L-1, ..., core 1, core 0: chain_in enters core L-1, and behind
// each core a multiplexer passes either the core's TDO (core selected) or the
// core's own TDI (core bypassed) on to the next core; the multiplexer behind
// core 0 gives chain_out. A bypassed core is also isolated: its TAP clock enable
// is low and the input TAM it sees is forced to zero, so its state stays as it
// was. Any combination of cores may be selected (one for test, one or more for
// debug). The multiplexers and gates are combinational.
//
// The register, the core order and the bypass multiplexers follow the internal
// controller as described; isolating by a clock enable and by zeroing the TAM is
// this design's choice.
module i_mstarc #(
  parameter int unsigned L     = mstar_pkg::NUM_CORES,
  parameter int unsigned TAM_W = mstar_pkg::TAM_W_DEF
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             sdi,        // TDI or TMS
  output logic             so,         // serial output (stage 0) to E-MSTARC
  output logic [L-1:0]     core_sel,   // core selection L-1 .. 0
  // TDI-TDO daisy chain
  input  logic             chain_in,
  output logic [L-1:0]     core_tdi,
  input  logic [L-1:0]     core_tdo,
  output logic             chain_out,
  output logic [L-1:0]     core_tck_en,
  // input-only TAM
  input  logic [TAM_W-1:0] tam,
  output logic [TAM_W-1:0] core_tam [L]
);


  star_reg #(.W(L)) u_reg (.tck, .trst_n, .sdi, .q(core_sel), .so);

  always_comb begin
    logic link;
    link = chain_in;
    for (int i = L - 1; i >= 0; i--) begin
      core_tdi[i] = link;
      link        = core_sel[i] ? core_tdo[i] : link;
    end
    chain_out = link;
  end

  assign core_tck_en = core_sel;

  always_comb
    for (int i = 0; i < L; i++) core_tam[i] = core_sel[i] ? tam : '0;

endmodule
