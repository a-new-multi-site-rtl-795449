// Multi-site star test arrangement: NUM_SITES DUTs tested in parallel from one
// set of tester channels.
//
// The tester is the hub of a star and every DUT a node. TCK, TMS, TDI, nTRST and
// the TAM_W-line input TAM are broadcast to all DUTs, and all DUTs share a single
// TDO line. Each DUT carries its own chip ID (from per-chip fuses, entered here
// through chip_id); since every DUT receives the same STAR register contents,
// exactly the DUT whose chip ID equals the E-MSTAR code enables its TDO driver,
// and the others stay in high impedance. The shared line is modelled in two-state
// logic: tdo is the value of the enabled driver (0 when none drives), tdo_driven
// tells whether any DUT drives it, and contention flags more than one driver,
// which a correct setup never produces. site_oe shows which DUT drives.
//
// The star topology, the shared channels and the single TDO follow the design;
// the two-state model of the shared TDO line is this design's own.
module mstar_multisite
  import mstar_pkg::*;
#(
  parameter int unsigned NUM_SITES  = 45,
  parameter int unsigned TAM_W      = TAM_W_DEF,
  parameter int unsigned K          = CHIP_ID_W,
  parameter int unsigned CHAIN_LEN  = 8,
  parameter int unsigned NWBR       = 8,
  parameter int unsigned LBIST_NPAT = 256,
  parameter int unsigned MEM_DEPTH  = 16
) (
  input  logic             tck,
  input  logic             tms,
  input  logic             tdi,
  input  logic             trst_n,
  input  logic             por_n,
  input  logic [TAM_W-1:0] tam,
  input  logic [K-1:0]     chip_id [NUM_SITES],
  input  logic [NWBR-1:0]  func_in [NUM_SITES],
  output logic             tdo,
  output logic             tdo_driven,
  output logic             contention,
  output logic [NUM_SITES-1:0] site_oe
);

  logic [NUM_SITES-1:0] site_tdo;
  logic [NUM_CORES-1:0] core_sel_unused [NUM_SITES];
  logic [NUM_SITES-1:0] match_n_unused;

  for (genvar s = 0; s < NUM_SITES; s++) begin : g_site
    mstar_dut #(
      .TAM_W(TAM_W), .K(K), .CHAIN_LEN(CHAIN_LEN), .NWBR(NWBR),
      .LBIST_NPAT(LBIST_NPAT), .MEM_DEPTH(MEM_DEPTH)
    ) u_dut (
      .tck, .tms, .tdi, .trst_n, .por_n, .tam,
      .chip_id(chip_id[s]), .func_in(func_in[s]),
      .tdo(site_tdo[s]), .tdo_oe(site_oe[s]),
      .core_sel(core_sel_unused[s]), .match_n(match_n_unused[s])
    );
  end

  // Shared TDO line.
  always_comb begin
    int unsigned n;
    n   = 0;
    tdo = 1'b0;
    for (int s = 0; s < NUM_SITES; s++) begin
      if (site_oe[s]) begin
        tdo = tdo | site_tdo[s];
        n++;
      end
    end
    tdo_driven = (n != 0);
    contention = (n > 1);
  end

endmodule
