// E-MSTARC: external MSTAR controller, the DUT selection logic.
//
// A K-bit STAR register (the E-MSTAR register) is loaded through TDI/TMS while
// nTRST is low. A comparator made of K XOR gates checks it, all the time, against
// the chip's own ID code; the XOR outputs are OR-ed so that match_n is low exactly
// when every bit agrees. The TDO enable coming from the chip-level TAP controller
// is AND-ed with the inverted match_n, so only the DUT whose chip ID equals the
// broadcast code ever drives the shared TDO line; all others keep their TDO pad
// in high impedance. Purely combinational apart from the register: tdo_oe follows
// tdo_en_tapc in the same cycle.
//
// The register, the XOR comparator, the active-low match and the AND gate follow
// the selection logic as described; reducing the XOR outputs with an OR is this
// design's choice.
module e_mstarc #(
  parameter int unsigned K = mstar_pkg::CHIP_ID_W
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic         sdi,          // serial input (from I-MSTARC stage 0)
  output logic         so,           // serial output (stage 0)
  input  logic [K-1:0] chip_id,      // from the chip ID storage
  input  logic         tdo_en_tapc,  // TDO enable of the chip-level TAP controller
  output logic [K-1:0] dut_code,     // contents of the E-MSTAR register
  output logic         match_n,      // low when dut_code == chip_id
  output logic         tdo_oe        // enable of the TDO pad
);

  star_reg #(.W(K)) u_reg (.tck, .trst_n, .sdi, .q(dut_code), .so);

  assign match_n = |(dut_code ^ chip_id);
  assign tdo_oe  = tdo_en_tapc & ~match_n;

endmodule
