// Multiple-input signature register.
//
// A W-bit internal-XOR LFSR whose stages also take a W-bit data word: on each
// rising clock edge with en high the register shifts toward its MSB, the MSB is
// fed back through the polynomial taps, and the data word is XOR-ed in. clr
// (synchronous, takes priority) sets the signature to zero. Used to compact the
// outputs of the scan chains of a wrapped core (so that no sink TAM pins are
// needed) and of the logic under LBIST.
//
// The register's use follows the design; the polynomial (x^16+x^12+x^5+1 by
// default, the CRC-CCITT polynomial) and the structure are this design's choice.
module misr #(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] POLY = W'(17'h1_1021)
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk) begin
    if (clr)     sig <= '0;
    else if (en) sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ d;
  end

endmodule
