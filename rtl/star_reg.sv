// STAR register: the serial-in, parallel-out shift register from which both
// MSTAR controllers (I-MSTARC and E-MSTARC) are built.
//
// Each stage is a flip-flop behind a two-input multiplexer. While nTRST is low
// (all TAP controllers held in Test-Logic-Reset) the multiplexers take the
// previous stage and the register shifts one bit per rising TCK edge, entering at
// stage W-1 from TDI (or TMS) and leaving at stage 0. While nTRST is high every
// stage feeds its own output back and the register holds the selection it was
// loaded with, so the stored bits keep driving the selection outputs during the
// whole test. The register has no reset of its own: nTRST low is its load phase,
// not a clear. Serial output so = stage 0; a following register takes it as its
// serial input.
//
// The shift/hold behaviour and the stage numbering follow the controller as
// described; the TCK edge and the absence of a reset are this design's choices.
module star_reg #(
  parameter int unsigned W = 3
) (
  input  logic         tck,
  input  logic         trst_n,  // low: shift, high: hold
  input  logic         sdi,     // serial data (TDI or TMS)
  output logic [W-1:0] q,       // parallel selection outputs
  output logic         so       // serial output (stage 0)
);

  always_ff @(posedge tck) begin
    if (!trst_n) begin
      q <= W'({sdi, q} >> 1);
    end
  end

  assign so = q[0];

endmodule
