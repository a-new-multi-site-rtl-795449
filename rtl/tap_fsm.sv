// IEEE 1149.1 TAP controller state machine.
//
// Sixteen-state controller advanced by TMS on the rising edge of TCK and forced
// to Test-Logic-Reset while nTRST is low (asynchronously, as the standard allows).
// The clock enable lets a core be isolated: with en low the controller keeps its
// state whatever TMS does, which is how an embedded TAP controller that is not
// selected by I-MSTARC is kept out of the chain without gating its clock. The
// chip-level controller runs with en tied high.
module tap_fsm
  import mstar_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       en,
  input  logic       tms,
  output tap_state_t state
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)  state <= TAP_RESET;
    else if (en)  state <= tap_next(state, tms);
  end

endmodule
