// IEEE 1149.1 TAP controller with instruction register and data registers.
//
// Used both as the chip-level TAP controller and as the embedded TAP controller
// of a TAPed core. It holds the 16-state controller (tap_fsm), a TAP_IR_W-bit
// instruction register and three data registers: BYPASS (1 bit), IDCODE (32 bits)
// and a USER register of USER_W bits whose capture value and update value belong
// to the owner (the chip ID for the chip-level controller, BIST control and status
// for a core). Registers shift LSB first from tdi toward tdo on the rising TCK
// edge. Capture happens on the rising edge that leaves Capture-xR, update on the
// rising edge that leaves Update-xR, when user_upd_stb pulses for one cycle.
// In Test-Logic-Reset the instruction is IDCODE.
//
// tdo is the combinational output of the selected register (stage 0), so several
// controllers and bypass multiplexers can be daisy-chained; the chip drives its
// pad from the chain's end through a falling-edge stage (see mstar_dut). tdo_en is
// high in Shift-IR and Shift-DR. tck_en freezes the controller and its registers
// (core isolation).
module tap_ctrl
  import mstar_pkg::*;
#(
  parameter int unsigned USER_W = 8,
  parameter logic [31:0] IDCODE = 32'h1000_0001
) (
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tck_en,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  output logic              tdo_en,
  output tap_state_t        state,
  output logic [TAP_IR_W-1:0] ir,
  input  logic [USER_W-1:0] user_cap,
  output logic [USER_W-1:0] user_upd,
  output logic              user_upd_stb
);

  logic [TAP_IR_W-1:0] ir_sr;
  logic                bypass_sr;
  logic [31:0]         id_sr;
  logic [USER_W-1:0]   user_sr;

  tap_fsm u_fsm (.tck, .trst_n, .en(tck_en), .tms, .state);

  // Instruction register: shift stage and update stage.
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sr <= IR_CAPTURE;
      ir    <= IR_IDCODE;
    end else if (tck_en) begin
      unique case (state)
        TAP_RESET:      ir    <= IR_IDCODE;
        TAP_CAPTURE_IR: ir_sr <= IR_CAPTURE;
        TAP_SHIFT_IR:   ir_sr <= {tdi, ir_sr[TAP_IR_W-1:1]};
        TAP_UPDATE_IR:  ir    <= ir_sr;
        default: ;
      endcase
    end
  end

  // Data registers.
  always_ff @(posedge tck) begin
    user_upd_stb <= 1'b0;
    if (tck_en) begin
      unique case (state)
        TAP_CAPTURE_DR: begin
          bypass_sr <= 1'b0;
          if (ir == IR_IDCODE) id_sr   <= IDCODE;
          if (ir == IR_USER)   user_sr <= user_cap;
        end
        TAP_SHIFT_DR: begin
          if (ir == IR_IDCODE)    id_sr   <= {tdi, id_sr[31:1]};
          else if (ir == IR_USER) user_sr <= USER_W'({tdi, user_sr} >> 1);
          else                    bypass_sr <= tdi;
        end
        TAP_UPDATE_DR: begin
          if (ir == IR_USER) begin
            user_upd     <= user_sr;
            user_upd_stb <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    if (state == TAP_SHIFT_IR)   tdo = ir_sr[0];
    else if (ir == IR_IDCODE)    tdo = id_sr[0];
    else if (ir == IR_USER)      tdo = user_sr[0];
    else                         tdo = bypass_sr;
  end

  assign tdo_en = (state == TAP_SHIFT_IR) || (state == TAP_SHIFT_DR);

endmodule
