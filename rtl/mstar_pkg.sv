// Shared types and constants of the multi-site star test (MSTAR) logic.
//
// Holds the IEEE 1149.1 TAP controller state encoding and next-state function,
// the instruction codes of the chip-level and embedded TAP controllers and of the
// IEEE 1500 wrapper instruction register, and the default widths used across the
// design. The TAP state encoding is the one commonly used with 1149.1 (the
// standard leaves the encoding free); the instruction codes and the widths of the
// chip ID and instruction registers are this design's own choices.
package mstar_pkg;

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TAP_EXIT2_DR   = 4'h0,
    TAP_EXIT1_DR   = 4'h1,
    TAP_SHIFT_DR   = 4'h2,
    TAP_PAUSE_DR   = 4'h3,
    TAP_SELECT_IR  = 4'h4,
    TAP_UPDATE_DR  = 4'h5,
    TAP_CAPTURE_DR = 4'h6,
    TAP_SELECT_DR  = 4'h7,
    TAP_EXIT2_IR   = 4'h8,
    TAP_EXIT1_IR   = 4'h9,
    TAP_SHIFT_IR   = 4'hA,
    TAP_PAUSE_IR   = 4'hB,
    TAP_RUN_IDLE   = 4'hC,
    TAP_UPDATE_IR  = 4'hD,
    TAP_CAPTURE_IR = 4'hE,
    TAP_RESET      = 4'hF
  } tap_state_t;

  // Next state of the TAP controller for a given TMS value (IEEE 1149.1 state diagram).
  function automatic tap_state_t tap_next(input tap_state_t s, input logic tms);
    unique case (s)
      TAP_RESET:      return tms ? TAP_RESET     : TAP_RUN_IDLE;
      TAP_RUN_IDLE:   return tms ? TAP_SELECT_DR : TAP_RUN_IDLE;
      TAP_SELECT_DR:  return tms ? TAP_SELECT_IR : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   return tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   return tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   return tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  return tms ? TAP_SELECT_DR : TAP_RUN_IDLE;
      TAP_SELECT_IR:  return tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   return tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   return tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   return tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  return tms ? TAP_SELECT_DR : TAP_RUN_IDLE;
      default:        return TAP_RESET;
    endcase
  endfunction

  // True while the controller is in the instruction-register column of the diagram.
  function automatic logic tap_in_ir_path(input tap_state_t s);
    return s inside {TAP_SELECT_IR, TAP_CAPTURE_IR, TAP_SHIFT_IR, TAP_EXIT1_IR,
                     TAP_PAUSE_IR, TAP_EXIT2_IR, TAP_UPDATE_IR};
  endfunction

  // TAP instruction register width and codes (chip-level and embedded TAPCs).
  localparam int unsigned TAP_IR_W = 4;
  localparam logic [TAP_IR_W-1:0] IR_BYPASS = 4'b1111;
  localparam logic [TAP_IR_W-1:0] IR_IDCODE = 4'b0001;
  localparam logic [TAP_IR_W-1:0] IR_USER   = 4'b1000;  // core/chip specific data register
  // Value loaded into the IR in Capture-IR (1149.1 requires "01" in the two LSBs).
  localparam logic [TAP_IR_W-1:0] IR_CAPTURE = 4'b0001;

  // IEEE 1500 wrapper instruction register.
  localparam int unsigned WIR_W = 2;
  typedef enum logic [WIR_W-1:0] {
    WS_BYPASS     = 2'd0,  // WBY between WSI and WSO
    WS_INTEST_SCAN = 2'd1, // core scan chains loaded from the input TAM, compacted in the MISR
    WS_EXTEST     = 2'd2,  // wrapper boundary register between WSI and WSO
    WS_READ_SIG   = 2'd3   // MISR signature captured and shifted out
  } wir_t;

  // Default sizes.
  localparam int unsigned TAM_W_DEF   = 16;  // input TAM width of the main configuration
  localparam int unsigned CHIP_ID_W   = 8;   // chip ID / E-MSTAR register width (K)
  localparam int unsigned NUM_CORES   = 3;   // cores behind I-MSTARC (L): 1500 core, LBIST core, MBIST core

endpackage
