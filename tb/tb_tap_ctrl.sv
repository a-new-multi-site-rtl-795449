// Testbench of tap_ctrl: after reset reads the 32-bit IDCODE, checks the IR
// capture pattern, the one-cycle BYPASS delay, the USER register capture and
// update with its strobe, the TDO enable in the shift states and the freeze of a
// disabled controller.
module tb_tap_ctrl;
  import mstar_pkg::*;
  localparam logic [31:0] ID = 32'h1234_5671;
  jtag_bfm j ();
  tap_state_t state;
  logic [TAP_IR_W-1:0] ir;
  logic [7:0] user_cap = 8'hC3, user_upd;
  logic user_upd_stb, tdo_en, tck_en = 1;
  int checks = 0, failures = 0, strobes = 0;

  tap_ctrl #(.USER_W(8), .IDCODE(ID)) dut (.tck(j.tck), .trst_n(j.trst_n), .tck_en, .tms(j.tms),
    .tdi(j.tdi), .tdo(j.tdo), .tdo_en, .state, .ir, .user_cap, .user_upd, .user_upd_stb);
  assign j.tdo_oe = tdo_en;

  always @(posedge j.tck) if (user_upd_stb) strobes++;

  task automatic expect_eq(input logic [255:0] got, input logic [255:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] o;
    int oe0;
    j.trst_n = 0;
    #20 j.trst_n = 1;
    j.reset_to_idle();
    oe0 = j.oe_cycles;
    j.shift_dr('0, 32, o);
    expect_eq(o[31:0], ID, "IDCODE after reset");
    expect_eq(j.oe_cycles - oe0, 32, "TDO enable cycles in Shift-DR");
    j.shift_ir({4'b0, IR_BYPASS}, 4, o);
    expect_eq(o[3:0], IR_CAPTURE, "IR capture");
    expect_eq(ir, IR_BYPASS, "IR update");
    j.shift_dr(256'hB5, 8, o);
    expect_eq(o[7:0], 8'h6A, "BYPASS one-bit delay");   // {B5,0} >> 0: 0 then bits 0..6
    j.shift_ir(IR_USER, 4, o);
    j.shift_dr(256'h96, 8, o);
    expect_eq(o[7:0], 8'hC3, "USER capture");
    expect_eq(user_upd, 8'h96, "USER update");
    expect_eq(strobes, 1, "update strobe");
    // Disabled controller keeps its state.
    tck_en = 0;
    j.step(1'b1); j.step(1'b1); j.step(1'b1);
    expect_eq(state, TAP_RUN_IDLE, "frozen state");
    tck_en = 1;
    j.step(1'b0);
    // TMS reset returns the instruction to IDCODE.
    j.reset_to_idle();
    expect_eq(ir, IR_IDCODE, "IR after Test-Logic-Reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
