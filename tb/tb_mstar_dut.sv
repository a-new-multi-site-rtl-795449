// Testbench of mstar_dut (one SoC, default sizes). Checks:
//  - with no core selected and the DUT's own code, the chain is the chip-level
//    TAP controller alone: 4-bit IR capture, IDCODE, chip ID, 1-bit BYPASS;
//  - with a code that is not the chip ID, TDO is never enabled;
//  - TDO and its enable change on the falling TCK edge;
//  - the STAR register can be loaded from TMS when STAR_FROM_TMS is set
//    (second instance);
//  - each single core selection puts exactly that core's register behind the
//    chip-level controller (chain lengths of BYPASS: 2 bits), and the MBIST
//    core runs and reports through the chain.
module tb_mstar_dut;
  import mstar_pkg::*;
  localparam logic [7:0] ID = 8'h6B;
  jtag_bfm j ();
  logic por_n = 0;
  logic [15:0] tam = '0;
  logic tdo_a, oe_a, tdo_b, oe_b, match_n_a, match_n_b;
  logic [2:0] sel_a, sel_b;
  int checks = 0, failures = 0, edge_err = 0;
  bit use_b = 0;

  mstar_dut dut_a (.tck(j.tck), .tms(j.tms), .tdi(j.tdi), .trst_n(j.trst_n), .por_n, .tam,
    .chip_id(ID), .func_in(8'h3C), .tdo(tdo_a), .tdo_oe(oe_a), .core_sel(sel_a), .match_n(match_n_a));
  mstar_dut #(.STAR_FROM_TMS(1'b1)) dut_b (.tck(j.tck), .tms(j.tms), .tdi(j.tdi), .trst_n(j.trst_n),
    .por_n, .tam, .chip_id(ID), .func_in(8'h3C), .tdo(tdo_b), .tdo_oe(oe_b), .core_sel(sel_b),
    .match_n(match_n_b));
  assign j.tdo    = use_b ? tdo_b : tdo_a;
  assign j.tdo_oe = use_b ? oe_b : oe_a;

  // TDO may only change while TCK is low (it is launched on the falling edge).
  always @(tdo_a or oe_a) if (j.tck && j.trst_n && $time > 0) edge_err++;

  task automatic expect_eq(input logic [255:0] got, input logic [255:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  task automatic star(input logic [2:0] sel, input logic [7:0] code);
    j.star_load({sel, code}, 11);
    j.step(1'b0);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] o;
    int oe0;
    j.trst_n = 0;
    j.idle(3);
    por_n = 1;
    star(3'b000, ID);
    expect_eq(match_n_a, 1'b0, "match");
    j.shift_ir(IR_IDCODE, 4, o);
    expect_eq(o[3:0], IR_CAPTURE, "IR capture, chip TAP only");
    j.shift_dr('0, 32, o);
    expect_eq(o[31:0], 32'h1000_0001, "IDCODE");
    j.shift_ir(IR_USER, 4, o);
    j.shift_dr('0, 8, o);
    expect_eq(o[7:0], ID, "chip ID register");
    j.shift_ir(IR_BYPASS, 4, o);
    j.shift_dr(256'h5, 4, o);
    expect_eq(o[3:0], 4'hA, "BYPASS, no core in chain");

    // Wrong code: silent.
    star(3'b000, ID ^ 8'h10);
    expect_eq(match_n_a, 1'b1, "mismatch");
    oe0 = j.oe_cycles;
    j.shift_dr('0, 32, o);
    expect_eq(j.oe_cycles - oe0, 0, "TDO silent for another code");

    // Each core alone behind the chip-level controller: all in bypass -> 2 bits.
    for (int c = 0; c < 3; c++) begin
      logic [2:0] sel;
      sel = 3'b001 << c;
      star(sel, ID);
      expect_eq(sel_a, sel, "core selection");
      j.shift_ir({IR_BYPASS, (c == 2) ? 4'b0000 : IR_BYPASS}, (c == 2) ? 6 : 8, o);
      j.shift_dr(256'h9, 6, o);
      expect_eq(o[5:0], 6'h24, "two-bit bypass chain");   // 9 delayed by two
    end

    // MBIST through the chain.
    star(3'b001, ID);
    j.shift_ir({IR_BYPASS, IR_USER}, 8, o);
    j.shift_dr({1'b0, 3'b001}, 4, o);
    j.idle(170);
    j.shift_dr('0, 4, o);
    expect_eq(o[2:0], 3'b010, "MBIST status via chain");

    // STAR register loaded from TMS in the second instance.
    use_b = 1;
    j.trst_n = 0;
    for (int i = 0; i < 11; i++) begin
      logic d;
      j.tick(1'(({3'b010, ID} >> i) & 1), 1'b0, d);
    end
    j.trst_n = 1;
    #1;
    expect_eq(sel_b, 3'b010, "STAR loaded from TMS");
    expect_eq(match_n_b, 1'b0, "code loaded from TMS");
    expect_eq(edge_err, 0, "TDO changed while TCK high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
