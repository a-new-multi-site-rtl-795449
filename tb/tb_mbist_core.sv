// Testbench of mbist_core: starts March C- through the embedded TAP controller,
// checks that the engine is busy for exactly 10*DEPTH TCK cycles, that every
// memory word ends at zero, and that the status read through the USER register
// is {fail=0, done=1, busy=0}; then corrupts one word during the run and checks
// that fail is reported.
module tb_mbist_core;
  import mstar_pkg::*;
  localparam int DEPTH = 16;
  jtag_bfm j ();
  logic tck_en = 1, por_n = 0, busy, done, fail;
  int checks = 0, failures = 0, busy_cycles = 0;

  mbist_core #(.DEPTH(DEPTH)) dut (.tck(j.tck), .trst_n(j.trst_n), .tck_en, .por_n, .tms(j.tms),
    .tdi(j.tdi), .tdo(j.tdo), .busy, .done, .fail);
  assign j.tdo_oe = 1'b0;

  always @(posedge j.tck) if (busy && tck_en) busy_cycles++;

  task automatic expect_eq(input logic [255:0] got, input logic [255:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] o;
    j.trst_n = 0;
    j.idle(3);
    por_n = 1;
    j.trst_n = 1;
    j.reset_to_idle();
    j.shift_ir(IR_USER, 4, o);
    busy_cycles = 0;
    j.shift_dr(256'h1, 3, o);
    j.idle(10 * DEPTH + 5);
    expect_eq(busy_cycles, 10 * DEPTH, "March C- length in cycles");
    for (int a = 0; a < DEPTH; a++) expect_eq(dut.mem[a], 8'h00, "final memory word");
    j.shift_dr('0, 3, o);
    expect_eq(o[2:0], 3'b010, "status {fail,done,busy}");
    // Disturb a word in the middle of the run: the test must fail.
    j.shift_dr(256'h1, 3, o);
    j.idle(3 * DEPTH);
    dut.mem[5] = 8'h10;
    j.idle(8 * DEPTH);
    j.shift_dr('0, 3, o);
    expect_eq(o[2:0], 3'b110, "status after disturbed run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
