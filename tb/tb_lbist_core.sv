// Testbench of lbist_core: through the embedded TAP controller, selects the USER
// register, writes start, checks that the BIST is busy for exactly NPAT TCK
// cycles, then reads {signature, done, busy} and compares the signature with a
// model of the pattern generator, the logic under test and the MISR written
// here. Also checks that a disabled core does not advance and that a TAP reset
// keeps the result.
module tb_lbist_core;
  import mstar_pkg::*;
  localparam int NPAT = 256;
  jtag_bfm j ();
  logic tck_en = 1, por_n = 0, busy, done;
  logic [15:0] signature;
  int checks = 0, failures = 0, busy_cycles = 0;

  lbist_core #(.NPAT(NPAT)) dut (.tck(j.tck), .trst_n(j.trst_n), .tck_en, .por_n, .tms(j.tms),
    .tdi(j.tdi), .tdo(j.tdo), .busy, .done, .signature);
  assign j.tdo_oe = 1'b0;

  always @(posedge j.tck) if (busy && tck_en) busy_cycles++;

  function automatic logic [15:0] model_sig();
    logic [15:0] p, s, o;
    p = 16'hACE1;
    s = '0;
    for (int i = 0; i < NPAT; i++) begin
      o = {p[7:0] ^ p[15:8], 8'(p[7:0] + p[15:8])};
      s = {s[14:0], 1'b0} ^ (s[15] ? 16'h1021 : 16'h0) ^ o;
      p = {p[14:0], p[15] ^ p[13] ^ p[12] ^ p[10]};
    end
    return s;
  endfunction

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
    j.shift_dr('0, 32, o);
    expect_eq(o[31:0], 32'h2000_0001, "IDCODE");
    j.shift_ir(IR_USER, 4, o);
    j.shift_dr('0, 18, o);
    expect_eq(o[1:0], 2'b00, "idle status");
    busy_cycles = 0;
    j.shift_dr(256'h1, 18, o);
    j.idle(NPAT / 2);
    // Freeze for a while: no progress.
    tck_en = 0;
    j.idle(50);
    tck_en = 1;
    j.idle(NPAT);
    expect_eq(busy_cycles, NPAT, "BIST length in cycles");
    expect_eq(done, 1'b1, "done");
    // TAP reset keeps the result.
    j.trst_n = 0; #20 j.trst_n = 1;
    j.reset_to_idle();
    j.shift_ir(IR_USER, 4, o);
    j.shift_dr('0, 18, o);
    expect_eq(o[17:0], {model_sig(), 2'b10}, "signature, done, busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
