// Tester-side driver of the five 1149.1 pins, shared by the testbenches.
//
// One call of tick() is one TCK period of 10 time units: TMS and TDI are set
// while TCK is low, TDO is sampled just before the rising edge, then TCK rises
// and falls. star_load() shifts a STAR register image with nTRST held low, LSB
// first, one bit per TCK, and leaves nTRST high. shift_ir()/shift_dr() start and
// end in Run-Test/Idle and shift LSB first; the bits seen on TDO come back in
// the same order. tdo_oe_seen counts the shift cycles in which TDO was driven.
interface jtag_bfm;
  logic tck    = 1'b0;
  logic tms    = 1'b1;
  logic tdi    = 1'b0;
  logic trst_n = 1'b0;
  logic tdo;
  logic tdo_oe;
  int   oe_cycles;
  int   cycles;

  task automatic tick(input logic m, input logic d, output logic o);
    tms = m;
    tdi = d;
    #4;
    o = tdo;
    if (tdo_oe) oe_cycles++;
    #1 tck = 1'b1;
    cycles++;
    #5 tck = 1'b0;
  endtask

  task automatic step(input logic m);
    logic o;
    tick(m, 1'b0, o);
  endtask

  // Test-Logic-Reset by five TMS=1, then Run-Test/Idle.
  task automatic reset_to_idle();
    repeat (5) step(1'b1);
    step(1'b0);
  endtask

  task automatic idle(input int n);
    repeat (n) step(1'b0);
  endtask

  task automatic star_load(input logic [255:0] v, input int n);
    logic o;
    trst_n = 1'b0;
    for (int i = 0; i < n; i++) tick(1'b0, v[i], o);
    trst_n = 1'b1;
    #1;
  endtask

  task automatic shift_dr(input logic [255:0] din, input int n, output logic [255:0] dout);
    logic o;
    dout = '0;
    step(1'b1);   // Select-DR
    step(1'b0);   // Capture-DR
    step(1'b0);   // Shift-DR
    for (int i = 0; i < n; i++) begin
      tick(i == n - 1, din[i], o);
      dout[i] = o;
    end
    step(1'b1);   // Update-DR
    step(1'b0);   // Run-Test/Idle
  endtask

  task automatic shift_ir(input logic [255:0] din, input int n, output logic [255:0] dout);
    logic o;
    dout = '0;
    step(1'b1);   // Select-DR
    step(1'b1);   // Select-IR
    step(1'b0);   // Capture-IR
    step(1'b0);   // Shift-IR
    for (int i = 0; i < n; i++) begin
      tick(i == n - 1, din[i], o);
      dout[i] = o;
    end
    step(1'b1);   // Update-IR
    step(1'b0);   // Run-Test/Idle
  endtask
endinterface
