// TAPed core with logic BIST, reached through its embedded TAP controller.
//
// The embedded TAP controller (tap_ctrl) gives access to an 18-bit USER data
// register. Writing it with bit 0 set (Update-DR) starts the BIST; reading it
// (Capture-DR) returns {signature[15:0], done, busy}. While running, a 16-bit
// pattern generator (PRPG, Fibonacci LFSR x^16+x^14+x^13+x^11+1, seed SEED)
// drives the core logic and a 16-bit MISR compacts its outputs, one pattern per
// TCK, for NPAT patterns; then done is set and the signature held until the next
// start. The BIST runs on TCK whenever the core is enabled (tck_en, the I-MSTARC
// selection) and survives TAP resets; por_n clears it.
//
// That the core is tested by LBIST through an embedded TAP controller follows
// the design; the BIST engine, its sizes and the core logic it tests (an 8-bit
// adder and XOR of the two pattern halves, a stand-in for logic that is not
// described) are this design's own.
module lbist_core
  import mstar_pkg::*;
#(
  parameter int unsigned NPAT   = 256,
  parameter logic [15:0] SEED   = 16'hACE1,
  parameter logic [31:0] IDCODE = 32'h2000_0001
) (
  input  logic tck,
  input  logic trst_n,
  input  logic tck_en,
  input  logic por_n,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  output logic busy,
  output logic done,
  output logic [15:0] signature
);

  localparam int unsigned USER_W = 18;
  localparam int unsigned CNT_W  = $clog2(NPAT + 1);

  logic [USER_W-1:0] user_upd;
  logic              user_upd_stb, tdo_en_unused;
  tap_state_t        state_unused;
  logic [TAP_IR_W-1:0] ir_unused;
  logic [15:0]       prpg, cut_out;
  logic [CNT_W-1:0]  cnt;
  logic              start;

  tap_ctrl #(.USER_W(USER_W), .IDCODE(IDCODE)) u_tap (
    .tck, .trst_n, .tck_en, .tms, .tdi, .tdo, .tdo_en(tdo_en_unused),
    .state(state_unused), .ir(ir_unused),
    .user_cap({signature, done, busy}), .user_upd, .user_upd_stb
  );

  assign start = tck_en && user_upd_stb && user_upd[0];

  // Logic under test.
  always_comb begin
    cut_out[7:0]  = prpg[7:0] + prpg[15:8];
    cut_out[15:8] = prpg[7:0] ^ prpg[15:8];
  end

  always_ff @(posedge tck) begin
    if (!por_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      prpg <= SEED;
    end else if (start) begin
      busy <= 1'b1;
      done <= 1'b0;
      cnt  <= '0;
      prpg <= SEED;
    end else if (tck_en && busy) begin
      prpg <= {prpg[14:0], prpg[15] ^ prpg[13] ^ prpg[12] ^ prpg[10]};
      cnt  <= cnt + 1'b1;
      if (cnt == CNT_W'(NPAT - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  misr #(.W(16)) u_misr (
    .clk(tck), .clr(!por_n || start), .en(tck_en && busy), .d(cut_out), .sig(signature)
  );

endmodule
