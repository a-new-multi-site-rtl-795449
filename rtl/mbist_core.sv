// TAPed core with memory BIST, reached through its embedded TAP controller.
//
// The core holds a DEPTH x DATA_W memory (a register array) and a March C- test
// engine: {any(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); any(r0)},
// with all-zero / all-one data words. Each read or write takes one TCK, so a
// complete run takes 10*DEPTH cycles. Writing the embedded TAP controller's
// 3-bit USER register with bit 0 set starts the test; reading it returns
// {fail, done, busy}. fail is sticky and is set by any read that differs from
// the expected word. The engine runs on TCK while the core is enabled (tck_en,
// the I-MSTARC selection) and survives TAP resets; por_n clears it.
//
// That the core is tested by MBIST through an embedded TAP controller follows
// the design; the algorithm, the memory size and the register layout are this
// design's own.
module mbist_core
  import mstar_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = 8,
  parameter logic [31:0] IDCODE = 32'h3000_0001
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
  output logic fail
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef enum logic [2:0] {M0, M1, M2, M3, M4, M5} march_t;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [2:0]        user_upd;
  logic              user_upd_stb, tdo_en_unused;
  tap_state_t        state_unused;
  logic [TAP_IR_W-1:0] ir_unused;
  march_t            elem;
  logic [AW-1:0]     addr;
  logic              op;       // 0: first operation of the element, 1: second
  logic              start, last_addr, is_read, wr_en;
  logic [DATA_W-1:0] exp_word, wr_word;

  tap_ctrl #(.USER_W(3), .IDCODE(IDCODE)) u_tap (
    .tck, .trst_n, .tck_en, .tms, .tdi, .tdo, .tdo_en(tdo_en_unused),
    .state(state_unused), .ir(ir_unused),
    .user_cap({fail, done, busy}), .user_upd, .user_upd_stb
  );

  assign start = tck_en && user_upd_stb && user_upd[0];

  // Operation of the current step.
  always_comb begin
    is_read  = 1'b0;
    exp_word = '0;
    wr_word  = '0;
    unique case (elem)
      M0: begin is_read = 1'b0;             wr_word = '0; end
      M1: begin is_read = !op; exp_word = '0; wr_word = '1; end
      M2: begin is_read = !op; exp_word = '1; wr_word = '0; end
      M3: begin is_read = !op; exp_word = '0; wr_word = '1; end
      M4: begin is_read = !op; exp_word = '1; wr_word = '0; end
      M5: begin is_read = 1'b1; exp_word = '0;            end
      default: ;
    endcase
    wr_en     = tck_en && busy && !is_read;
    last_addr = (elem == M3 || elem == M4) ? (addr == '0) : (addr == AW'(DEPTH - 1));
  end

  always_ff @(posedge tck)
    if (wr_en) mem[addr] <= wr_word;

  always_ff @(posedge tck) begin
    if (!por_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      fail <= 1'b0;
      elem <= M0;
      addr <= '0;
      op   <= 1'b0;
    end else if (start) begin
      busy <= 1'b1;
      done <= 1'b0;
      fail <= 1'b0;
      elem <= M0;
      addr <= '0;
      op   <= 1'b0;
    end else if (tck_en && busy) begin
      if (is_read && mem[addr] != exp_word) fail <= 1'b1;
      if ((elem == M0 || elem == M5) || op) begin
        op <= 1'b0;
        if (last_addr) begin
          unique case (elem)
            M0: begin elem <= M1; addr <= '0; end
            M1: begin elem <= M2; addr <= '0; end
            M2: begin elem <= M3; addr <= AW'(DEPTH - 1); end
            M3: begin elem <= M4; addr <= AW'(DEPTH - 1); end
            M4: begin elem <= M5; addr <= '0; end
            default: begin busy <= 1'b0; done <= 1'b1; end
          endcase
        end else if (elem == M3 || elem == M4) begin
          addr <= addr - 1'b1;
        end else begin
          addr <= addr + 1'b1;
        end
      end else begin
        op <= 1'b1;
      end
    end
  end

endmodule
