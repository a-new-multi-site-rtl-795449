// Testbench of e_mstarc: loads DUT codes through the serial input, then checks
// match_n (low only when the code equals the chip ID) and the TDO enable (the
// TAP enable gated by the match) for several chip IDs, including IDs that differ
// from the code in a single bit. Also checks that a load takes K TCK cycles.
module tb_e_mstarc;
  localparam int K = 8;
  logic tck = 0, trst_n = 1, sdi = 0, so, tdo_en_tapc = 0, match_n, tdo_oe;
  logic [K-1:0] chip_id = '0, dut_code;
  int checks = 0, failures = 0;

  e_mstarc #(.K(K)) dut (.tck, .trst_n, .sdi, .so, .chip_id, .tdo_en_tapc, .dut_code, .match_n, .tdo_oe);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [K-1:0] code);
    trst_n = 0;
    for (int i = 0; i < K; i++) begin
      sdi = code[i];
      @(posedge tck); #1;
    end
    trst_n = 1;
  endtask

  task automatic check(input logic [K-1:0] code, input logic [K-1:0] id);
    chip_id = id;
    for (int e = 0; e < 2; e++) begin
      tdo_en_tapc = 1'(e);
      #1;
      checks++;
      if (match_n !== (code != id) || tdo_oe !== (1'(e) && code == id)) begin
        failures++;
        $display("code=%h id=%h en=%0d match_n=%b oe=%b", code, id, e, match_n, tdo_oe);
      end
    end
  endtask

  initial begin
    logic [K-1:0] code;
    for (int t = 0; t < 30; t++) begin
      code = K'($urandom);
      load(code);
      checks++;
      if (dut_code !== code) begin
        failures++;
        $display("load: got %h want %h", dut_code, code);
      end
      check(code, code);
      check(code, code ^ (K'(1) << (t % K)));
      check(code, K'($urandom));
      // Hold while nTRST is high.
      repeat (3) begin sdi = ~sdi; @(posedge tck); #1; end
      check(code, code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
