// Testbench of mstarc: loads {core selection, DUT code} images of L+K bits with
// nTRST low (first bit ends in E-MSTARC stage 0), checks that exactly L+K TCK
// cycles place every bit, that the serial output leaves the chain, and that the
// selections drive the bypass chain and the TDO enable.
module tb_mstarc;
  localparam int L = 3, K = 8, TW = 4;
  logic tck = 0, trst_n = 1, sdi = 0, so, chain_in = 0, chain_out, tdo_en_tapc = 1, match_n, tdo_oe;
  logic [L-1:0] core_sel, core_tdi, core_tdo = '0, core_tck_en;
  logic [TW-1:0] tam = '1, core_tam [L];
  logic [K-1:0] chip_id = 8'h5A, dut_code;
  int checks = 0, failures = 0;

  mstarc #(.L(L), .K(K), .TAM_W(TW)) dut (.tck, .trst_n, .sdi, .so, .core_sel, .chain_in,
    .core_tdi, .core_tdo, .chain_out, .core_tck_en, .tam, .core_tam, .chip_id, .tdo_en_tapc,
    .dut_code, .match_n, .tdo_oe);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L+K-1:0] img, prev;
    int n;
    prev = '0;
    trst_n = 0;
    for (int i = 0; i < L + K; i++) begin sdi = 0; @(posedge tck); #1; end
    for (int t = 0; t < 20; t++) begin
      img = (t == 0) ? {3'b101, 8'h5A} : (L + K)'($urandom);
      n = 0;
      trst_n = 0;
      for (int i = 0; i < L + K; i++) begin
        sdi = img[i];
        // Serial output leaves the previous image, stage 0 first.
        checks++;
        if (so !== prev[i]) begin failures++; $display("so bit %0d", i); end
        @(posedge tck); #1;
        n++;
      end
      trst_n = 1;
      #1;
      checks++;
      if (n != L + K || core_sel !== img[L+K-1:K] || dut_code !== img[K-1:0]) begin
        failures++;
        $display("img %b: sel %b code %h", img, core_sel, dut_code);
      end
      checks++;
      if (tdo_oe !== (img[K-1:0] == chip_id) || match_n !== (img[K-1:0] != chip_id)) begin
        failures++; $display("oe mismatch");
      end
      chain_in = 1;
      core_tdo = '0;
      #1;
      checks++;
      if (chain_out !== (img[L+K-1:K] == '0)) begin failures++; $display("chain_out"); end
      prev = img;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
