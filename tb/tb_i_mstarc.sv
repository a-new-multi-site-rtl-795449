// Testbench of i_mstarc: for every combination of core selections, loads the
// register, then drives random chain input and core outputs and compares each
// core's serial input, the chain output, the clock enables and the per-core TAM
// with a reference model of the bypass daisy chain (core L-1 first).
module tb_i_mstarc;
  localparam int L = 3, TW = 4;
  logic tck = 0, trst_n = 1, sdi = 0, so, chain_in = 0, chain_out;
  logic [L-1:0] core_sel, core_tdi, core_tdo = '0, core_tck_en;
  logic [TW-1:0] tam = '0, core_tam [L];
  int checks = 0, failures = 0;

  i_mstarc #(.L(L), .TAM_W(TW)) dut (.tck, .trst_n, .sdi, .so, .core_sel, .chain_in,
    .core_tdi, .core_tdo, .chain_out, .core_tck_en, .tam, .core_tam);

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] sel, exp_tdi;
    logic x, exp_out;
    for (int s = 0; s < (1 << L); s++) begin
      sel = L'(s);
      trst_n = 0;
      for (int i = 0; i < L; i++) begin sdi = sel[i]; @(posedge tck); #1; end
      trst_n = 1;
      checks++;
      if (core_sel !== sel || core_tck_en !== sel) begin
        failures++; $display("sel load got %b want %b", core_sel, sel);
      end
      for (int t = 0; t < 16; t++) begin
        chain_in = 1'($urandom);
        core_tdo = L'($urandom);
        tam      = TW'($urandom);
        #1;
        x = chain_in;
        for (int i = L - 1; i >= 0; i--) begin
          exp_tdi[i] = x;
          if (sel[i]) x = core_tdo[i];
        end
        exp_out = x;
        checks++;
        if (core_tdi !== exp_tdi || chain_out !== exp_out) begin
          failures++;
          $display("sel=%b in=%b tdo=%b: tdi %b/%b out %b/%b", sel, chain_in, core_tdo,
                   core_tdi, exp_tdi, chain_out, exp_out);
        end
        for (int i = 0; i < L; i++) begin
          checks++;
          if (core_tam[i] !== (sel[i] ? tam : '0)) begin
            failures++; $display("tam core %0d", i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
