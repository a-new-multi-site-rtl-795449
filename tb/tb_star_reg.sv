// Testbench of star_reg: shifts random bits with nTRST low and compares the
// parallel and serial outputs with a reference shift model after every TCK;
// then raises nTRST and checks that the contents hold while TDI keeps toggling.
module tb_star_reg;
  localparam int W = 5;
  logic tck = 0, trst_n = 0, sdi = 0;
  logic [W-1:0] q, ref_q;
  logic so;
  int checks = 0, failures = 0;

  star_reg #(.W(W)) dut (.tck, .trst_n, .sdi, .q, .so);

  always #5 tck = ~tck;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    trst_n = 0;
    // Fill with known zeros first.
    for (int i = 0; i < W; i++) begin
      sdi = 0; @(posedge tck); #1;
    end
    for (int i = 0; i < 40; i++) begin
      sdi = 1'($urandom);
      @(posedge tck); #1;
      ref_q = {sdi, ref_q[W-1:1]};
      checks++;
      if (q !== ref_q || so !== ref_q[0]) begin
        failures++;
        $display("shift mismatch q=%b ref=%b", q, ref_q);
      end
    end
    trst_n = 1;
    for (int i = 0; i < 20; i++) begin
      sdi = 1'($urandom);
      @(posedge tck); #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("hold mismatch q=%b ref=%b", q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
