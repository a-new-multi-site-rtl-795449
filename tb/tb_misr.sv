// Testbench of misr: feeds random words with random enables and compares the
// signature with a reference model (shift toward the MSB, feedback through the
// polynomial x^16+x^12+x^5+1, XOR of the data word); checks the clear.
module tb_misr;
  logic clk = 0, clr = 1, en = 0;
  logic [15:0] d = '0, sig, ref_sig;
  int checks = 0, failures = 0;

  misr #(.W(16)) dut (.clk, .clr, .en, .d, .sig);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    clr = 0;
    ref_sig = '0;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom % 4) != 0;
      d  = 16'($urandom);
      clr = (i == 150);
      @(posedge clk); #1;
      if (clr) ref_sig = '0;
      else if (en) ref_sig = {ref_sig[14:0], 1'b0} ^ (ref_sig[15] ? 16'h1021 : 16'h0) ^ d;
      checks++;
      if (sig !== ref_sig) begin
        failures++; $display("step %0d sig %h ref %h", i, sig, ref_sig);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
