// tb_rs_syndrome_calc: self-checking test of the serial syndrome calculator.
//
// Codewords from the reference encoder, with 0..10 random symbol errors, are
// streamed in; the 16 syndromes must equal those computed directly from
// their definition (zero for a clean codeword) and syn_valid must pulse one
// cycle after the last symbol.
module tb_rs_syndrome_calc;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  gf_t  in_sym = 0;
  gf_t  syn [2*T];
  logic syn_valid;
  int checks = 0, failures = 0;

  rs_syndrome_calc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw_t  r;
    syn_t s;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 12; n++) begin
      r = random_codeword();
      for (int k = 0; k < (n % 11); k++) r[$urandom_range(254)] ^= sym_t'($urandom_range(255, 1));
      s = syndromes(r);
      for (int j = 0; j < 255; j++) begin
        in_valid <= 1; in_sof <= (j == 0); in_sym <= r[254-j];
        @(posedge clk);
      end
      in_valid <= 0; in_sof <= 0;
      #1;
      checks++;
      if (!syn_valid) begin failures++; $display("syn_valid missing"); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (syn[i] != s[i]) begin failures++; $display("cw %0d S_%0d got %h exp %h", n, i+1, syn[i], s[i]); end
      end
      repeat (1 + n % 5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
