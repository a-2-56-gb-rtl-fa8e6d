// tb_rs_rel_eval: self-checking test of the reliability evaluator.
//
// Codewords of 255 symbols with random 4-bit reliabilities (many ties) are
// streamed in, back to back and with gaps.  The reference is a stable
// selection of the 5 smallest (reliability, arrival index, bit index)
// triples.  lrp_valid must pulse exactly 3 cycles after the last symbol.
module tb_rs_rel_eval;
  import rs_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [M-1:0][REL_W-1:0] in_rel = '0;
  lrp_t lrp [ETA];
  logic lrp_valid;
  int checks = 0, failures = 0;

  rs_rel_eval dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [REL_W-1:0] rel [255][8];
    int key [5], kb [5], kr [5];
    int best;
    for (int n = 0; n < 12; n++) begin
      for (int j = 0; j < 255; j++)
        for (int b = 0; b < 8; b++)
          rel[j][b] = (n % 3 == 0) ? REL_W'($urandom_range(15)) : REL_W'($urandom_range(15, 2));
      if (n % 3 == 1) rel[254][7] = 0;            // least reliable on the last bit
      // reference: 5 smallest, stable in (arrival, bit) order
      for (int m = 0; m < 5; m++) begin
        best = -1;
        for (int j = 0; j < 255; j++)
          for (int b = 0; b < 8; b++) begin
            bit used;
            used = 0;
            for (int q = 0; q < m; q++) if (key[q] == j && kb[q] == b) used = 1;
            if (!used && (best < 0 || rel[j][b] < kr[m])) begin
              best = 1; key[m] = j; kb[m] = b; kr[m] = rel[j][b];
            end
          end
      end
      if (n == 0) begin repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk); end
      for (int j = 0; j < 255; j++) begin
        in_valid <= 1; in_sof <= (j == 0);
        for (int b = 0; b < 8; b++) in_rel[b] <= rel[j][b];
        @(posedge clk);
      end
      in_valid <= 0; in_sof <= 0;
      for (int c = 1; c <= 3; c++) begin
        #1;
        checks++;
        if (lrp_valid != (c == 3)) begin failures++; $display("lrp_valid timing, cycle %0d", c); end
        if (c == 3)
          for (int m = 0; m < 5; m++) begin
            checks++;
            if (lrp[m].rel != REL_W'(kr[m]) || lrp[m].pos != 8'(254 - key[m]) || lrp[m].bit_idx != 3'(kb[m])) begin
              failures++;
              $display("cw %0d lrp %0d: got rel %0d pos %0d bit %0d exp rel %0d pos %0d bit %0d",
                       n, m, lrp[m].rel, lrp[m].pos, lrp[m].bit_idx, kr[m], 254 - key[m], kb[m]);
            end
          end
        @(posedge clk);
      end
      repeat ((n % 2 == 0) ? 1 : 10) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
