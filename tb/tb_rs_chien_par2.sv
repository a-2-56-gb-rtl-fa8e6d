// tb_rs_chien_par2: self-checking test of the parallel-2 Chien search.
//
// Lambda(x) = prod (1 - X_k x) is built for 0..8 random distinct error
// positions (scaled by a random constant), plus some polynomials whose
// stated degree does not match their roots.  The search must report every
// position in reception order with its locator alpha^l, set fail exactly
// when the root count differs from the degree, and finish in 128 cycles.
module tb_rs_chien_par2;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t lambda [T+1];
  logic [4:0] deg = 0;
  logic [7:0] root_pos [T];
  gf_t root_x [T];
  logic [3:0] nroots;
  logic fail, done;
  int checks = 0, failures = 0;

  rs_chien_par2 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t lam [9];
    int   pos [8];
    int   v, cyc;
    bit   exp_fail;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      v = n % 9;
      for (int k = 0; k < v; k++) begin
        bit dup;
        do begin
          pos[k] = $urandom_range(254); dup = 0;
          for (int q = 0; q < k; q++) if (pos[q] == pos[k]) dup = 1;
        end while (dup);
      end
      // sort descending (reception order)
      for (int a = 0; a < v; a++)
        for (int b = a + 1; b < v; b++)
          if (pos[b] > pos[a]) begin int t; t = pos[a]; pos[a] = pos[b]; pos[b] = t; end
      for (int j = 0; j < 9; j++) lam[j] = 0;
      lam[0] = sym_t'($urandom_range(255, 1));
      for (int k = 0; k < v; k++)
        for (int j = 8; j > 0; j--) lam[j] ^= mul(lam[j-1], apow(pos[k]));
      exp_fail = (n % 10 == 7);
      for (int j = 0; j < 9; j++) lambda[j] = lam[j];
      deg = exp_fail ? 5'(v + 1) : 5'(v);
      start <= 1; @(posedge clk); start <= 0;
      #1; cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != 128) begin failures++; $display("search took %0d cycles", cyc); end
      checks++;
      if (fail != exp_fail) begin failures++; $display("case %0d: fail=%0d", n, fail); end
      checks++;
      if (nroots != 4'(v)) begin failures++; $display("case %0d: nroots %0d exp %0d", n, nroots, v); end
      for (int k = 0; k < v && k < int'(nroots); k++) begin
        checks++;
        if (root_pos[k] != 8'(pos[k]) || root_x[k] != apow(pos[k])) begin
          failures++; $display("case %0d root %0d: pos %0d exp %0d", n, k, root_pos[k], pos[k]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
