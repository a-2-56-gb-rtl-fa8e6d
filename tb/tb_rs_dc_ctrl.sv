// tb_rs_dc_ctrl: self-checking test of the decision-confined candidate loop
// (syndrome updater + IR-RiBM solver + controller).
//
// Error patterns are built so that each outcome occurs: a flipped candidate
// with deg(Lambda) < T (early and late in the Gray walk) and the hard
// fallback after all 31 candidates.  The reference flips the LRP bits of
// gamma(i) = i ^ (i >> 1) in the received word, recomputes the syndromes
// from scratch and runs Berlekamp-Massey; the first i with degree below T
// is expected, else the hard result.  Checked: candidate index, flip
// pattern, degree, Lambda (up to scale), S_1..S_8 of the chosen candidate,
// and done at cycle 10 + 8*i after start (258 for the fallback).
module tb_rs_dc_ctrl;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t syn_in [2*T];
  lrp_t lrp_in [ETA];
  gf_t res_lambda [T+1];
  logic [4:0] res_deg;
  gf_t res_syn [T];
  logic [ETA-1:0] res_flip, res_cand;
  logic res_soft, done;
  int checks = 0, failures = 0;
  int n_soft = 0, n_hard = 0;

  rs_dc_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw_t  e, rc;
    syn_t s, sc, s0;
    lam_t lam, got;
    int   len, acc, cyc, p, ne;
    int   lp [5], lb [5];
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      for (int l = 0; l < 255; l++) e[l] = 0;
      for (int m = 0; m < 5; m++) begin
        bit dup;
        do begin
          lp[m] = $urandom_range(254); dup = 0;
          for (int q = 0; q < m; q++) if (lp[q] == lp[m]) dup = 1;
        end while (dup);
        lb[m] = $urandom_range(7);
      end
      // n%4: 0 -> few errors, 1 -> 8 errors + LRP bit errors (soft, late),
      //      2 -> 8 errors off the LRPs (hard fallback), 3 -> 14 errors
      ne = (n % 4 == 0) ? 3 : (n % 4 == 3) ? 14 : 8 - (n % 4 == 1 ? 1 : 0);
      for (int k = 0; k < ne; k++) begin
        bit bad;
        do begin
          p = $urandom_range(254); bad = (e[p] != 0);
          for (int m = 0; m < 5; m++) if (lp[m] == p) bad = 1;
        end while (bad);
        e[p] = sym_t'($urandom_range(255, 1));
      end
      if (n % 4 == 1) begin            // LRPs 3 and 4 are wrong bits: i = 24 ... 31
        e[lp[3]] ^= sym_t'(1 << lb[3]);
        e[lp[4]] ^= sym_t'(1 << lb[4]);
      end
      s0 = syndromes(e);
      acc = 0;
      for (int i = 1; i < 32 && acc == 0; i++) begin
        int g;
        g = i ^ (i >> 1);
        rc = e;
        for (int m = 0; m < 5; m++) if (g[m]) rc[lp[m]] ^= sym_t'(1 << lb[m]);
        sc = syndromes(rc);
        bm(sc, lam, len);
        if (len < 8) acc = i;
      end
      if (acc == 0) begin sc = s0; bm(sc, lam, len); end
      for (int j = 0; j < 16; j++) syn_in[j] = s0[j];
      for (int m = 0; m < 5; m++) lrp_in[m] = '{rel: REL_W'(m), pos: 8'(lp[m]), bit_idx: 3'(lb[m])};
      start <= 1; @(posedge clk); start <= 0;
      #1; cyc = 1;
      while (!done && cyc < 400) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != 10 + 8 * ((acc == 0) ? 31 : acc)) begin
        failures++; $display("run %0d: done at %0d, candidate %0d", n, cyc, acc);
      end
      checks++;
      if (res_cand != ETA'(acc) || res_soft != (acc != 0) || res_flip != ETA'(acc ^ (acc >> 1))) begin
        failures++; $display("run %0d: cand %0d soft %0d flip %b exp cand %0d", n, res_cand, res_soft, res_flip, acc);
      end
      checks++;
      if (res_deg != 5'(len)) begin failures++; $display("run %0d: deg %0d exp %0d", n, res_deg, len); end
      for (int j = 0; j < 9; j++) got[j] = res_lambda[j];
      if (len <= 8) begin
        checks++;
        if (!same_up_to_scale(lam, got)) begin failures++; $display("run %0d: Lambda mismatch", n); end
      end
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (res_syn[j] != sc[j]) begin failures++; $display("run %0d: S_%0d mismatch", n, j+1); end
      end
      if (acc != 0) n_soft++; else n_hard++;
      repeat (3) @(posedge clk);
    end
    $display("soft=%0d hard=%0d", n_soft, n_hard);
    checks++; if (n_soft == 0 || n_hard == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
