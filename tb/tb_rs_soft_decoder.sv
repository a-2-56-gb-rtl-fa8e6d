// tb_rs_soft_decoder: end-to-end test of the soft RS(255,239) decoder at its
// default size.
//
// Random codewords from the reference encoder are corrupted in five ways:
//   clean     no error
//   hard      1..7 random symbol errors
//   beyond    9 symbol errors, two of them single-bit errors sitting on
//             least reliable bits (only soft decoding can fix this)
//   fallback  8 symbol errors away from the LRPs: every flipped candidate
//             has deg(Lambda) >= T, so the hard Lambda must be used
//   heavy     20 symbol errors, usually a detected failure
// Bit reliabilities are 8..15 except five chosen bits with 0..4, so the LRP
// list is known exactly.  An independent reference decoder (candidate loop
// with direct syndromes, Berlekamp-Massey, exhaustive root search and
// Forney's formula) predicts every output word and status; for all but
// "heavy" the output must also equal the transmitted codeword.  Codewords
// are sent back to back at the 259-cycle period and with gaps; the first
// output symbol must come exactly 3*259+1 cycles after the first input
// symbol.  Each mechanism (soft acceptance, hard fallback, correction
// beyond T, detected failure, clean pass) must occur at least once.
module tb_rs_soft_decoder;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  gf_t  in_sym = 0;
  logic [M-1:0][REL_W-1:0] in_rel = '0;
  logic out_valid, out_sof;
  gf_t  out_sym;
  dec_status_t out_status;

  rs_soft_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clean = 0, n_soft = 0, n_fallback = 0, n_beyond = 0, n_fail = 0, n_b2b = 0;
  localparam int NCW = 30;

  initial begin
    repeat (NCW * 400 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in order
  cw_t         exp_cw [NCW];
  dec_status_t exp_st [NCW];
  cw_t         tx_cw  [NCW];
  bit          must_match_tx [NCW];
  longint      sof_time [$];
  longint      lat [$];
  longint      cyc = 0;
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n && in_valid && in_sof) sof_time.push_back(cyc);
    if (rst_n && out_valid && out_sof) lat.push_back(cyc - sof_time.pop_front());
  end

  // ---------------- reference decoder ----------------
  function automatic void ref_decode(cw_t r, int lp [5], int lb [5],
                                     output cw_t o, output dec_status_t st);
    cw_t  rc;
    syn_t s;
    lam_t lam;
    int   len, acc, nr;
    int   rpos [16];
    sym_t om [16];
    st = '0;
    acc = 0;
    for (int i = 1; i < 32 && acc == 0; i++) begin
      int g;
      g  = i ^ (i >> 1);
      rc = r;
      for (int m = 0; m < 5; m++) if (g[m]) rc[lp[m]] ^= sym_t'(1 << lb[m]);
      s = syndromes(rc);
      bm(s, lam, len);
      if (len < 8) acc = i;
    end
    if (acc == 0) begin
      rc = r;
      s = syndromes(rc);
      bm(s, lam, len);
    end
    st.flipped = (acc != 0);
    st.cand    = ETA'(acc);
    // exhaustive root search
    nr = 0;
    for (int l = 0; l < 255; l++) begin
      sym_t v, xi;
      xi = apow(-l);
      v = 0;
      for (int j = 8; j >= 0; j--) v = mul(v, xi) ^ lam[j];
      if (v == 0) begin if (nr < 16) rpos[nr] = l; nr++; end
    end
    if (len > 8 || nr != len) begin
      st.fail = 1; st.nerr = 0; o = r;
      return;
    end
    st.nerr = 4'(nr);
    // Forney: Omega = S*Lambda mod x^16, e = Omega(X^-1)/Lambda'(X^-1)
    for (int k = 0; k < 16; k++) begin
      om[k] = 0;
      for (int j = 0; j <= k && j <= 8; j++) om[k] ^= mul(lam[j], s[k-j]);
    end
    o = rc;
    for (int q = 0; q < nr; q++) begin
      sym_t xi, num, den, xp;
      xi = apow(-rpos[q]);
      num = 0; xp = 1;
      for (int k = 0; k < 16; k++) begin num ^= mul(om[k], xp); xp = mul(xp, xi); end
      den = 0; xp = 1;                      // Lambda'(x) = sum odd j Lambda_j x^(j-1)
      for (int j = 1; j <= 8; j++) begin
        if (j % 2 == 1) den ^= mul(lam[j], xp);
        xp = mul(xp, xi);
      end
      o[rpos[q]] ^= mul(num, inv(den));
    end
  endfunction

  // ---------------- stimulus ----------------
  task automatic send(cw_t r, logic [REL_W-1:0] rel [255][8]);
    for (int j = 0; j < 255; j++) begin
      in_valid <= 1; in_sof <= (j == 0);
      in_sym <= r[254-j];
      for (int b = 0; b < 8; b++) in_rel[b] <= rel[254-j][b];
      @(posedge clk);
    end
    in_valid <= 0; in_sof <= 0;
  endtask

  initial begin
    cw_t c, r, o;
    dec_status_t st;
    logic [REL_W-1:0] rel [255][8];
    int lp [5], lb [5];
    int kind, ne, p, gap;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < NCW; n++) begin
      kind = n % 5;
      c = random_codeword();
      r = c;
      for (int l = 0; l < 255; l++)
        for (int b = 0; b < 8; b++) rel[l][b] = REL_W'($urandom_range(15, 8));
      // five distinct LRP symbols, one bit each, reliabilities 0..4
      for (int m = 0; m < 5; m++) begin
        bit dup;
        do begin
          lp[m] = $urandom_range(254);
          dup = 0;
          for (int q = 0; q < m; q++) if (lp[q] == lp[m]) dup = 1;
        end while (dup);
        lb[m] = $urandom_range(7);
        rel[lp[m]][lb[m]] = REL_W'(m);
      end
      case (kind)
        0: ;
        1: begin
          ne = $urandom_range(7, 1);
          for (int k = 0; k < ne; k++) r[$urandom_range(254)] ^= sym_t'($urandom_range(255, 1));
        end
        2: begin
          int a, b2, cntn;
          a = $urandom_range(4);
          b2 = (a + 1 + $urandom_range(3)) % 5;
          r[lp[a]]  ^= sym_t'(1 << lb[a]);
          r[lp[b2]] ^= sym_t'(1 << lb[b2]);
          cntn = 0;
          while (cntn < 7) begin
            bit bad;
            p = $urandom_range(254);
            bad = (r[p] != c[p]);
            for (int m = 0; m < 5; m++) if (lp[m] == p) bad = 1;
            if (!bad) begin r[p] ^= sym_t'($urandom_range(255, 1)); cntn++; end
          end
        end
        3: begin
          int cntn;
          cntn = 0;
          while (cntn < 8) begin
            bit bad;
            p = $urandom_range(254);
            bad = (r[p] != c[p]);
            for (int m = 0; m < 5; m++) if (lp[m] == p) bad = 1;
            if (!bad) begin r[p] ^= sym_t'($urandom_range(255, 1)); cntn++; end
          end
        end
        default: begin
          for (int k = 0; k < 20; k++) r[$urandom_range(254)] ^= sym_t'($urandom_range(255, 1));
        end
      endcase
      ref_decode(r, lp, lb, o, st);
      exp_cw[n] = o;
      exp_st[n] = st;
      tx_cw[n]  = c;
      must_match_tx[n] = (kind != 4);
      send(r, rel);
      gap = (n % 3 == 2) ? $urandom_range(40, 4) : 4;   // PERIOD-255 = 4: back to back
      if (gap == 4) n_b2b++;
      repeat (gap) @(posedge clk);
    end
  end

  // ---------------- checking ----------------
  initial begin
    cw_t got, e, tx;
    dec_status_t st, est;
    longint t0;
    bit mt;
    for (int n = 0; n < NCW; n++) begin
      do @(posedge clk); while (!(rst_n && out_valid && out_sof));
      st = out_status;
      got[254] = out_sym;
      #1;
      t0 = lat.pop_front();
      checks++;
      if (t0 != 3 * PERIOD + 1) begin
        failures++; $display("cw %0d: latency %0d", n, t0);
      end
      for (int j = 1; j < 255; j++) begin
        @(posedge clk);
        checks++;
        if (!out_valid) begin failures++; $display("cw %0d: gap in output", n); end
        got[254-j] = out_sym;
      end
      e = exp_cw[n]; est = exp_st[n];
      tx = tx_cw[n]; mt = must_match_tx[n];
      checks++;
      if (got != e) begin
        failures++; $display("cw %0d: output differs from reference", n);
        for (int l = 254; l >= 0; l--) if (got[l] != e[l]) $display("  pos %0d got %h exp %h tx %h", l, got[l], e[l], tx[l]);
      end
      checks++;
      if (st != est) begin
        failures++;
        $display("cw %0d: status %p expected %p", n, st, est);
      end
      if (mt) begin
        checks++;
        if (got != tx) begin failures++; $display("cw %0d: not the sent codeword", n); end
      end
      if (n % 5 == 0 && got == tx) n_clean++;
      if (st.flipped && !st.fail) n_soft++;
      if (!st.flipped && !st.fail && st.nerr > 0) n_fallback++;
      if (st.fail) n_fail++;
      if (mt && got == tx && n % 5 == 2) n_beyond++;
    end
    $display("clean=%0d soft=%0d fallback=%0d beyond_t=%0d fail=%0d back_to_back=%0d",
             n_clean, n_soft, n_fallback, n_beyond, n_fail, n_b2b);
    checks++; if (n_clean == 0)    begin failures++; $display("no clean codeword"); end
    checks++; if (n_soft == 0)     begin failures++; $display("no soft acceptance"); end
    checks++; if (n_fallback == 0) begin failures++; $display("no hard fallback"); end
    checks++; if (n_beyond == 0)   begin failures++; $display("no correction beyond T"); end
    checks++; if (n_fail == 0)     begin failures++; $display("no detected failure"); end
    checks++; if (n_b2b == 0)      begin failures++; $display("no back-to-back codewords"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
