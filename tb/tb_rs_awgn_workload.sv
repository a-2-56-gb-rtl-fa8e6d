// tb_rs_awgn_workload: the decoder on a noisy channel at the operating
// points the decoder was characterised at (Eb/N0 = 6.0, 6.5 and 7.0 dB).
//
// Random RS(255,239) codewords are sent as BPSK (+1/-1 per bit) over an
// additive white Gaussian noise channel, with the noise variance set from
// Eb/N0 and the code rate 239/255.  The receiver takes the sign as the hard
// bit and quantises |y| to the 4-bit reliability (floor(8*|y|), at most 15).
// Gaussian samples come from the Box-Muller transform on $urandom.  NPER
// codewords per Eb/N0 point are fed back to back at the 259-cycle period.
//
// Statistics depend on the channel, so the checks are properties every
// decoded word must have, whatever the noise:
//   - output symbols come on 255 consecutive cycles
//   - fail set: the output equals the received word
//   - fail clear: the output is a codeword (all 16 syndromes zero)
//   - hard result (no flip): it differs from the received word in at most
//     nerr <= 8 symbols
//   - flipped result: outside the five LRP symbols it differs from the
//     received word in at most 7 symbols (deg(Lambda) < 8)
// The testbench also prints, per point, how many words a hard decoder could
// correct (<= 8 symbol errors), how many came out equal to the sent word,
// and the average number of candidates the decision-confined search needed
// (index of the accepted flip pattern, or 32 for the hard fallback), which
// is the quantity tabulated for the original design (5.22 / 1.30 / 1.07
// key-equation solutions per word).  This decoder solves the hard word
// first as well, so it runs the solver once more than that count whenever a
// flip pattern is accepted.
module tb_rs_awgn_workload;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  localparam int NPER = 40;
  localparam int NPT  = 3;
  localparam real EBN0_DB [NPT] = '{6.0, 6.5, 7.0};

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

  initial begin
    repeat (NPT * NPER * 270 + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t rx_cw [NPT*NPER];
  cw_t tx_cw [NPT*NPER];
  int  lrp_sym [NPT*NPER][5];

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1))) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // the five least reliable bits in the decoder's order: reliability, then
  // arrival order (symbol x^254 first), then bit index; returns symbols
  function automatic void find_lrps(logic [REL_W-1:0] rel [255][8], output int ls [5]);
    int br [5], bj [5];
    for (int m = 0; m < 5; m++) begin br[m] = 1 << REL_W; bj[m] = 0; end
    for (int j = 0; j < 255 * 8; j++) begin
      int l, b, v;
      l = 254 - j / 8; b = j % 8; v = int'(rel[l][b]);
      for (int m = 0; m < 5; m++) begin
        if (v < br[m]) begin
          for (int q = 4; q > m; q--) begin br[q] = br[q-1]; bj[q] = bj[q-1]; end
          br[m] = v; bj[m] = j;
          break;
        end
      end
    end
    for (int m = 0; m < 5; m++) ls[m] = 254 - bj[m] / 8;
  endfunction

  task automatic send(cw_t r, logic [REL_W-1:0] rel [255][8]);
    for (int j = 0; j < 255; j++) begin
      in_valid <= 1; in_sof <= (j == 0);
      in_sym <= r[254-j];
      for (int b = 0; b < 8; b++) in_rel[b] <= rel[254-j][b];
      @(posedge clk);
    end
    in_valid <= 0; in_sof <= 0;
  endtask

  // ---------------- stimulus ----------------
  initial begin
    cw_t c, r;
    logic [REL_W-1:0] rel [255][8];
    real sigma, y, ebn0;
    int q, ls [5];
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int pt = 0; pt < NPT; pt++) begin
      ebn0  = 10.0 ** (EBN0_DB[pt] / 10.0);
      sigma = $sqrt(1.0 / (2.0 * (239.0 / 255.0) * ebn0));
      for (int n = 0; n < NPER; n++) begin
        c = random_codeword();
        for (int l = 0; l < 255; l++) begin
          r[l] = 0;
          for (int b = 0; b < 8; b++) begin
            y = (c[l][b] ? -1.0 : 1.0) + sigma * gauss();
            if (y < 0.0) r[l][b] = 1'b1;
            if (y < 0.0) y = -y;
            q = int'($floor(8.0 * y));
            rel[l][b] = REL_W'((q > 15) ? 15 : q);
          end
        end
        find_lrps(rel, ls);
        tx_cw[pt*NPER+n] = c;
        rx_cw[pt*NPER+n] = r;
        for (int m = 0; m < 5; m++) lrp_sym[pt*NPER+n][m] = ls[m];
        send(r, rel);
        repeat (4) @(posedge clk);      // 255 + 4 = 259: back to back
      end
    end
  end

  // ---------------- checking ----------------
  initial begin
    cw_t got, r, tx;
    syn_t s;
    dec_status_t st;
    int idx, nd, nd_out, cand_i, hard_err;
    int hard_ok [NPT], soft_ok [NPT], n_flip [NPT], n_fail [NPT], n_fb [NPT];
    int sum_cand [NPT];
    for (int pt = 0; pt < NPT; pt++) begin
      hard_ok[pt] = 0; soft_ok[pt] = 0; n_flip[pt] = 0; n_fail[pt] = 0;
      n_fb[pt] = 0; sum_cand[pt] = 0;
    end
    for (int pt = 0; pt < NPT; pt++) begin
      for (int n = 0; n < NPER; n++) begin
        idx = pt * NPER + n;
        do @(posedge clk); while (!(rst_n && out_valid && out_sof));
        st = out_status;
        got[254] = out_sym;
        for (int j = 1; j < 255; j++) begin
          @(posedge clk);
          checks++;
          if (!out_valid) begin failures++; $display("word %0d: gap in output", idx); end
          got[254-j] = out_sym;
        end
        r = rx_cw[idx]; tx = tx_cw[idx];
        nd = 0; nd_out = 0; hard_err = 0;
        for (int l = 0; l < 255; l++) begin
          bit is_lrp;
          is_lrp = 0;
          for (int m = 0; m < 5; m++) if (lrp_sym[idx][m] == l) is_lrp = 1;
          if (got[l] != r[l]) begin nd++; if (!is_lrp) nd_out++; end
          if (r[l] != tx[l]) hard_err++;
        end
        checks++;
        if (st.fail) begin
          n_fail[pt]++;
          if (got != r) begin failures++; $display("word %0d: failed word not passed unchanged", idx); end
        end else begin
          s = syndromes(got);
          for (int i = 0; i < 16; i++)
            if (s[i] != 0) begin failures++; $display("word %0d: output is not a codeword", idx); break; end
          checks++;
          if (st.flipped) begin
            if (nd_out > 7) begin failures++; $display("word %0d: %0d changes outside the LRPs", idx, nd_out); end
          end else begin
            if (nd > int'(st.nerr) || st.nerr > 4'(T)) begin
              failures++; $display("word %0d: hard result changes %0d symbols, nerr %0d", idx, nd, st.nerr);
            end
          end
        end
        // candidates searched, counted as in the original algorithm
        cand_i = 0;
        for (int k = ETA - 1; k >= 0; k--) cand_i = (cand_i << 1) | (int'(st.cand[k]) ^ (cand_i & 1));
        if (st.flipped) begin n_flip[pt]++; sum_cand[pt] += cand_i; end
        else begin n_fb[pt]++; sum_cand[pt] += (hard_err == 0 ? 1 : 32); end
        if (hard_err <= T) hard_ok[pt]++;
        if (got == tx) soft_ok[pt]++;
      end
      $display("Eb/N0 %.1f dB: %0d words, hard-correctable %0d, decoded to the sent word %0d, flip accepted %0d, hard result %0d, fail %0d, avg candidates %.2f",
               EBN0_DB[pt], NPER, hard_ok[pt], soft_ok[pt], n_flip[pt], n_fb[pt], n_fail[pt],
               real'(sum_cand[pt]) / real'(NPER));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
