// rs_soft_decoder: decision-confined soft-decision RS(255,239) decoder.
//
// Each codeword arrives as 255 symbols, one per cycle, with a reliability
// value for each of its 8 bits.  The decoder is a 3-stage pipeline with a
// fixed stage period of PERIOD = 259 cycles, followed by the corrected
// output stream:
//   stage 1  syndrome calculator and reliability evaluator (5 LRPs) while
//            the symbols are also written into the codeword memory
//   stage 2  decision-confined loop (rs_dc_ctrl): syndrome updater and
//            IR-RiBM key equation solver try Gray-code bit-flip candidates
//            until one gives deg(Lambda) < T, else fall back to the hard one
//   stage 3  parallel-2 Chien search (128 cycles), then Bjorck-Pereyra
//            error values (at most 92 cycles)
//   output   the codeword is read back from memory and corrected: the error
//            values at the found positions plus the bit flips of the
//            accepted candidate are added (XOR).
// Stage k of a codeword starts exactly k*PERIOD cycles after its first
// symbol; the read-back starts one cycle before the end of stage 3, so the
// first corrected symbol appears 3*PERIOD+1 cycles after the first input
// symbol (one cycle for the memory read).  The pipeline, its stages and the 259-cycle period
// follow the reference decoder; the fixed-offset stage timing, the memory
// read-back and the handling of a failed search (the received word is
// passed on unchanged, out_status.fail set) are this design's choices.
//
// Interface: in_sof marks the first of 255 symbols given on consecutive
// cycles with in_valid; codewords may start every PERIOD cycles or later.
// in_rel[b] is the reliability of bit b (smaller = less reliable).  The
// first symbol received is the coefficient of x^254.  Output symbols come
// on 255 consecutive cycles with out_valid; out_sof and out_status mark the
// first of them.
module rs_soft_decoder
  import rs_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  gf_t                     in_sym,
  input  logic [M-1:0][REL_W-1:0] in_rel,
  output logic                    out_valid,
  output logic                    out_sof,
  output gf_t                     out_sym,
  output dec_status_t             out_status
);

  // ------------------------------------------------------------------
  // stage timing: each stage start launches the next one PERIOD later
  // ------------------------------------------------------------------
  logic       s1_start, s2_start, s3_start, o_start;
  logic [8:0] t1_q, t2_q, t3_q;
  logic       t1_run, t2_run, t3_run;

  assign s1_start = in_valid && in_sof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_q <= '0; t2_q <= '0; t3_q <= '0;
      t1_run <= 1'b0; t2_run <= 1'b0; t3_run <= 1'b0;
      s2_start <= 1'b0; s3_start <= 1'b0; o_start <= 1'b0;
    end else begin
      s2_start <= t1_run && (t1_q == 9'(PERIOD - 1));
      s3_start <= t2_run && (t2_q == 9'(PERIOD - 1));
      o_start  <= t3_run && (t3_q == 9'(PERIOD - 2));
      if (s1_start) begin t1_run <= 1'b1; t1_q <= 9'd1; end
      else if (t1_run) begin
        t1_q <= t1_q + 9'd1;
        if (t1_q == 9'(PERIOD - 1)) t1_run <= 1'b0;
      end
      if (s2_start) begin t2_run <= 1'b1; t2_q <= 9'd1; end
      else if (t2_run) begin
        t2_q <= t2_q + 9'd1;
        if (t2_q == 9'(PERIOD - 1)) t2_run <= 1'b0;
      end
      if (s3_start) begin t3_run <= 1'b1; t3_q <= 9'd1; end
      else if (t3_run) begin
        t3_q <= t3_q + 9'd1;
        if (t3_q == 9'(PERIOD - 1)) t3_run <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------
  // stage 1
  // ------------------------------------------------------------------
  gf_t        syn [2*T];
  logic       syn_valid;
  lrp_t       lrp [ETA];
  logic       lrp_valid;
  logic [1:0] wr_bank_q, wr_bank;
  logic [7:0] wr_addr_q, wr_addr;

  rs_syndrome_calc u_syn (
    .clk, .rst_n, .in_valid, .in_sof, .in_sym, .syn, .syn_valid
  );

  rs_rel_eval u_rel (
    .clk, .rst_n, .in_valid, .in_sof, .in_rel, .lrp, .lrp_valid
  );

  assign wr_bank = s1_start ? ((wr_bank_q == 2'd2) ? 2'd0 : wr_bank_q + 2'd1)
                            : wr_bank_q;
  assign wr_addr = s1_start ? 8'd0 : wr_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank_q <= 2'd2;
      wr_addr_q <= '0;
    end else if (in_valid) begin
      wr_bank_q <= wr_bank;
      wr_addr_q <= wr_addr + 8'd1;
    end
  end

  // ------------------------------------------------------------------
  // stage 2
  // ------------------------------------------------------------------
  gf_t            res_lambda [T+1];
  logic [4:0]     res_deg;
  gf_t            res_syn [T];
  logic [ETA-1:0] res_flip, res_cand;
  logic           res_soft, s2_done;
  lrp_t           s2_lrp [ETA];
  logic [1:0]     s2_bank;

  rs_dc_ctrl u_dc (
    .clk, .rst_n, .start(s2_start), .syn_in(syn), .lrp_in(lrp),
    .res_lambda, .res_deg, .res_syn, .res_flip, .res_cand, .res_soft,
    .done(s2_done)
  );

  // ------------------------------------------------------------------
  // stage 3
  // ------------------------------------------------------------------
  logic [7:0]     root_pos [T];
  gf_t            root_x [T];
  logic [3:0]     nroots;
  logic           ch_fail, ch_done, bp_done;
  gf_t            err [T];
  gf_t            s3_syn [T];
  logic [ETA-1:0] s3_flip, s3_cand;
  logic           s3_soft;
  lrp_t           s3_lrp [ETA];
  logic [1:0]     s3_bank;

  rs_chien_par2 u_chien (
    .clk, .rst_n, .start(s3_start), .lambda(res_lambda), .deg(res_deg),
    .root_pos, .root_x, .nroots, .fail(ch_fail), .done(ch_done)
  );

  rs_bp_eval u_bp (
    .clk, .rst_n, .start(ch_done), .nerr(ch_fail ? 4'd0 : nroots),
    .x_in(root_x), .s_in(s3_syn), .err, .done(bp_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_bank <= '0; s3_bank <= '0;
      s3_flip <= '0; s3_cand <= '0; s3_soft <= 1'b0;
      for (int m = 0; m < ETA; m++) begin s2_lrp[m] <= LRP_NONE; s3_lrp[m] <= LRP_NONE; end
      for (int j = 0; j < T; j++) s3_syn[j] <= '0;
    end else begin
      if (s2_start) begin
        s2_bank <= wr_bank_q;
        s2_lrp  <= lrp;
      end
      if (s3_start) begin
        s3_bank <= s2_bank;
        s3_lrp  <= s2_lrp;
        s3_syn  <= res_syn;
        s3_flip <= res_flip;
        s3_cand <= res_cand;
        s3_soft <= res_soft;
      end
    end
  end

  // ------------------------------------------------------------------
  // output: read back and correct
  // ------------------------------------------------------------------
  logic [7:0]     o_pos [T];
  gf_t            o_err [T];
  logic [3:0]     o_n;
  logic           o_fail, o_soft;
  logic [ETA-1:0] o_flip, o_cand;
  lrp_t           o_lrp [ETA];
  logic [1:0]     o_bank;
  logic           o_run;
  logic [7:0]     o_idx;
  gf_t            rd_data, corr, corr_q;
  logic           rd_v_q, rd_first_q;
  logic [7:0]     cur_pos;

  rs_cw_mem u_mem (
    .clk,
    .wr_en(in_valid), .wr_bank, .wr_addr, .wr_data(in_sym),
    .rd_en(o_run), .rd_bank(o_bank), .rd_addr(o_idx), .rd_data
  );

  assign cur_pos = 8'd254 - o_idx;

  always_comb begin
    corr = '0;
    for (int k = 0; k < T; k++)
      if (4'(k) < o_n && o_pos[k] == cur_pos) corr ^= o_err[k];
    for (int m = 0; m < ETA; m++)
      if (o_flip[m] && o_lrp[m].pos == cur_pos) corr[o_lrp[m].bit_idx] ^= 1'b1;
    if (o_fail) corr = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_run <= 1'b0; o_idx <= '0; o_bank <= '0; o_n <= '0;
      o_fail <= 1'b0; o_soft <= 1'b0; o_flip <= '0; o_cand <= '0;
      rd_v_q <= 1'b0; rd_first_q <= 1'b0; corr_q <= '0;
      for (int k = 0; k < T; k++) begin o_pos[k] <= '0; o_err[k] <= '0; end
      for (int m = 0; m < ETA; m++) o_lrp[m] <= LRP_NONE;
    end else begin
      rd_v_q     <= o_run;
      rd_first_q <= o_run && (o_idx == 8'd0);
      corr_q     <= corr;
      if (o_start) begin
        o_run  <= 1'b1;
        o_idx  <= '0;
        o_bank <= s3_bank;
        o_lrp  <= s3_lrp;
        o_flip <= ch_fail ? '0 : s3_flip;
        o_cand <= s3_cand;
        o_soft <= s3_soft;
        o_fail <= ch_fail;
        o_n    <= ch_fail ? 4'd0 : nroots;
        o_pos  <= root_pos;
        o_err  <= err;
      end else if (o_run) begin
        o_idx <= o_idx + 8'd1;
        if (o_idx == 8'(N - 1)) o_run <= 1'b0;
      end
    end
  end

  assign out_valid  = rd_v_q;
  assign out_sof    = rd_first_q;
  assign out_sym    = rd_data ^ corr_q;
  assign out_status = '{fail: o_fail, flipped: o_soft, cand: o_cand, nerr: o_n};

  // stage hand-offs must find the previous stage finished
  assert property (@(posedge clk) disable iff (!rst_n) s1_start |-> !t1_run || t1_q == 9'(PERIOD - 1))
    else $error("codewords closer than PERIOD cycles");
  // each stage's results must be ready by the next stage's start
  logic syn_seen, lrp_seen, s2_seen, bp_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_seen <= 1'b0; lrp_seen <= 1'b0; s2_seen <= 1'b0; bp_seen <= 1'b0;
    end else begin
      syn_seen <= syn_valid || (syn_seen && !s2_start);
      lrp_seen <= lrp_valid || (lrp_seen && !s2_start);
      s2_seen  <= s2_done   || (s2_seen  && !s3_start);
      bp_seen  <= bp_done   || (bp_seen  && !o_start);
    end
  end
  assert property (@(posedge clk) disable iff (!rst_n) s2_start |-> syn_seen && lrp_seen)
    else $error("stage 1 results late");
  assert property (@(posedge clk) disable iff (!rst_n) s3_start |-> s2_seen)
    else $error("stage 2 overran its period");
  assert property (@(posedge clk) disable iff (!rst_n) o_start |-> bp_seen)
    else $error("stage 3 overran its period");

endmodule
