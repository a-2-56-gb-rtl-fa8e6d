// rs_dc_ctrl: second pipeline stage, the decision-confined candidate loop.
//
// Instead of decoding every test pattern and choosing among them, the
// decoder tries bit-flipped candidates one after the other and keeps the
// first whose Lambda(x) has degree below T: with more than T errors such a
// Lambda is very unlikely, so that candidate is taken as the answer.  The
// candidates are visited in Gray-code order, gamma(i) = i ^ (i >> 1) for
// i = 1..2^ETA-1, so each differs from the previous by one LRP (bit kappa =
// number of trailing zeros of i) and the syndrome updater only adds one
// flip.  If no candidate qualifies, the hard-decision Lambda(x) of the
// unmodified syndromes is used, so the decoder never does worse than a hard
// decoder.
//
// Schedule (cycles after start): 0 load S(x) and the LRPs into the updater;
// 1 start the key equation solver on S(x) (the hard candidate) while the
// updater builds S^[1]; then every 8 cycles the solver takes the next
// S^[i] while the updater builds S^[i+1].  Solving the hard candidate first
// (the reference loop solves it last, only when needed) keeps all 32
// solves inside one 259-cycle period: 1 + 32*8 = 257; the selected result
// is the same.  The result (Lambda, its degree, S_1..S_T of the chosen
// candidate, the flip pattern) is registered and done pulses at most 258
// cycles after start; it stays until the next start.
module rs_dc_ctrl
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        syn_in [2*T],
  input  lrp_t       lrp_in [ETA],
  output gf_t        res_lambda [T+1],
  output logic [4:0] res_deg,
  output gf_t        res_syn [T],
  output logic [ETA-1:0] res_flip,   // bit j: LRP j is flipped
  output logic [ETA-1:0] res_cand,   // candidate index, 0 = hard decision
  output logic       res_soft,       // a flipped candidate was accepted
  output logic       done
);

  localparam int unsigned NCAND = 1 << ETA;   // 32 including the hard one

  // updater and solver
  logic       upd_start, upd_busy, kes_start, kes_done;
  logic [2:0] upd_kappa;
  gf_t        upd_syn [2*T];
  gf_t        kes_lambda [T+1];
  logic [4:0] kes_deg;

  rs_syn_updater u_upd (
    .clk, .rst_n, .load(start), .syn_in, .lrp_in,
    .start(upd_start), .kappa(upd_kappa), .syn_out(upd_syn), .busy(upd_busy)
  );

  rs_kes_irribm u_kes (
    .clk, .rst_n, .start(kes_start), .syn(upd_syn),
    .lambda(kes_lambda), .deg(kes_deg), .done(kes_done)
  );

  function automatic logic [2:0] ctz(input logic [ETA-1:0] v);
    for (int b = 0; b < ETA; b++) if (v[b]) return 3'(b);
    return 3'd0;
  endfunction

  logic           running, first_issue;
  logic [ETA-1:0] cur_q;                  // candidate in the solver
  gf_t            cand_syn_q [T];
  gf_t            hard_lambda_q [T+1];
  logic [4:0]     hard_deg_q;
  gf_t            hard_syn_q [T];

  logic           issue, accept, give_up;
  logic [ETA-1:0] nxt;

  assign nxt     = first_issue ? '0 : cur_q + 1'b1;
  assign accept  = running && kes_done && (cur_q != '0) && (kes_deg < 5'(T));
  assign give_up = running && kes_done && !accept && (cur_q == ETA'(NCAND-1));
  assign issue   = running && (first_issue || (kes_done && !accept && !give_up));

  assign kes_start = issue;
  // while candidate n is solved the updater builds candidate n+1
  assign upd_start = issue && (nxt != ETA'(NCAND-1));
  assign upd_kappa = ctz(nxt + 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; first_issue <= 1'b0; cur_q <= '0; done <= 1'b0;
      res_deg <= '0; res_flip <= '0; res_cand <= '0; res_soft <= 1'b0;
      hard_deg_q <= '0;
      for (int j = 0; j <= T; j++) begin res_lambda[j] <= '0; hard_lambda_q[j] <= '0; end
      for (int j = 0; j < T; j++) begin
        res_syn[j] <= '0; cand_syn_q[j] <= '0; hard_syn_q[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        running     <= 1'b1;
        first_issue <= 1'b1;
      end else begin
        first_issue <= 1'b0;
        if (issue) begin
          cur_q <= nxt;
          for (int j = 0; j < T; j++) cand_syn_q[j] <= upd_syn[j];
        end
        if (running && kes_done && cur_q == '0) begin
          hard_lambda_q <= kes_lambda;
          hard_deg_q    <= kes_deg;
          hard_syn_q    <= cand_syn_q;
        end
        if (accept) begin
          res_lambda <= kes_lambda;
          res_deg    <= kes_deg;
          res_syn    <= cand_syn_q;
          res_flip   <= cur_q ^ (cur_q >> 1);
          res_cand   <= cur_q;
          res_soft   <= 1'b1;
        end else if (give_up) begin
          res_lambda <= hard_lambda_q;
          res_deg    <= hard_deg_q;
          res_syn    <= hard_syn_q;
          res_flip   <= '0;
          res_cand   <= '0;
          res_soft   <= 1'b0;
        end
        if (accept || give_up) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // the updater must be idle whenever a new candidate is issued
  assert property (@(posedge clk) disable iff (!rst_n) upd_start |-> !upd_busy);

endmodule
