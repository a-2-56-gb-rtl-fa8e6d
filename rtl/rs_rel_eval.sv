// rs_rel_eval: reliability evaluator.  Finds the ETA=5 least reliable bits
// (LRPs) of a 255-symbol codeword while it streams in, one symbol per cycle.
//
// Each cycle the 8 bits of one symbol arrive with one reliability value per
// bit (a smaller value means less reliable).  A merge-sort tree, as in the
// decoder's reliability evaluator, reduces them to the 5 least reliable:
//   stage 1: four 2-sorters and two 4-mergers (IN1..IN8 = bits 0..7)
//            -> register of two sorted 4-lists
//   stage 2: one 8-merger keeping the 5 smallest -> register
//   stage 3: a 10-merger of those 5 with the 5 running LRPs -> LRP register
// The running list restarts on the symbol flagged by sof.  The stage widths
// (2, 4, 4, 5, 5) are those of the reference tree; the tie rule (the entry
// already held, or the lower bit index, wins) is this design's choice.
//
// Timing: the symbol at cycle c reaches the LRP register at the end of
// cycle c+2; after the last (255th) symbol, lrp_valid pulses for one cycle
// three cycles later, with lrp[0..4] sorted least reliable first.  Symbols
// must arrive on 255 consecutive cycles, sof on the first.  Positions are
// powers of x: the first symbol received has position 254.
module rs_rel_eval
  import rs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_sof,
  input  logic [M-1:0][REL_W-1:0] in_rel,   // reliability of each bit
  output lrp_t                  lrp [ETA],
  output logic                  lrp_valid
);

  typedef lrp_t list5_t [5];

  // merge two sorted lists (valid lengths na, nb <= 5), keep the 5 smallest.
  // Rank-based network: A entries win ties against B entries.
  function automatic list5_t merge5(input list5_t a, input int na,
                                    input list5_t b, input int nb);
    list5_t o;
    int     r;
    for (int k = 0; k < 5; k++) o[k] = LRP_NONE;
    for (int i = 0; i < 5; i++) begin
      if (i < na) begin
        r = i;
        for (int j = 0; j < 5; j++)
          if (j < nb && lrp_less(b[j], a[i])) r++;
        if (r < 5) o[r] = a[i];
      end
    end
    for (int j = 0; j < 5; j++) begin
      if (j < nb) begin
        r = j;
        for (int i = 0; i < 5; i++)
          if (i < na && !lrp_less(b[j], a[i])) r++;
        if (r < 5) o[r] = b[j];
      end
    end
    return o;
  endfunction

  logic [7:0] sym_cnt;       // index of the incoming symbol in the codeword
  logic [7:0] pos_now;
  logic       last_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sym_cnt <= '0;
    else if (in_valid) sym_cnt <= in_sof ? 8'd1 : sym_cnt + 8'd1;
  end

  assign pos_now  = 8'd254 - (in_sof ? 8'd0 : sym_cnt);
  assign last_now = !in_sof && (sym_cnt == 8'd254);

  // ---------------- stage 1: merge sort 2 and merge sort 4 ----------------
  list5_t s1_d [2];
  list5_t s1_q [2];
  logic   s1_v, s1_sof, s1_last;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      list5_t p0, p1, q0, q1;
      for (int k = 0; k < 5; k++) begin
        p0[k] = LRP_NONE; p1[k] = LRP_NONE;
        q0[k] = LRP_NONE; q1[k] = LRP_NONE;
      end
      p0[0] = '{rel: in_rel[4*h+0], pos: pos_now, bit_idx: 3'(4*h+0)};
      p1[0] = '{rel: in_rel[4*h+1], pos: pos_now, bit_idx: 3'(4*h+1)};
      q0[0] = '{rel: in_rel[4*h+2], pos: pos_now, bit_idx: 3'(4*h+2)};
      q1[0] = '{rel: in_rel[4*h+3], pos: pos_now, bit_idx: 3'(4*h+3)};
      s1_d[h] = merge5(merge5(p0, 1, p1, 1), 2, merge5(q0, 1, q1, 1), 2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_sof <= 1'b0; s1_last <= 1'b0;
      for (int h = 0; h < 2; h++)
        for (int k = 0; k < 5; k++) s1_q[h][k] <= LRP_NONE;
    end else begin
      s1_v    <= in_valid;
      s1_sof  <= in_valid && in_sof;
      s1_last <= in_valid && last_now;
      if (in_valid) s1_q <= s1_d;
    end
  end

  // ---------------- stage 2: merge sort 8 (keep 5) ----------------
  list5_t s2_q;
  logic   s2_v, s2_sof, s2_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_sof <= 1'b0; s2_last <= 1'b0;
      for (int k = 0; k < 5; k++) s2_q[k] <= LRP_NONE;
    end else begin
      s2_v    <= s1_v;
      s2_sof  <= s1_sof;
      s2_last <= s1_last;
      if (s1_v) s2_q <= merge5(s1_q[0], 4, s1_q[1], 4);
    end
  end

  // ---------------- stage 3: merge sort 10 with the running LRPs ----------
  list5_t run_q;
  list5_t run_d;

  always_comb run_d = merge5(run_q, s2_sof ? 0 : 5, s2_q, 5);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrp_valid <= 1'b0;
      for (int k = 0; k < 5; k++) run_q[k] <= LRP_NONE;
    end else begin
      lrp_valid <= s2_v && s2_last;
      if (s2_v) run_q <= run_d;
    end
  end

  always_comb
    for (int k = 0; k < ETA; k++) lrp[k] = run_q[k];

endmodule
