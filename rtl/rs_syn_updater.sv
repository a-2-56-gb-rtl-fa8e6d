// rs_syn_updater: syndrome updater for Gray-code bit flipping.
//
// Flipping bit b of the symbol at position l adds e' = alpha^b at x^l, so
// every syndrome changes by S_j += e' * (alpha^l)^j, j = 1..2T.  LUT1 maps
// the LRP's bit index to e' and LUT2 (an antilog ROM) maps its position to
// beta = alpha^l, as in the reference updater.  The 16 increments are made
// two per cycle over T=8 cycles with four GF multipliers and a squarer:
//   cycle 0:    P = e'*beta,        Q = e'*beta^2       -> S_1, S_2
//   cycle c>0:  P = P*beta^2,       Q = Q*beta^2        -> S_2c+1, S_2c+2
// (this schedule is this design's own; the reference gives only the
// multiplier count and the 8-cycle budget, and a second squarer it lists
// is not needed here).
//
// Interface: load copies syn_in and the LRP list into the block.  start with
// kappa (0..ETA-1) begins one update on that same cycle; syn_out holds the
// partly updated polynomial during the next 7 cycles and the complete
// S^[i] after the 8th (busy low again).  A start while busy is ignored.
module rs_syn_updater
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  gf_t        syn_in [2*T],
  input  lrp_t       lrp_in [ETA],
  input  logic       start,
  input  logic [2:0] kappa,
  output gf_t        syn_out [2*T],
  output logic       busy
);

  lrp_t       lrp_q [ETA];
  logic [2:0] cnt;
  gf_t        p_q, q_q, b2_q;

  // LUT1: bit index -> e' (alpha^bit, a single set bit in polynomial basis)
  function automatic gf_t lut1(input logic [2:0] b);
    case (b)
      3'd0: return 8'h01;  3'd1: return 8'h02;
      3'd2: return 8'h04;  3'd3: return 8'h08;
      3'd4: return 8'h10;  3'd5: return 8'h20;
      3'd6: return 8'h40;  default: return 8'h80;
    endcase
  endfunction

  lrp_t sel;
  gf_t  e_k, beta, beta2;
  gf_t  term_p, term_q;
  logic first;

  always_comb sel = (kappa < 3'(ETA)) ? lrp_q[kappa] : lrp_q[0];

  rs_gf_alog_rom u_lut2 (.addr(sel.pos), .data(beta));

  assign e_k   = lut1(sel.bit_idx);
  assign beta2 = gf_sq(beta);                 // squarer
  assign first = start && !busy;

  always_comb begin
    if (first) begin
      term_p = gf_mul(e_k, beta);             // FFM 1
      term_q = gf_mul(e_k, beta2);            // FFM 2
    end else begin
      term_p = gf_mul(p_q, b2_q);             // FFM 3
      term_q = gf_mul(q_q, b2_q);             // FFM 4
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      p_q  <= '0; q_q <= '0; b2_q <= '0;
      for (int j = 0; j < 2*T; j++) syn_out[j] <= '0;
      for (int k = 0; k < ETA; k++) lrp_q[k] <= LRP_NONE;
    end else if (load) begin
      busy <= 1'b0;
      cnt  <= '0;
      for (int j = 0; j < 2*T; j++) syn_out[j] <= syn_in[j];
      for (int k = 0; k < ETA; k++) lrp_q[k] <= lrp_in[k];
    end else if (first || busy) begin
      p_q <= term_p;
      q_q <= term_q;
      if (first) b2_q <= beta2;
      syn_out[2*cnt]   <= syn_out[2*cnt]   ^ term_p;
      syn_out[2*cnt+1] <= syn_out[2*cnt+1] ^ term_q;
      cnt  <= cnt + 3'd1;
      busy <= (cnt != 3'(T-1));
    end
  end

endmodule
