// rs_kes_irribm: iteration-reduced RiBM key equation solver (Lambda only).
//
// Reformulated inversionless Berlekamp-Massey needs 2T iterations; this
// solver does two of them per iteration, so Lambda(x) of one syndrome
// polynomial takes T=8 cycles.  It works on 2T+1 processing elements
// (rs_ir_pe): PE_0..PE_2T-1 start with S_1..S_2T and PE_2T with Lambda_0=1.
// Each iteration shifts the array down by two, and the two elements at the
// bottom hold the odd discrepancy Phi (delta_0) and the predicted even
// discrepancy (delta_1).  The controller picks one of five cases from
// delta_0, delta_1 and the length L:
//   1: d0=0, d1=0              g0=c                       keep theta
//   2: d0=0, d1!=0, L>tau-1    g0=c, g3=d1                keep theta
//   3: d0=0, d1!=0, L<=tau-1   g0=c, g3=d1                theta<=delta_{i+2}, L=2tau-L
//   4: d0!=0, L<=tau-1         g0=c*d0, g1=beta, g2=d0^2  theta<=delta_{i+1}, L=2tau-1-L
//   5: d0!=0, L>tau-1          g0=c^2, g2=c*d0, g3=beta   keep theta
// beta, the even-step discrepancy c*delta_1 - alpha*delta_0 of the next
// iteration, is computed one iteration ahead from delta_1..3 and theta_0..2
// so the critical path stays at two multipliers and two adders.  After T
// iterations Lambda_0..Lambda_T are in PE_0..PE_T (up to a non-zero scale
// factor, which moves no root) and deg is its degree L.
//
// The case table, the beta look-ahead and the PE array follow the reference
// algorithm.  Its zeroing of theta entries is done here with a tracked
// boundary: qpos is the element holding B_0 of the theta polynomial, and
// bpos = 2T-2tau is where Lambda_0 lands in this iteration; elements at or
// above bpos must not read product terms (theta below qpos, delta_{i+1} at
// bpos).  This bookkeeping was derived for this design.
//
// Timing: start (one cycle, with syn valid) performs iteration 1 on that
// cycle; done pulses T cycles after start, with lambda/deg valid in that
// cycle.  A new start may coincide with done (back-to-back solves).
module rs_kes_irribm
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        syn [2*T],      // syn[i-1] = S_i
  output gf_t        lambda [T+1],   // lambda[j] = Lambda_j (scaled)
  output logic [4:0] deg,
  output logic       done
);

  localparam int NPE = 2*T + 1;

  // controller state
  logic       busy;
  logic [3:0] tau_q;                      // iteration number of this cycle
  logic [4:0] l_q, q_q;
  gf_t        al_q, c_q, beta_q;

  // current (load-muxed) controller values
  logic [3:0] tau;
  logic [4:0] l_c, q_c;
  gf_t        al_c, c_c, beta_c;
  logic       en;

  assign en     = start || busy;
  assign tau    = start ? 4'd1 : tau_q;
  assign l_c    = start ? 5'd0 : l_q;
  assign q_c    = start ? 5'(2*T) : q_q;
  assign al_c   = start ? syn[0] : al_q;
  assign c_c    = start ? 8'h01 : c_q;
  assign beta_c = start ? (syn[1] ^ gf_sq(syn[0])) : beta_q;

  // PE array wiring
  gf_t d_cur [NPE+2];
  gf_t t_cur [NPE+1];
  gf_t d_reg [NPE];
  gf_t init  [NPE];

  always_comb begin
    for (int p = 0; p < 2*T; p++) init[p] = syn[p];
    init[2*T] = 8'h01;
  end
  assign d_cur[NPE]   = '0;
  assign d_cur[NPE+1] = '0;
  assign t_cur[NPE]   = '0;

  // case decision
  typedef enum logic [2:0] {C1 = 3'd1, C2, C3, C4, C5} kes_case_e;
  kes_case_e cs;
  gf_t       d0, d1, g0, g13, g2;
  logic      use_g1;
  logic [1:0] th_sel;
  logic       upd_le;                    // L <= tau-1
  logic [4:0] bpos;

  assign d0     = d_cur[0];
  assign d1     = d_cur[1];
  assign upd_le = ({1'b0, l_c} <= ({2'b0, tau} - 6'd1));
  assign bpos   = 5'(2*T) - {tau, 1'b0};

  always_comb begin
    if (d0 == '0) cs = (d1 == '0) ? C1 : (upd_le ? C3 : C2);
    else          cs = upd_le ? C4 : C5;
    g0 = c_c; g13 = '0; g2 = '0; use_g1 = 1'b0; th_sel = 2'd0;
    case (cs)
      C1: ;
      C2: g13 = d1;
      C3: begin g13 = d1; th_sel = 2'd2; end
      C4: begin
        g0 = gf_mul(c_c, d0); g13 = beta_c; g2 = gf_sq(d0);
        use_g1 = 1'b1; th_sel = 2'd1;
      end
      default: begin
        g0 = gf_sq(c_c); g2 = gf_mul(c_c, d0); g13 = beta_c;
      end
    endcase
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic lam_reg;
    assign lam_reg = (5'(p) >= bpos);
    rs_ir_pe u_pe (
      .clk, .rst_n, .en, .load(start), .init_val(init[p]),
      .d_ip1(d_cur[p+1]), .d_ip2(d_cur[p+2]), .t_ip1(t_cur[p+1]),
      .g0, .g13, .g2, .use_g1, .th_sel,
      .zero_d1(5'(p) == bpos),
      .zero_t0(lam_reg && (5'(p) < q_c)),
      .zero_t1(lam_reg && (5'(p + 1) < q_c)),
      .d_cur(d_cur[p]), .t_cur(t_cur[p]), .d_q(d_reg[p])
    );
  end

  // next controller state
  logic [4:0] l_n, q_n;
  gf_t        al_n, c_n, beta_n;

  always_comb begin
    l_n = l_c; q_n = q_c; al_n = al_c; c_n = c_c;
    case (cs)
      C3: begin l_n = {tau, 1'b0} - l_c;        q_n = bpos;
                al_n = d_cur[2]; c_n = d1; end
      C4: begin l_n = {tau, 1'b0} - 5'd1 - l_c; q_n = bpos + 5'd1;
                al_n = d1; c_n = d0; end
      default: ;
    endcase
    // look-ahead of the next even-step discrepancy
    beta_n = gf_mul(g0,  gf_mul(al_n, d_cur[2]) ^ gf_mul(c_n, d_cur[3]))
           ^ (use_g1 ? gf_mul(g13, gf_mul(al_n, d_cur[1]) ^ gf_mul(c_n, d_cur[2]))
                     : gf_mul(g13, gf_mul(al_n, t_cur[0]) ^ gf_mul(c_n, t_cur[1])))
           ^ gf_mul(g2,  gf_mul(al_n, t_cur[1]) ^ gf_mul(c_n, t_cur[2]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; tau_q <= '0;
      l_q <= '0; q_q <= '0; al_q <= '0; c_q <= '0; beta_q <= '0;
    end else begin
      done <= en && (tau == 4'(T));
      if (en) begin
        busy   <= (tau != 4'(T));
        tau_q  <= tau + 4'd1;
        l_q    <= l_n;  q_q <= q_n;
        al_q   <= al_n; c_q <= c_n; beta_q <= beta_n;
      end
    end
  end

  assign deg = l_q;
  always_comb
    for (int j = 0; j <= T; j++) lambda[j] = d_reg[j];

endmodule
