// rs_chien_par2: parallel-2 Chien search.
//
// Finds the error positions l, the roots alpha^-l of Lambda(x), testing two
// positions per cycle so that all 255 take 128 cycles.  Register R_j starts
// at Lambda_j; in search cycle c it holds Lambda_j*alpha^(2jc), and
//   lane A = Lambda_0 + sum R_j*alpha^j    = Lambda(alpha^(2c+1)), l = 254-2c
//   lane B = Lambda_0 + sum R_j*alpha^(2j) = Lambda(alpha^(2c+2)), l = 253-2c
// after which R_j <= R_j*alpha^(2j), the lane-B product; this takes 16
// constant multipliers.  Positions are visited in reception order (254
// first).  Each root is stored with its position and its locator
// X = alpha^l, produced by a running register stepped by alpha^-2.
// Two lanes and 128 cycles follow the reference design; the rest of the
// arrangement is this design's own.
//
// Timing: start loads Lambda and is search cycle 0; done pulses 128 cycles
// later with nroots, root_pos/root_x (the first nroots entries valid) and
// fail = more than T roots or a root count different from deg.
module rs_chien_par2
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        lambda [T+1],
  input  logic [4:0] deg,
  output logic [7:0] root_pos [T],
  output gf_t        root_x [T],
  output logic [3:0] nroots,
  output logic       fail,
  output logic       done
);

  localparam gf_t ALPHA_INV  = gf_alpha_pow(254);
  localparam gf_t ALPHA_INV2 = gf_alpha_pow(253);
  localparam gf_t ALPHA_254  = gf_alpha_pow(254);

  logic       busy;
  logic [6:0] c_q;
  gf_t        r_q [1:T];
  gf_t        r_cur [1:T];
  gf_t        l0_q, l0_cur;
  gf_t        xa_q, xa_cur, xb_cur;
  logic [6:0] c_cur;
  logic [4:0] deg_q;
  logic       ovf_q;
  gf_t        sum_a, sum_b;
  gf_t        prod_b [1:T];
  logic       hit_a, hit_b, en;
  logic [7:0] pos_a, pos_b;

  assign en     = start || busy;
  assign c_cur  = start ? 7'd0 : c_q;
  assign l0_cur = start ? lambda[0] : l0_q;
  assign xa_cur = start ? ALPHA_254 : xa_q;
  assign xb_cur = gf_mul(xa_cur, ALPHA_INV);

  always_comb begin
    sum_a = l0_cur;
    sum_b = l0_cur;
    for (int j = 1; j <= T; j++) begin
      r_cur[j]  = start ? lambda[j] : r_q[j];
      prod_b[j] = gf_mul(r_cur[j], gf_alpha_pow(2*j));
      sum_a    ^= gf_mul(r_cur[j], gf_alpha_pow(j));
      sum_b    ^= prod_b[j];
    end
  end

  assign pos_a = 8'd254 - {c_cur, 1'b0};
  assign pos_b = 8'd253 - {c_cur, 1'b0};
  assign hit_a = en && (sum_a == '0);
  assign hit_b = en && (sum_b == '0) && (c_cur != 7'd127);

  logic [3:0] cnt_cur;
  assign cnt_cur = start ? 4'd0 : nroots;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; c_q <= '0; l0_q <= '0; xa_q <= '0; deg_q <= '0;
      nroots <= '0; ovf_q <= 1'b0; fail <= 1'b0; done <= 1'b0;
      for (int j = 1; j <= T; j++) r_q[j] <= '0;
      for (int k = 0; k < T; k++) begin root_pos[k] <= '0; root_x[k] <= '0; end
    end else begin
      done <= 1'b0;
      if (en) begin
        logic [3:0] n;
        logic       ovf;
        n   = cnt_cur;
        ovf = start ? 1'b0 : ovf_q;
        if (start) deg_q <= deg;
        if (hit_a) begin
          if (n < 4'(T)) begin root_pos[n[2:0]] <= pos_a; root_x[n[2:0]] <= xa_cur; n = n + 4'd1; end
          else ovf = 1'b1;
        end
        if (hit_b) begin
          if (n < 4'(T)) begin root_pos[n[2:0]] <= pos_b; root_x[n[2:0]] <= xb_cur; n = n + 4'd1; end
          else ovf = 1'b1;
        end
        nroots <= n;
        ovf_q  <= ovf;
        l0_q   <= l0_cur;
        xa_q   <= gf_mul(xa_cur, ALPHA_INV2);
        for (int j = 1; j <= T; j++) r_q[j] <= prod_b[j];
        c_q    <= c_cur + 7'd1;
        busy   <= (c_cur != 7'd127);
        if (c_cur == 7'd127) begin
          done <= 1'b1;
          fail <= ovf || ({1'b0, n} != (start ? deg : deg_q));
        end
      end
    end
  end

endmodule
