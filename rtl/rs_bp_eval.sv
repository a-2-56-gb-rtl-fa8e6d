// rs_bp_eval: Bjorck-Pereyra error value evaluator.
//
// With the error locators X_1..X_v from the Chien search, the syndromes
// satisfy sum_k e_k X_k^i = S_i (i = 1..v), a Vandermonde system.  The
// Bjorck-Pereyra method solves it in place on the S registers without
// computing the error evaluator polynomial:
//   step 1: for k = 1..v-1, i = v down to k+1:  S_i -= X_k * S_(i-1)
//   step 2: for k = v-1 down to 1, i = k+1..v:  S_i /= (X_i - X_(i-k));
//                                               S_(i-1) -= S_i
//   step 3: for k = 1..v:                       S_k /= X_k   -> e_k
// One operation per cycle, with the divide and the subtract of step 2 in
// separate cycles: v(v-1)/2 + v(v-1) + v cycles, 92 for v = T = 8, the
// budget of the reference evaluator.  The datapath is one multiplier, one
// adder and one divider (inverse ROM and multiplier) behind operand
// multiplexers, as in the reference figure.  The reference writes the
// procedure for v = T; running it on the v roots actually found is this
// design's reading.
//
// Timing: start latches v, X and S; done pulses one cycle after the last
// operation, with err[k-1] = e_k for k = 1..v (others 0).
module rs_bp_eval
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] nerr,
  input  gf_t        x_in [T],
  input  gf_t        s_in [T],
  output gf_t        err [T],
  output logic       done
);

  typedef enum logic [2:0] {IDLE, P1, P2DIV, P2SUB, P3} bp_state_e;
  bp_state_e  st;
  logic [3:0] v, k, i;                     // 1-based indices
  gf_t        x_q [T];
  gf_t        s_q [T];

  // operand selection (indices converted to 0-based)
  gf_t s_i, s_im1, x_k, x_i, x_ik, den, inv_den, quo, prod;
  assign s_i   = s_q[3'(i - 4'd1)];
  assign s_im1 = s_q[3'(i - 4'd2)];
  assign x_k   = x_q[3'(k - 4'd1)];
  assign x_i   = x_q[3'(i - 4'd1)];
  assign x_ik  = x_q[3'(i - k - 4'd1)];

  always_comb begin
    case (st)
      P3:      den = x_k;
      default: den = x_i ^ x_ik;
    endcase
  end

  rs_gf_inv_rom u_inv (.addr(den), .data(inv_den));

  assign quo  = gf_mul((st == P3) ? s_q[3'(k - 4'd1)] : s_i, inv_den);
  assign prod = gf_mul(x_k, s_im1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; v <= '0; k <= '0; i <= '0; done <= 1'b0;
      for (int j = 0; j < T; j++) begin x_q[j] <= '0; s_q[j] <= '0; end
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (start) begin
          v <= nerr;
          for (int j = 0; j < T; j++) begin
            x_q[j] <= (j < int'(nerr)) ? x_in[j] : '0;
            s_q[j] <= (j < int'(nerr)) ? s_in[j] : '0;
          end
          if (nerr == 4'd0) done <= 1'b1;
          else if (nerr == 4'd1) begin st <= P3; k <= 4'd1; end
          else begin st <= P1; k <= 4'd1; i <= nerr; end
        end
        P1: begin
          s_q[3'(i - 4'd1)] <= s_i ^ prod;
          if (i > k + 4'd1) i <= i - 4'd1;
          else if (k + 4'd1 < v) begin k <= k + 4'd1; i <= v; end
          else begin st <= P2DIV; k <= v - 4'd1; i <= v; end
        end
        P2DIV: begin
          s_q[3'(i - 4'd1)] <= quo;
          st <= P2SUB;
        end
        P2SUB: begin
          s_q[3'(i - 4'd2)] <= s_im1 ^ s_i;
          if (i < v) begin i <= i + 4'd1; st <= P2DIV; end
          else if (k > 4'd1) begin k <= k - 4'd1; i <= k; st <= P2DIV; end
          else begin st <= P3; k <= 4'd1; end
        end
        P3: begin
          s_q[3'(k - 4'd1)] <= quo;
          if (k < v) k <= k + 4'd1;
          else begin st <= IDLE; done <= 1'b1; end
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb
    for (int j = 0; j < T; j++) err[j] = s_q[j];

endmodule
