// rs_ir_pe: processing element of the iteration-reduced RiBM key equation
// solver.
//
// The element holds one delta and one theta register.  Per iteration it
// computes
//     delta_i <= g0*delta_{i+2} + g2*theta_{i+1} + g13*(delta_{i+1} or theta_i)
// with three GF multipliers and two adders: g1 and g3 are never both
// non-zero, so one multiplier serves both, its operand chosen by use_g1 (as
// in the reference element's g1/g3 input).  The theta register keeps its
// value or loads delta_{i+1} or delta_{i+2}, picked by th_sel.
//
// The zero-forcing inputs keep Lambda(x) free of product terms: once the
// upper end of the array holds Lambda coefficients, operands that still hold
// S(x)*Lambda(x) or S(x)*B(x) terms must read as zero (zero_d1 for
// delta_{i+1}, zero_t0 / zero_t1 for theta_i / theta_{i+1}).  The reference
// element shows these zero-selecting multiplexers; which operand is zeroed
// in which iteration is worked out by the controller of rs_kes_irribm.
//
// Timing: when load is high the element starts from init_val instead of its
// registers, so the first iteration happens on the load cycle.  The d_cur /
// t_cur outputs are the values neighbours use in the current cycle.
module rs_ir_pe
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // perform an iteration this cycle
  input  logic       load,      // use init_val as the current value
  input  gf_t        init_val,
  // neighbour operands (current values of elements i+1, i+2)
  input  gf_t        d_ip1,
  input  gf_t        d_ip2,
  input  gf_t        t_ip1,
  // control from the controller
  input  gf_t        g0,
  input  gf_t        g13,
  input  gf_t        g2,
  input  logic       use_g1,
  input  logic [1:0] th_sel,    // 0 keep, 1 delta_{i+1}, 2 delta_{i+2}
  input  logic       zero_d1,
  input  logic       zero_t0,
  input  logic       zero_t1,
  // state
  output gf_t        d_cur,
  output gf_t        t_cur,
  output gf_t        d_q
);

  gf_t t_q;
  gf_t op_d1, op_t0, op_t1, op13, d_new, t_new;

  assign d_cur = load ? init_val : d_q;
  assign t_cur = load ? init_val : t_q;

  assign op_d1 = zero_d1 ? '0 : d_ip1;
  assign op_t0 = zero_t0 ? '0 : t_cur;
  assign op_t1 = zero_t1 ? '0 : t_ip1;
  assign op13  = use_g1 ? op_d1 : op_t0;

  assign d_new = gf_mul(g0, d_ip2) ^ gf_mul(g2, op_t1) ^ gf_mul(g13, op13);

  always_comb
    case (th_sel)
      2'd1:    t_new = d_ip1;
      2'd2:    t_new = d_ip2;
      default: t_new = t_cur;
    endcase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '0;
      t_q <= '0;
    end else if (en) begin
      d_q <= d_new;
      t_q <= t_new;
    end
  end

endmodule
