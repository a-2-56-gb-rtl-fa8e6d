// tb_rs_ir_pe: self-checking test of one IR-RiBM processing element.
//
// Random operands and controls are applied; the new delta must equal
// g0*d_ip2 + g2*t_ip1 + g13*(d_ip1 or theta) with zeroed operands as
// requested, and theta must keep its value or load d_ip1 / d_ip2, all
// computed with the reference arithmetic.  load must make init_val the
// current value for the same cycle.
module tb_rs_ir_pe;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  gf_t init_val = 0, d_ip1 = 0, d_ip2 = 0, t_ip1 = 0, g0 = 0, g13 = 0, g2 = 0;
  logic use_g1 = 0, zero_d1 = 0, zero_t0 = 0, zero_t1 = 0;
  logic [1:0] th_sel = 0;
  gf_t d_cur, t_cur, d_q;
  int checks = 0, failures = 0;

  rs_ir_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t dm, tm, cd, ct, exp_d, exp_t, a1, a0, a2;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    dm = 0; tm = 0;
    for (int n = 0; n < 3000; n++) begin
      load = (n % 9 == 0); init_val = sym_t'($urandom);
      en = (n % 7 != 3);
      d_ip1 = sym_t'($urandom); d_ip2 = sym_t'($urandom); t_ip1 = sym_t'($urandom);
      g0 = sym_t'($urandom); g13 = sym_t'($urandom); g2 = sym_t'($urandom);
      use_g1 = $urandom_range(1); th_sel = 2'($urandom_range(2));
      zero_d1 = ($urandom_range(3) == 0); zero_t0 = ($urandom_range(3) == 0); zero_t1 = ($urandom_range(3) == 0);
      cd = load ? init_val : dm;
      ct = load ? init_val : tm;
      a1 = zero_d1 ? 0 : d_ip1;
      a0 = zero_t0 ? 0 : ct;
      a2 = zero_t1 ? 0 : t_ip1;
      exp_d = mul(g0, d_ip2) ^ mul(g2, a2) ^ mul(g13, use_g1 ? a1 : a0);
      exp_t = (th_sel == 1) ? d_ip1 : (th_sel == 2) ? d_ip2 : ct;
      #1;
      checks++;
      if (d_cur != cd || t_cur != ct) begin failures++; $display("current value wrong"); end
      @(posedge clk);
      if (en) begin dm = exp_d; tm = exp_t; end
      #1;
      checks++;
      if (d_q != dm) begin failures++; $display("step %0d: delta got %h exp %h", n, d_q, dm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
