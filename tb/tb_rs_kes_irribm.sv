// tb_rs_kes_irribm: self-checking test of the IR-RiBM key equation solver.
//
// Random error patterns of 0..12 symbol errors are turned into syndromes by
// the reference package; Lambda(x) and its length from a reference
// Berlekamp-Massey are compared with the solver's output (equal up to a
// scale factor, same degree).  Solves are issued back to back, so done must
// come exactly T=8 cycles after each start, and a start must coincide with
// the previous done.
module tb_rs_kes_irribm;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t  syn [2*T];
  gf_t  lambda [T+1];
  logic [4:0] deg;
  logic done;
  int checks = 0, failures = 0;

  rs_kes_irribm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NTEST = 400;
  syn_t sq [NTEST];

  initial begin
    cw_t  e;
    lam_t ref_lam, got;
    int   ref_len, ne, p, t_start, t_done;
    for (int n = 0; n < NTEST; n++) begin
      for (int l = 0; l < 255; l++) e[l] = 0;
      ne = n % 13;
      for (int k = 0; k < ne; k++) begin
        p = $urandom_range(254);
        e[p] = sym_t'($urandom_range(255, 1));
      end
      sq[n] = syndromes(e);
    end
    for (int i = 0; i < 2*T; i++) syn[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n <= NTEST; n++) begin
      // drive start for solve n and, in the same cycle, check solve n-1
      #1;
      if (n < NTEST) begin
        start = 1;
        for (int i = 0; i < 2*T; i++) syn[i] = sq[n][i];
      end else start = 0;
      if (n > 0) begin
        checks++;
        if (!done) begin failures++; $display("done missing for solve %0d", n-1); end
        bm(sq[n-1], ref_lam, ref_len);
        for (int j = 0; j <= T; j++) got[j] = lambda[j];
        checks++;
        if (deg != 5'(ref_len)) begin
          failures++; $display("solve %0d: deg %0d expected %0d", n-1, deg, ref_len);
        end else if (ref_len <= T) begin
          checks++;
          if (!same_up_to_scale(ref_lam, got)) begin
            failures++; $display("solve %0d: Lambda mismatch", n-1);
          end
        end
      end
      @(posedge clk);
      #1 start = 0;
      for (int c = 1; c < T; c++) begin
        checks++;
        if (done) begin failures++; $display("early done"); end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
