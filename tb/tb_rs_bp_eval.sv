// tb_rs_bp_eval: self-checking test of the Bjorck-Pereyra error value
// evaluator.
//
// For v = 0..8 distinct random locators X_k = alpha^l and random non-zero
// error values e_k, the syndromes S_i = sum e_k X_k^i (i = 1..v) are formed
// with the reference arithmetic; the evaluator must return e_k, taking
// exactly v(v-1)/2 + v(v-1) + v cycles (92 for v = 8) before done.
module tb_rs_bp_eval;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] nerr = 0;
  gf_t x_in [T], s_in [T], err [T];
  logic done;
  int checks = 0, failures = 0;

  rs_bp_eval dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   pos [8];
    sym_t ev [8];
    int   v, cyc, expc;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 90; n++) begin
      v = n % 9;
      for (int k = 0; k < 8; k++) begin x_in[k] = 0; s_in[k] = 0; end
      for (int k = 0; k < v; k++) begin
        bit dup;
        do begin
          pos[k] = $urandom_range(254); dup = 0;
          for (int q = 0; q < k; q++) if (pos[q] == pos[k]) dup = 1;
        end while (dup);
        ev[k] = sym_t'($urandom_range(255, 1));
        x_in[k] = apow(pos[k]);
      end
      for (int i = 1; i <= v; i++) begin
        sym_t acc;
        acc = 0;
        for (int k = 0; k < v; k++) acc ^= mul(ev[k], apow(pos[k] * i));
        s_in[i-1] = acc;
      end
      nerr <= 4'(v);
      start <= 1; @(posedge clk); start <= 0;
      #1; cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      expc = v * (v - 1) / 2 + v * (v - 1) + v + 1;
      if (v == 0) expc = 1;
      checks++;
      if (cyc != expc) begin failures++; $display("v=%0d: %0d cycles, expected %0d", v, cyc, expc); end
      for (int k = 0; k < v; k++) begin
        checks++;
        if (err[k] != ev[k]) begin failures++; $display("v=%0d e_%0d got %h exp %h", v, k+1, err[k], ev[k]); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
