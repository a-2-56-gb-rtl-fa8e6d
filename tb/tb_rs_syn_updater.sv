// tb_rs_syn_updater: self-checking test of the Gray-code syndrome updater.
//
// Random syndromes and LRP lists are loaded; then the 31 flips of a full
// Gray-code walk are applied back to back.  After each 8-cycle update the
// 16 syndromes must equal S_j + alpha^b * alpha^(l*j) summed over the flips
// so far, computed with the reference arithmetic; busy must be high for
// exactly the 7 cycles after each start.
module tb_rs_syn_updater;
  import rs_pkg::*;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, start = 0, busy;
  logic [2:0] kappa = 0;
  gf_t syn_in [2*T];
  lrp_t lrp_in [ETA];
  gf_t syn_out [2*T];
  int checks = 0, failures = 0;

  rs_syn_updater dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t s [16];
    int   kk;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      for (int j = 0; j < 16; j++) begin s[j] = sym_t'($urandom); syn_in[j] = s[j]; end
      for (int m = 0; m < ETA; m++)
        lrp_in[m] = '{rel: REL_W'(m), pos: 8'($urandom_range(254)), bit_idx: 3'($urandom_range(7))};
      load <= 1; @(posedge clk); load <= 0;
      for (int i = 1; i < 32; i++) begin
        kk = 0;
        while (((i >> kk) & 1) == 0) kk++;
        for (int j = 1; j <= 16; j++)
          s[j-1] ^= mul(sym_t'(1 << lrp_in[kk].bit_idx), apow(int'(lrp_in[kk].pos) * j));
        start <= 1; kappa <= 3'(kk);
        @(posedge clk);
        start <= 0;
        for (int c = 1; c < 8; c++) begin
          #1; checks++;
          if (!busy) begin failures++; $display("busy low too early"); end
          @(posedge clk);
        end
        #1; checks++;
        if (busy) begin failures++; $display("busy still high"); end
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (syn_out[j] != s[j]) begin failures++; $display("set %0d flip %0d S_%0d got %h exp %h", n, i, j+1, syn_out[j], s[j]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
