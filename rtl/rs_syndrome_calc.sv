// rs_syndrome_calc: serial syndrome calculator, S_i = R(alpha^i), i=1..2T.
//
// One received symbol per cycle, highest power of x first (Horner's rule):
// each of the 2T=16 cells does S_i <= S_i*alpha^i + r with a constant
// multiplier; on sof the cell restarts with S_i <= r.  After the 255th
// symbol syn_valid pulses for one cycle with all 16 syndromes, which stay
// valid until the next sof.  The serial Horner structure is the usual one
// for this block; the decoder only fixes its function and its 255-cycle
// period.
module rs_syndrome_calc
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  gf_t  in_sym,
  output gf_t  syn [2*T],      // syn[i-1] = S_i
  output logic syn_valid
);

  logic [7:0] sym_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_cnt   <= '0;
      syn_valid <= 1'b0;
      for (int i = 0; i < 2*T; i++) syn[i] <= '0;
    end else begin
      syn_valid <= in_valid && !in_sof && (sym_cnt == 8'(N-1));
      if (in_valid) begin
        sym_cnt <= in_sof ? 8'd1 : sym_cnt + 8'd1;
        for (int i = 0; i < 2*T; i++)
          syn[i] <= in_sof ? in_sym
                           : (gf_mul(syn[i], gf_alpha_pow(i + 1)) ^ in_sym);
      end
    end
  end

endmodule
