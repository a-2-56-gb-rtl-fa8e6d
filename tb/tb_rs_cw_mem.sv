// tb_rs_cw_mem: self-checking test of the three-bank codeword memory.
//
// Random writes and reads over all three banks are compared with a model
// array; reading and writing the same address in one cycle must return the
// old byte (the decoder relies on this when a bank is reused), and read
// data must appear one cycle after rd_en.
module tb_rs_cw_mem;
  import rs_pkg::*;

  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [1:0] wr_bank = 0, rd_bank = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  gf_t wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  gf_t model [3][256];

  rs_cw_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_t expd;
    bit  pend;
    // fill everything
    for (int b = 0; b < 3; b++)
      for (int a = 0; a < 256; a++) begin
        wr_en <= 1; wr_bank <= 2'(b); wr_addr <= 8'(a);
        model[b][a] = gf_t'($urandom); wr_data <= model[b][a];
        @(posedge clk);
      end
    wr_en <= 0;
    pend = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [1:0] rb, wb;
      logic [7:0] ra, wa;
      bit dw, same;
      rb = 2'($urandom_range(2)); ra = 8'($urandom);
      same = (n % 4 == 0);
      wb = same ? rb : 2'($urandom_range(2)); wa = same ? ra : 8'($urandom);
      dw = $urandom_range(1);
      rd_en <= 1; rd_bank <= rb; rd_addr <= ra;
      wr_en <= dw; wr_bank <= wb; wr_addr <= wa; wr_data <= gf_t'($urandom);
      @(posedge clk);
      #1;
      if (pend) begin end
      checks++;
      if (rd_data != model[rb][ra]) begin
        failures++; $display("read %0d/%0d got %h exp %h", rb, ra, rd_data, model[rb][ra]);
      end
      if (dw) model[wb][wa] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
