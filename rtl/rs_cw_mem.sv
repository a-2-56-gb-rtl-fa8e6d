// rs_cw_mem: received-codeword memory, three banks of 256 bytes.
//
// The decoder writes each incoming codeword into one bank and reads it back
// three stage periods later, when its error pattern is known; three banks
// hold the three codewords in flight (the memory of the reference design is
// also 3 x 256 bytes).  One synchronous write port and one synchronous read
// port: rd_data shows the addressed byte one cycle after rd_en.  The flat
// array and the bank*256+addr mapping are this design's choice.
module rs_cw_mem
  import rs_pkg::*;
#(
  parameter int unsigned BANKS = 3
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic [1:0] wr_bank,
  input  logic [7:0] wr_addr,
  input  gf_t        wr_data,
  input  logic       rd_en,
  input  logic [1:0] rd_bank,
  input  logic [7:0] rd_addr,
  output gf_t        rd_data
);

  gf_t mem [BANKS*256];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_bank, rd_addr}];
  end

endmodule
