// rs_gf_inv_rom: 256-entry inverse ROM, data = addr^-1 in GF(2^8).
//
// The error value evaluator divides by reading this ROM and multiplying.
// The table is computed at elaboration: for every power alpha^i the entry
// at alpha^i holds alpha^(255-i).  Entry 0 has no inverse and holds 0.
// Purely combinational.
module rs_gf_inv_rom
  import rs_pkg::*;
(
  input  gf_t addr,
  output gf_t data
);

  typedef gf_t table_t [256];

  function automatic table_t build_inv();
    table_t t;
    gf_t    e [255];
    gf_t    x;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      e[i] = x;
      x = gf_mul(x, 8'h02);
    end
    t[0] = 8'h00;
    for (int i = 0; i < 255; i++)
      t[e[i]] = e[(255 - i) % 255];
    return t;
  endfunction

  localparam table_t INV = build_inv();

  assign data = INV[addr];

endmodule
