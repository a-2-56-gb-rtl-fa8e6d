// rs_gf_alog_rom: 256-entry antilog ROM, data = alpha^addr in GF(2^8).
//
// Used as LUT2 of the syndrome updater: it turns a symbol position l into
// the locator alpha^l.  The table is computed at elaboration from the field
// polynomial (entry 255 wraps to alpha^0 = 1).  Purely combinational: the
// output follows the address in the same cycle.
module rs_gf_alog_rom
  import rs_pkg::*;
(
  input  logic [7:0] addr,
  output gf_t        data
);

  typedef gf_t table_t [256];

  function automatic table_t build_alog();
    table_t t;
    gf_t    x;
    x = 8'h01;
    for (int i = 0; i < 256; i++) begin
      t[i] = x;
      x = gf_mul(x, 8'h02);
      if (i == 254) x = 8'h01;
    end
    return t;
  endfunction

  localparam table_t ALOG = build_alog();

  assign data = ALOG[addr];

endmodule
