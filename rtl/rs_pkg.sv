// rs_pkg: constants, types and GF(2^8) arithmetic shared by the soft
// Reed-Solomon RS(255,239) decoder.
//
// The code is RS(N=255, K=239) over GF(2^8) with correction power T=8; the
// syndromes are S_i = R(alpha^i) for i = 1..2T, as in the decoder's
// definition.  Soft decoding uses ETA=5 least reliable positions (LRPs), each
// one a single bit of one received symbol.  Every pipeline stage lasts
// PERIOD=259 cycles: 255 symbols plus the 4-cycle delay of the reliability
// evaluator.  Field elements are in polynomial basis, bit b of a symbol being
// the coefficient of alpha^b, so flipping bit b adds alpha^b = (1 << b).
// The field polynomial x^8+x^4+x^3+x^2+1 (the one of ITU-T G.975) is this
// design's choice; the per-bit reliability width REL_W is also our own.
package rs_pkg;

  localparam int unsigned M      = 8;     // bits per symbol
  localparam int unsigned N      = 255;   // codeword length (symbols)
  localparam int unsigned K      = 239;   // message length (symbols)
  localparam int unsigned T      = 8;     // correction power (N-K)/2
  localparam int unsigned ETA    = 5;     // number of LRPs
  localparam int unsigned PERIOD = 259;   // cycles per pipeline stage
  localparam int unsigned REL_W  = 4;     // bits of per-bit reliability

  localparam logic [8:0] PRIM_POLY = 9'h11D;

  typedef logic [M-1:0] gf_t;

  // one candidate least reliable position: reliability, symbol position l
  // (power of x, 0..254) and bit index within the symbol
  typedef struct packed {
    logic [REL_W-1:0] rel;
    logic [7:0]       pos;
    logic [2:0]       bit_idx;
  } lrp_t;

  // per-codeword decoding report delivered with the first output symbol
  typedef struct packed {
    logic           fail;   // Lambda's root count did not match its degree
    logic           flipped; // corrected through a bit-flipped candidate
    logic [ETA-1:0] cand;   // accepted candidate (0 = hard decision)
    logic [3:0]     nerr;   // symbol errors found by the Chien search
  } dec_status_t;

  localparam lrp_t LRP_NONE = '{rel: '1, pos: 8'hFF, bit_idx: 3'd0};

  // a before b in the "least reliable first" order; ties keep the earlier
  // entry first (lower position index in arrival order wins)
  function automatic logic lrp_less(input lrp_t a, input lrp_t b);
    return a.rel < b.rel;
  endfunction

  // GF(2^8) multiplication, shift-and-add with reduction by PRIM_POLY
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [M-1:0] acc;
    logic [M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc ^= sh;
      sh = sh[M-1] ? ((sh << 1) ^ PRIM_POLY[M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  function automatic gf_t gf_sq(input gf_t a);
    return gf_mul(a, a);
  endfunction

  // alpha^e for 0 <= e < 255 (iterative, used for constants and ROM init)
  function automatic gf_t gf_alpha_pow(input int unsigned e);
    gf_t r;
    r = 8'h01;
    for (int unsigned i = 0; i < (e % 255); i++)
      r = gf_mul(r, 8'h02);
    return r;
  endfunction

endpackage
