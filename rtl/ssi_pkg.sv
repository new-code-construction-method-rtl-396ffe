// ssi_pkg: types, GF(2^p) arithmetic and the default interleaver table shared by
// the superimposed-structured-interleaver (SSI) repeat-accumulate encoder.
//
// The information part H_c of the parity-check matrix is tiled into L x L blocks,
// L = 2^p - 1. Every nonzero block is a sum (XOR, "superimposition") of one or more
// structured permutation matrices pi(i,j): in row k of pi(i,j) the single 1 sits in
// column f(alpha^i * (alpha^j)^k) - 1 (0-based), where alpha is the primitive element
// of GF(2^p) and f() reads a field element as the integer whose bit n is the
// coefficient of alpha^n. This definition and the superimposition follow the
// construction this encoder is built for; the primitive polynomials and the default
// table below are this design's own choices.
//
// A table entry is one pi(i,j) placed at (row-block rb, information column-block cb).
// The code search that produces a girth-optimised table is an offline program, not
// hardware; ssi_entry() returns a deterministic stand-in table with the column and
// row weights of the rate-5/6 reference code (see README). Replace ssi_entry() to
// encode another SSI code: the hardware is generated from whatever it returns.
package ssi_pkg;

  localparam int unsigned MAX_P = 16;
  typedef logic [MAX_P-1:0] gf_t;

  typedef struct packed {
    logic [15:0] rb;  // row-block (0 .. MB-1)
    logic [15:0] cb;  // information column-block (0 .. KB-1)
    logic [15:0] i;   // pi(i,j) exponent i
    logic [15:0] j;   // pi(i,j) exponent j, coprime with L
  } ssi_entry_t;

  // Primitive polynomial of GF(2^p), bit n = coefficient of x^n.
  // p = 3 gives x^3 + x + 1, the field of the pi(1,2) example.
  function automatic int unsigned default_poly(int unsigned p);
    case (p)
      2:       return 'h7;     // x^2+x+1
      3:       return 'hB;     // x^3+x+1
      4:       return 'h13;    // x^4+x+1
      5:       return 'h25;    // x^5+x^2+1
      6:       return 'h43;    // x^6+x+1
      7:       return 'h83;    // x^7+x+1
      8:       return 'h11D;   // x^8+x^4+x^3+x^2+1
      9:       return 'h211;   // x^9+x^4+1
      10:      return 'h409;   // x^10+x^3+1
      11:      return 'h805;   // x^11+x^2+1
      12:      return 'h1053;  // x^12+x^6+x^4+x+1
      13:      return 'h201B;  // x^13+x^4+x^3+x+1
      default: return 0;
    endcase
  endfunction

  // Product of two elements of GF(2^p) (shift-and-add, reduction by poly).
  function automatic gf_t gf_mul(gf_t a, gf_t b, int unsigned p, int unsigned poly);
    gf_t r;
    gf_t x;
    r = '0;
    x = a;
    for (int unsigned n = 0; n < MAX_P; n++) begin
      if (n < p) begin
        if (b[n]) r = r ^ x;
        x = x << 1;
        if (x[p]) x = x ^ gf_t'(poly);
      end
    end
    return r;
  endfunction

  // alpha^n, alpha = x.
  function automatic gf_t gf_alpha_pow(int unsigned n, int unsigned p, int unsigned poly);
    gf_t x;
    x = gf_t'(1);
    for (int unsigned m = 0; m < n; m++) begin
      x = x << 1;
      if (x[p]) x = x ^ gf_t'(poly);
    end
    return x;
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned x;
    int unsigned y;
    int unsigned t;
    x = a;
    y = b;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Column weight of information column-block c: the first w3 blocks have
  // weight 3, the rest weight 4.
  function automatic int unsigned col_weight(int unsigned c, int unsigned w3);
    return (c < w3) ? 3 : 4;
  endfunction

  // Number of pi(i,j) entries in the table (sum of the column weights).
  function automatic int unsigned ssi_num_entries(int unsigned kb, int unsigned w3);
    return 3 * w3 + 4 * (kb - w3);
  endfunction

  // Entry e of the default table. Entries are listed column-block by column-block.
  // Entries 2q and 2q+1 form pair q: both sit in row-block q mod MB and share
  // j, with different i, so when they fall in the same column-block they are
  // superimposed in one L x L block without overlapping 1s
  // (i1 + j*k = i2 + j*k mod L has no solution for i1 != i2).
  function automatic ssi_entry_t ssi_entry(int unsigned e, int unsigned mb, int unsigned kb,
                                           int unsigned w3, int unsigned l);
    ssi_entry_t   ent;
    int unsigned  c;
    int unsigned  acc;
    int unsigned  q;
    int unsigned  jj;
    c   = 0;
    acc = 0;
    while ((c + 1 < kb) && (e >= acc + col_weight(c, w3))) begin
      acc = acc + col_weight(c, w3);
      c   = c + 1;
    end
    q  = e / 2;
    jj = (2 * q + 1) % l;
    while ((jj == 0) || (gcd(jj, l) != 1)) jj = (jj + 1) % l;
    ent.rb = 16'(q % mb);
    ent.cb = 16'(c);
    ent.i  = 16'((7 * q + (e % 2) * ((l + 1) / 2)) % l);
    ent.j  = 16'(jj);
    return ent;
  endfunction

endpackage
