// interp_pkg: types, constants and Galois-field helper functions shared by the
// interpolation processor.
//
// Field: GF(2^8), the symbol field of an RS(255,239) code, built on the
// primitive polynomial x^8 + x^4 + x^3 + x^2 + 1 (0x11D). The field size follows
// from the code; the choice of primitive polynomial is this design's own.
//
// pe_op_e / pe_ctrl_t form the command word that the y-processor broadcasts to
// every processing element in every x-processor each clock cycle.
package interp_pkg;

  parameter int unsigned GF_M = 8;
  parameter logic [GF_M:0] GF_POLY = 9'h11D;

  typedef logic [GF_M-1:0] gf_t;

  // Commands understood by a processing element.
  //   OP_NOP      hold all coefficients
  //   OP_INIT     load Q_j(x,y) = y^j for every polynomial j
  //   OP_EVAL     present coefficient of polynomial j (masked by the Hasse
  //               binomial C(a,r) mod 2) to the evaluation tree
  //   OP_UPD_J    Q_j <- Q_j + f * Q_jstar
  //   OP_UPD_STAR Q_jstar <- (x + alpha) * Q_jstar  (uses the linear array)
  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,
    OP_INIT     = 3'd1,
    OP_EVAL     = 3'd2,
    OP_UPD_J    = 3'd3,
    OP_UPD_STAR = 3'd4
  } pe_op_e;

  // Widths of the polynomial index and of the derivative order. Eight
  // polynomials and derivative orders below 16 cover multiplicities up to 8.
  parameter int unsigned JW = 4;
  parameter int unsigned RW = 4;

  typedef struct packed {
    pe_op_e        op;
    logic [JW-1:0] j;      // polynomial written (OP_UPD_J) or evaluated (OP_EVAL)
    logic [JW-1:0] jstar;  // polynomial of minimum weighted degree
    gf_t           f;      // update factor Delta_j / Delta_jstar
    gf_t           alpha;  // x-coordinate of the current point
    logic [RW-1:0] r;      // x-derivative order of the current constraint
  } pe_ctrl_t;

  // Shift-and-add multiplication modulo GF_POLY.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p;
    gf_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < int'(GF_M); i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[GF_M-1] ? ((aa << 1) ^ GF_POLY[GF_M-1:0]) : (aa << 1);
    end
    return p;
  endfunction

  // Squaring is linear over GF(2); written through gf_mul for clarity.
  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  // Inverse as a^(2^M - 2) = a^2 * a^4 * ... * a^(2^(M-1)); gf_inv(0) = 0.
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    gf_t s;
    r = gf_t'(1);
    s = a;
    for (int i = 1; i < int'(GF_M); i++) begin
      s = gf_sq(s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // Parity of the binomial coefficient C(n,k) (Lucas' theorem): odd exactly
  // when every bit set in k is also set in n.
  function automatic logic binom_odd(int unsigned n, int unsigned k);
    return (k <= n) && ((n & k) == k);
  endfunction

endpackage
