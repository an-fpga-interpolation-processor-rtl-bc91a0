// gf_mult: combinational GF(2^8) multiplier, the GF-MULT of every processing
// element and of every evaluation-tree node.
//
// p = a * b modulo the field polynomial of interp_pkg (0x11D). The product is
// formed by shift-and-add over the bits of b with reduction after every shift.
// Purely combinational; no clock. The document names the unit; its internal
// structure is this design's choice.
module gf_mult
  import interp_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);
  assign p = gf_mul(a, b);
endmodule
