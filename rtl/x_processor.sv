// x_processor: one row of the PE array, holding the x-polynomial that
// multiplies y^B in every bivariate polynomial Q_0 .. Q_dy.
//
// NX processing elements, PE a owning monomial x^a y^B, are joined two ways:
//   * a linear array: PE a receives PE (a-1)'s coefficient of Q_jstar, which
//     turns the per-PE update into Q_jstar <- (x + alpha) Q_jstar in one cycle;
//   * a binary evaluation tree (eval_tree) over the PE leaf outputs, which
//     returns R = sum_a C(a,r) q_(j,a,B) alpha^a = alpha^r * (d/dx)^[r] q(alpha),
//     the row's share of a Hasse-derivative evaluation, LOG2(NX) cycles after an
//     OP_EVAL command.
// overflow pulses when OP_UPD_STAR would shift a nonzero coefficient out of the
// last PE (the polynomial has outgrown NX coefficients in x).
// rd_a / rd_j read one stored coefficient combinationally.
// The document gives the split into x-processors and a y-processor and the two
// topologies; the row-per-power-of-y arrangement is this design's reading.
module x_processor
  import interp_pkg::*;
#(
  parameter int unsigned NPOLY = 5,
  parameter int unsigned LOGNX = 3,
  parameter int unsigned B     = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pe_ctrl_t         ctrl,
  input  gf_t              pw [LOGNX],
  output logic             row_valid,
  output gf_t              row_result,
  output logic             overflow,
  input  logic [JW-1:0]    rd_j,
  input  logic [LOGNX-1:0] rd_a,
  output gf_t              rd_data
);
  localparam int unsigned NX = 2 ** LOGNX;

  gf_t star [NX];
  gf_t leaf [NX];
  gf_t rdv  [NX];

  for (genvar a = 0; a < int'(NX); a++) begin : g_pe
    interp_pe #(.NPOLY(NPOLY), .A(a), .B(B)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctrl     (ctrl),
      .left_in  ((a == 0) ? gf_t'(0) : star[(a == 0) ? 0 : a-1]),
      .star_out (star[a]),
      .leaf_out (leaf[a]),
      .rd_j     (rd_j),
      .rd_data  (rdv[a])
    );
  end

  eval_tree #(.LOGN(LOGNX)) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (ctrl.op == OP_EVAL),
    .leaves    (leaf),
    .pw        (pw),
    .valid_out (row_valid),
    .result    (row_result)
  );

  assign overflow = (ctrl.op == OP_UPD_STAR) && (star[NX-1] != '0);
  assign rd_data  = rdv[rd_a];

endmodule
