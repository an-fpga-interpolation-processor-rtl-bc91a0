// interp_top: monomial-parallel interpolation processor for Koetter-Vardy
// soft-decision decoding of RS(N, K) codes over GF(2^8).
//
// It finds a bivariate polynomial Q(x,y) of least (1, K-1)-weighted degree
// that passes through a stream of points (alpha, beta) with given
// multiplicities. Q is kept as dy+1 = NPOLY candidate polynomials
// Q_0 .. Q_dy, each written as sum_b q_b(x) y^b. The PE array holds one PE per
// monomial x^a y^b (a < NX = 2^LOGNX, b < NPOLY), arranged as NPOLY
// x-processors (one per power of y), each a linear array of NX PEs plus a
// binary evaluation tree. The y-processor combines the row values into
// discrepancies and sequences the updates; all PEs update one polynomial at a
// time, in parallel over the monomials.
//
// Interface: start, then one point per pt_valid/pt_ready handshake with
// pt_last on the final one; when done rises, best_j names the result
// polynomial and rd_j / rd_b / rd_a read any coefficient q_(j,a,b) back
// combinationally. overflow (sticky) flags that NX was too small.
// Iteration timing: 3*NPOLY + LOG2(NX) + 4 cycles per constraint with a
// nonzero discrepancy, 2*NPOLY + LOG2(NX) + 3 with none, plus one cycle per
// accepted point (see y_processor).
// The split into PEs, x-processors, a y-processor, linear array and tree is
// the document's; sizes not printed there (NX, dy) are derived for RS(255,239)
// with multiplicity 4.
module interp_top
  import interp_pkg::*;
#(
  parameter int unsigned K     = 239,
  parameter int unsigned NPOLY = 5,
  parameter int unsigned LOGNX = 10,
  parameter int unsigned MMAX  = 4,
  parameter int unsigned WDW   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             pt_valid,
  output logic             pt_ready,
  input  gf_t              pt_alpha,
  input  gf_t              pt_beta,
  input  logic [RW-1:0]    pt_mult,
  input  logic             pt_last,
  output logic             busy,
  output logic             done,
  output logic             overflow,
  output logic [JW-1:0]    best_j,
  output logic [WDW-1:0]   best_wdeg,
  output logic             ev_update,
  output logic             ev_skip,
  input  logic [JW-1:0]    rd_j,
  input  logic [JW-1:0]    rd_b,
  input  logic [LOGNX-1:0] rd_a,
  output gf_t              rd_data
);

  pe_ctrl_t ctrl;
  gf_t      pw         [LOGNX];
  gf_t      row_result [NPOLY];
  gf_t      row_rd     [NPOLY];
  logic     [NPOLY-1:0] row_valid, row_ovf;

  y_processor #(.K(K), .NPOLY(NPOLY), .LOGNX(LOGNX), .MMAX(MMAX), .WDW(WDW)) u_yproc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .pt_valid   (pt_valid),
    .pt_ready   (pt_ready),
    .pt_alpha   (pt_alpha),
    .pt_beta    (pt_beta),
    .pt_mult    (pt_mult),
    .pt_last    (pt_last),
    .ctrl       (ctrl),
    .pw         (pw),
    .row_valid  (row_valid[0]),
    .row_result (row_result),
    .ovf_in     (|row_ovf),
    .busy       (busy),
    .done       (done),
    .overflow   (overflow),
    .best_j     (best_j),
    .best_wdeg  (best_wdeg),
    .ev_update  (ev_update),
    .ev_skip    (ev_skip)
  );

  for (genvar b = 0; b < int'(NPOLY); b++) begin : g_row
    x_processor #(.NPOLY(NPOLY), .LOGNX(LOGNX), .B(b)) u_xproc (
      .clk        (clk),
      .rst_n      (rst_n),
      .ctrl       (ctrl),
      .pw         (pw),
      .row_valid  (row_valid[b]),
      .row_result (row_result[b]),
      .overflow   (row_ovf[b]),
      .rd_j       (rd_j),
      .rd_a       (rd_a),
      .rd_data    (row_rd[b])
    );
  end

  assign rd_data = (int'(rd_b) < int'(NPOLY)) ? row_rd[rd_b] : '0;

endmodule
