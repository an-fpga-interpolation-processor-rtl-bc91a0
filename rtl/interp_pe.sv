// interp_pe: processing element of the monomial-parallel interpolation array.
//
// A PE owns one monomial x^A y^B and stores its coefficient in each of the
// NPOLY = dy+1 bivariate polynomials Q_0 .. Q_dy (one GF(2^8) register per
// polynomial). It holds exactly one GF multiplier and one GF adder; a mux in
// front of each selects the operands, so the register-to-register path is one
// multiplier, one adder and one mux.
//
// Commands (ctrl.op, see interp_pkg), all applied at the rising clock edge:
//   OP_INIT      q[j] <= (A == 0 && B == j) ? 1 : 0      (Q_j = y^j)
//   OP_UPD_J     q[ctrl.j]     <= q[ctrl.j] + ctrl.f * q[ctrl.jstar]
//   OP_UPD_STAR  q[ctrl.jstar] <= left_in + ctrl.alpha * q[ctrl.jstar]
//                i.e. multiply Q_jstar by (x + alpha); left_in is the
//                neighbour's (x^(A-1) y^B) coefficient of Q_jstar, taken over
//                the linear array, 0 for A = 0.
//   OP_EVAL / OP_NOP hold.
// Combinational outputs: star_out = q[ctrl.jstar] (to the right neighbour),
// leaf_out = q[ctrl.j] when C(A, ctrl.r) is odd, else 0 (to the evaluation
// tree), rd_data = q[rd_j].
// The document gives the PE's contents (adder, multiplier, dy+1 coefficients);
// the command set and reset value (Q_j = y^j) are this design's.
module interp_pe
  import interp_pkg::*;
#(
  parameter int unsigned NPOLY = 5,
  parameter int unsigned A = 0,
  parameter int unsigned B = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pe_ctrl_t      ctrl,
  input  gf_t           left_in,
  output gf_t           star_out,
  output gf_t           leaf_out,
  input  logic [JW-1:0] rd_j,
  output gf_t           rd_data
);

  gf_t q [NPOLY];

  gf_t    mul_a, mul_p, add_b, sum;
  logic   is_star;

  assign is_star  = (ctrl.op == OP_UPD_STAR);
  assign star_out = q[ctrl.jstar];
  assign mul_a    = is_star ? ctrl.alpha : ctrl.f;
  assign add_b    = is_star ? left_in : q[ctrl.j];

  gf_mult u_mul (.a(mul_a), .b(q[ctrl.jstar]), .p(mul_p));
  assign sum = mul_p ^ add_b;

  assign leaf_out = binom_odd(A, int'(ctrl.r)) ? q[ctrl.j] : '0;
  assign rd_data  = q[rd_j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(NPOLY); j++)
        q[j] <= (A == 0 && B == j) ? gf_t'(1) : gf_t'(0);
    end else begin
      unique case (ctrl.op)
        OP_INIT:
          for (int j = 0; j < int'(NPOLY); j++)
            q[j] <= (A == 0 && B == j) ? gf_t'(1) : gf_t'(0);
        OP_UPD_J:    q[ctrl.j]     <= sum;
        OP_UPD_STAR: q[ctrl.jstar] <= sum;
        default: ;
      endcase
    end
  end

endmodule
