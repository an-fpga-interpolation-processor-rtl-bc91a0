// eval_tree: pipelined binary tree that evaluates a polynomial at a point.
//
// Given N = 2^LOGN leaf coefficients c_0 .. c_(N-1) and the powers
// pw[k] = alpha^(2^k), it returns sum_a c_a * alpha^a. A node at height k
// (k = 0 just above the leaves) combines its children as
// left + pw[k] * right, so each node is one GF multiplier and one GF adder and
// the result emerges after LOGN register stages (one per level).
// valid_in is carried alongside the data; valid_out marks the result of the
// leaves presented LOGN cycles earlier. pw must be held constant while data is
// in flight. The document states that a binary tree performs the polynomial
// evaluations; the multiply-by-power node form and the per-level registers are
// this design's choice.
module eval_tree
  import interp_pkg::*;
#(
  parameter int unsigned LOGN = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  input  gf_t  leaves [2**LOGN],
  input  gf_t  pw     [LOGN],
  output logic valid_out,
  output gf_t  result
);
  localparam int unsigned N = 2 ** LOGN;

  // Heap layout: node 1 is the root, node i has children 2i and 2i+1, the
  // leaves sit at N .. 2N-1. Only nodes 1 .. N-1 are registers.
  gf_t node [2*N];

  function automatic int unsigned height(int unsigned i);
    int unsigned d;
    d = 0;
    while ((i >> (d + 1)) != 0) d++;
    return LOGN - 1 - d;
  endfunction

  for (genvar a = 0; a < int'(N); a++) begin : g_leaf
    assign node[N+a] = leaves[a];
  end

  for (genvar i = 1; i < int'(N); i++) begin : g_node
    gf_t prod;
    gf_mult u_mul (.a(pw[height(i)]), .b(node[2*i+1]), .p(prod));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) node[i] <= '0;
      else        node[i] <= node[2*i] ^ prod;
    end
  end

  assign node[0] = '0;
  assign result  = node[1];

  logic [LOGN-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= (vpipe << 1) | LOGN'(valid_in);
  end
  assign valid_out = vpipe[LOGN-1];

endmodule
