// y_processor: y-direction arithmetic and top-level control of the
// interpolation processor (Koetter's iterative interpolation).
//
// The processor keeps NPOLY = dy+1 bivariate polynomials Q_0 .. Q_dy, stored
// monomial-parallel in the x-processors, and their (1, K-1)-weighted degrees
// wdeg_j, which live here. Each interpolation point (alpha, beta) of
// multiplicity m imposes the m(m+1)/2 constraints D_(r,s) Q(alpha, beta) = 0,
// r + s < m, taken in the order r = 0..m-1 (outer), s = 0..m-1-r (inner).
// One constraint (one "iteration") runs through these states:
//   SETUP  (NPOLY cycles) y-weights ywt[b] = C(b,s) mod 2 * beta^(b-s), one GF
//          multiplication per cycle;
//   EVAL   (NPOLY cycles) one OP_EVAL per polynomial j; every x-processor
//          returns its row value R_b(j) LOG2(NX) cycles later and the
//          discrepancy is formed here as Delta'_j = sum_b ywt[b] * R_b(j),
//          which equals alpha^r * D_(r,s) Q_j(alpha, beta);
//   WAIT   until all NPOLY discrepancies are in;
//   DECIDE pick jstar, the polynomial of least (wdeg, j) among those with
//          Delta'_j != 0, and invert Delta'_jstar; if none is nonzero the
//          iteration ends here (a "skip");
//   UPD    (NPOLY cycles) OP_UPD_J with f = Delta'_j / Delta'_jstar for every
//          j != jstar whose discrepancy is nonzero (the common factor alpha^r
//          cancels in the ratio);
//   STAR   OP_UPD_STAR: Q_jstar <- (x + alpha) Q_jstar, wdeg_jstar += 1.
// After the point flagged pt_last, best_j / best_wdeg give the polynomial of
// least weighted degree, the interpolation result, and done is raised.
//
// Interface: start (pulse in IDLE or DONE) clears the polynomials to
// Q_j = y^j. Points are taken with a valid/ready handshake (pt_*); a point is
// accepted in the cycle where pt_valid and pt_ready are both 1. alpha must be
// nonzero (true for the code's nonzero evaluation positions). ev_update /
// ev_skip pulse once per iteration. overflow is sticky: a polynomial grew past
// NX coefficients in x and the result is not valid.
// The document states that y-calculations and top-level control sit in a
// y-processor; the algorithm steps, the state sequence and all timing here are
// this design's. The discrepancy sum and the inversion are single-cycle
// combinational blocks, longer than the PE path.
module y_processor
  import interp_pkg::*;
#(
  parameter int unsigned K     = 239,
  parameter int unsigned NPOLY = 5,
  parameter int unsigned LOGNX = 10,
  parameter int unsigned MMAX  = 4,
  parameter int unsigned WDW   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // point stream
  input  logic              pt_valid,
  output logic              pt_ready,
  input  gf_t               pt_alpha,
  input  gf_t               pt_beta,
  input  logic [RW-1:0]     pt_mult,
  input  logic              pt_last,
  // to / from the x-processors
  output pe_ctrl_t          ctrl,
  output gf_t               pw [LOGNX],
  input  logic              row_valid,
  input  gf_t               row_result [NPOLY],
  input  logic              ovf_in,
  // status
  output logic              busy,
  output logic              done,
  output logic              overflow,
  output logic [JW-1:0]     best_j,
  output logic [WDW-1:0]    best_wdeg,
  output logic              ev_update,
  output logic              ev_skip
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_WAIT_PT, S_SETUP, S_EVAL, S_WAIT, S_DECIDE, S_UPD,
    S_STAR, S_NEXT, S_DONE
  } state_e;

  state_e          state;
  gf_t             alpha, beta, bp, dinv;
  logic [RW-1:0]   mult, r, s;
  logic            last;
  logic [JW-1:0]   cnt, rcv, jstar;
  gf_t             ywt   [NPOLY];
  gf_t             delta [NPOLY];
  logic [WDW-1:0]  wdeg  [NPOLY];

  // ---- discrepancy of the row values now leaving the trees
  gf_t dsum;
  always_comb begin
    dsum = '0;
    for (int b = 0; b < int'(NPOLY); b++) dsum ^= gf_mul(ywt[b], row_result[b]);
  end

  // ---- least (wdeg, j) among nonzero discrepancies, and among all
  logic          any_nz;
  logic [JW-1:0] js_c, best_c;
  always_comb begin
    any_nz = 1'b0;
    js_c   = '0;
    best_c = '0;
    for (int j = 0; j < int'(NPOLY); j++) begin
      if (delta[j] != '0 && (!any_nz || wdeg[j] < wdeg[js_c])) begin
        any_nz = 1'b1;
        js_c   = JW'(j);
      end
      if (wdeg[j] < wdeg[best_c]) best_c = JW'(j);
    end
  end

  // ---- commands to the PEs
  always_comb begin
    ctrl       = '0;
    ctrl.op    = OP_NOP;
    ctrl.alpha = alpha;
    ctrl.r     = r;
    ctrl.jstar = jstar;
    ctrl.j     = cnt;
    ctrl.f     = gf_mul(delta[cnt], dinv);
    unique case (state)
      S_INIT: ctrl.op = OP_INIT;
      S_EVAL: ctrl.op = OP_EVAL;
      S_UPD:  if (cnt != jstar && delta[cnt] != '0) ctrl.op = OP_UPD_J;
      S_STAR: ctrl.op = OP_UPD_STAR;
      default: ;
    endcase
  end

  assign pt_ready  = (state == S_WAIT_PT);
  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign done      = (state == S_DONE);
  assign ev_update = (state == S_STAR);
  assign ev_skip   = (state == S_DECIDE) && !any_nz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      alpha     <= '0;
      beta      <= '0;
      bp        <= '0;
      dinv      <= '0;
      mult      <= '0;
      r         <= '0;
      s         <= '0;
      last      <= 1'b0;
      cnt       <= '0;
      rcv       <= '0;
      jstar     <= '0;
      overflow  <= 1'b0;
      best_j    <= '0;
      best_wdeg <= '0;
      for (int k = 0; k < int'(LOGNX); k++) pw[k] <= '0;
      for (int j = 0; j < int'(NPOLY); j++) begin
        ywt[j]   <= '0;
        delta[j] <= '0;
        wdeg[j]  <= WDW'(j * (K - 1));
      end
    end else begin
      if (ovf_in) overflow <= 1'b1;
      if (row_valid) begin
        delta[rcv] <= dsum;
        rcv        <= rcv + 1'b1;
      end

      unique case (state)
        S_IDLE, S_DONE:
          if (start) state <= S_INIT;

        S_INIT: begin
          overflow <= 1'b0;
          for (int j = 0; j < int'(NPOLY); j++) wdeg[j] <= WDW'(j * (K - 1));
          state <= S_WAIT_PT;
        end

        S_WAIT_PT:
          if (pt_valid) begin
            alpha <= pt_alpha;
            beta  <= pt_beta;
            mult  <= pt_mult;
            last  <= pt_last;
            pw[0] <= pt_alpha;
            for (int k = 1; k < int'(LOGNX); k++) pw[k] <= gf_sq(pw_next(k - 1));
            r     <= '0;
            s     <= '0;
            cnt   <= '0;
            bp    <= gf_t'(1);
            if (pt_mult != '0)  state <= S_SETUP;
            else if (pt_last)   state <= S_DONE;
          end

        S_SETUP: begin
          // cnt runs over b; bp holds beta^(b-s) once b >= s
          if (cnt >= JW'(s)) begin
            ywt[cnt] <= binom_odd(int'(cnt), int'(s)) ? bp : '0;
            bp       <= gf_mul(bp, beta);
          end else begin
            ywt[cnt] <= '0;
          end
          if (cnt == JW'(NPOLY - 1)) begin
            cnt   <= '0;
            rcv   <= '0;
            state <= S_EVAL;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end

        S_EVAL:
          if (cnt == JW'(NPOLY - 1)) begin
            cnt   <= '0;
            state <= S_WAIT;
          end else begin
            cnt <= cnt + 1'b1;
          end

        S_WAIT:
          if (rcv == JW'(NPOLY)) state <= S_DECIDE;

        S_DECIDE:
          if (any_nz) begin
            jstar <= js_c;
            dinv  <= gf_inv(delta[js_c]);
            cnt   <= '0;
            state <= S_UPD;
          end else begin
            state <= S_NEXT;
          end

        S_UPD:
          if (cnt == JW'(NPOLY - 1)) begin
            cnt   <= '0;
            state <= S_STAR;
          end else begin
            cnt <= cnt + 1'b1;
          end

        S_STAR: begin
          wdeg[jstar] <= wdeg[jstar] + 1'b1;
          state       <= S_NEXT;
        end

        S_NEXT: begin
          cnt <= '0;
          bp  <= gf_t'(1);
          if (int'(r) + int'(s) + 1 < int'(mult)) begin
            s     <= s + 1'b1;
            state <= S_SETUP;
          end else if (int'(r) + 1 < int'(mult)) begin
            r     <= r + 1'b1;
            s     <= '0;
            state <= S_SETUP;
          end else if (last) begin
            state <= S_DONE;
          end else begin
            state <= S_WAIT_PT;
          end
        end

        default: state <= S_IDLE;
      endcase

      if (state == S_NEXT || state == S_WAIT_PT) begin
        best_j    <= best_c;
        best_wdeg <= wdeg[best_c];
      end
    end
  end

  // alpha^(2^k) of the incoming point, k = 0 .. LOGNX-1
  function automatic gf_t pw_next(int unsigned k);
    gf_t v;
    v = pt_alpha;
    for (int unsigned i = 0; i < k; i++) v = gf_sq(v);
    return v;
  endfunction

  // Points must lie off the line x = 0: the row values carry a factor alpha^r.
  a_alpha_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (pt_valid && pt_ready && pt_mult != '0) |-> pt_alpha != '0);
  a_mult_range: assert property (@(posedge clk) disable iff (!rst_n)
    (pt_valid && pt_ready) |-> int'(pt_mult) <= int'(MMAX));

endmodule
