// qpp_addr_gen: address generator for the LTE quadratic permutation
// polynomial interleaver pi(i) = (f1*i + f2*i^2) mod K, vectorised over the
// parallel SISO decoders.
//
// The code block of K bits is cut into P sub-blocks of M = K/P bits; SISO j
// handles indices t + j*M, t = 0..M-1. Because this interleaver is
// contention-free for any P that divides K, pi(t + j*M) mod M is the same for
// every j: all decoders address the same memory row r = pi(t) mod M, and
// decoder j needs column q_j = pi(t + j*M) div M. The generator therefore
// keeps every address in mixed radix (q, r) and never divides while running:
// pi(i+1) = pi(i) + g(i), g(i+1) = g(i) + 2*f2 (both mod K), with one shared
// row part and one column part per decoder. Two steps (t, t+1) are produced
// per cycle for the radix-4 decoders.
//
// Interface: 'init' loads K, M, P-1 and f1, f2 and starts a setup of P_MAX
// cycles that computes the start values with divisions; 'ready' then rises.
// 'restart' returns to t = 0 in one cycle; 'adv' moves on by two steps. The
// outputs are combinational from the registers: row_e/col_e for step t,
// row_o/col_o for step t+1. P must be a power of two (the column wraps with a
// mask). The recursive, division-free formulation is this design's choice.
module qpp_addr_gen #(
  parameter int unsigned P_MAX = 16,
  parameter int unsigned K_W   = 13,   // bits of K (K <= 6144)
  parameter int unsigned M_W   = 9,    // bits of M (M <= 384)
  parameter int unsigned Q_W   = $clog2(P_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [K_W-1:0]   cfg_k,
  input  logic [M_W-1:0]   cfg_m,
  input  logic [Q_W-1:0]   cfg_pmask,   // P - 1
  input  logic [K_W-1:0]   cfg_f1,
  input  logic [K_W-1:0]   cfg_f2,
  input  logic             restart,
  input  logic             adv,
  output logic             ready,
  output logic [M_W-1:0]   row_e,
  output logic [M_W-1:0]   row_o,
  output logic [Q_W-1:0]   col_e [P_MAX],
  output logic [Q_W-1:0]   col_o [P_MAX]
);

  localparam int unsigned XW = 3 * K_W + 4;

  logic [K_W-1:0] k_q, f1_q, f2_q;
  logic [M_W-1:0] m_q;
  logic [Q_W-1:0] pmask_q;

  // start values (t = 0) and increments
  logic [Q_W-1:0] qpi0 [P_MAX];
  logic [Q_W-1:0] qg0  [P_MAX];
  logic [M_W-1:0] rg0, dr;
  logic [Q_W-1:0] dq;

  // running state
  logic [M_W-1:0] r_pi, r_g;
  logic [Q_W-1:0] q_pi [P_MAX];
  logic [Q_W-1:0] q_g  [P_MAX];

  logic           setup;
  logic [Q_W:0]   sj;

  // ---- setup arithmetic for decoder sj ----
  logic [XW-1:0] x, pi_x, g_x, d_x;
  always_comb begin
    x    = XW'(sj) * XW'(m_q);
    pi_x = (XW'(f1_q) * x + XW'(f2_q) * x * x) % XW'(k_q);
    g_x  = (XW'(f1_q) + XW'(f2_q) * (2 * x + 1)) % XW'(k_q);
    d_x  = (2 * XW'(f2_q)) % XW'(k_q);
  end

  // ---- mixed-radix addition of the row parts ----
  function automatic logic [M_W:0] radd(input logic [M_W-1:0] a, input logic [M_W-1:0] b,
                                        input logic [M_W-1:0] m);
    logic [M_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, m}) return {1'b1, M_W'(s - {1'b0, m})};
    return {1'b0, s[M_W-1:0]};
  endfunction

  logic [M_W:0]   s_o, s_g1, s_e2, s_g2;
  logic [Q_W-1:0] qg1 [P_MAX];
  always_comb begin
    s_o  = radd(r_pi, r_g, m_q);          // pi(t+1) row part
    s_g1 = radd(r_g, dr, m_q);            // g(t+1)
    s_e2 = radd(s_o[M_W-1:0], s_g1[M_W-1:0], m_q);  // pi(t+2)
    s_g2 = radd(s_g1[M_W-1:0], dr, m_q);  // g(t+2)
    row_e = r_pi;
    row_o = s_o[M_W-1:0];
    for (int j = 0; j < P_MAX; j++) begin
      col_e[j] = q_pi[j];
      col_o[j] = (q_pi[j] + q_g[j] + Q_W'(s_o[M_W])) & pmask_q;
      qg1[j]   = (q_g[j] + dq + Q_W'(s_g1[M_W])) & pmask_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q <= '0; f1_q <= '0; f2_q <= '0; m_q <= '0; pmask_q <= '0;
      rg0 <= '0; dr <= '0; dq <= '0; r_pi <= '0; r_g <= '0;
      setup <= 1'b0; sj <= '0; ready <= 1'b0;
      for (int j = 0; j < P_MAX; j++) begin
        qpi0[j] <= '0; qg0[j] <= '0; q_pi[j] <= '0; q_g[j] <= '0;
      end
    end else if (init) begin
      k_q <= cfg_k; f1_q <= cfg_f1; f2_q <= cfg_f2; m_q <= cfg_m; pmask_q <= cfg_pmask;
      setup <= 1'b1; sj <= '0; ready <= 1'b0;
    end else if (setup) begin
      qpi0[sj[Q_W-1:0]] <= Q_W'(pi_x / XW'(m_q));
      qg0[sj[Q_W-1:0]]  <= Q_W'(g_x / XW'(m_q));
      if (sj == '0) begin
        rg0 <= M_W'(g_x % XW'(m_q));
        dq  <= Q_W'(d_x / XW'(m_q));
        dr  <= M_W'(d_x % XW'(m_q));
      end
      if (sj == (Q_W + 1)'(P_MAX - 1)) begin
        setup <= 1'b0;
        ready <= 1'b1;
      end
      sj <= sj + 1'b1;
    end else if (restart) begin
      r_pi <= '0;
      r_g  <= rg0;
      for (int j = 0; j < P_MAX; j++) begin
        q_pi[j] <= qpi0[j];
        q_g[j]  <= qg0[j];
      end
    end else if (adv) begin
      r_pi <= s_e2[M_W-1:0];
      r_g  <= s_g2[M_W-1:0];
      for (int j = 0; j < P_MAX; j++) begin
        q_pi[j] <= (col_o[j] + qg1[j] + Q_W'(s_e2[M_W])) & pmask_q;
        q_g[j]  <= (qg1[j] + dq + Q_W'(s_g2[M_W])) & pmask_q;
      end
    end
  end

endmodule
