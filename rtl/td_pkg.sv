// td_pkg: sizes, types and trellis arithmetic shared by the turbo decoder.
//
// The sizes follow the decoder's characteristics: code blocks of up to 6144
// bits, 16 parallel SISO decoders, 64-bit sliding windows and 2 output bits
// per cycle (radix-4). LLR and state-metric widths are this design's choice.
//
// The constituent code is the 8-state recursive systematic code of the LTE
// turbo code: feedback 1+D^2+D^3, parity 1+D+D^3. A state is {d1,d2,d3},
// d1 the newest register bit, held as state[2:0] = {d1,d2,d3}.
// LLRs are log(P(bit=1)/P(bit=0)); a branch with data bit u and parity bit p
// has metric u*(Ls+La) + p*Lp (max-log-MAP, constant terms dropped).
package td_pkg;

  localparam int unsigned N_MAX  = 6144;  // maximum code length
  localparam int unsigned P_MAX  = 16;    // parallel SISO decoders
  localparam int unsigned L_WIN  = 64;    // sliding window, in bits
  localparam int unsigned V_OUT  = 2;     // output bits per cycle (radix-4)
  localparam int unsigned M_MAX  = N_MAX / P_MAX;  // longest sub-block, bits
  localparam int unsigned MAXWIN = 8;     // windows per sub-block the border store holds

  localparam int unsigned LLR_W = 8;      // channel and extrinsic LLR width
  localparam int unsigned MET_W = 16;     // state metric width

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [MET_W-1:0] met_t;
  typedef met_t [7:0] mvec_t;             // one metric per trellis state

  localparam met_t MET_NEG = met_t'(-(2 ** (MET_W - 3)));

  // Next state and parity bit of the LTE constituent encoder.
  function automatic logic [2:0] next_state(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic parity_bit(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  function automatic met_t mmax(input met_t a, input met_t b);
    return (a > b) ? a : b;
  endfunction

  // One forward (alpha) trellis step. lu = Ls + La, lp = parity LLR.
  function automatic mvec_t fwd_step(input mvec_t a, input met_t lu, input met_t lp);
    mvec_t r;
    logic [2:0] ns;
    met_t cand;
    for (int s = 0; s < 8; s++) r[s] = met_t'(-(2 ** (MET_W - 1)));
    for (int s = 0; s < 8; s++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = next_state(3'(s), u[0]);
        cand = a[s] + (u[0] ? lu : met_t'(0)) + (parity_bit(3'(s), u[0]) ? lp : met_t'(0));
        r[ns] = mmax(r[ns], cand);
      end
    end
    return r;
  endfunction

  // One backward (beta) trellis step: beta_k from beta_{k+1}.
  function automatic mvec_t bwd_step(input mvec_t b, input met_t lu, input met_t lp);
    mvec_t r;
    met_t c0, c1;
    for (int s = 0; s < 8; s++) begin
      c0 = b[next_state(3'(s), 1'b0)] + (parity_bit(3'(s), 1'b0) ? lp : met_t'(0));
      c1 = b[next_state(3'(s), 1'b1)] + lu + (parity_bit(3'(s), 1'b1) ? lp : met_t'(0));
      r[s] = mmax(c0, c1);
    end
    return r;
  endfunction

  // Extrinsic LLR of one step: max over u=1 branches minus max over u=0
  // branches of alpha_k + parity term + beta_{k+1}. The systematic and a
  // priori terms cancel, so they are left out.
  function automatic met_t ext_llr(input mvec_t a, input mvec_t b, input met_t lp);
    met_t m0, m1, c;
    m0 = met_t'(-(2 ** (MET_W - 1)));
    m1 = met_t'(-(2 ** (MET_W - 1)));
    for (int s = 0; s < 8; s++) begin
      c  = a[s] + b[next_state(3'(s), 1'b0)] + (parity_bit(3'(s), 1'b0) ? lp : met_t'(0));
      m0 = mmax(m0, c);
      c  = a[s] + b[next_state(3'(s), 1'b1)] + (parity_bit(3'(s), 1'b1) ? lp : met_t'(0));
      m1 = mmax(m1, c);
    end
    return m1 - m0;
  endfunction

  // Subtract state 0's metric from every state.
  function automatic mvec_t normalize(input mvec_t m);
    mvec_t r;
    for (int s = 0; s < 8; s++) r[s] = m[s] - m[0];
    return r;
  endfunction

  function automatic llr_t sat_llr(input met_t x);
    if (x > met_t'(2 ** (LLR_W - 1) - 1)) return llr_t'(2 ** (LLR_W - 1) - 1);
    if (x < met_t'(-(2 ** (LLR_W - 1) - 1))) return llr_t'(-(2 ** (LLR_W - 1) - 1));
    return llr_t'(x);
  endfunction

  // Known start state 0 of the trellis.
  function automatic mvec_t known_start();
    mvec_t r;
    for (int s = 0; s < 8; s++) r[s] = (s == 0) ? met_t'(0) : MET_NEG;
    return r;
  endfunction

endpackage
