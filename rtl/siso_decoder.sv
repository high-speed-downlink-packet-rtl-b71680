// siso_decoder: radix-4 max-log-MAP soft-in soft-out decoder working on one
// sub-block of the code block with the sliding-window schedule.
//
// Each accepted input carries two trellis steps (an even and an odd bit):
// systematic, parity and a priori LLRs. The forward unit runs the alpha
// recursion two steps per cycle and writes alphas and inputs into one of two
// window buffers. When a window of WIN_PAIRS pairs (or the last, shorter,
// window of a phase) is complete, the backward unit runs the beta recursion
// over it in reverse order and emits two extrinsic LLRs and two hard decisions
// per cycle, while the forward unit fills the other buffer with the next
// window. Windows stream back to back, so the next phase's first window may
// follow the current phase's last window directly (tail-overlapped decoding).
//
// State metrics at borders: the forward recursion starts a phase from the
// known state 0 (first sub-block) or from the neighbouring decoder's final
// alpha of the same phase one iteration earlier (alpha_nb). The backward
// recursion of a window starts from the beta this decoder computed at the
// start of the next window one iteration earlier; for the last window it
// takes the next decoder's beta at its sub-block start (beta_nb), or uniform
// metrics for the last sub-block. Before the first iteration these stores hold
// uniform (zero) metrics. This border handling, the widths and the
// normalisation (subtract state 0) are this design's choices; the window
// schedule, radix-4 processing and window length follow the decoder described.
//
// Timing: out_valid rises one cycle after the backward unit reads a pair;
// the first output of a window comes two cycles after its last input.
// bank_free_next[b] says that window buffer b can take the first pair of a
// new window in the next cycle. A new window must not be started in a buffer
// whose bank_free_next bit is low.
module siso_decoder
  import td_pkg::*;
#(
  parameter int unsigned WIN_PAIRS = L_WIN / V_OUT,
  parameter int unsigned MAX_WIN   = MAXWIN,
  parameter int unsigned TAG_W     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,        // new code block: reset border stores
  input  logic             first_sub,    // this decoder holds the first sub-block
  input  logic             last_sub,     // this decoder holds the last sub-block
  input  mvec_t            alpha_nb [2], // previous decoder's final alpha, per phase
  input  mvec_t            beta_nb  [2], // next decoder's start beta, per phase
  input  logic             in_valid,
  input  logic             in_first,     // first pair of a phase
  input  logic             in_last,      // last pair of a phase
  input  logic             in_phase,     // 0 natural order, 1 interleaved order
  input  llr_t             in_sys [2],   // [0] even step, [1] odd step
  input  llr_t             in_par [2],
  input  llr_t             in_la  [2],
  input  logic [TAG_W-1:0] in_tag,
  output logic [1:0]       bank_free_next,
  output logic             busy,
  output logic             out_valid,
  output logic             out_phase,
  output llr_t             out_le   [2],
  output logic [1:0]       out_hard,
  output logic [TAG_W-1:0] out_tag,
  output mvec_t            alpha_end_o  [2],
  output mvec_t            beta_start_o [2]
);

  localparam int unsigned KW = $clog2(WIN_PAIRS);
  localparam int unsigned WW = $clog2(MAX_WIN);

  typedef struct packed {
    mvec_t            a0;   // alpha before the even step
    mvec_t            a1;   // alpha before the odd step
    llr_t             s0, s1, p0, p1, l0, l1;
    logic [TAG_W-1:0] tag;
  } wentry_t;

  typedef struct packed {
    logic [KW:0]   len;     // pairs in the window
    logic [WW-1:0] widx;    // window index in the sub-block
    logic          phase;
    logic          lastwin; // last window of the phase
  } wmeta_t;

  wentry_t wbuf [2][WIN_PAIRS];
  wmeta_t  meta [2];
  logic [1:0] full;

  mvec_t nii [2][MAX_WIN];   // beta at each window start, per phase
  mvec_t alpha_end [2];

  // ---------------- forward unit ----------------
  mvec_t         alpha_q;
  logic [KW-1:0] fw_k;
  logic [WW-1:0] fw_w;
  logic          fw_bank;

  mvec_t a_start, a_mid, a_next;
  always_comb begin
    if (in_first) a_start = first_sub ? known_start() : alpha_nb[in_phase];
    else          a_start = alpha_q;
    a_mid  = fwd_step(a_start, met_t'(in_sys[0]) + met_t'(in_la[0]), met_t'(in_par[0]));
    a_next = normalize(fwd_step(a_mid, met_t'(in_sys[1]) + met_t'(in_la[1]), met_t'(in_par[1])));
  end

  logic fw_close;
  assign fw_close = in_valid && (in_last || fw_k == KW'(WIN_PAIRS - 1));

  // ---------------- backward unit ----------------
  logic          bw_active;
  logic          bw_bank;
  logic [KW-1:0] bw_k;
  mvec_t         beta_q;

  logic    bw_start, bw_proc;
  wmeta_t  bmeta;
  logic [KW-1:0] k_cur;
  mvec_t   b_cur, b_mid, b_low;
  wentry_t e;
  met_t    le0, le1, full0, full1;

  always_comb begin
    bmeta    = meta[bw_bank];
    bw_start = !bw_active && full[bw_bank];
    bw_proc  = bw_active || bw_start;
    k_cur    = bw_start ? KW'(bmeta.len - 1'b1) : bw_k;
    if (!bw_start)           b_cur = beta_q;
    else if (!bmeta.lastwin) b_cur = nii[bmeta.phase][bmeta.widx + 1'b1];
    else if (last_sub)       b_cur = '0;
    else                     b_cur = beta_nb[bmeta.phase];
    e     = wbuf[bw_bank][k_cur];
    le1   = ext_llr(e.a1, b_cur, met_t'(e.p1));
    b_mid = bwd_step(b_cur, met_t'(e.s1) + met_t'(e.l1), met_t'(e.p1));
    le0   = ext_llr(e.a0, b_mid, met_t'(e.p0));
    b_low = normalize(bwd_step(b_mid, met_t'(e.s0) + met_t'(e.l0), met_t'(e.p0)));
    full0 = le0 + met_t'(e.s0) + met_t'(e.l0);
    full1 = le1 + met_t'(e.s1) + met_t'(e.l1);
  end

  logic bw_done;
  assign bw_done = bw_proc && (k_cur == '0);

  always_comb begin
    for (int b = 0; b < 2; b++)
      bank_free_next[b] = !full[b] || (bw_done && bw_bank == 1'(b));
  end

  // window buffers: plain memories, no reset
  always_ff @(posedge clk) begin
    if (in_valid)
      wbuf[fw_bank][fw_k] <= '{a0: a_start, a1: a_mid,
                               s0: in_sys[0], s1: in_sys[1],
                               p0: in_par[0], p1: in_par[1],
                               l0: in_la[0],  l1: in_la[1],
                               tag: in_tag};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fw_k      <= '0;
      fw_w      <= '0;
      fw_bank   <= 1'b0;
      alpha_q   <= '0;
      full      <= '0;
      bw_active <= 1'b0;
      bw_bank   <= 1'b0;
      bw_k      <= '0;
      beta_q    <= '0;
      out_valid <= 1'b0;
      out_phase <= 1'b0;
      out_le    <= '{default: '0};
      out_hard  <= '0;
      out_tag   <= '0;
      meta      <= '{default: '0};
      for (int p = 0; p < 2; p++) begin
        alpha_end[p] <= '0;
        for (int w = 0; w < MAX_WIN; w++) nii[p][w] <= '0;
      end
    end else begin
      if (clear) begin
        fw_k    <= '0;
        fw_w    <= '0;
        fw_bank <= 1'b0;
        bw_bank <= 1'b0;
        for (int p = 0; p < 2; p++) begin
          alpha_end[p] <= '0;
          for (int w = 0; w < MAX_WIN; w++) nii[p][w] <= '0;
        end
      end
      // forward
      if (in_valid) begin
        alpha_q <= a_next;
        if (in_last) alpha_end[in_phase] <= a_next;
        if (fw_close) begin
          meta[fw_bank] <= '{len: (KW + 1)'(fw_k) + 1'b1, widx: fw_w,
                             phase: in_phase, lastwin: in_last};
          fw_k    <= '0;
          fw_w    <= in_last ? '0 : fw_w + 1'b1;
          fw_bank <= !fw_bank;
        end else begin
          fw_k <= fw_k + 1'b1;
        end
      end
      // backward
      out_valid <= bw_proc;
      if (bw_proc) begin
        out_phase   <= bmeta.phase;
        out_le[0]   <= sat_llr(le0);
        out_le[1]   <= sat_llr(le1);
        out_hard[0] <= full0 > 0;
        out_hard[1] <= full1 > 0;
        out_tag     <= e.tag;
        if (bw_done) begin
          bw_active <= 1'b0;
          bw_bank   <= !bw_bank;
          nii[bmeta.phase][bmeta.widx] <= b_low;
        end else begin
          bw_active <= 1'b1;
          bw_k      <= k_cur - 1'b1;
          beta_q    <= b_low;
        end
      end
      // window buffer occupancy
      for (int b = 0; b < 2; b++) begin
        if (fw_close && fw_bank == 1'(b)) full[b] <= 1'b1;
        else if (bw_done && bw_bank == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

  assign busy = (|full) || out_valid || (fw_k != '0);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      alpha_end_o[p]  = alpha_end[p];
      beta_start_o[p] = nii[p][0];
    end
  end

  // A window must never start in a buffer the backward unit still needs.
  a_no_overwrite: assert property (@(posedge clk)
    (rst_n && in_valid && fw_k == '0) |-> !full[fw_bank]);

endmodule
