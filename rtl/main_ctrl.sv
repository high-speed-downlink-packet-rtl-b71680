// main_ctrl: main controller of the parallel turbo decoder.
//
// A code block is handled in four steps:
//   1. configure: cfg_start latches the code length K, the interleaver
//      coefficients f1/f2, the number of iterations and the mode; the
//      parallel factor P (active SISO decoders) is chosen as the largest of
//      16, 8, 4, 2, 1 that divides K and leaves each decoder at least two
//      sliding windows (K/P >= 2L), and the interleaver setup is started;
//   2. load: K channel LLR triples are taken in natural order and written to
//      row i mod M, column i div M (M = K/P); the extrinsic memory is cleared;
//   3. decode: 2*n_iter half iterations alternate between natural order
//      (phase 0) and interleaved order (phase 1). Each issues M/2 reads, one
//      pair of trellis steps per cycle for all decoders at once. In normal
//      mode a phase starts only after the previous one has written all its
//      results (this gap is the phase-switching latency). In tail-overlapped
//      mode (cfg_tod) the next phase is issued right behind the previous one,
//      so its first window is read while the previous phase's last window is
//      still being written back;
//   4. read-out: the hard decisions of the last half iteration are streamed
//      in natural order, one bit per cycle.
// Issue of a pair that opens a new window waits while the decoders' window
// buffer for it is still in use (stall). Memory reads are synchronous: the
// s_* outputs are the issue signals delayed one cycle, aligned with the
// memory data. The P-selection rule and mode switch follow the decoder
// described; the handshakes and state encoding are this design's choices.
module main_ctrl
  import td_pkg::*;
#(
  parameter int unsigned P         = P_MAX,
  parameter int unsigned WIN_PAIRS = L_WIN / V_OUT,
  parameter int unsigned K_W       = 13,
  parameter int unsigned R_W       = $clog2(M_MAX),
  parameter int unsigned Q_W       = $clog2(P)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host configuration
  input  logic           cfg_start,
  input  logic [K_W-1:0] cfg_k,
  input  logic [K_W-1:0] cfg_f1,
  input  logic [K_W-1:0] cfg_f2,
  input  logic [3:0]     cfg_n_iter,
  input  logic           cfg_tod,
  // loading
  input  logic           ld_valid,
  output logic           ld_ready,
  output logic           ld_we,
  output logic [R_W-1:0] ld_row,
  output logic [Q_W-1:0] ld_col,
  // interleaver address generator
  output logic           qpp_init,
  output logic [K_W-1:0] qpp_k,
  output logic [K_W-1:0] qpp_f1,
  output logic [K_W-1:0] qpp_f2,
  output logic [R_W-1:0] qpp_m,
  output logic [Q_W-1:0] qpp_pmask,
  output logic           qpp_restart,
  output logic           qpp_adv,
  input  logic           qpp_ready,
  input  logic [R_W-1:0] qpp_row_e,
  input  logic [R_W-1:0] qpp_row_o,
  // decoding reads (issue cycle)
  output logic           rd_en,
  output logic           rd_phase,
  output logic [R_W-1:0] rd_sys_row_e,
  output logic [R_W-1:0] rd_sys_row_o,
  output logic [R_W-1:0] rd_par_row_e,
  output logic [R_W-1:0] rd_par_row_o,
  // SISO control (aligned with memory data)
  output logic           siso_clear,
  output logic           s_valid,
  output logic           s_first,
  output logic           s_last,
  output logic           s_phase,
  output logic [P-1:0]   active,
  output logic [P-1:0]   first_sub,
  output logic [P-1:0]   last_sub,
  input  logic [1:0]     bank_free_next,
  input  logic           siso_busy,
  // read-out of hard decisions
  output logic           out_rd_en,
  output logic [R_W-1:0] out_row,
  output logic [Q_W-1:0] out_col,
  output logic           out_valid,
  output logic           out_row_odd,
  output logic [Q_W-1:0] out_col_q,
  // status
  output logic           busy,
  output logic           done,
  output logic           stall
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_LOAD, S_DEC, S_DRAIN, S_FIN, S_OUT} state_t;
  state_t state;

  localparam int unsigned WK_W = $clog2(WIN_PAIRS);

  logic [K_W-1:0] k_q;
  logic [3:0]     n_iter_q;
  logic           tod_q;
  logic [R_W-1:0] m_q;
  logic [Q_W-1:0] pmask_q;

  // ---- parallel factor ----
  logic [Q_W-1:0] pmask_n;
  logic [R_W-1:0] m_n;
  always_comb begin
    pmask_n = '0;
    m_n     = R_W'(cfg_k);
    for (int lp = 0; lp <= Q_W; lp++) begin
      // K divisible by 2^lp and K / 2^lp >= 2L
      if (((cfg_k & K_W'((1 << lp) - 1)) == '0) && ((cfg_k >> lp) >= K_W'(2 * L_WIN))) begin
        pmask_n = Q_W'((1 << lp) - 1);
        m_n     = R_W'(cfg_k >> lp);
      end
    end
  end

  // ---- counters ----
  logic [K_W-1:0] cnt;        // loaded / read-out items
  logic [R_W-1:0] row_c;
  logic [Q_W-1:0] col_c;
  logic [R_W-2:0] pc;         // pair index within the phase
  logic [WK_W-1:0] wk;        // pair index within the window
  logic           wpar;       // window buffer the next window goes to
  logic [4:0]     h;          // half iteration
  logic           inflight;

  logic phase, pair_last, issue_ok, issue;
  always_comb begin
    phase     = h[0];
    pair_last = ({1'b0, pc} == R_W'((m_q >> 1) - 1'b1));
    issue_ok  = (wk != '0) || bank_free_next[wpar];
    issue     = (state == S_DEC) && issue_ok;
    stall     = (state == S_DEC) && !issue_ok;
    rd_en     = issue;
    rd_phase  = phase;
    rd_par_row_e = {pc, 1'b0};
    rd_par_row_o = {pc, 1'b1};
    if (phase) begin
      rd_sys_row_e = qpp_row_e;
      rd_sys_row_o = qpp_row_o;
    end else begin
      rd_sys_row_e = {pc, 1'b0};
      rd_sys_row_o = {pc, 1'b1};
    end
    qpp_adv     = issue && phase;
    qpp_restart = issue && !phase && (pc == '0);
    ld_ready    = (state == S_LOAD);
    ld_we       = ld_ready && ld_valid;
    ld_row      = row_c;
    ld_col      = col_c;
    out_rd_en   = (state == S_OUT);
    out_row     = row_c;
    out_col     = col_c;
    busy        = (state != S_IDLE);
    qpp_k       = k_q;
    qpp_m       = m_q;
    qpp_pmask   = pmask_q;
  end

  always_comb begin
    for (int j = 0; j < P; j++) begin
      active[j]    = (Q_W'(j) & ~pmask_q) == '0;
      first_sub[j] = (j == 0);
      last_sub[j]  = (Q_W'(j) == pmask_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k_q <= '0; qpp_f1 <= '0; qpp_f2 <= '0; n_iter_q <= '0; tod_q <= 1'b0;
      m_q <= '0; pmask_q <= '0;
      cnt <= '0; row_c <= '0; col_c <= '0; pc <= '0; wk <= '0; wpar <= 1'b0; h <= '0;
      inflight <= 1'b0;
      qpp_init <= 1'b0; siso_clear <= 1'b0;
      s_valid <= 1'b0; s_first <= 1'b0; s_last <= 1'b0; s_phase <= 1'b0;
      out_valid <= 1'b0; out_row_odd <= 1'b0; out_col_q <= '0;
      done <= 1'b0;
    end else begin
      qpp_init   <= 1'b0;
      siso_clear <= 1'b0;
      done       <= 1'b0;
      s_valid    <= issue;
      s_first    <= issue && (pc == '0);
      s_last     <= issue && pair_last;
      s_phase    <= phase;
      inflight   <= issue;
      out_valid  <= out_rd_en;
      out_row_odd <= row_c[0];
      out_col_q  <= col_c;
      unique case (state)
        S_IDLE: if (cfg_start) begin
          k_q      <= cfg_k;
          qpp_f1   <= cfg_f1;
          qpp_f2   <= cfg_f2;
          n_iter_q <= cfg_n_iter;
          tod_q    <= cfg_tod;
          m_q      <= m_n;
          pmask_q  <= pmask_n;
          qpp_init <= 1'b1;
          state    <= S_SETUP;
        end
        S_SETUP: if (qpp_ready && !qpp_init) begin
          siso_clear <= 1'b1;
          cnt   <= '0;
          row_c <= '0;
          col_c <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (ld_valid) begin
          cnt <= cnt + 1'b1;
          if (row_c == m_q - 1'b1) begin
            row_c <= '0;
            col_c <= col_c + 1'b1;
          end else begin
            row_c <= row_c + 1'b1;
          end
          if (cnt == k_q - 1'b1) begin
            pc <= '0; wk <= '0; wpar <= 1'b0; h <= '0;
            state <= S_DEC;
          end
        end
        S_DEC: if (issue) begin
          if (pair_last || wk == WK_W'(WIN_PAIRS - 1)) begin
            wk   <= '0;
            wpar <= !wpar;
          end else begin
            wk <= wk + 1'b1;
          end
          if (pair_last) begin
            pc <= '0;
            h  <= h + 1'b1;
            if (h == {n_iter_q - 1'b1, 1'b1}) state <= S_FIN;
            else if (!tod_q)           state <= S_DRAIN;
          end else begin
            pc <= pc + 1'b1;
          end
        end
        S_DRAIN: if (!siso_busy && !inflight) state <= S_DEC;
        S_FIN: if (!siso_busy && !inflight) begin
          cnt   <= '0;
          row_c <= '0;
          col_c <= '0;
          state <= S_OUT;
        end
        S_OUT: begin
          cnt <= cnt + 1'b1;
          if (row_c == m_q - 1'b1) begin
            row_c <= '0;
            col_c <= col_c + 1'b1;
          end else begin
            row_c <= row_c + 1'b1;
          end
          if (cnt == k_q - 1'b1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_n_iter_nonzero: assert property (@(posedge clk) (state == S_IDLE && cfg_start) |-> cfg_n_iter != '0);

endmodule
