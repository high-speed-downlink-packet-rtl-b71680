// turbo_decoder_top: parallel LTE turbo decoder with tail-overlapped decoding.
//
// Sixteen radix-4 SISO decoders work on the sixteen sub-blocks of a code
// block at once. Channel LLRs sit in the input memory and extrinsic LLRs in
// the extrinsic information memory (EIM), both organised so that one row
// holds the values of all sub-blocks at the same offset. The LTE interleaver
// is contention-free, so in both the natural and the interleaved phase all
// decoders read (and later write) the same row each cycle; the interleaver
// and de-interleaver networks only permute the columns. The main controller
// sequences loading, the half iterations (normal mode, or tail-overlapped
// mode in which a phase starts while the previous one is still finishing)
// and the read-out of the decoded bits.
//
// Host interface: pulse cfg_start with K, f1, f2 (the LTE interleaver
// coefficients for K), the number of iterations and the mode; then send K
// LLR triples (systematic, parity 1, parity 2; log P(1)/P(0)) on in_* with a
// valid/ready handshake; decoded bits then appear on out_valid/out_bit in
// natural order and done pulses with the last bit. stall is high in cycles
// in which a read is held back because a decoder's window buffer is in use.
// Trellis termination bits are not handled: both constituent trellises are
// ended with uniform metrics.
module turbo_decoder_top
  import td_pkg::*;
#(
  parameter int unsigned P         = P_MAX,
  parameter int unsigned WIN_PAIRS = L_WIN / V_OUT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_start,
  input  logic [12:0] cfg_k,
  input  logic [12:0] cfg_f1,
  input  logic [12:0] cfg_f2,
  input  logic [3:0]  cfg_n_iter,
  input  logic        cfg_tod,
  input  logic        in_valid,
  output logic        in_ready,
  input  llr_t        in_sys,
  input  llr_t        in_p1,
  input  llr_t        in_p2,
  output logic        out_valid,
  output logic        out_bit,
  output logic        busy,
  output logic        done,
  output logic        stall
);

  localparam int unsigned R_W   = $clog2(M_MAX);
  localparam int unsigned Q_W   = $clog2(P);
  localparam int unsigned TAG_W = 2 * R_W + 2 * Q_W;
  localparam int unsigned E_W   = LLR_W + 1;

  // ---- controller ----
  logic           ld_we, qpp_init, qpp_restart, qpp_adv, qpp_ready;
  logic [R_W-1:0] ld_row, qpp_m, qpp_row_e, qpp_row_o;
  logic [Q_W-1:0] ld_col, qpp_pmask;
  logic [12:0]    qpp_k, qpp_f1, qpp_f2;
  logic           rd_en, rd_phase;
  logic [R_W-1:0] rd_sys_row_e, rd_sys_row_o, rd_par_row_e, rd_par_row_o;
  logic           siso_clear, s_valid, s_first, s_last, s_phase;
  logic [P-1:0]   active, first_sub, last_sub;
  logic [1:0]     bank_free_next;
  logic           siso_busy;
  logic           out_rd_en, out_row_odd;
  logic [R_W-1:0] out_row;
  logic [Q_W-1:0] out_col, out_col_q;

  main_ctrl #(.P(P), .WIN_PAIRS(WIN_PAIRS)) u_ctrl (
    .clk, .rst_n, .cfg_start, .cfg_k, .cfg_f1, .cfg_f2, .cfg_n_iter, .cfg_tod,
    .ld_valid(in_valid), .ld_ready(in_ready), .ld_we, .ld_row, .ld_col,
    .qpp_init, .qpp_k, .qpp_f1, .qpp_f2, .qpp_m, .qpp_pmask, .qpp_restart, .qpp_adv,
    .qpp_ready, .qpp_row_e, .qpp_row_o,
    .rd_en, .rd_phase, .rd_sys_row_e, .rd_sys_row_o, .rd_par_row_e, .rd_par_row_o,
    .siso_clear, .s_valid, .s_first, .s_last, .s_phase, .active, .first_sub, .last_sub,
    .bank_free_next, .siso_busy,
    .out_rd_en, .out_row, .out_col, .out_valid, .out_row_odd, .out_col_q,
    .busy, .done, .stall
  );

  // ---- interleaver address generator ----
  logic [Q_W-1:0] qpp_col_e [P], qpp_col_o [P];
  qpp_addr_gen #(.P_MAX(P), .K_W(13), .M_W(R_W)) u_qpp (
    .clk, .rst_n, .init(qpp_init), .cfg_k(qpp_k), .cfg_m(qpp_m), .cfg_pmask(qpp_pmask),
    .cfg_f1(qpp_f1), .cfg_f2(qpp_f2), .restart(qpp_restart), .adv(qpp_adv),
    .ready(qpp_ready), .row_e(qpp_row_e), .row_o(qpp_row_o),
    .col_e(qpp_col_e), .col_o(qpp_col_o)
  );

  // column of each decoder for the pair being issued, and its tag
  logic [Q_W-1:0]   col_e_q [P], col_o_q [P];
  logic [TAG_W-1:0] tag_q [P];
  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int j = 0; j < P; j++) begin
        col_e_q[j] <= rd_phase ? qpp_col_e[j] : Q_W'(j);
        col_o_q[j] <= rd_phase ? qpp_col_o[j] : Q_W'(j);
        tag_q[j]   <= {rd_sys_row_e, rd_sys_row_o,
                       rd_phase ? qpp_col_e[j] : Q_W'(j),
                       rd_phase ? qpp_col_o[j] : Q_W'(j)};
      end
    end
  end

  // ---- input memory ----
  llr_t sys_row_e [P], sys_row_o [P], par_row_e [P], par_row_o [P];
  input_memory #(.P(P), .ROWS(M_MAX)) u_inmem (
    .clk, .wr_en(ld_we), .wr_row(ld_row), .wr_col(ld_col),
    .wr_sys(in_sys), .wr_p1(in_p1), .wr_p2(in_p2),
    .rd_en, .rd_sys_row_e, .rd_sys_row_o, .rd_par_row_e, .rd_par_row_o,
    .par_sel(rd_phase),
    .sys_e(sys_row_e), .sys_o(sys_row_o), .par_e(par_row_e), .par_o(par_row_o)
  );

  // ---- extrinsic information memory ----
  logic [E_W-1:0] eim_rd_e [P], eim_rd_o [P];
  logic [E_W-1:0] wr_row_data_e [P], wr_row_data_o [P];
  logic [P-1:0]   hit_e, hit_o;
  logic           dec_en;
  logic [R_W-1:0] dec_row_e, dec_row_o;

  eim #(.P(P), .ROWS(M_MAX)) u_eim (
    .clk,
    .ld_en(ld_we), .ld_row, .ld_col, .ld_data('0),
    .dec_en, .dec_row_e, .dec_row_o,
    .dec_data_e(wr_row_data_e), .dec_data_o(wr_row_data_o),
    .dec_hit_e(hit_e), .dec_hit_o(hit_o),
    .rd_en(rd_en || out_rd_en),
    .rd_row_e(out_rd_en ? {out_row[R_W-1:1], 1'b0} : rd_sys_row_e),
    .rd_row_o(out_rd_en ? {out_row[R_W-1:1], 1'b1} : rd_sys_row_o),
    .rd_e(eim_rd_e), .rd_o(eim_rd_o)
  );

  // ---- interleaver networks (memory row -> decoders) ----
  llr_t sys_e [P], sys_o [P];
  logic [E_W-1:0] ap_e [P], ap_o [P];
  perm_gather #(.P_MAX(P), .T(llr_t)) u_g_sys_e (.row_in(sys_row_e), .sel(col_e_q), .dout(sys_e));
  perm_gather #(.P_MAX(P), .T(llr_t)) u_g_sys_o (.row_in(sys_row_o), .sel(col_o_q), .dout(sys_o));
  perm_gather #(.P_MAX(P), .T(logic [E_W-1:0])) u_g_la_e  (.row_in(eim_rd_e),  .sel(col_e_q), .dout(ap_e));
  perm_gather #(.P_MAX(P), .T(logic [E_W-1:0])) u_g_la_o  (.row_in(eim_rd_o),  .sel(col_o_q), .dout(ap_o));

  // ---- SISO decoders ----
  mvec_t            alpha_end [P][2], beta_start [P][2];
  mvec_t            alpha_nb  [P][2], beta_nb [P][2];
  logic [1:0]       bfn  [P];
  logic [P-1:0]     sbusy;
  logic [P-1:0]     o_valid;
  llr_t             o_le [P][2];
  logic [1:0]       o_hard [P];
  logic [TAG_W-1:0] o_tag [P];
  logic             o_phase [P];
  logic [E_W-1:0]   dec_e [P], dec_o [P];
  logic [Q_W-1:0]   wcol_e [P], wcol_o [P];

  for (genvar j = 0; j < P; j++) begin : g_siso
    always_comb begin
      for (int p = 0; p < 2; p++) begin
        alpha_nb[j][p] = (j > 0)     ? alpha_end[(j > 0) ? j - 1 : 0][p]      : '0;
        beta_nb[j][p]  = (j < P - 1) ? beta_start[(j < P - 1) ? j + 1 : j][p] : '0;
      end
    end

    siso_decoder #(.WIN_PAIRS(WIN_PAIRS), .TAG_W(TAG_W)) u_siso (
      .clk, .rst_n, .clear(siso_clear),
      .first_sub(first_sub[j]), .last_sub(last_sub[j]),
      .alpha_nb(alpha_nb[j]), .beta_nb(beta_nb[j]),
      .in_valid(s_valid), .in_first(s_first), .in_last(s_last), .in_phase(s_phase),
      .in_sys('{sys_e[j], sys_o[j]}), .in_par('{par_row_e[j], par_row_o[j]}),
      .in_la('{llr_t'(ap_e[j][LLR_W-1:0]), llr_t'(ap_o[j][LLR_W-1:0])}),
      .in_tag(tag_q[j]),
      .bank_free_next(bfn[j]), .busy(sbusy[j]),
      .out_valid(o_valid[j]), .out_phase(o_phase[j]), .out_le(o_le[j]), .out_hard(o_hard[j]),
      .out_tag(o_tag[j]),
      .alpha_end_o(alpha_end[j]), .beta_start_o(beta_start[j])
    );

    assign dec_e[j]  = {o_hard[j][0], o_le[j][0]};
    assign dec_o[j]  = {o_hard[j][1], o_le[j][1]};
    assign wcol_e[j] = o_tag[j][2*Q_W-1:Q_W];
    assign wcol_o[j] = o_tag[j][Q_W-1:0];
  end

  assign bank_free_next = bfn[0];
  assign siso_busy      = |sbusy;

  // ---- de-interleaver networks (decoders -> EIM row) ----
  perm_scatter #(.P_MAX(P), .W(E_W)) u_s_e (.din(dec_e), .sel(wcol_e), .active(active),
                                            .row_out(wr_row_data_e), .hit(hit_e));
  perm_scatter #(.P_MAX(P), .W(E_W)) u_s_o (.din(dec_o), .sel(wcol_o), .active(active),
                                            .row_out(wr_row_data_o), .hit(hit_o));

  assign dec_en    = o_valid[0];
  assign dec_row_e = o_tag[0][TAG_W-1:TAG_W-R_W];
  assign dec_row_o = o_tag[0][TAG_W-R_W-1:2*Q_W];

  // ---- read-out ----
  assign out_bit = out_row_odd ? eim_rd_o[out_col_q][LLR_W] : eim_rd_e[out_col_q][LLR_W];

  // all decoders run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) o_valid == '0 || o_valid == '1);

endmodule
