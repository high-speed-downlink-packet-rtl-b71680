// tb_siso_decoder: checks the sliding-window SISO decoder against an
// independent integer max-log-MAP model of the same window schedule.
//
// Three phases are streamed back to back, one input pair per cycle with no
// gap between phases: natural phase (iteration 1), interleaved phase,
// natural phase again (iteration 2, which must use the window-start betas
// stored in iteration 1). Each phase has 80 pairs, i.e. windows of 32, 32 and
// 16 pairs, so a short last window and a stall for a busy window buffer both
// occur. Every extrinsic LLR, hard decision and tag is compared, and the
// latency from a window's last input to its first output is checked.
module tb_siso_decoder;
  import td_pkg::*;

  localparam int WP    = 32;      // window, in pairs
  localparam int NP    = 80;      // pairs per phase
  localparam int NSTEP = 2 * NP;
  localparam int NPH   = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic clear = 0;
  mvec_t alpha_nb [2], beta_nb [2];
  logic in_valid = 0, in_first = 0, in_last = 0, in_phase = 0;
  llr_t in_sys [2], in_par [2], in_la [2];
  logic [7:0] in_tag;
  logic [1:0] bank_free_next;
  logic busy, out_valid, out_phase;
  llr_t out_le [2];
  logic [1:0] out_hard;
  logic [7:0] out_tag;
  mvec_t alpha_end_o [2], beta_start_o [2];

  siso_decoder #(.WIN_PAIRS(WP), .TAG_W(8)) dut (.*, .first_sub(1'b1), .last_sub(1'b0));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // stimulus, per phase and step
  int sys_v [NPH][NSTEP], par_v [NPH][NSTEP], la_v [NPH][NSTEP];
  int exp_le [NPH][NSTEP], exp_hard [NPH][NSTEP];
  int bnb [2][8];
  int nii_ref [2][8][8];   // [phase][window][state]

  // independent trellis model: registers r0 (newest), r1, r2
  function automatic int nxt(int s, int u);
    int r0, r1, r2, a;
    r0 = (s >> 2) & 1; r1 = (s >> 1) & 1; r2 = s & 1;
    a = u ^ r1 ^ r2;
    return a * 4 + r0 * 2 + r1;
  endfunction
  function automatic int par(int s, int u);
    int r0, r1, r2, a;
    r0 = (s >> 2) & 1; r1 = (s >> 1) & 1; r2 = s & 1;
    a = u ^ r1 ^ r2;
    return a ^ r0 ^ r2;
  endfunction

  task automatic reference(int ph, int pidx, int first_iter);
    int alpha [NSTEP+1][8];
    int beta [8], nb [8];
    int nwin, ws, we, m0, m1, c, lu, e;
    for (int s = 0; s < 8; s++) alpha[0][s] = (s == 0) ? 0 : -100000;
    for (int k = 0; k < NSTEP; k++) begin
      lu = sys_v[ph][k] + la_v[ph][k];
      for (int s = 0; s < 8; s++) alpha[k+1][s] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          c = alpha[k][s] + u * lu + par(s, u) * par_v[ph][k];
          if (c > alpha[k+1][nxt(s, u)]) alpha[k+1][nxt(s, u)] = c;
        end
    end
    nwin = (NP + WP - 1) / WP;
    for (int w = 0; w < nwin; w++) begin
      ws = 2 * WP * w;
      we = (2 * WP * (w + 1) < NSTEP) ? 2 * WP * (w + 1) : NSTEP;
      for (int s = 0; s < 8; s++) begin
        if (w == nwin - 1) beta[s] = bnb[pidx][s];
        else if (first_iter) beta[s] = 0;
        else beta[s] = nii_ref[pidx][w+1][s];
      end
      for (int k = we - 1; k >= ws; k--) begin
        lu = sys_v[ph][k] + la_v[ph][k];
        m0 = -1000000; m1 = -1000000;
        for (int s = 0; s < 8; s++) begin
          c = alpha[k][s] + par(s, 0) * par_v[ph][k] + beta[nxt(s, 0)];
          if (c > m0) m0 = c;
          c = alpha[k][s] + par(s, 1) * par_v[ph][k] + beta[nxt(s, 1)];
          if (c > m1) m1 = c;
        end
        e = m1 - m0;
        exp_hard[ph][k] = (e + lu > 0) ? 1 : 0;
        if (e > 127) e = 127;
        if (e < -127) e = -127;
        exp_le[ph][k] = e;
        for (int s = 0; s < 8; s++) begin
          m0 = beta[nxt(s, 0)] + par(s, 0) * par_v[ph][k];
          m1 = beta[nxt(s, 1)] + lu + par(s, 1) * par_v[ph][k];
          nb[s] = (m0 > m1) ? m0 : m1;
        end
        beta = nb;
      end
      for (int s = 0; s < 8; s++) nii_ref[pidx][w][s] = beta[s];
    end
  endtask

  int phase_of [NPH] = '{0, 1, 0};
  int got [NPH];
  int last_in_cycle, first_out_cycle;
  int stalls = 0;
  logic wpar = 0;
  int win_len_seen_short = 0;

  // output checker: pairs arrive in reverse order inside each window
  int oph = 0;
  always @(posedge clk) begin
    if (out_valid) begin
      automatic int pi = out_tag;
      automatic int k0 = 2 * pi;
      checks += 4;
      if (out_le[0] !== llr_t'(exp_le[oph][k0]) || out_le[1] !== llr_t'(exp_le[oph][k0+1])) begin
        failures += 1;
        $display("LE mismatch ph%0d pair %0d: got %0d %0d exp %0d %0d", oph, pi,
                 out_le[0], out_le[1], exp_le[oph][k0], exp_le[oph][k0+1]);
      end
      if (out_hard[0] !== 1'(exp_hard[oph][k0]) || out_hard[1] !== 1'(exp_hard[oph][k0+1]))
        failures += 1;
      if (out_phase !== 1'(phase_of[oph])) failures += 1;
      got[oph] += 1;
      // the last window of a phase ends with pair index of its first pair
      if (got[oph] == NP) oph += 1;
    end
  end

  initial begin
    for (int ph = 0; ph < NPH; ph++)
      for (int k = 0; k < NSTEP; k++) begin
        sys_v[ph][k] = int'($urandom_range(80)) - 40;
        par_v[ph][k] = int'($urandom_range(80)) - 40;
        la_v[ph][k]  = int'($urandom_range(60)) - 30;
      end
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < 8; s++) begin
        bnb[p][s] = int'($urandom_range(40)) - 20;
        beta_nb[p][s] = met_t'(bnb[p][s]);
        alpha_nb[p][s] = '0;
      end
    reference(0, 0, 1);
    reference(1, 1, 1);
    reference(2, 0, 0);
    got = '{default: 0};
    in_sys = '{default: '0}; in_par = '{default: '0}; in_la = '{default: '0}; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    for (int ph = 0; ph < NPH; ph++) begin
      for (int pi = 0; pi < NP; pi++) begin
        // decide in the cycle before: a new window may only start in a
        // buffer that is free by then
        @(negedge clk);
        while (pi % WP == 0 && !bank_free_next[wpar]) begin
          stalls += 1;
          @(posedge clk);
          in_valid <= 0;
          @(negedge clk);
        end
        @(posedge clk);
        in_valid <= 1;
        in_first <= (pi == 0);
        in_last  <= (pi == NP - 1);
        in_phase <= 1'(phase_of[ph]);
        in_sys   <= '{llr_t'(sys_v[ph][2*pi]), llr_t'(sys_v[ph][2*pi+1])};
        in_par   <= '{llr_t'(par_v[ph][2*pi]), llr_t'(par_v[ph][2*pi+1])};
        in_la    <= '{llr_t'(la_v[ph][2*pi]),  llr_t'(la_v[ph][2*pi+1])};
        in_tag   <= 8'(pi);
        if (pi % WP == WP - 1 || pi == NP - 1) wpar = !wpar;
      end
    end
    @(posedge clk);
    in_valid <= 0;
    last_in_cycle = cycle;
    // The last (16-pair) window waits for the backward pass of the 32-pair
    // window before it: that pass starts one cycle after the previous
    // window's last input, runs WP cycles, then the short window runs 16
    // cycles and its outputs are registered once: last output WP+1 cycles
    // after the last input, seen here one cycle later.
    while (oph < NPH) @(posedge clk);
    checks += 1;
    if (cycle - last_in_cycle != WP + 2) begin
      failures += 1;
      $display("latency: last output %0d cycles after last input", cycle - last_in_cycle);
    end
    // a short window followed by a full one forces one wait for a buffer
    checks += 1;
    if (stalls == 0) begin
      failures += 1;
      $display("no buffer stall happened");
    end
    @(posedge clk);
    checks += 1;
    if (busy) failures += 1;
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures += 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
