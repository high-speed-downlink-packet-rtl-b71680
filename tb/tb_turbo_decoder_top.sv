// tb_turbo_decoder_top: end-to-end test of the turbo decoder.
//
// For each case the testbench draws K random bits, encodes them with its own
// model of the LTE turbo encoder (two 8-state RSC encoders, the second fed
// through the QPP interleaver; no termination bits), maps the bits to LLRs
// of +/-A with bounded uniform noise, runs the decoder and compares every
// decoded bit with the data sent. Cases cover the three parallel factors the
// controller picks (P = 16, 8 and 1), normal and tail-overlapped mode, and a
// code length whose last window is short, which makes the read issue stall.
// It counts how often each mechanism occurred: normal-mode phase switches,
// tail-overlapped phase switches (a read issued while the previous phase is
// still being written back), stalls and each parallel factor.
// Cycle check, from the first read to the last extrinsic write, with
// W = the window length in pairs (L/2 = 32, or M/2 if that is shorter) and
// the phase-switching latency of this design PSL = W + 3:
//   normal: 2*n_iter*(M/2 + PSL) - 1 cycles (every phase waits for the last),
//   TOD   : n_iter*M + stalls + W + 2 cycles (only the final drain remains).
module tb_turbo_decoder_top;
  import td_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts before the first clock
  always #5 clk = !clk;

  logic        cfg_start = 0, cfg_tod = 0;
  logic [12:0] cfg_k = 0, cfg_f1 = 0, cfg_f2 = 0;
  logic [3:0]  cfg_n_iter = 0;
  logic        in_valid = 0, in_ready;
  llr_t        in_sys = 0, in_p1 = 0, in_p2 = 0;
  logic        out_valid, out_bit, busy, done, stall;

  turbo_decoder_top dut (.*);

  int checks = 0, failures = 0;
  int n_normal_switch = 0, n_tod_switch = 0, n_stall = 0;
  int n_p16 = 0, n_p8 = 0, n_p1 = 0;

  // ---- reference encoder ----
  bit data [N_MAX], dint [N_MAX], par1 [N_MAX], par2 [N_MAX];

  // encoder 1 reads data in natural order, encoder 2 in interleaved order
  task automatic rsc_encode(int k, bit second);
    bit r0, r1, r2, a, d;
    r0 = 0; r1 = 0; r2 = 0;
    for (int i = 0; i < k; i++) begin
      d = second ? dint[i] : data[i];
      a = d ^ r1 ^ r2;
      if (second) par2[i] = a ^ r0 ^ r2;
      else        par1[i] = a ^ r0 ^ r2;
      r2 = r1; r1 = r0; r0 = a;
    end
  endtask

  function automatic int noisy(bit b, int amp, int nz);
    int v;
    v = (b ? amp : -amp) + int'($urandom_range(2 * nz)) - nz;
    if (v > 127) v = 127;
    if (v < -127) v = -127;
    return v;
  endfunction

  bit seen [N_MAX];
  function automatic int qpp(int i, int k, int f1, int f2);
    longint v;
    v = (longint'(f1) * i + longint'(f2) * i * i) % k;
    return int'(v);
  endfunction

  // ---- monitors ----
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int first_rd, last_wr;
  logic prev_rd_phase = 0;
  always @(posedge clk) begin
    if (dut.rd_en && first_rd < 0) first_rd = cyc;
    if (dut.dec_en) last_wr = cyc;
    if (stall) n_stall += 1;
    // first read of a phase: overlapped if the previous phase still writes
    if (dut.rd_en && dut.u_ctrl.pc == '0 && dut.u_ctrl.h != '0) begin
      if (dut.siso_busy || dut.s_valid) n_tod_switch += 1;
      else n_normal_switch += 1;
    end
  end

  task automatic run_case(int k, int f1, int f2, int n_iter, bit tod, int amp, int nz,
                          int exp_p);
    int errs, nout, st0, dec_cycles, m, expc, psl, weff, raw, sv;
    int idx;
    // interleaver sanity
    for (int i = 0; i < k; i++) seen[i] = 0;
    for (int i = 0; i < k; i++) begin idx = qpp(i, k, f1, f2); seen[idx] = 1; end
    checks += 1;
    for (int i = 0; i < k; i++) if (!seen[i]) begin
      failures += 1;
      $display("K=%0d: f1/f2 is not a permutation", k);
      break;
    end
    for (int i = 0; i < k; i++) data[i] = 1'($urandom_range(1));
    for (int i = 0; i < k; i++) begin idx = qpp(i, k, f1, f2); dint[i] = data[idx]; end
    rsc_encode(k, 1'b0);
    rsc_encode(k, 1'b1);
    @(posedge clk);
    cfg_start <= 1; cfg_k <= 13'(k); cfg_f1 <= 13'(f1); cfg_f2 <= 13'(f2);
    cfg_n_iter <= 4'(n_iter); cfg_tod <= tod;
    @(posedge clk);
    cfg_start <= 0;
    @(posedge clk);
    checks += 1;
    if (dut.u_ctrl.pmask_q != 4'(exp_p - 1)) begin
      failures += 1;
      $display("K=%0d: parallel factor %0d, expected %0d", k, dut.u_ctrl.pmask_q + 1, exp_p);
    end
    case (dut.u_ctrl.pmask_q)
      4'd15: n_p16 += 1;
      4'd7:  n_p8 += 1;
      4'd0:  n_p1 += 1;
      default: ;
    endcase
    m = k / exp_p;
    first_rd = -1;
    raw = 0;
    for (int i = 0; i < k; i++) begin
      sv = noisy(data[i], amp, nz);
      if ((sv > 0) != data[i]) raw += 1;
      in_valid <= 1;
      in_sys <= llr_t'(sv);
      in_p1  <= llr_t'(noisy(par1[i], amp, nz));
      in_p2  <= llr_t'(noisy(par2[i], amp, nz));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    st0 = n_stall;
    errs = 0; nout = 0;
    while (!done) begin
      @(posedge clk);
      if (out_valid) begin
        if (out_bit != data[nout]) errs += 1;
        nout += 1;
      end
    end
    dec_cycles = last_wr - first_rd + 1;
    // the last window of a phase drains in weff cycles: the window itself,
    // or the full window ahead of a short last window
    weff = (m / 2 < WIN_PAIRS_TB) ? m / 2 : WIN_PAIRS_TB;
    psl  = weff + 3;
    expc = tod ? (n_iter * m + (n_stall - st0) + weff + 2)
               : (2 * n_iter * (m / 2 + psl) - 1);
    checks += 3;
    if (nout != k) begin failures += 1; $display("K=%0d: %0d bits out", k, nout); end
    if (errs != 0) begin failures += 1; $display("K=%0d tod=%0d: %0d bit errors", k, tod, errs); end
    if (dec_cycles != expc) begin
      failures += 1;
      $display("K=%0d tod=%0d: decode took %0d cycles, expected %0d", k, tod, dec_cycles, expc);
    end
    // the channel must have corrupted bits for the test to mean anything
    if (k >= 1024) begin
      checks += 1;
      if (raw == 0) begin failures += 1; $display("K=%0d: channel made no errors", k); end
    end
    $display("K=%0d P=%0d iter=%0d tod=%0d: %0d cycles, %0d channel errors, %0d bit errors, %0d stalls",
             k, exp_p, n_iter, tod, dec_cycles, raw, errs, n_stall - st0);
  endtask

  localparam int WIN_PAIRS_TB = L_WIN / V_OUT;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_case(40, 3, 10, 3, 1'b0, 20, 28, 1);
    run_case(40, 3, 10, 3, 1'b1, 20, 28, 1);
    run_case(160, 21, 120, 3, 1'b1, 20, 28, 1);
    run_case(160, 21, 120, 3, 1'b0, 20, 28, 1);
    run_case(1024, 31, 64, 3, 1'b1, 20, 28, 8);
    run_case(2048, 31, 64, 3, 1'b1, 20, 28, 16);
    run_case(6144, 263, 480, 3, 1'b1, 20, 28, 16);
    run_case(6144, 263, 480, 3, 1'b0, 20, 28, 16);
    checks += 4;
    if (n_normal_switch == 0) begin failures += 1; $display("no normal phase switch"); end
    if (n_tod_switch == 0)    begin failures += 1; $display("no overlapped phase switch"); end
    if (n_stall == 0)         begin failures += 1; $display("no stall"); end
    if (n_p16 == 0 || n_p8 == 0 || n_p1 == 0) begin failures += 1; $display("a parallel factor never used"); end
    $display("switches normal=%0d tod=%0d stalls=%0d P16=%0d P8=%0d P1=%0d",
             n_normal_switch, n_tod_switch, n_stall, n_p16, n_p8, n_p1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures += 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
