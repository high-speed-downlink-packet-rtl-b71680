// tb_tod_ber: error-rate comparison of normal and tail-overlapped decoding.
//
// Tail-overlapped decoding lets a phase's first window read a few extrinsic
// values before the previous phase has rewritten them. This testbench checks
// that this costs little error-correcting power. It encodes random K = 6144
// blocks (16 decoders) with its own LTE encoder model, adds bounded uniform
// noise strong enough to leave residual errors, and decodes the very same
// LLRs in both modes with 4 iterations. Checks, at noise of +/-36 around
// +/-20 (about one channel bit in five flipped): the noise leaves errors in
// the channel, the decoder removes most of them in both modes, and the
// tail-overlapped mode leaves at most 25% more (+ 5) bit errors than the
// normal mode, summed over all blocks. A second run at +/-38, at the edge of
// the decoder's correcting power, is only reported: there the stale reads of
// tail-overlapped mode do show as extra residual errors.
module tb_tod_ber;
  import td_pkg::*;

  localparam int K = 6144, F1 = 263, F2 = 480, NBLK = 3, NITER = 4;
  localparam int AMP = 20;
  int NZ = 36;

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
  bit data [K], dint [K];
  int lsys [K], lp1 [K], lp2 [K];

  function automatic int qpp(int i);
    longint v;
    v = (longint'(F1) * i + longint'(F2) * i * i) % K;
    return int'(v);
  endfunction

  function automatic int noisy(bit b);
    int v;
    v = (b ? AMP : -AMP) + int'($urandom_range(2 * NZ)) - NZ;
    return v;
  endfunction

  task automatic make_block(output int raw);
    bit r0, r1, r2, a;
    for (int i = 0; i < K; i++) data[i] = 1'($urandom_range(1));
    for (int i = 0; i < K; i++) dint[i] = data[qpp(i)];
    raw = 0;
    for (int i = 0; i < K; i++) begin
      lsys[i] = noisy(data[i]);
      if ((lsys[i] > 0) != data[i]) raw += 1;
    end
    r0 = 0; r1 = 0; r2 = 0;
    for (int i = 0; i < K; i++) begin
      a = data[i] ^ r1 ^ r2;
      lp1[i] = noisy(a ^ r0 ^ r2);
      r2 = r1; r1 = r0; r0 = a;
    end
    r0 = 0; r1 = 0; r2 = 0;
    for (int i = 0; i < K; i++) begin
      a = dint[i] ^ r1 ^ r2;
      lp2[i] = noisy(a ^ r0 ^ r2);
      r2 = r1; r1 = r0; r0 = a;
    end
  endtask

  task automatic decode(bit tod, output int errs);
    int nout;
    @(posedge clk);
    cfg_start <= 1; cfg_k <= 13'(K); cfg_f1 <= 13'(F1); cfg_f2 <= 13'(F2);
    cfg_n_iter <= 4'(NITER); cfg_tod <= tod;
    @(posedge clk);
    cfg_start <= 0;
    for (int i = 0; i < K; i++) begin
      in_valid <= 1;
      in_sys <= llr_t'(lsys[i]);
      in_p1  <= llr_t'(lp1[i]);
      in_p2  <= llr_t'(lp2[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    errs = 0; nout = 0;
    while (!done) begin
      @(posedge clk);
      if (out_valid) begin
        if (out_bit != data[nout]) errs += 1;
        nout += 1;
      end
    end
  endtask

  initial begin
    int raw, e_n, e_t, raw_sum, en_sum, et_sum;
    raw_sum = 0; en_sum = 0; et_sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      make_block(raw);
      decode(1'b0, e_n);
      decode(1'b1, e_t);
      $display("block %0d: channel errors %0d, normal %0d, tail-overlapped %0d", b, raw, e_n, e_t);
      raw_sum += raw; en_sum += e_n; et_sum += e_t;
    end
    checks += 4;
    if (raw_sum == 0) failures += 1;
    if (en_sum * 10 > raw_sum) begin failures += 1; $display("normal mode corrects too little"); end
    if (et_sum * 10 > raw_sum) begin failures += 1; $display("TOD corrects too little"); end
    if (et_sum * 4 > en_sum * 5 + 20) begin failures += 1; $display("TOD loses too much"); end
    // reported only: the edge of the correcting range
    NZ = 38;
    raw_sum = 0; en_sum = 0; et_sum = 0;
    for (int b = 0; b < NBLK; b++) begin
      make_block(raw);
      decode(1'b0, e_n);
      decode(1'b1, e_t);
      raw_sum += raw; en_sum += e_n; et_sum += e_t;
    end
    $display("noise +/-38: channel errors %0d, residual normal %0d, tail-overlapped %0d",
             raw_sum, en_sum, et_sum);
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
