// tb_main_ctrl: exercises the main controller with a simple model of its
// environment (an interleaver generator that becomes ready a few cycles after
// init, and decoders that stay busy for a fixed time after their last input).
// Checks: the parallel factor and sub-block length chosen for several code
// lengths; the load addresses (row i mod M, column i div M); per half
// iteration M/2 issued pairs with first/last marks, alternating phases and
// natural or interleaved rows; that normal mode waits for the decoders to be
// idle before a new phase while tail-overlapped mode issues the next phase
// in the very next cycle; that a busy window buffer stalls the issue; and the
// read-out order and done pulse.
module tb_main_ctrl;
  localparam int P = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic cfg_start = 0, cfg_tod = 0;
  logic [12:0] cfg_k = 0, cfg_f1 = 0, cfg_f2 = 0;
  logic [3:0] cfg_n_iter = 0;
  logic ld_valid = 0, ld_ready, ld_we;
  logic [8:0] ld_row;
  logic [3:0] ld_col;
  logic qpp_init, qpp_restart, qpp_adv, qpp_ready = 0;
  logic [12:0] qpp_k, qpp_f1, qpp_f2;
  logic [8:0] qpp_m, qpp_row_e, qpp_row_o;
  logic [3:0] qpp_pmask;
  logic rd_en, rd_phase;
  logic [8:0] rd_sys_row_e, rd_sys_row_o, rd_par_row_e, rd_par_row_o;
  logic siso_clear, s_valid, s_first, s_last, s_phase;
  logic [P-1:0] active, first_sub, last_sub;
  logic [1:0] bank_free_next = 2'b11;
  logic siso_busy;
  logic out_rd_en, out_valid, out_row_odd;
  logic [8:0] out_row;
  logic [3:0] out_col, out_col_q;
  logic busy, done, stall;

  main_ctrl dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // interleaver model: ready 4 cycles after init; rows are tagged values
  int rdy_cnt = 0;
  always @(posedge clk) begin
    if (qpp_init) begin qpp_ready <= 0; rdy_cnt <= 4; end
    else if (rdy_cnt > 0) begin rdy_cnt <= rdy_cnt - 1; if (rdy_cnt == 1) qpp_ready <= 1; end
  end
  int qt = 0;
  always @(posedge clk) begin
    if (qpp_restart) qt <= 0;
    else if (qpp_adv) qt <= qt + 1;
  end
  assign qpp_row_e = 9'((4 * qt + 100) % 256 * 2 % 384);
  assign qpp_row_o = 9'(qpp_row_e + 1);

  // decoder model: busy for 20 cycles after the last input
  int busy_cnt = 0;
  always @(posedge clk) begin
    if (s_valid) busy_cnt <= 20;
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign siso_busy = (busy_cnt > 0);

  // issue monitor
  int pairs_in_phase = 0, phases = 0, last_issue_cyc = 0, gap_sum = 0, bad_gap = 0;
  int stall_cycles = 0, stall_issue = 0;
  logic cur_phase = 0;
  int mode_tod = 0, m_cur = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall) begin
      stall_cycles += 1;
      if (rd_en) stall_issue += 1;
    end
    if (rd_en) begin
      if (pairs_in_phase == 0) begin
        // first pair of a phase
        if (phases > 0) begin
          if (mode_tod && cyc != last_issue_cyc + 1) bad_gap += 1;
          if (!mode_tod && (siso_busy || s_valid)) bad_gap += 1;
        end
        cur_phase = rd_phase;
      end
      checks += 3;
      if (rd_phase != 1'(phases % 2)) failures += 1;
      if (rd_par_row_e != 9'(2 * pairs_in_phase) || rd_par_row_o != 9'(2 * pairs_in_phase + 1))
        failures += 1;
      if (rd_phase ? (rd_sys_row_e != qpp_row_e || !qpp_adv)
                   : (rd_sys_row_e != 9'(2 * pairs_in_phase) || qpp_adv)) failures += 1;
      last_issue_cyc = cyc;
      pairs_in_phase += 1;
      if (pairs_in_phase == m_cur / 2) begin
        pairs_in_phase = 0;
        phases += 1;
      end
    end
  end

  task automatic check_pfactor(int k, int exp_p);
    rst_n <= 0;
    @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    cfg_start <= 1; cfg_k <= 13'(k); cfg_n_iter <= 1;
    @(posedge clk);
    cfg_start <= 0;
    @(posedge clk);
    checks += 3;
    if (dut.pmask_q != 4'(exp_p - 1)) begin
      failures += 1; $display("K=%0d: P=%0d expected %0d", k, dut.pmask_q + 1, exp_p);
    end
    if (qpp_m != 9'(k / exp_p)) failures += 1;
    if (active != 16'((1 << exp_p) - 1) || last_sub != 16'(1 << (exp_p - 1))) failures += 1;
  endtask

  task automatic run(int k, int n_iter, bit tod, bit make_stall);
    int m, p, nout, idx;
    p = (k >= 2048) ? 16 : (k >= 1024) ? 8 : (k >= 512) ? 4 : (k >= 256) ? 2 : 1;
    m = k / p;
    m_cur = m; mode_tod = tod;
    phases = 0; pairs_in_phase = 0;
    @(posedge clk);
    cfg_start <= 1; cfg_k <= 13'(k); cfg_n_iter <= 4'(n_iter); cfg_tod <= tod;
    @(posedge clk);
    cfg_start <= 0;
    while (!ld_ready) @(posedge clk);
    for (int i = 0; i < k; i++) begin
      ld_valid <= 1;
      #1;
      checks += 1;
      if (!ld_we || ld_row != 9'(i % m) || ld_col != 4'(i / m)) failures += 1;
      @(posedge clk);
    end
    ld_valid <= 0;
    // optionally hold window buffer 1 busy for a while during the first phase
    if (make_stall) begin
      bank_free_next <= 2'b01;
      repeat (60) @(posedge clk);
      bank_free_next <= 2'b11;
    end
    nout = 0;
    while (!done) begin
      @(posedge clk);
      if (out_rd_en) begin
        checks += 1;
        if (out_row != 9'(nout % m) || out_col != 4'(nout / m)) failures += 1;
        nout += 1;
      end
    end
    checks += 3;
    if (nout != k) begin failures += 1; $display("read-out %0d of %0d", nout, k); end
    if (phases != 2 * n_iter) begin failures += 1; $display("%0d half iterations", phases); end
    if (bad_gap != 0) begin failures += 1; $display("phase switch timing wrong (%0d)", bad_gap); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check_pfactor(6144, 16);
    check_pfactor(2048, 16);
    check_pfactor(1024, 8);
    check_pfactor(1008, 4);
    check_pfactor(512, 4);
    check_pfactor(256, 2);
    check_pfactor(40, 1);
    rst_n <= 0;
    @(posedge clk);
    rst_n <= 1;
    run(256, 2, 1'b0, 1'b1);
    run(256, 2, 1'b1, 1'b0);
    run(512, 1, 1'b1, 1'b0);
    checks += 2;
    if (stall_cycles == 0) begin failures += 1; $display("no stall"); end
    if (stall_issue != 0) failures += 1;
    $display("stall cycles %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures += 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
