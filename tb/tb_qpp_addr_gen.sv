// tb_qpp_addr_gen: compares the vectorised interleaver addresses with
// pi(i) = (f1*i + f2*i^2) mod K computed directly, for three LTE code lengths
// and their parallel factors (K=6144/P=16, K=1024/P=8, K=40/P=1). For every
// step pair and decoder, col*M + row must equal pi(t + j*M). It also
// checks that each parameter set is a permutation and that the setup takes
// P_MAX cycles.
module tb_qpp_addr_gen;
  localparam int P = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic init = 0, restart = 0, adv = 0, ready;
  logic [12:0] cfg_k, cfg_f1, cfg_f2;
  logic [8:0]  cfg_m;
  logic [3:0]  cfg_pmask;
  logic [8:0]  row_e, row_o;
  logic [3:0]  col_e [P], col_o [P];

  qpp_addr_gen dut (.*);

  int checks = 0, failures = 0;

  function automatic longint pi_ref(longint i, longint k, longint f1, longint f2);
    return (f1 * i + f2 * i * i) % k;
  endfunction

  task automatic run(int k, int f1, int f2, int pp);
    int m, cyc;
    bit seen [];
    m = k / pp;
    // permutation check of the reference parameters themselves
    seen = new[k];
    for (int i = 0; i < k; i++) seen[pi_ref(i, k, f1, f2)] = 1;
    checks += 1;
    for (int i = 0; i < k; i++) if (!seen[i]) begin failures += 1; break; end
    @(posedge clk);
    cfg_k <= 13'(k); cfg_f1 <= 13'(f1); cfg_f2 <= 13'(f2);
    cfg_m <= 9'(m); cfg_pmask <= 4'(pp - 1);
    init <= 1;
    @(posedge clk);
    init <= 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!ready);
    checks += 1;
    if (cyc != P + 1) begin failures += 1; $display("setup took %0d cycles", cyc); end
    restart <= 1;
    @(posedge clk);
    restart <= 0;
    for (int t = 0; t < m; t += 2) begin
      #1;
      for (int j = 0; j < pp; j++) begin
        checks += 2;
        if (longint'(col_e[j]) * m + row_e != pi_ref(t + j * m, k, f1, f2)) begin
          failures += 1;
          if (failures < 10) $display("K=%0d t=%0d j=%0d got %0d,%0d exp %0d", k, t, j,
                                      col_e[j], row_e, pi_ref(t + j * m, k, f1, f2));
        end
        if (longint'(col_o[j]) * m + row_o != pi_ref(t + 1 + j * m, k, f1, f2)) failures += 1;
      end
      adv <= 1;
      @(posedge clk);
      adv <= 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(6144, 263, 480, 16);
    run(1024, 31, 64, 8);
    run(40, 3, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures += 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
