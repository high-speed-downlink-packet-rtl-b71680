// tb_perm_scatter: random data and random permutations; column perm[j] must
// receive decoder j's value. With only the first P/2 decoders active (and
// their selects a permutation of the first P/2 columns) the other columns
// must show no hit.
module tb_perm_scatter;
  localparam int P = 16;
  logic [8:0] din [P], row_out [P];
  logic [3:0] sel [P];
  logic [P-1:0] active, hit;
  int checks = 0, failures = 0;
  perm_scatter #(.P_MAX(P), .W(9)) dut (.*);
  initial begin
    for (int n = 0; n < 200; n++) begin
      int perm [P];
      int np;
      np = (n % 2) ? P : P / 2;
      for (int j = 0; j < P; j++) perm[j] = j % np;
      if (np == P) perm.shuffle();
      else begin
        for (int j = 0; j < np; j++) begin
          int r, t;
          r = int'($urandom_range(np - 1));
          t = perm[j]; perm[j] = perm[r]; perm[r] = t;
        end
      end
      for (int j = 0; j < P; j++) begin
        din[j] = 9'($urandom);
        sel[j] = 4'(perm[j]);
        active[j] = (j < np);
      end
      #1;
      for (int j = 0; j < np; j++) begin
        checks += 1;
        if (row_out[perm[j]] !== din[j] || !hit[perm[j]]) failures += 1;
      end
      for (int k = np; k < P; k++) begin
        checks += 1;
        if (hit[k]) failures += 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures += 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
