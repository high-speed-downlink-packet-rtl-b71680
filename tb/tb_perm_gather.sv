// tb_perm_gather: random rows and random permutations as selects; every
// decoder output must equal the selected column.
module tb_perm_gather;
  localparam int P = 16;
  logic [7:0] row_in [P], dout [P];
  logic [3:0] sel [P];
  int checks = 0, failures = 0;
  perm_gather #(.P_MAX(P), .T(logic [7:0])) dut (.*);
  initial begin
    for (int n = 0; n < 200; n++) begin
      int perm [P];
      for (int j = 0; j < P; j++) perm[j] = j;
      perm.shuffle();
      for (int j = 0; j < P; j++) begin
        row_in[j] = 8'($urandom);
        sel[j]    = 4'(perm[j]);
      end
      #1;
      for (int j = 0; j < P; j++) begin
        checks += 1;
        if (dout[j] !== row_in[perm[j]]) failures += 1;
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
