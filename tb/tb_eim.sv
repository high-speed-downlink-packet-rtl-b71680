// tb_eim: clears every entry through the load port, then mixes row writes
// with random column enables and row reads (including a read and a write of
// the same bank in one cycle) against a model array, and checks that the
// data read one cycle later match the model.
module tb_eim;
  localparam int P = 16, ROWS = 384;
  logic clk = 0;
  always #5 clk = !clk;
  logic ld_en = 0, dec_en = 0, rd_en = 0;
  logic [8:0] ld_row = 0, dec_row_e = 0, dec_row_o = 1, rd_row_e = 0, rd_row_o = 1;
  logic [3:0] ld_col = 0;
  logic [8:0] ld_data = 0;
  logic [8:0] dec_data_e [P], dec_data_o [P], rd_e [P], rd_o [P];
  logic [P-1:0] dec_hit_e = 0, dec_hit_o = 0;
  int checks = 0, failures = 0;
  logic [8:0] model [ROWS][P];
  eim dut (.*);

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < P; c++) begin
        @(posedge clk);
        ld_en <= 1; ld_row <= 9'(r); ld_col <= 4'(c); ld_data <= 9'(r + c);
        model[r][c] = 9'(r + c);
      end
    @(posedge clk);
    ld_en <= 0;
    for (int n = 0; n < 400; n++) begin
      int we, wo, re, ro;
      logic [8:0] exp_e [P], exp_o [P];
      we = 2 * int'($urandom_range(ROWS / 2 - 1));
      wo = 2 * int'($urandom_range(ROWS / 2 - 1)) + 1;
      re = 2 * int'($urandom_range(ROWS / 2 - 1));
      ro = 2 * int'($urandom_range(ROWS / 2 - 1)) + 1;
      // read sees the old contents even when the same row is written
      for (int c = 0; c < P; c++) begin exp_e[c] = model[re][c]; exp_o[c] = model[ro][c]; end
      dec_en <= 1; dec_row_e <= 9'(we); dec_row_o <= 9'(wo);
      dec_hit_e <= P'($urandom); dec_hit_o <= P'($urandom);
      rd_en <= 1; rd_row_e <= 9'(re); rd_row_o <= 9'(ro);
      for (int c = 0; c < P; c++) begin
        dec_data_e[c] <= 9'($urandom);
        dec_data_o[c] <= 9'($urandom);
      end
      @(posedge clk);
      for (int c = 0; c < P; c++) begin
        if (dec_hit_e[c]) model[we][c] = dec_data_e[c];
        if (dec_hit_o[c]) model[wo][c] = dec_data_o[c];
      end
      dec_en <= 0; rd_en <= 0;
      #1;
      for (int c = 0; c < P; c++) begin
        checks += 2;
        if (rd_e[c] !== exp_e[c]) failures += 1;
        if (rd_o[c] !== exp_o[c]) failures += 1;
      end
      @(posedge clk);
    end
    // final full read-back of every row
    for (int r = 0; r < ROWS; r += 2) begin
      rd_en <= 1; rd_row_e <= 9'(r); rd_row_o <= 9'(r + 1);
      @(posedge clk);
      rd_en <= 0;
      #1;
      for (int c = 0; c < P; c++) begin
        checks += 2;
        if (rd_e[c] !== model[r][c]) failures += 1;
        if (rd_o[c] !== model[r+1][c]) failures += 1;
      end
    end
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
