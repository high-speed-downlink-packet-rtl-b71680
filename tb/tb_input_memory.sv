// tb_input_memory: fills every (row, column) with distinct values, one triple
// per cycle, then reads even/odd row pairs with different systematic and
// parity rows and both parity selections, checking each value one cycle
// after the read.
module tb_input_memory;
  import td_pkg::*;
  localparam int P = 16, ROWS = 384;
  logic clk = 0;
  always #5 clk = !clk;
  logic wr_en = 0, rd_en = 0, par_sel = 0;
  logic [8:0] wr_row = 0, rd_sys_row_e = 0, rd_sys_row_o = 1, rd_par_row_e = 0, rd_par_row_o = 1;
  logic [3:0] wr_col = 0;
  llr_t wr_sys = 0, wr_p1 = 0, wr_p2 = 0;
  llr_t sys_e [P], sys_o [P], par_e [P], par_o [P];
  int checks = 0, failures = 0;
  input_memory dut (.*);

  function automatic llr_t val(int r, int c, int w);
    return llr_t'((r * 7 + c * 13 + w * 29) % 251);
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < P; c++) begin
        @(posedge clk);
        wr_en <= 1; wr_row <= 9'(r); wr_col <= 4'(c);
        wr_sys <= val(r, c, 0); wr_p1 <= val(r, c, 1); wr_p2 <= val(r, c, 2);
      end
    @(posedge clk);
    wr_en <= 0;
    for (int n = 0; n < 300; n++) begin
      int se, so, pe, po, ps;
      se = 2 * int'($urandom_range(ROWS / 2 - 1));
      so = 2 * int'($urandom_range(ROWS / 2 - 1)) + 1;
      pe = 2 * int'($urandom_range(ROWS / 2 - 1));
      ps = int'($urandom_range(1));
      po = pe + 1;
      rd_en <= 1; rd_sys_row_e <= 9'(se); rd_sys_row_o <= 9'(so);
      rd_par_row_e <= 9'(pe); rd_par_row_o <= 9'(po); par_sel <= ps[0];
      @(posedge clk);
      rd_en <= 0;
      @(posedge clk);
      #1;
      for (int c = 0; c < P; c++) begin
        checks += 4;
        if (sys_e[c] !== val(se, c, 0)) failures += 1;
        if (sys_o[c] !== val(so, c, 0)) failures += 1;
        if (par_e[c] !== val(pe, c, 1 + ps)) failures += 1;
        if (par_o[c] !== val(po, c, 1 + ps)) failures += 1;
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
