// input_memory: channel LLR store of the turbo decoder. Index i of the code
// block lives in row i mod M, column i div M, so one row holds the values of
// all P sub-blocks at the same offset (up to 16 per row). Each row carries
// the systematic, first-parity and second-parity LLRs.
//
// Rows are split into an even and an odd bank (row parity) so that the two
// trellis steps of a radix-4 cycle, which always have opposite parity, are
// read together. The systematic LLRs are read at the rows chosen by the
// caller (natural or interleaved); the parity LLRs at the natural rows, with
// par_sel choosing the first (0) or second (1) encoder's parity.
// Loading writes one LLR triple per cycle at (row, column). Reads are
// synchronous: data appear the cycle after rd_en. The bank split and the
// read/write ports are this design's choices.
module input_memory
  import td_pkg::*;
#(
  parameter int unsigned P     = P_MAX,
  parameter int unsigned ROWS  = M_MAX,   // rows in total (both banks)
  parameter int unsigned R_W   = $clog2(ROWS),
  parameter int unsigned Q_W   = $clog2(P)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [R_W-1:0] wr_row,
  input  logic [Q_W-1:0] wr_col,
  input  llr_t           wr_sys,
  input  llr_t           wr_p1,
  input  llr_t           wr_p2,
  input  logic           rd_en,
  input  logic [R_W-1:0] rd_sys_row_e,   // even row
  input  logic [R_W-1:0] rd_sys_row_o,   // odd row
  input  logic [R_W-1:0] rd_par_row_e,
  input  logic [R_W-1:0] rd_par_row_o,
  input  logic           par_sel,
  output llr_t           sys_e [P],
  output llr_t           sys_o [P],
  output llr_t           par_e [P],
  output llr_t           par_o [P]
);
  localparam int unsigned HR = ROWS / 2;

  llr_t sys_mem [2][HR][P];
  llr_t p1_mem  [2][HR][P];
  llr_t p2_mem  [2][HR][P];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      sys_mem[wr_row[0]][wr_row[R_W-1:1]][wr_col] <= wr_sys;
      p1_mem[wr_row[0]][wr_row[R_W-1:1]][wr_col]  <= wr_p1;
      p2_mem[wr_row[0]][wr_row[R_W-1:1]][wr_col]  <= wr_p2;
    end
    if (rd_en) begin
      sys_e <= sys_mem[0][rd_sys_row_e[R_W-1:1]];
      sys_o <= sys_mem[1][rd_sys_row_o[R_W-1:1]];
      par_e <= par_sel ? p2_mem[0][rd_par_row_e[R_W-1:1]] : p1_mem[0][rd_par_row_e[R_W-1:1]];
      par_o <= par_sel ? p2_mem[1][rd_par_row_o[R_W-1:1]] : p1_mem[1][rd_par_row_o[R_W-1:1]];
    end
  end

  a_row_parity: assert property (@(posedge clk)
    rd_en |-> (!rd_sys_row_e[0] && rd_sys_row_o[0] && !rd_par_row_e[0] && rd_par_row_o[0]));
endmodule
