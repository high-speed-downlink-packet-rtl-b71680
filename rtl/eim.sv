// eim: extrinsic information memory. Holds, for every bit of the code block,
// the latest extrinsic LLR and the hard decision of the latest half
// iteration, in the same row/column layout as the input memory (index i in
// row i mod M, column i div M; even and odd rows in separate banks).
//
// Every decoding cycle reads one even and one odd row (a priori LLRs of the
// two steps being fed to the decoders) and writes one even and one odd row
// (extrinsic LLRs of the two steps leaving the decoders). The write-enable
// controller builds the per-column enables of both banks: during decoding
// from the de-interleaver's column hits, during loading a single column (the
// entry being cleared to zero before the first iteration). A row write and a
// row read of the same bank may happen in one cycle (one read and one write
// port per bank). Reads are synchronous, one cycle.
module eim
  import td_pkg::*;
#(
  parameter int unsigned P    = P_MAX,
  parameter int unsigned ROWS = M_MAX,
  parameter int unsigned R_W  = $clog2(ROWS),
  parameter int unsigned Q_W  = $clog2(P),
  parameter int unsigned E_W  = LLR_W + 1      // {hard decision, extrinsic}
) (
  input  logic           clk,
  // loading: write one entry
  input  logic           ld_en,
  input  logic [R_W-1:0] ld_row,
  input  logic [Q_W-1:0] ld_col,
  input  logic [E_W-1:0] ld_data,
  // decoding: write an even and an odd row, per-column enables
  input  logic           dec_en,
  input  logic [R_W-1:0] dec_row_e,
  input  logic [R_W-1:0] dec_row_o,
  input  logic [E_W-1:0] dec_data_e [P],
  input  logic [E_W-1:0] dec_data_o [P],
  input  logic [P-1:0]   dec_hit_e,
  input  logic [P-1:0]   dec_hit_o,
  // reads
  input  logic           rd_en,
  input  logic [R_W-1:0] rd_row_e,
  input  logic [R_W-1:0] rd_row_o,
  output logic [E_W-1:0] rd_e [P],
  output logic [E_W-1:0] rd_o [P]
);
  localparam int unsigned HR = ROWS / 2;

  logic [E_W-1:0] mem [2][HR][P];

  // write-enable controller
  logic [P-1:0]   wen [2];
  logic [R_W-2:0] waddr [2];
  logic [E_W-1:0] wdata [2][P];
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      wen[b]   = '0;
      waddr[b] = '0;
      for (int k = 0; k < P; k++) wdata[b][k] = '0;
    end
    if (dec_en) begin
      wen[0]   = dec_hit_e;
      wen[1]   = dec_hit_o;
      waddr[0] = dec_row_e[R_W-1:1];
      waddr[1] = dec_row_o[R_W-1:1];
      for (int k = 0; k < P; k++) begin
        wdata[0][k] = dec_data_e[k];
        wdata[1][k] = dec_data_o[k];
      end
    end else if (ld_en) begin
      wen[ld_row[0]][ld_col]   = 1'b1;
      waddr[ld_row[0]]         = ld_row[R_W-1:1];
      wdata[ld_row[0]][ld_col] = ld_data;
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < P; k++)
        if (wen[b][k]) mem[b][waddr[b]][k] <= wdata[b][k];
    if (rd_en) begin
      rd_e <= mem[0][rd_row_e[R_W-1:1]];
      rd_o <= mem[1][rd_row_o[R_W-1:1]];
    end
  end

  a_no_load_while_decoding: assert property (@(posedge clk) !(dec_en && ld_en));
  a_dec_row_parity: assert property (@(posedge clk) dec_en |-> (!dec_row_e[0] && dec_row_o[0]));
endmodule
