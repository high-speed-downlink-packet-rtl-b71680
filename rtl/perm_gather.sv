// perm_gather: interleaver network between a memory row and the parallel
// SISO decoders. Decoder j receives column sel[j] of the row just read.
// With the contention-free interleaver all decoders read the same row and
// the selects form a permutation, so one row read serves all decoders in one
// cycle. Purely combinational: a P_MAX-way multiplexer per decoder.
module perm_gather #(
  parameter int unsigned P_MAX = 16,
  parameter type         T     = logic [7:0],   // element type
  parameter int unsigned Q_W   = $clog2(P_MAX)
) (
  input  T               row_in [P_MAX],
  input  logic [Q_W-1:0] sel    [P_MAX],
  output T               dout   [P_MAX]
);
  always_comb begin
    for (int j = 0; j < P_MAX; j++) dout[j] = row_in[sel[j]];
  end
endmodule
