// perm_scatter: de-interleaver network from the parallel SISO decoders back
// to a memory row. The output of active decoder j goes to column sel[j];
// hit[k] tells which columns received a value (the column write enables).
// Inactive decoders (beyond the parallel factor) are ignored. With a
// contention-free interleaver no two active decoders name the same column;
// should they, the highest-numbered one wins. Purely combinational.
module perm_scatter #(
  parameter int unsigned P_MAX = 16,
  parameter int unsigned W     = 9,
  parameter int unsigned Q_W   = $clog2(P_MAX)
) (
  input  logic [W-1:0]     din     [P_MAX],
  input  logic [Q_W-1:0]   sel     [P_MAX],
  input  logic [P_MAX-1:0] active,
  output logic [W-1:0]     row_out [P_MAX],
  output logic [P_MAX-1:0] hit
);
  always_comb begin
    for (int k = 0; k < P_MAX; k++) begin
      row_out[k] = '0;
      hit[k]     = 1'b0;
      for (int j = 0; j < P_MAX; j++) begin
        if (active[j] && sel[j] == Q_W'(k)) begin
          row_out[k] = din[j];
          hit[k]     = 1'b1;
        end
      end
    end
  end
endmodule
