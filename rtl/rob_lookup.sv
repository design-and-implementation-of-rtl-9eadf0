// rob_lookup: the lookup array of one source operand. Of all rows whose
// destination matches the operand's register it keeps only the one closest
// to the top of the buffer, the most current definition, and drops the
// matches below it. Rows are numbered from the top, row 0 being the newest.
//
// The structure follows the original lookup cell: there are m = lg n
// lookup lines, and line j is cut into independent segments of 2^(j+1)
// rows, a cut sitting above every row i with i mod 2^(j+1) = 0. Inside a
// segment, a matching row in the upper half (bit j of i is 0) pulls the
// segment's line low, and a row in the lower half (bit j of i is 1)
// drops its own match when it sees that line low. For any matching row k
// above a row i, the highest bit in which i and k differ names a line whose
// segment holds both, with k in the upper half and i in the lower, so row
// i is dropped exactly when some row above it matched. Every row does this
// in parallel with lg n lines, independent of how many rows matched.
// The circuit's per-row constants are p(i,j) = i mod 2^(j+1) (segment cut
// where zero) and d(i,j) = floor((i mod 2^(j+1)) / 2^j) (bit j of i).
//
// Purely combinational. ENTRIES must be a power of two.
module rob_lookup #(
  parameter int unsigned ENTRIES = 32
) (
  input  logic [ENTRIES-1:0] match_in,   // [i]: row i matched (and is valid)
  output logic [ENTRIES-1:0] match_out   // at most one bit set: the topmost match
);

  localparam int unsigned M = $clog2(ENTRIES);

  if ((1 << M) != ENTRIES) begin : g_bad_size
    $error("rob_lookup: ENTRIES must be a power of two");
  end

  // line_low[j][s]: segment s of lookup line j has been discharged.
  logic [M-1:0][ENTRIES-1:0] line_low;
  logic [ENTRIES-1:0]        drop;

  always_comb begin
    line_low = '0;
    for (int unsigned j = 0; j < M; j++)
      for (int unsigned i = 0; i < ENTRIES; i++)
        if (((i >> j) & 1) == 0 && match_in[i])
          line_low[j][i >> (j + 1)] = 1'b1;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      drop[i] = 1'b0;
      for (int unsigned j = 0; j < M; j++)
        if (((i >> j) & 1) == 1 && line_low[j][i >> (j + 1)])
          drop[i] = 1'b1;
    end
  end

  assign match_out = match_in & ~drop;

endmodule
