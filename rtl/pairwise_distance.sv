// pairwise_distance: pipelined pairwise distances between the newest value and all earlier
// values of the current window.
//
// Values of a window arrive one per valid cycle, in_first marking the first. The k-th value
// (k = 0..N-1) is written into row k of a register array, and in the same cycle one subtractor
// per row forms diff[j] = value_k - value_j for every row j. Row j is meaningful only when
// j < k (mask[j]); the rows with j >= k hold values of an earlier window or nothing. Column k of
// the upper-triangular distance matrix therefore appears in the k-th cycle, and N subtractors
// produce all N(N-1)/2 distances of a window in N cycles.
//
// Each value is a vector of VEC elements: VEC = 1 gives the error distances e_k - e_j, and
// VEC = L gives the input-vector distances x_k - x_j (one subtractor per row and element),
// which the architecture builds with hardware identical to the error block.
//
// Timing: one column per clock, latency PD_LAT = 1. out_col is the column index k, out_first
// and out_last mark the first and the N-th value of the window.
//
// Holding each value in a fixed row (rather than shifting a delay line) is this design's
// choice; it ties row j to the j-th error of the window, which is what the per-row
// accumulators need.
module pairwise_distance
  import mee_pkg::*;
#(
  parameter int unsigned N   = 100,  // window size
  parameter int unsigned VEC = 1     // elements per value
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  sample_t in_val [VEC],
  output logic    out_valid,
  output logic    out_first,
  output logic    out_last,
  output logic    mask [N],
  output diff_t   diff [N][VEC]
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  sample_t       row [N][VEC];
  logic [CW-1:0] cnt;   // index of the next value in the window
  logic [CW-1:0] k;
  assign k = in_first ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      for (int j = 0; j < int'(N); j++) mask[j] <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_valid && in_first;
      out_last  <= in_valid && (32'(k) == N - 1);
      if (in_valid) begin
        cnt <= (32'(k) == N - 1) ? '0 : k + 1'b1;
        for (int j = 0; j < int'(N); j++) mask[j] <= (j < int'(k));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      row[k] <= in_val;
      for (int j = 0; j < int'(N); j++)
        for (int v = 0; v < int'(VEC); v++)
          diff[j][v] <= DIFF_W'(in_val[v]) - DIFF_W'(row[j][v]);
    end
  end

endmodule
