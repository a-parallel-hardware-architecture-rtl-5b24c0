// mee_accumulator: one pipelined accumulator per row forming the row gradients of the
// information potential, gradV_j = sum_k G(e_k - e_j) * (e_k - e_j) * (x_k - x_j).
//
// Each valid cycle brings one column k of the three matrices: kernel values g[j], error
// distances de[j] and input-vector distances dx[j][0..L-1], with mask[j] high for the rows
// j < k that belong to the column. Row j multiplies g*de, then that product by each element of
// dx, and adds the L terms to its L accumulators. The first column of a window (in_first)
// restarts the sums; after the last column (in_last) has been added, done pulses and grad holds
// the N row gradients, each a vector of L components in Q47.16.
//
// Timing: one column per clock; a column is in the sums ACC_LAT = 3 cycles after it enters
// (g*de; times dx; add). done rises in that same cycle for the last column, and grad holds
// its value until the next window's first column reaches the adders.
//
// Products are rounded down to Q.16 after each multiplication; this is this design's fixed-point
// choice where the architecture mixes floating- and fixed-point arithmetic.
module mee_accumulator
  import mee_pkg::*;
#(
  parameter int unsigned N = 100,  // window size (rows)
  parameter int unsigned L = 10    // filter order (elements per row)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  logic  mask [N],
  input  kern_t g    [N],
  input  diff_t de   [N],
  input  diff_t dx   [N][L],
  output logic  done,
  output acc_t  grad [N][L]
);
  localparam int unsigned GDE_W = G_W + DIFF_W + 1;  // g*de, before rounding
  localparam int unsigned PRD_W = GDE_W + DIFF_W;    // (g*de)*dx, before rounding

  // Stage 1
  logic signed [GDE_W-1:0] gde1 [N];
  diff_t                   dx1  [N][L];
  logic                    m1   [N];
  logic                    v1, f1, l1;
  // Stage 2
  acc_t                    term2 [N][L];
  logic                    m2    [N];
  logic                    v2, f2, l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, f1, l1, v2, f2, l2, done} <= '0;
    end else begin
      v1 <= in_valid;
      f1 <= in_valid && in_first;
      l1 <= in_valid && in_last;
      v2 <= v1;
      f2 <= f1;
      l2 <= l1;
      done <= l2;
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(N); j++) begin
      gde1[j] <= (GDE_W'(signed'({1'b0, g[j]})) * GDE_W'(de[j])) >>> FRAC;
      dx1[j]  <= dx[j];
      m1[j]   <= mask[j];
      m2[j]   <= m1[j];
      for (int m = 0; m < int'(L); m++)
        term2[j][m] <= acc_t'((PRD_W'(gde1[j]) * PRD_W'(dx1[j][m])) >>> FRAC);
    end
    // Stage 3: accumulate.
    if (v2) begin
      for (int j = 0; j < int'(N); j++)
        for (int m = 0; m < int'(L); m++)
          if (f2) grad[j][m] <= m2[j] ? term2[j][m] : '0;
          else if (m2[j]) grad[j][m] <= grad[j][m] + term2[j][m];
    end
  end

endmodule
