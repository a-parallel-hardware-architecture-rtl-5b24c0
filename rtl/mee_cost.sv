// mee_cost: the MEE cost function, from a stream of errors and input vectors to new weights.
//
// Four pipelined parts in a chain (error distances, Gaussian kernels, accumulators, weight
// update), plus input-vector distances computed alongside the error distances:
//   - pairwise_distance (VEC=1) turns the k-th error of the window into the column
//     e_k - e_j, j < k;
//   - pairwise_distance (VEC=L) does the same for the input vectors, x_k - x_j;
//   - gaussian_kernel evaluates G(e_k - e_j) for the whole column;
//   - mee_accumulator adds G * (e_k - e_j) * (x_k - x_j) into N row accumulators;
//   - weight_update sums the rows and forms w + mu * gradV.
// Error and input distances are delayed by the kernel latency so that the three terms of a
// pair meet in the accumulator in the same cycle.
//
// Interface: one (error, input vector) pair per valid cycle; in_first marks the first pair of a
// window. The N-th pair after in_first closes the window. w_valid pulses once per window with
// the new weights, LAT_LAST = PD_LAT + KERN_LAT + ACC_LAT + WU_LAT = 11 cycles after the last
// pair entered. The weights must stay constant while a window is in flight (the caller's job).
module mee_cost
  import mee_pkg::*;
#(
  parameter int unsigned N        = 100,
  parameter int unsigned L        = 10,
  parameter int unsigned MU_SHIFT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_first,
  input  sample_t     in_e,
  input  sample_t     in_xvec [L],
  input  logic [31:0] kscale,
  input  logic [31:0] mu,
  input  weight_t     w_cur   [L],
  output logic        w_valid,
  output weight_t     w_new   [L]
);
  // Error distances.
  sample_t e_vec [1];
  logic    pe_valid, pe_first, pe_last;
  logic    pe_mask [N];
  diff_t   pe_dist [N][1];
  assign e_vec[0] = in_e;

  pairwise_distance #(.N(N), .VEC(1)) u_err_dist (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_first(in_first), .in_val(e_vec),
    .out_valid(pe_valid), .out_first(pe_first), .out_last(pe_last),
    .mask(pe_mask), .diff(pe_dist));

  // Input-vector distances.
  logic  px_valid, px_first, px_last;
  logic  px_mask [N];
  diff_t px_dist [N][L];

  pairwise_distance #(.N(N), .VEC(L)) u_in_dist (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_first(in_first), .in_val(in_xvec),
    .out_valid(px_valid), .out_first(px_first), .out_last(px_last),
    .mask(px_mask), .diff(px_dist));

  // Gaussian kernels of the error distances.
  diff_t de_col [N];
  logic  k_valid;
  logic  k_mask [N];
  kern_t k_g    [N];
  always_comb for (int j = 0; j < int'(N); j++) de_col[j] = pe_dist[j][0];

  gaussian_kernel #(.N(N)) u_kernel (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pe_valid), .in_mask(pe_mask), .de(de_col), .kscale(kscale),
    .out_valid(k_valid), .out_mask(k_mask), .g(k_g));

  // Align distances and window flags with the kernel output.
  localparam int unsigned ROW_W = DIFF_W * (L + 1);
  logic [N*ROW_W-1:0] dist_flat, dist_dly;
  logic [1:0]         flags_dly;
  diff_t              a_de [N];
  diff_t              a_dx [N][L];

  always_comb
    for (int j = 0; j < int'(N); j++) begin
      dist_flat[j*ROW_W +: DIFF_W] = pe_dist[j][0];
      a_de[j] = diff_t'(dist_dly[j*ROW_W +: DIFF_W]);
      for (int m = 0; m < int'(L); m++) begin
        dist_flat[j*ROW_W + (m+1)*DIFF_W +: DIFF_W] = px_dist[j][m];
        a_dx[j][m] = diff_t'(dist_dly[j*ROW_W + (m+1)*DIFF_W +: DIFF_W]);
      end
    end

  pipe_delay #(.WIDTH(N*ROW_W), .DEPTH(KERN_LAT)) u_dist_dly (
    .clk(clk), .rst_n(rst_n), .d(dist_flat), .q(dist_dly));
  pipe_delay #(.WIDTH(2), .DEPTH(KERN_LAT)) u_flag_dly (
    .clk(clk), .rst_n(rst_n), .d({pe_first, pe_last}), .q(flags_dly));

  // Row accumulators.
  logic acc_done;
  acc_t acc_grad [N][L];

  mee_accumulator #(.N(N), .L(L)) u_acc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(k_valid), .in_first(flags_dly[1]), .in_last(flags_dly[0]),
    .mask(k_mask), .g(k_g), .de(a_de), .dx(a_dx),
    .done(acc_done), .grad(acc_grad));

  // Gradient sum and weight update.
  weight_update #(.N(N), .L(L), .MU_SHIFT(MU_SHIFT)) u_update (
    .clk(clk), .rst_n(rst_n),
    .start(acc_done), .grad(acc_grad), .w_cur(w_cur), .mu(mu),
    .done(w_valid), .w_new(w_new));

  // The two distance blocks see the same stream and must stay in step.
  assert property (@(posedge clk) disable iff (!rst_n)
    pe_valid == px_valid && pe_first == px_first && pe_last == px_last);

endmodule
