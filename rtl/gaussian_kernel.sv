// gaussian_kernel: one Gaussian kernel per row, G(de) = exp(-de^2 / (2 sigma^2)).
//
// A column of N error distances (and its row mask) enters each valid cycle; every row squares
// its distance, scales it by kscale = 1/(2 sigma^2) and feeds the result to its own pipelined
// exponential. All N kernels of a column thus leave together, so the N(N-1)/2 kernels of a
// window take N cycles plus the kernel latency.
//
// kscale is unsigned Q16.16. The squared, scaled argument saturates at 2^16 - 1 (the
// exponential is zero there anyway). The constant factor 1/(sqrt(2 pi) sigma) of the kernel
// is left out; it is the same for every pair and is folded into the step size mu.
//
// Timing: one column per clock, latency KERN_LAT = 5 (square, scale, 3-cycle exponential).
// kscale is a setting and must not change while columns are in flight. The mask travels with the column. Rows whose mask is low still compute; their results are
// ignored downstream.
module gaussian_kernel
  import mee_pkg::*;
#(
  parameter int unsigned N = 100  // window size (rows)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_mask [N],
  input  diff_t       de      [N],
  input  logic [31:0] kscale,
  output logic        out_valid,
  output logic        out_mask [N],
  output kern_t       g        [N]
);
  logic [2*DIFF_W-1:0] sq  [N];  // de^2, Q.32
  logic [31:0]         arg [N];  // de^2 * kscale, Q16.16 saturated
  logic                v1, v2;
  logic                vexp [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
    end
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_row
    logic [2*DIFF_W-1:0] mag;
    logic [2*DIFF_W+31:0] scaled;
    assign mag    = de[j][DIFF_W-1] ? (2*DIFF_W)'(-de[j]) : (2*DIFF_W)'(de[j]);
    assign scaled = ((2*DIFF_W+32)'(sq[j] >> FRAC) * (2*DIFF_W+32)'(kscale)) >> FRAC;

    always_ff @(posedge clk) begin
      sq[j]  <= mag * mag;
      arg[j] <= (scaled > (2*DIFF_W+32)'(32'hFFFF_FFFF)) ? 32'hFFFF_FFFF : scaled[31:0];
    end

    exp_unit u_exp (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v2),
      .u        (arg[j]),
      .out_valid(vexp[j]),
      .y        (g[j])
    );
  end

  assign out_valid = vexp[0];

  logic [N-1:0] mask_in, mask_out;
  always_comb
    for (int j = 0; j < int'(N); j++) begin
      mask_in[j]  = in_mask[j];
      out_mask[j] = mask_out[j];
    end

  pipe_delay #(.WIDTH(N), .DEPTH(KERN_LAT)) u_mask (
    .clk(clk), .rst_n(rst_n), .d(mask_in), .q(mask_out));

endmodule
