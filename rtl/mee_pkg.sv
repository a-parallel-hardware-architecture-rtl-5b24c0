// mee_pkg: number formats, latencies and shared helpers of the MEE adaptive filter.
//
// The datapath is fixed point throughout (a design choice; see README). Samples, desired
// values and errors are signed Q15.16 in 32 bits. Weights are signed Q7.24 in 32 bits, so that
// small weight increments are not lost. Pairwise differences are one bit wider than their
// operands (33 bits) so a subtraction never overflows. Gaussian kernel values lie in (0,1] and
// are unsigned Q1.16 in 17 bits. Gradient accumulators are signed Q47.16 in 64 bits.
//
// The latency constants below are the pipeline depths of the blocks, in clock cycles from an
// input qualified by its valid bit to the registered output that depends on it.
package mee_pkg;

  localparam int unsigned DW     = 32;  // sample / error width
  localparam int unsigned FRAC   = 16;  // fraction bits of samples, errors and gradients
  localparam int unsigned WW     = 32;  // weight width
  localparam int unsigned W_FRAC = 24;  // fraction bits of weights
  localparam int unsigned DIFF_W = DW + 1;
  localparam int unsigned G_W    = FRAC + 1;
  localparam int unsigned ACC_W  = 64;

  typedef logic signed [DW-1:0]     sample_t;
  typedef logic signed [WW-1:0]     weight_t;
  typedef logic signed [DIFF_W-1:0] diff_t;
  typedef logic        [G_W-1:0]    kern_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Pipeline depths.
  localparam int unsigned FIR_LAT  = 3;            // sample in -> error out
  localparam int unsigned PD_LAT   = 1;            // value in -> column of differences out
  localparam int unsigned EXP_LAT  = 3;            // argument in -> exp(-u) out
  localparam int unsigned KERN_LAT = 2 + EXP_LAT;  // distance in -> kernel value out
  localparam int unsigned ACC_LAT  = 3;            // column in -> accumulator updated
  localparam int unsigned WU_LAT   = 2;            // start -> new weights out

  // log2(e) in Q1.16, used to turn exp(-u) into 2^(-u*log2(e)).
  localparam logic [16:0] LOG2E_Q16 = 17'd94548;

  // 2^(-i/16) in Q1.16 for i = 0..16, i.e. round(65536 * 2^(-i/16)).
  // Segment table of the exponential; values between entries are interpolated linearly.
  localparam logic [16:0] EXP2_TABLE [17] = '{
    17'd65536, 17'd62757, 17'd60097, 17'd57549, 17'd55109, 17'd52773,
    17'd50535, 17'd48393, 17'd46341, 17'd44376, 17'd42495, 17'd40693,
    17'd38968, 17'd37316, 17'd35734, 17'd34219, 17'd32768};

  // Clamp a wide signed value to a signed DW-bit sample.
  function automatic sample_t sat_sample(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'({1'b0, {(DW-1){1'b1}}})))
      return {1'b0, {(DW-1){1'b1}}};
    else if (v < -ACC_W'(signed'({1'b0, {(DW-1){1'b1}}})) - 1)
      return {1'b1, {(DW-1){1'b0}}};
    else
      return v[DW-1:0];
  endfunction

  // Clamp a wide signed value to a signed WW-bit weight.
  function automatic weight_t sat_weight(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'({1'b0, {(WW-1){1'b1}}})))
      return {1'b0, {(WW-1){1'b1}}};
    else if (v < -ACC_W'(signed'({1'b0, {(WW-1){1'b1}}})) - 1)
      return {1'b1, {(WW-1){1'b0}}};
    else
      return v[WW-1:0];
  endfunction

endpackage
