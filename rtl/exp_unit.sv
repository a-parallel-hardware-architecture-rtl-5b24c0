// exp_unit: pipelined exponential y = exp(-u) for the Gaussian kernel.
//
// u is unsigned Q16.16 (u >= 0); y is unsigned Q1.16 in (0,1], 1.0 = 65536. The unit rewrites
// exp(-u) as 2^(-t) with t = u * log2(e). The integer part of t becomes a right shift; the
// fraction selects one of 16 segments of 2^(-f) (table EXP2_TABLE, entry i = 2^(-i/16)) and is
// interpolated linearly inside the segment from its 12 low bits. The worst relative error is
// about 1e-4, below one step of the Q1.16 output for arguments near zero.
//
// Timing: fully pipelined, one argument per clock, latency EXP_LAT = 3 cycles
// (t = u*log2e; segment interpolation; shift).
//
// The architecture uses a pipelined floating-point exponential from a vendor library here;
// this fixed-point shift-and-interpolate unit is this design's own substitute.
module exp_unit
  import mee_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] u,
  output logic        out_valid,
  output kern_t       y
);
  // Stage 1: t = u * log2(e), Q.32 -> integer part and 16 fraction bits.
  logic [48:0] t;
  logic [16:0] ip1;
  logic [15:0] fp1;
  logic        v1;
  assign t = 49'(u) * 49'(LOG2E_Q16);

  // Stage 2: 2^(-f) by table and linear interpolation.
  logic [16:0] ip2;
  logic [16:0] m2;
  logic        v2;
  logic [3:0]  seg;
  logic [11:0] r;
  logic [16:0] base, nxt;
  logic [28:0] step;
  assign seg  = fp1[15:12];
  assign r    = fp1[11:0];
  assign base = EXP2_TABLE[5'(seg)];
  assign nxt  = EXP2_TABLE[5'(seg) + 5'd1];
  assign step = (29'(base - nxt) * 29'(r)) >> 12;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    ip1 <= t[48:32];
    fp1 <= t[31:16];
    ip2 <= ip1;
    m2  <= base - step[16:0];
    // Stage 3: shift by the integer part; anything shifted past the last bit is zero.
    y   <= (ip2 > 17'd16) ? '0 : kern_t'(m2 >> ip2[4:0]);
  end

endmodule
