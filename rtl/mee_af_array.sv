// mee_af_array: NUM_AF independent MEE adaptive filters side by side (one FPGA's worth).
//
// The filters share nothing but the clock, reset and the kernel and step-size settings; each
// has its own sample stream with a valid/ready handshake, its own weights and its own
// iteration counter, so they adapt in parallel and at their own pace (for example one channel
// each). A host feeds one sample per clock to every filter and reads the weights back after
// the last iteration.
//
// The default of 20 filters with window 100 and order 10 is the configuration reported as
// fitting one large FPGA; the per-filter timing is that of mee_af.
module mee_af_array
  import mee_pkg::*;
#(
  parameter int unsigned NUM_AF   = 20,   // adaptive filters
  parameter int unsigned N        = 100,  // window size
  parameter int unsigned L        = 10,   // filter order
  parameter int unsigned MU_SHIFT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] kscale,
  input  logic [31:0] mu,
  input  logic        in_valid  [NUM_AF],
  output logic        in_ready  [NUM_AF],
  input  sample_t     x_in      [NUM_AF],
  input  sample_t     d_in      [NUM_AF],
  output weight_t     w         [NUM_AF][L],
  output logic        upd_valid [NUM_AF],
  output logic [31:0] iter      [NUM_AF],
  output logic        e_valid   [NUM_AF],
  output sample_t     e_out     [NUM_AF]
);
  for (genvar a = 0; a < int'(NUM_AF); a++) begin : g_af
    mee_af #(.N(N), .L(L), .MU_SHIFT(MU_SHIFT)) u_af (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_valid[a]), .in_ready(in_ready[a]),
      .x_in(x_in[a]), .d_in(d_in[a]),
      .kscale(kscale), .mu(mu),
      .w(w[a]), .upd_valid(upd_valid[a]), .iter(iter[a]),
      .e_valid(e_valid[a]), .e_out(e_out[a]));
  end
endmodule
