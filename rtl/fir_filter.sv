// fir_filter: adaptive FIR filter of the MEE adaptive filter, y = sum_i w_i * x_i and e = d - y.
//
// A new sample enters the input delay line whenever in_valid is high; all older samples move
// one tap along and the oldest is dropped, so every accepted sample forms a new input vector of
// L samples (xvec[0] is the newest and meets w[0]). The vector is multiplied tap by tap with the
// current weights and the products are added by an adder tree; the desired value d travels
// alongside and the filter's output is the error e = d - y. One vector is accepted per clock.
//
// The L weight registers live here and are replaced all at once when w_load is high (the
// weight update of the cost function feeds them back); they reset to zero.
//
// Timing: in_valid -> out_valid after FIR_LAT = 3 cycles (delay line, products, sum/error).
// out_xvec is the input vector that produced out_e, for the input pairwise-distance block.
//
// The tap products follow the structure of the filter described for this architecture; that
// design multiplies in floating point and adds in fixed point, whereas here both are fixed
// point (samples Q15.16, weights Q7.24, products rounded down to Q.16) and the error saturates
// to 32 bits.
module fir_filter
  import mee_pkg::*;
#(
  parameter int unsigned L = 10  // filter order (number of weights)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  input  sample_t d_in,
  input  logic    w_load,
  input  weight_t w_new [L],
  output weight_t w     [L],
  output logic    out_valid,
  output sample_t out_e,
  output sample_t out_xvec [L]
);
  // Stage 1: delay line.
  sample_t xline [L];
  sample_t d1;
  logic    v1;
  // Stage 2: products.
  logic signed [ACC_W-1:0] prod [L];
  sample_t xvec2 [L];
  sample_t d2;
  logic    v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(L); i++) begin
        xline[i] <= '0;
        w[i]     <= '0;
      end
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (w_load) w <= w_new;
      if (in_valid) begin
        xline[0] <= x_in;
        for (int i = 1; i < int'(L); i++) xline[i] <= xline[i-1];
      end
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) d1 <= d_in;
    for (int i = 0; i < int'(L); i++)
      prod[i] <= (ACC_W'(xline[i]) * ACC_W'(w[i])) >>> W_FRAC;
    xvec2 <= xline;
    d2    <= d1;
  end

  // Stage 3: adder tree and error.
  logic signed [ACC_W-1:0] ysum;
  always_comb begin
    ysum = '0;
    for (int i = 0; i < int'(L); i++) ysum += prod[i];
  end

  always_ff @(posedge clk) begin
    out_e    <= sat_sample(ACC_W'(d2) - ysum);
    out_xvec <= xvec2;
  end

endmodule
