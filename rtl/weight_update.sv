// weight_update: gradient sum and weight update w(n+1) = w(n) + mu * gradV.
//
// When start pulses, the N row gradients from the accumulators are summed per weight
// (gradV = gradV_1 + ... + gradV_N, an adder tree per weight), then scaled by the step size and
// added to the current weights:
//   dw = (gradV * mu) >>> MU_SHIFT     (gradV in Q.16, dw in weight units Q7.24)
// so the integer mu is mu_real * 2^(MU_SHIFT + W_FRAC - FRAC). Everything constant in the
// gradient of the information potential (1/N^2, 1/sigma^2, the kernel's normalisation and the
// factor 2 from counting each pair once) is folded into mu. New weights saturate to 32 bits.
//
// Timing: start -> done after WU_LAT = 2 cycles (sum; scale and add). w_new is valid while
// done is high and is held afterwards.
module weight_update
  import mee_pkg::*;
#(
  parameter int unsigned N        = 100,  // window size (rows)
  parameter int unsigned L        = 10,   // filter order
  parameter int unsigned MU_SHIFT = 32    // right shift applied after multiplying by mu
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  acc_t        grad  [N][L],
  input  weight_t     w_cur [L],
  input  logic [31:0] mu,
  output logic        done,
  output weight_t     w_new [L]
);
  localparam int unsigned SUM_W = ACC_W + $clog2(N + 1);
  localparam int unsigned PRD_W = SUM_W + 33;

  logic signed [SUM_W-1:0] gsum_c [L];
  logic signed [SUM_W-1:0] gsum   [L];
  logic                    s1;

  always_comb
    for (int m = 0; m < int'(L); m++) begin
      gsum_c[m] = '0;
      for (int j = 0; j < int'(N); j++) gsum_c[m] += SUM_W'(grad[j][m]);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      done <= 1'b0;
    end else begin
      s1   <= start;
      done <= s1;
    end
  end

  // Increments are clamped to +-2^62 before the add so the sum cannot wrap.
  localparam acc_t DW_LIM = acc_t'(64'sh3FFF_FFFF_FFFF_FFFF);

  always_ff @(posedge clk) begin
    if (start) gsum <= gsum_c;
    if (s1)
      for (int m = 0; m < int'(L); m++) begin
        logic signed [PRD_W-1:0] dw;
        acc_t                    dwc;
        dw = (PRD_W'(gsum[m]) * PRD_W'(signed'({1'b0, mu}))) >>> MU_SHIFT;
        if (dw > PRD_W'(DW_LIM))       dwc = DW_LIM;
        else if (dw < -PRD_W'(DW_LIM)) dwc = -DW_LIM;
        else                           dwc = acc_t'(dw);
        w_new[m] <= sat_weight(acc_t'(w_cur[m]) + dwc);
      end
  end

endmodule
