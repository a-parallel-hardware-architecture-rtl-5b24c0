// tb_sysid_workload: the system-identification experiment at full filter size.
//
// One filter with order 10 and window 100 identifies a 10-tap plant whose largest weight is 5.
// A fixed sequence of 2000 noise samples (approximately Gaussian, unit variance) is generated
// once and fed through the plant; the filter is trained on consecutive windows of 100 samples
// taken cyclically from that sequence, for up to 2000 iterations. Checks: every weight ends
// within 0.02 of the plant, the weight of 5 is tracked and reported as it converges, each
// iteration takes N + 14 = 114 cycles, and the filter was stalled during every update.
module tb_sysid_workload;
  import mee_pkg::*;
  localparam int N = 100;
  localparam int L = 10;
  localparam int NS = 2000;
  localparam int ITERS = 2000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        in_valid = 1'b0;
  logic        in_ready;
  sample_t     x_in = '0, d_in = '0;
  logic [31:0] kscale = 32'd2048;        // sigma = 4
  logic [31:0] mu = 32'd8_000_000;       // mu_real = 7.3e-6
  weight_t     w [L];
  logic        upd_valid;
  logic [31:0] iter;
  logic        e_valid;
  sample_t     e_out;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  mee_af #(.N(N), .L(L)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .d_in(d_in), .kscale(kscale), .mu(mu), .w(w), .upd_valid(upd_valid),
    .iter(iter), .e_valid(e_valid), .e_out(e_out));

  real h [L] = '{5.0, -1.2, 0.8, 0.5, -0.4, 0.3, 0.2, -0.1, 0.1, 0.05};
  sample_t xq [NS];
  sample_t dq [NS];
  int  cycle = 0, last_upd = -1, n_period_bad = 0, n_stall = 0, n_upd = 0;
  int  conv_iter = -1;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) begin
    if (in_valid && !in_ready) n_stall++;
    if (upd_valid) begin
      real d0;
      n_upd++;
      if (last_upd >= 0 && cycle - last_upd != N + 14) n_period_bad++;
      last_upd = cycle;
      d0 = $itor(w[0]) / 16777216.0 - h[0];
      if (d0 < 0) d0 = -d0;
      if (conv_iter < 0 && d0 < 0.01) conv_iter = n_upd;
      if (n_upd % 250 == 0) $display("iteration %0d: w[0] = %f", n_upd, $itor(w[0]) / 16777216.0);
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 3; i++) s += ($itor($urandom_range(0, 65535)) / 32768.0 - 1.0);
    return s;
  endfunction

  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;

  initial begin
    // The input sequence and the plant's response (circular, so every window has history).
    for (int k = 0; k < NS; k++) xq[k] = sample_t'($rtoi(gauss() * 65536.0));
    for (int k = 0; k < NS; k++) begin
      real dr;
      dr = 0.0;
      for (int i = 0; i < L; i++) dr += h[i] * $itor(xq[(k - i + NS) % NS]) / 65536.0;
      dq[k] = sample_t'($rtoi(dr * 65536.0));
    end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // The first window starts from an empty delay line; later windows carry the history over.
    for (int it = 0; it < ITERS; it++) begin
      for (int s = 0; s < N; s++) begin
        int k;
        k = (it * N + s) % NS;
        x_in = xq[k];
        d_in = dq[k];
        in_valid = 1'b1;
        do @(negedge clk); while (!in_ready_q);
      end
    end
    in_valid = 1'b0;
    repeat (N + 30) @(negedge clk);
    checks++;
    if (n_upd != ITERS) begin
      failures++;
      $display("FAIL: %0d updates", n_upd);
    end
    for (int i = 0; i < L; i++) begin
      real d;
      d = $itor(w[i]) / 16777216.0 - h[i];
      if (d < 0) d = -d;
      checks++;
      if (d > 0.02) begin
        failures++;
        $display("FAIL: w[%0d]=%f plant %f", i, $itor(w[i]) / 16777216.0, h[i]);
      end
    end
    checks++;
    if (n_period_bad != 0) begin
      failures++;
      $display("FAIL: %0d iterations not %0d cycles long", n_period_bad, N + 14);
    end
    checks++;
    if (n_stall < ITERS - 1) begin
      failures++;
      $display("FAIL: only %0d stall cycles", n_stall);
    end
    $display("w[0] within 0.01 of 5 after %0d iterations; %0d cycles per iteration", conv_iter, N + 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ITERS * (N + 14) + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
