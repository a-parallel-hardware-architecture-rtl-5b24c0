// tb_mee_af: system identification with one MEE adaptive filter (N=16, L=4).
//
// An unknown FIR plant h is driven with approximately Gaussian noise; the filter sees the
// same input and the plant's output as desired signal. Checks:
//   - the weights converge to h (within 0.01) after the run;
//   - the error of the last window is far below that of the first;
//   - with the input always valid an iteration takes exactly N + 14 cycles;
//   - in_ready is low from the N-th sample of a window until the update is loaded, and a
//     source that keeps in_valid high meanwhile is held off (stalls are counted);
//   - windows with idle input cycles (bubbles) still produce correct updates;
//   - upd_valid pulses once per iteration and iter counts them.
// Each mechanism must occur at least once.
module tb_mee_af;
  import mee_pkg::*;
  localparam int N = 16;
  localparam int L = 4;
  localparam int ITERS = 120;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        in_valid = 1'b0;
  logic        in_ready;
  sample_t     x_in = '0, d_in = '0;
  logic [31:0] kscale = 32'd8192;        // sigma = 2
  logic [31:0] mu = 32'd900_000_000;     // mu_real = 8.2e-4
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

  real h [L] = '{0.9, -0.6, 0.4, 0.2};
  real hist [L];
  int  cycle = 0;
  int  n_upd = 0, last_upd = -1, n_period_ok = 0, n_period_bad = 0;
  int  n_stall = 0, n_bubble = 0;
  real err_first = 0.0;
  int  n_err = 0;
  bit  bubbles_on = 1'b0;
  bit  win_bubbled = 1'b0;  // the window now being filled had an idle input cycle

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (in_valid && !in_ready) n_stall <= n_stall + 1;
    if (!in_valid && in_ready && rst_n) begin
      n_bubble <= n_bubble + 1;
      win_bubbled <= 1'b1;
    end
    if (upd_valid) begin
      n_upd <= n_upd + 1;
      win_bubbled <= 1'b0;
      if (!win_bubbled && last_upd >= 0) begin
        if (cycle - last_upd == N + 14) n_period_ok <= n_period_ok + 1;
        else n_period_bad <= n_period_bad + 1;
      end
      last_upd <= cycle;
    end
    if (e_valid) begin
      real a;
      a = $itor(e_out) / 65536.0;
      if (a < 0) a = -a;
      if (n_err < N) err_first += a;
      n_err <= n_err + 1;
    end
  end

  function automatic real gauss();
    // Sum of three uniforms on [-1, 1): mean 0, variance 1.
    real s = 0.0;
    for (int i = 0; i < 3; i++) s += ($itor($urandom_range(0, 65535)) / 32768.0 - 1.0);
    return s;
  endfunction

  task automatic push_sample();
    real xr, dr;
    xr = gauss();
    x_in = sample_t'($rtoi(xr * 65536.0));
    for (int i = L - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = $itor(x_in) / 65536.0;
    dr = 0.0;
    for (int i = 0; i < L; i++) dr += h[i] * hist[i];
    d_in = sample_t'($rtoi(dr * 65536.0));
    in_valid = 1'b1;
    // Hold until accepted (stalls while the filter is updating).
    do @(negedge clk); while (!(in_ready_q));
    in_valid = 1'b0;
  endtask

  // in_ready as sampled by the last rising edge.
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;

  initial begin
    for (int i = 0; i < L; i++) hist[i] = 0.0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int it = 0; it < ITERS; it++) begin
      bubbles_on = (it >= ITERS / 2 && it < ITERS / 2 + 10);
      for (int s = 0; s < N; s++) begin
        push_sample();
        if (bubbles_on && s < N - 1 && $urandom_range(0, 2) == 0) @(negedge clk);
      end
    end
    repeat (30) @(negedge clk);
    checks++;
    if (n_upd != ITERS || iter != 32'(ITERS)) begin
      failures++;
      $display("FAIL: %0d updates, iter=%0d, expected %0d", n_upd, iter, ITERS);
    end
    for (int i = 0; i < L; i++) begin
      real d;
      d = $itor(w[i]) / 16777216.0 - h[i];
      if (d < 0) d = -d;
      checks++;
      if (d > 0.01) begin
        failures++;
        $display("FAIL: w[%0d]=%f plant %f", i, $itor(w[i]) / 16777216.0, h[i]);
      end
    end
    checks++;
    if (n_period_bad != 0 || n_period_ok < ITERS / 2) begin
      failures++;
      $display("FAIL: iteration period: %0d ok, %0d wrong", n_period_ok, n_period_bad);
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no stall happened"); end
    checks++;
    if (n_bubble == 0) begin failures++; $display("FAIL: no bubble happened"); end
    $display("stalls=%0d bubbles=%0d updates=%0d period_ok=%0d mean|e| first window %f",
             n_stall, n_bubble, n_upd, n_period_ok, err_first / N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ITERS * (N + 40) + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
