// tb_mee_af_array: end-to-end test of the filter array (3 filters, N=8, L=3).
//
// Each filter identifies its own unknown plant from its own noise stream, and each stream
// behaves differently: filter 0 keeps in_valid high (it is stalled during every update),
// filter 1 inserts random idle cycles (bubbles), filter 2 drops in_valid while in_ready is low
// and comes back later. Checks: every filter converges to its plant; the always-valid filter
// runs at N + 14 cycles per iteration and is ahead of the others (they are independent); the
// update counters agree with upd_valid; and stalls, bubbles and updates each happen at least
// once on every filter that is meant to show them.
module tb_mee_af_array;
  import mee_pkg::*;
  localparam int NA = 3;
  localparam int N = 8;
  localparam int L = 3;
  localparam int ITERS = 150;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [31:0] kscale = 32'd8192;           // sigma = 2
  logic [31:0] mu = 32'd3_000_000_000;      // mu_real = 2.7e-3
  logic        in_valid [NA];
  logic        in_ready [NA];
  sample_t     x_in [NA], d_in [NA];
  weight_t     w [NA][L];
  logic        upd_valid [NA];
  logic [31:0] iter [NA];
  logic        e_valid [NA];
  sample_t     e_out [NA];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  mee_af_array #(.NUM_AF(NA), .N(N), .L(L)) dut (.clk(clk), .rst_n(rst_n), .kscale(kscale),
    .mu(mu), .in_valid(in_valid), .in_ready(in_ready), .x_in(x_in), .d_in(d_in), .w(w),
    .upd_valid(upd_valid), .iter(iter), .e_valid(e_valid), .e_out(e_out));

  real h [NA][L] = '{'{1.0, -0.5, 0.25}, '{-0.7, 0.3, 0.6}, '{0.2, 0.8, -0.4}};
  int  n_stall [NA], n_bubble [NA], n_upd [NA], n_period_ok, n_period_bad;
  int  last_upd0 = -1, cycle = 0;
  logic rdy_q [NA];

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) begin
    for (int a = 0; a < NA; a++) begin
      rdy_q[a] <= in_ready[a];
      if (in_valid[a] && !in_ready[a]) n_stall[a]++;
      if (!in_valid[a] && in_ready[a] && rst_n) n_bubble[a]++;
      if (upd_valid[a]) n_upd[a]++;
    end
    if (upd_valid[0]) begin
      if (last_upd0 >= 0) begin
        if (cycle - last_upd0 == N + 14) n_period_ok <= n_period_ok + 1;
        else n_period_bad <= n_period_bad + 1;
      end
      last_upd0 <= cycle;
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 3; i++) s += ($itor($urandom_range(0, 65535)) / 32768.0 - 1.0);
    return s;
  endfunction

  task automatic drive(input int a);
    real hist [L];
    for (int i = 0; i < L; i++) hist[i] = 0.0;
    for (int s = 0; s < ITERS * N; s++) begin
      real dr;
      x_in[a] = sample_t'($rtoi(gauss() * 65536.0));
      for (int i = L - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = $itor(x_in[a]) / 65536.0;
      dr = 0.0;
      for (int i = 0; i < L; i++) dr += h[a][i] * hist[i];
      d_in[a] = sample_t'($rtoi(dr * 65536.0));
      in_valid[a] = 1'b1;
      if (a == 2) begin
        // Offer the sample only while the filter is ready; back off otherwise.
        while (!in_ready[a]) begin
          in_valid[a] = 1'b0;
          repeat ($urandom_range(1, 4)) @(negedge clk);
          in_valid[a] = 1'b1;
        end
      end
      do @(negedge clk); while (!rdy_q[a]);
      in_valid[a] = 1'b0;
      if (a == 1 && (s % N) != N - 1 && $urandom_range(0, 2) == 0)
        repeat ($urandom_range(1, 3)) @(negedge clk);
    end
  endtask

  initial begin
    for (int a = 0; a < NA; a++) begin
      in_valid[a] = 1'b0;
      x_in[a] = '0;
      d_in[a] = '0;
      n_stall[a] = 0;
      n_bubble[a] = 0;
      n_upd[a] = 0;
    end
    n_period_ok = 0;
    n_period_bad = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      drive(0);
      drive(1);
      drive(2);
      begin
        // Independence: when filter 0 finishes, the slower streams are behind.
        wait (iter[0] == 32'(ITERS));
        checks++;
        if (!(iter[1] < iter[0] && iter[2] < iter[0])) begin
          failures++;
          $display("FAIL: filters not independent: iter %0d %0d %0d", iter[0], iter[1], iter[2]);
        end
      end
    join
    repeat (30) @(negedge clk);
    for (int a = 0; a < NA; a++) begin
      checks++;
      if (n_upd[a] != ITERS || iter[a] != 32'(ITERS)) begin
        failures++;
        $display("FAIL: filter %0d: %0d updates, iter %0d", a, n_upd[a], iter[a]);
      end
      for (int i = 0; i < L; i++) begin
        real d;
        d = $itor(w[a][i]) / 16777216.0 - h[a][i];
        if (d < 0) d = -d;
        checks++;
        if (d > 0.01) begin
          failures++;
          $display("FAIL: filter %0d w[%0d]=%f plant %f", a, i, $itor(w[a][i]) / 16777216.0, h[a][i]);
        end
      end
      $display("filter %0d: stalls=%0d bubbles=%0d updates=%0d", a, n_stall[a], n_bubble[a], n_upd[a]);
    end
    checks++;
    if (n_period_bad != 0 || n_period_ok != ITERS - 1) begin
      failures++;
      $display("FAIL: filter 0 period: %0d ok, %0d wrong", n_period_ok, n_period_bad);
    end
    // Mechanisms: stall on the always-valid filter, bubbles on filter 1, back-off on filter 2.
    checks++;
    if (n_stall[0] == 0) begin failures++; $display("FAIL: no stall"); end
    checks++;
    if (n_bubble[1] == 0) begin failures++; $display("FAIL: no bubble"); end
    checks++;
    if (n_stall[2] != 0 || n_bubble[2] == 0) begin
      failures++;
      $display("FAIL: back-off stream: stalls %0d bubbles %0d", n_stall[2], n_bubble[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ITERS * (N + 14) * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
