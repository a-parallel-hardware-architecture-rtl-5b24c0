// tb_mee_af_array_full: one complete iteration of the array at its default size
// (20 filters, window 100, order 10), checked against a floating-point model.
//
// Every filter gets its own noise stream and its own random plant, one sample per clock. The
// weights start at zero, so the first window's errors are the desired values themselves and
// the first update must equal mu_real * sum_{j<k} G(d_k - d_j) (d_k - d_j) (x_k - x_j), with
// the input vectors formed from the stream (zeros before the first sample). The test checks
// all 200 new weights, that the update arrives N + 14 cycles after the window began, and that
// a sample offered for the next window is held off (a stall) while the filters update.
module tb_mee_af_array_full;
  import mee_pkg::*;
  localparam int NA = 20;
  localparam int N = 100;
  localparam int L = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [31:0] kscale = 32'd8192;        // sigma = 2
  logic [31:0] mu = 32'd100_000_000;     // mu_real = 9.1e-5
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

  mee_af_array dut (.clk(clk), .rst_n(rst_n), .kscale(kscale),
    .mu(mu), .in_valid(in_valid), .in_ready(in_ready), .x_in(x_in), .d_in(d_in), .w(w),
    .upd_valid(upd_valid), .iter(iter), .e_valid(e_valid), .e_out(e_out));

  real xs [NA][N];
  real ds [NA][N];
  real h  [NA][L];
  int  cycle = 0, start_c = 0, upd_c = -1, n_stall = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) begin
    if (upd_valid[0] && upd_c < 0) upd_c <= cycle;
    if (in_valid[0] && !in_ready[0]) n_stall++;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 3; i++) s += ($itor($urandom_range(0, 65535)) / 32768.0 - 1.0);
    return s;
  endfunction

  function automatic real xv(input int a, input int k, input int i);
    return (k - i >= 0) ? xs[a][k-i] : 0.0;
  endfunction

  initial begin
    for (int a = 0; a < NA; a++) begin
      in_valid[a] = 1'b0;
      for (int i = 0; i < L; i++) h[a][i] = $itor($urandom_range(0, 2000)) / 1000.0 - 1.0;
      for (int k = 0; k < N; k++) begin
        xs[a][k] = $itor($rtoi(gauss() * 65536.0)) / 65536.0;
        ds[a][k] = 0.0;
        for (int i = 0; i < L; i++) ds[a][k] += h[a][i] * xv(a, k, i);
        ds[a][k] = $itor($rtoi(ds[a][k] * 65536.0)) / 65536.0;
      end
    end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start_c = cycle;
    for (int k = 0; k < N; k++) begin
      for (int a = 0; a < NA; a++) begin
        x_in[a] = sample_t'($rtoi(xs[a][k] * 65536.0));
        d_in[a] = sample_t'($rtoi(ds[a][k] * 65536.0));
        in_valid[a] = 1'b1;
      end
      @(negedge clk);
    end
    // Offer the first sample of the next window at once: it must wait for the update.
    wait (upd_c >= 0);
    @(negedge clk);
    @(negedge clk);
    for (int a = 0; a < NA; a++) in_valid[a] = 1'b0;
    checks++;
    if (upd_c - start_c != N + 14) begin
      failures++;
      $display("FAIL: update after %0d cycles, expected %0d", upd_c - start_c, N + 14);
    end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL: no stall while updating");
    end
    for (int a = 0; a < NA; a++) begin
      real mur;
      mur = $itor(mu) / 1099511627776.0;
      checks++;
      if (iter[a] != 32'd1) begin
        failures++;
        $display("FAIL: filter %0d iter %0d", a, iter[a]);
      end
      for (int m = 0; m < L; m++) begin
        real sum, tol, got, err;
        sum = 0.0;
        tol = 0.0;
        for (int k = 0; k < N; k++)
          for (int j = 0; j < k; j++) begin
            real de, t;
            de = ds[a][k] - ds[a][j];
            t = $exp(-de * de * $itor(kscale) / 65536.0) * de * (xv(a, k, m) - xv(a, j, m));
            sum += t;
            tol += 4.0e-4 * (t < 0 ? -t : t) + 24.0 / 65536.0;
          end
        got = $itor(w[a][m]) / 16777216.0;
        err = got - mur * sum;
        if (err < 0) err = -err;
        checks++;
        if (err > mur * tol + 2.0 / 16777216.0) begin
          failures++;
          $display("FAIL: filter %0d w[%0d]=%f expected %f", a, m, got, mur * sum);
        end
      end
    end
    $display("first update after %0d cycles, %0d stall cycles on filter 0", upd_c - start_c, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
