// tb_mee_cost: checks one weight update of the MEE cost function against a real-valued model.
//
// Streams windows of N=6 random errors and input vectors (L=3), with and without idle gaps,
// into the cost function and compares the new weights with
//   w + mu_real * sum_{j<k} exp(-(e_k-e_j)^2 * kscale) * (e_k-e_j) * (x_k-x_j)
// (mu_real = mu / 2^40), computed in floating point. The tolerance covers the kernel's
// interpolation error and the rounding of the fixed-point products. w_valid must come
// PD_LAT + KERN_LAT + ACC_LAT + WU_LAT cycles after the last pair of the window.
module tb_mee_cost;
  import mee_pkg::*;
  localparam int N = 6;
  localparam int L = 3;
  localparam int LAT = int'(PD_LAT + KERN_LAT + ACC_LAT + WU_LAT);

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        in_valid = 1'b0, in_first = 1'b0;
  sample_t     in_e = '0;
  sample_t     in_xvec [L];
  logic [31:0] kscale = 32'd16384;       // sigma = sqrt(2)
  logic [31:0] mu = 32'd2_000_000_000;   // mu_real = 1.82e-3
  weight_t     w_cur [L];
  logic        w_valid;
  weight_t     w_new [L];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  mee_cost #(.N(N), .L(L)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_first(in_first), .in_e(in_e), .in_xvec(in_xvec), .kscale(kscale), .mu(mu),
    .w_cur(w_cur), .w_valid(w_valid), .w_new(w_new));

  int cycle = 0, nvalid = 0, valid_at = -1;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (w_valid) begin
    nvalid <= nvalid + 1;
    valid_at <= cycle;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 4; w++) begin
      real e [N];
      real x [N][L];
      real sum [L], tol [L];
      real mur;
      int  last_c;
      for (int m = 0; m < L; m++) w_cur[m] = weight_t'($signed($urandom_range(0, 2**25)) - 2**24);
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        in_e = sample_t'($signed($urandom_range(0, 2**18)) - 2**17);  // +-2.0
        e[k] = $itor(in_e) / 65536.0;
        for (int m = 0; m < L; m++) begin
          in_xvec[m] = sample_t'($signed($urandom_range(0, 2**18)) - 2**17);
          x[k][m] = $itor(in_xvec[m]) / 65536.0;
        end
        in_valid = 1'b1;
        in_first = (k == 0);
        last_c = cycle;
        if (w % 2 == 1 && k % 2 == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          in_first = 1'b0;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_first = 1'b0;
      // Model.
      mur = $itor(mu) / 1099511627776.0;
      for (int m = 0; m < L; m++) begin
        sum[m] = 0.0;
        tol[m] = 0.0;
        for (int k = 0; k < N; k++)
          for (int j = 0; j < k; j++) begin
            real de, gk, t;
            de = e[k] - e[j];
            gk = $exp(-de * de * $itor(kscale) / 65536.0);
            t = gk * de * (x[k][m] - x[j][m]);
            sum[m] += t;
            tol[m] += 4.0e-4 * (t < 0 ? -t : t) + 12.0 / 65536.0;
          end
      end
      repeat (LAT + 3) @(negedge clk);
      checks++;
      if (nvalid != w + 1 || valid_at != last_c + LAT) begin
        failures++;
        $display("FAIL: window %0d: %0d updates, last at %0d, expected at %0d", w, nvalid, valid_at, last_c + LAT);
      end
      for (int m = 0; m < L; m++) begin
        real got, want, err;
        got = $itor(w_new[m]) / 16777216.0;
        want = $itor(w_cur[m]) / 16777216.0 + mur * sum[m];
        err = got - want;
        if (err < 0) err = -err;
        checks++;
        if (err > mur * tol[m] + 2.0 / 16777216.0) begin
          failures++;
          $display("FAIL: window %0d w_new[%0d]=%f expected %f", w, m, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
