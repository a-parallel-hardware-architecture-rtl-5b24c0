// tb_weight_update: checks w_new = w + mu * sum_j grad[j] against real arithmetic.
//
// Random row gradients, weights and step sizes (N=7, L=4, MU_SHIFT=32); done must follow start
// by WU_LAT cycles, and each new weight must match w + (mu/2^32) * sum_j grad[j][m] rescaled
// from Q.16 to Q.24, within one LSB. One case drives a weight into saturation.
module tb_weight_update;
  import mee_pkg::*;
  localparam int N = 7;
  localparam int L = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        start = 1'b0;
  acc_t        grad [N][L];
  weight_t     w_cur [L];
  logic [31:0] mu;
  logic        done;
  weight_t     w_new [L];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_update #(.N(N), .L(L), .MU_SHIFT(32)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .grad(grad), .w_cur(w_cur), .mu(mu), .done(done), .w_new(w_new));

  int cycle = 0, done_at = -1, ndone = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (done) begin
    done_at <= cycle;
    ndone <= ndone + 1;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      real expw [L];
      int  st;
      @(negedge clk);
      mu = $urandom();
      for (int m = 0; m < L; m++) begin
        real s;
        w_cur[m] = weight_t'($signed($urandom_range(0, 2**26)) - 2**25);
        s = 0.0;
        for (int j = 0; j < N; j++) begin
          grad[j][m] = acc_t'($signed($urandom_range(0, 2**24)) - 2**23);
          if (t == 0 && m == 0) grad[j][m] = acc_t'(64'sd1 <<< 40);
          s += $itor(grad[j][m]);
        end
        // The increment in weight LSBs (Q.24) is (gradient sum in Q.16 LSBs) * mu / 2^32.
        expw[m] = $itor(w_cur[m]) + $floor(s * $itor(mu) / 4294967296.0);
        if (expw[m] > 2147483647.0) expw[m] = 2147483647.0;
      end
      start = 1'b1;
      st = cycle;
      @(negedge clk);
      start = 1'b0;
      repeat (3) @(negedge clk);
      checks++;
      if (ndone != t + 1 || done_at != st + int'(WU_LAT)) begin
        failures++;
        $display("FAIL: done at %0d, start at %0d", done_at, st);
      end
      for (int m = 0; m < L; m++) begin
        real err;
        err = $itor(w_new[m]) - expw[m];
        if (err < 0) err = -err;
        checks++;
        if (err > 1.0) begin
          failures++;
          $display("FAIL: t=%0d w_new[%0d]=%0d expected %f", t, m, w_new[m], expw[m]);
        end
      end
    end
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
