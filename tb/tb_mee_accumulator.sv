// tb_mee_accumulator: checks the row accumulators against a real-valued double sum.
//
// Drives three windows of N columns (N=5, L=3) with random kernel values, error distances and
// input distances, the mask rows j < k set as the distance block sets them, and idle gaps.
// After each window, done must pulse ACC_LAT cycles after the last column, and every
// grad[j][m] must equal sum_k g*de*dx over that window's columns within the rounding of the
// fixed-point products. Stale values from the previous window must not leak into the next.
module tb_mee_accumulator;
  import mee_pkg::*;
  localparam int N = 5;
  localparam int L = 3;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic  mask [N];
  kern_t g [N];
  diff_t de [N];
  diff_t dx [N][L];
  logic  done;
  acc_t  grad [N][L];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  mee_accumulator #(.N(N), .L(L)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_first(in_first), .in_last(in_last), .mask(mask), .g(g), .de(de), .dx(dx),
    .done(done), .grad(grad));

  real ref_sum [N][L];
  int  cycle = 0, ndone = 0, done_at = -1;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (done) begin
    ndone <= ndone + 1;
    done_at <= cycle;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 3; w++) begin
      int last_c;
      for (int j = 0; j < N; j++) for (int m = 0; m < L; m++) ref_sum[j][m] = 0.0;
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        for (int j = 0; j < N; j++) begin
          g[j] = kern_t'($urandom_range(0, 65536));
          de[j] = diff_t'($signed($urandom_range(0, 2**19)) - 2**18);
          mask[j] = (j < k);
          for (int m = 0; m < L; m++) begin
            dx[j][m] = diff_t'($signed($urandom_range(0, 2**19)) - 2**18);
            if (j < k)
              ref_sum[j][m] += $itor(g[j]) / 65536.0 * $itor(de[j]) / 65536.0 * $itor(dx[j][m]) / 65536.0;
          end
        end
        in_valid = 1'b1;
        in_first = (k == 0);
        in_last = (k == N - 1);
        last_c = cycle;
        if (k == 2) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_first = 1'b0;
      in_last = 1'b0;
      repeat (6) @(negedge clk);
      checks++;
      if (ndone != w + 1 || done_at != last_c + int'(ACC_LAT)) begin
        failures++;
        $display("FAIL: window %0d done count %0d at %0d, last column at %0d", w, ndone, done_at, last_c);
      end
      for (int j = 0; j < N; j++)
        for (int m = 0; m < L; m++) begin
          real err;
          err = $itor(grad[j][m]) / 65536.0 - ref_sum[j][m];
          if (err < 0) err = -err;
          checks++;
          if (err > 16.0 * N / 65536.0) begin
            failures++;
            $display("FAIL: grad[%0d][%0d]=%f ref %f", j, m, $itor(grad[j][m]) / 65536.0, ref_sum[j][m]);
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
