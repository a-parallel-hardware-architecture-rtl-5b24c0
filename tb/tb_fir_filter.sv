// tb_fir_filter: checks the adaptive FIR against a real-valued model.
//
// Loads random weights, streams random samples with idle gaps, and compares each error
// e = d - sum w_i x(k-i) with the model (tolerance L+1 LSB of Q.16 for the rounded products),
// the input vector that goes with it, and the FIR_LAT latency. Weights are reloaded midway to
// check that a load takes effect on the next sample.
module tb_fir_filter;
  import mee_pkg::*;
  localparam int L = 5;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;
  logic    in_valid = 1'b0;
  sample_t x_in = '0, d_in = '0;
  logic    w_load = 1'b0;
  weight_t w_new [L];
  weight_t w [L];
  logic    out_valid;
  sample_t out_e;
  sample_t out_xvec [L];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_filter #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .d_in(d_in), .w_load(w_load), .w_new(w_new), .w(w), .out_valid(out_valid),
    .out_e(out_e), .out_xvec(out_xvec));

  // Model state.
  real     hist [L];
  real     wr   [L];
  real     exp_e [512];
  real     exp_x [512][L];
  int      exp_c [512];
  int      n_exp = 0, n_got = 0;
  int      cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic load_weights();
    for (int i = 0; i < L; i++) begin
      w_new[i] = weight_t'($signed($urandom_range(0, 2**26)) - 2**25);  // +-2.0
      wr[i] = $itor(w_new[i]) / 16777216.0;
    end
    @(negedge clk);
    w_load = 1'b1;
    @(negedge clk);
    w_load = 1'b0;
  endtask

  task automatic send(input int n);
    for (int s = 0; s < n; s++) begin
      real y;
      real xv [L];
      x_in = sample_t'($signed($urandom_range(0, 2**20)) - 2**19);   // +-8.0
      d_in = sample_t'($signed($urandom_range(0, 2**22)) - 2**21);   // +-32.0
      in_valid = 1'b1;
      for (int i = L - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = $itor(x_in) / 65536.0;
      y = 0.0;
      for (int i = 0; i < L; i++) begin
        y += hist[i] * wr[i];
        xv[i] = hist[i];
      end
      exp_e[n_exp] = $itor(d_in) / 65536.0 - y;
      exp_x[n_exp] = xv;
      exp_c[n_exp] = cycle + int'(FIR_LAT);
      n_exp++;
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (n_got >= n_exp) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        real e, err;
        real xv [L];
        int  c;
        e = exp_e[n_got];
        xv = exp_x[n_got];
        c = exp_c[n_got];
        n_got++;
        err = $itor(out_e) / 65536.0 - e;
        if (err < 0) err = -err;
        if (err > (L + 1) / 65536.0) begin
          failures++;
          $display("FAIL: e=%f expected %f", $itor(out_e) / 65536.0, e);
        end
        for (int i = 0; i < L; i++) begin
          checks++;
          if ($itor(out_xvec[i]) / 65536.0 != xv[i]) begin
            failures++;
            $display("FAIL: xvec[%0d] %f vs %f at %0d", i, $itor(out_xvec[i]) / 65536.0, xv[i], cycle);
          end
        end
        checks++;
        if (cycle != c) begin
          failures++;
          $display("FAIL: latency, out at %0d expected %0d", cycle, c);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < L; i++) hist[i] = 0.0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_weights();
    send(60);
    repeat (6) @(posedge clk);
    load_weights();
    send(60);
    repeat (8) @(posedge clk);
    checks++;
    if (n_got != n_exp || n_exp != 120) begin
      failures++;
      $display("FAIL: %0d of %0d outputs", n_got, n_exp);
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
