// tb_pairwise_distance: checks the column of pairwise differences and its row mask.
//
// Streams several windows of random vectors (N=6, VEC=2) with idle gaps, including a window
// cut short by an early in_first. For every value the model expects diff[j] = v_k - v_j and
// mask[j] = (j < k) over the rows of the current window, the first/last flags, and the
// one-cycle latency.
module tb_pairwise_distance;
  import mee_pkg::*;
  localparam int N = 6;
  localparam int VEC = 2;

  logic    clk = 1'b0;
  logic    rst_n = 1'b1;
  logic    in_valid = 1'b0, in_first = 1'b0;
  sample_t in_val [VEC];
  logic    out_valid, out_first, out_last;
  logic    mask [N];
  diff_t   diff [N][VEC];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  pairwise_distance #(.N(N), .VEC(VEC)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_first(in_first), .in_val(in_val), .out_valid(out_valid), .out_first(out_first),
    .out_last(out_last), .mask(mask), .diff(diff));

  longint win [N][VEC];   // values of the current window, model side
  int     k_model;
  int     nlast = 0;

  task automatic send(input bit first);
    longint v [VEC];
    @(negedge clk);
    if (first) k_model = 0;
    for (int e = 0; e < VEC; e++) begin
      v[e] = longint'($signed($urandom())) ;
      in_val[e] = sample_t'(v[e]);
      v[e] = longint'(in_val[e]);
    end
    in_valid = 1'b1;
    in_first = first;
    @(negedge clk);
    in_valid = 1'b0;
    in_first = 1'b0;
    // Output is registered: check it now, one cycle after the sampling edge.
    checks++;
    if (!out_valid || out_first != first || out_last != (k_model == N - 1)) begin
      failures++;
      $display("FAIL: flags valid=%0b first=%0b last=%0b k=%0d", out_valid, out_first, out_last, k_model);
    end
    if (out_last) nlast++;
    for (int j = 0; j < N; j++) begin
      checks++;
      if (mask[j] != (j < k_model)) begin
        failures++;
        $display("FAIL: mask[%0d]=%0b k=%0d", j, mask[j], k_model);
      end
      if (j < k_model)
        for (int e = 0; e < VEC; e++) begin
          checks++;
          if (longint'(diff[j][e]) != v[e] - win[j][e]) begin
            failures++;
            $display("FAIL: diff[%0d][%0d]", j, e);
          end
        end
    end
    win[k_model] = v;
    k_model = (k_model == N - 1) ? 0 : k_model + 1;
    if ($urandom_range(0, 2) == 0) @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 4; w++)
      for (int k = 0; k < N; k++) send(k == 0);
    // A window restarted early, then full windows that follow back to back without in_first.
    for (int k = 0; k < 3; k++) send(k == 0);
    for (int k = 0; k < 2 * N; k++) send(k == 0);
    for (int k = 0; k < N; k++) send(1'b0);
    @(negedge clk);
    checks++;
    if (nlast != 7) begin
      failures++;
      $display("FAIL: %0d windows closed, expected 7", nlast);
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
