// tb_gaussian_kernel: checks G(de) = exp(-de^2 * kscale) row by row against the real-valued
// kernel, for two kernel widths, with the row mask carried through and the KERN_LAT latency.
// kscale is changed once, while no column is in flight. Distances cover zero, small and large values (large ones must give zero).
module tb_gaussian_kernel;
  import mee_pkg::*;
  localparam int N = 5;
  localparam int NCOL = 60;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        in_valid = 1'b0;
  logic        in_mask [N];
  diff_t       de [N];
  logic [31:0] kscale = 32'd32768;  // 1/(2 sigma^2) = 0.5, sigma = 1
  logic        out_valid;
  logic        out_mask [N];
  kern_t       g [N];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  gaussian_kernel #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .in_mask(in_mask), .de(de), .kscale(kscale), .out_valid(out_valid), .out_mask(out_mask),
    .g(g));

  real  col_de   [NCOL][N];
  logic col_mask [NCOL][N];
  real  col_k    [NCOL];
  int   col_c    [NCOL];
  int   nin = 0, nout = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (nout >= nin || cycle != col_c[nout]) begin
        failures++;
        $display("FAIL: output at %0d unexpected", cycle);
      end else begin
        for (int j = 0; j < N; j++) begin
          real r, err;
          r = 65536.0 * $exp(-col_de[nout][j] * col_de[nout][j] * col_k[nout]);
          err = $itor(g[j]) - r;
          if (err < 0) err = -err;
          checks++;
          if (err > 3.0e-4 * r + 3.0 || out_mask[j] != col_mask[nout][j]) begin
            failures++;
            $display("FAIL: col %0d row %0d de=%f g=%0d ref=%f", nout, j, col_de[nout][j], g[j], r);
          end
        end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCOL; c++) begin
      @(negedge clk);
      if (c == NCOL / 2) begin
        // kscale is a setting: change it only while the pipeline is empty.
        in_valid = 1'b0;
        repeat (KERN_LAT + 1) @(negedge clk);
        kscale = 32'd8192;  // sigma = 2
      end
      for (int j = 0; j < N; j++) begin
        int r;
        r = $urandom_range(0, 9);
        de[j] = (r == 0) ? '0 :
                (r == 1) ? diff_t'(40'sd20 * 65536) :
                           diff_t'($signed($urandom_range(0, 2**19)) - 2**18);  // +-4.0
        in_mask[j] = 1'($urandom_range(0, 1));
        col_de[c][j] = $itor(de[j]) / 65536.0;
        col_mask[c][j] = in_mask[j];
      end
      col_k[c] = $itor(kscale) / 65536.0;
      col_c[c] = cycle + int'(KERN_LAT);
      nin = c + 1;
      in_valid = 1'b1;
      if (c % 11 == 3) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != NCOL) begin
      failures++;
      $display("FAIL: %0d columns out of %0d", nout, NCOL);
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
