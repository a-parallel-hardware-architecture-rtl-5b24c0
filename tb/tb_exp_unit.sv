// tb_exp_unit: checks exp_unit against the real-valued exponential.
//
// Random arguments in [0, 20) plus the edge cases 0 and the largest input are streamed one
// per clock. Each output is compared with 65536*exp(-u) (tolerance 3e-4 relative plus 2 LSB)
// and must appear exactly EXP_LAT cycles after its input.
module tb_exp_unit;
  import mee_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        in_valid = 1'b0;
  logic [31:0] u = '0;
  logic        out_valid;
  kern_t       y;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u(u),
                .out_valid(out_valid), .y(y));

  localparam int NV = 400;
  logic [31:0] vec [NV];
  int          sent_cycle [NV];
  int          cycle = 0, nout = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1 rst_n = 1'b0;
    for (int i = 0; i < NV; i++) vec[i] = $urandom_range(0, 20 * 65536 - 1);
    vec[0] = 0;
    vec[1] = 32'hFFFF_FFFF;
    vec[2] = 32'd65536;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      in_valid <= 1'b1;
      u <= vec[i];
      sent_cycle[i] = cycle + 1;  // the edge that samples this input
      @(posedge clk);
      // Insert an idle cycle now and then.
      if (i % 37 == 5) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NV) begin
      failures++;
      $display("FAIL: %0d outputs for %0d inputs", nout, NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && nout < NV) begin
      real ref_v, err;
      ref_v = 65536.0 * $exp(-$itor(vec[nout]) / 65536.0);
      err = $itor(y) - ref_v;
      if (err < 0) err = -err;
      checks++;
      if (err > 3.0e-4 * ref_v + 2.0) begin
        failures++;
        $display("FAIL: u=%0d y=%0d ref=%f", vec[nout], y, ref_v);
      end
      checks++;
      if (cycle - sent_cycle[nout] != int'(EXP_LAT)) begin
        failures++;
        $display("FAIL: latency %0d", cycle - sent_cycle[nout]);
      end
      nout <= nout + 1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
