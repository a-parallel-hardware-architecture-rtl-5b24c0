// mee_af: one MEE adaptive filter (adaptive FIR + MEE cost function + window control).
//
// The filter adapts in batches: it accepts a window of N samples (x, d), one per clock when
// the source keeps in_valid high, filters them with the current weights, streams the N errors
// and input vectors into the cost function, and when the cost function returns new weights it
// loads them into the FIR. While the window drains through the pipelines the weights must not
// change, so in_ready is low from the N-th sample until the update is loaded: that is the
// feedback loop of the filter, closed once per window. Each window is one iteration.
//
// Handshake: a sample is taken when in_valid && in_ready. in_valid may drop inside a window
// (a bubble; the window simply takes longer). The FIR delay line carries the last L-1 samples
// over from one window into the next, so a continuous input stream gives every input vector
// its full history.
//
// Timing: with in_valid always high an iteration takes N + FIR_LAT + PD_LAT + KERN_LAT +
// ACC_LAT + WU_LAT = N + 14 clock cycles: the edge that loads the new weights also raises
// in_ready, and the next window's first sample is taken on the following edge. upd_valid is
// high for the cycle after the load; w shows the FIR's current weights and iter counts
// updates. e_valid/e_out expose the error stream.
//
// kscale = 1/(2 sigma^2) in Q16.16; mu is the integer step size described in weight_update.
// The window control (state machine and counters) is this design's own; the architecture
// only says that the weights are fed back and updated once per window.
module mee_af
  import mee_pkg::*;
#(
  parameter int unsigned N        = 100,  // window size
  parameter int unsigned L        = 10,   // filter order
  parameter int unsigned MU_SHIFT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  sample_t     x_in,
  input  sample_t     d_in,
  input  logic [31:0] kscale,
  input  logic [31:0] mu,
  output weight_t     w [L],
  output logic        upd_valid,
  output logic [31:0] iter,
  output logic        e_valid,
  output sample_t     e_out
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [0:0] {S_ACCEPT, S_UPDATE} state_t;
  state_t        state;
  logic [CW-1:0] cnt;
  logic          take;
  assign in_ready = (state == S_ACCEPT);
  assign take     = in_valid && in_ready;

  // Window control.
  logic    cost_w_valid;
  weight_t cost_w_new [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACCEPT;
      cnt   <= '0;
      iter  <= '0;
      upd_valid <= 1'b0;
    end else begin
      upd_valid <= 1'b0;
      case (state)
        S_ACCEPT:
          if (take) begin
            if (32'(cnt) == N - 1) begin
              cnt   <= '0;
              state <= S_UPDATE;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        S_UPDATE:
          if (cost_w_valid) begin
            upd_valid <= 1'b1;
            iter      <= iter + 1;
            state     <= S_ACCEPT;
          end
        default: state <= S_ACCEPT;
      endcase
    end
  end

  // Adaptive FIR.
  sample_t fir_xvec [L];
  logic    fir_first;

  fir_filter #(.L(L)) u_fir (
    .clk(clk), .rst_n(rst_n),
    .in_valid(take), .x_in(x_in), .d_in(d_in),
    .w_load(state == S_UPDATE && cost_w_valid), .w_new(cost_w_new), .w(w),
    .out_valid(e_valid), .out_e(e_out), .out_xvec(fir_xvec));

  pipe_delay #(.WIDTH(1), .DEPTH(FIR_LAT)) u_first_dly (
    .clk(clk), .rst_n(rst_n), .d(take && cnt == '0), .q(fir_first));

  // MEE cost function.
  mee_cost #(.N(N), .L(L), .MU_SHIFT(MU_SHIFT)) u_cost (
    .clk(clk), .rst_n(rst_n),
    .in_valid(e_valid), .in_first(fir_first), .in_e(e_out), .in_xvec(fir_xvec),
    .kscale(kscale), .mu(mu), .w_cur(w),
    .w_valid(cost_w_valid), .w_new(cost_w_new));

  // New weights arrive only while a window is being closed.
  assert property (@(posedge clk) disable iff (!rst_n) cost_w_valid |-> state == S_UPDATE);

endmodule
