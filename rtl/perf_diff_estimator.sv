// perf_diff_estimator: estimates what a finished super-trace would have
// cost on the backend it did not run on, and derives its performance loss
// (the Performance Difference Estimator of the feedback path).
//
// The estimate is a linear regression: est = bias + sum(coef[k] * x[k]),
// where x[0] is the observed cycle count and x[1..NUM_METRIC] are the
// per-super-trace metric counters (instructions, cache misses, branch
// mispredicts, ILP and MLP estimates). Two coefficient sets are supplied as
// configuration inputs: coef_b2l estimates Little cycles from a Big run,
// coef_l2b Big cycles from a Little run. Coefficients are signed Q8.8; the
// sum is rounded down to whole cycles and clamped to [0, 2**CYC_W-1].
// Outputs: Big-only cycles (observed or estimated), Little cycles, the local
// loss little - big (signed, cycles), the loss actually suffered
// (local loss when the super-trace ran on Little, 0 on Big) and the target
// loss, LOSS_PCT percent of the Big-only cycles. That a linear model over
// such metrics with precomputed multipliers is used follows the design
// description; its coefficients are not published and are therefore
// inputs, and the exact metric set, number format and serial evaluation are
// this implementation's choice.
//
// Timing: one multiply-accumulate per cycle. A sample is accepted on the
// clock edge that sees sample_valid while busy = 0; the results appear with
// a one-cycle done pulse NUM_METRIC+2 edges later (8 at the defaults) and
// are held until the next sample.
module perf_diff_estimator
  import stp_pkg::*;
#(
  parameter int unsigned LOSS_PCT = 5   // allowed performance loss, percent
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample_valid,
  input  perf_sample_t             sample,
  input  regr_coef_t               coef_b2l,
  input  regr_coef_t               coef_l2b,
  output logic                     busy,
  output logic                     done,
  output backend_e                 ran_on,
  output logic [CYC_W-1:0]         big_cycles,
  output logic [CYC_W-1:0]         little_cycles,
  output logic signed [CYC_W:0]    local_loss,
  output logic signed [CYC_W:0]    actual_loss,
  output logic [CYC_W-1:0]         target_loss
);

  localparam int unsigned NTERM = NUM_METRIC + 1;
  localparam int unsigned ACC_W = CYC_W + COEF_W + 8;
  localparam int unsigned IDX_W = $clog2(NTERM + 1);

  perf_sample_t             smp;
  logic [NTERM-1:0][COEF_W-1:0] cf;   // coefficients of the running estimate
  logic [IDX_W-1:0]         idx;
  logic signed [ACC_W-1:0]  acc;
  logic                     finish;

  logic [CYC_W-1:0]         x_term;
  logic signed [COEF_W-1:0] c_term;
  logic signed [ACC_W-1:0]  prod;
  logic signed [ACC_W-1:0]  est_full;
  logic [CYC_W-1:0]         est;

  always_comb begin
    x_term = smp.cycles;
    for (int k = 1; k < NTERM; k++)
      if (idx == IDX_W'(k)) x_term = CYC_W'(smp.metric[k-1]);
    c_term = cf[0];
    for (int k = 1; k < NTERM; k++)
      if (idx == IDX_W'(k)) c_term = cf[k];
    prod = ACC_W'($signed({1'b0, x_term}) * c_term);

    est_full = acc >>> 8;
    if (est_full < 0)
      est = '0;
    else if (est_full > ACC_W'({CYC_W{1'b1}}))
      est = '1;
    else
      est = est_full[CYC_W-1:0];
  end

  logic [CYC_W-1:0] big_n, little_n;
  always_comb begin
    if (smp.ran_on == BACKEND_BIG) begin
      big_n    = smp.cycles;
      little_n = est;
    end else begin
      big_n    = est;
      little_n = smp.cycles;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp           <= '0;
      cf            <= '0;
      idx           <= '0;
      acc           <= '0;
      busy          <= 1'b0;
      finish        <= 1'b0;
      done          <= 1'b0;
      ran_on        <= BACKEND_BIG;
      big_cycles    <= '0;
      little_cycles <= '0;
      local_loss    <= '0;
      actual_loss   <= '0;
      target_loss   <= '0;
    end else begin
      done   <= 1'b0;
      finish <= 1'b0;
      if (!busy) begin
        if (sample_valid) begin
          smp  <= sample;
          cf   <= (sample.ran_on == BACKEND_BIG) ? coef_b2l.coef : coef_l2b.coef;
          acc  <= ACC_W'((sample.ran_on == BACKEND_BIG) ? coef_b2l.bias : coef_l2b.bias) <<< 8;
          idx  <= '0;
          busy <= 1'b1;
        end
      end else if (!finish) begin
        acc <= acc + prod;
        idx <= idx + 1'b1;
        if (idx == IDX_W'(NTERM - 1)) finish <= 1'b1;
      end else begin
        busy          <= 1'b0;
        done          <= 1'b1;
        ran_on        <= smp.ran_on;
        big_cycles    <= big_n;
        little_cycles <= little_n;
        local_loss    <= $signed({1'b0, little_n}) - $signed({1'b0, big_n});
        actual_loss   <= (smp.ran_on == BACKEND_LITTLE)
                         ? $signed({1'b0, little_n}) - $signed({1'b0, big_n}) : '0;
        target_loss   <= CYC_W'((big_n * LOSS_PCT) / 100);
      end
    end
  end

endmodule
