// perf_monitor: the threshold controller of the feedback path (Performance
// Monitor). It turns the distance between the performance achieved and the
// performance target into the per-super-trace loss threshold below which
// running on Little is currently affordable.
//
// For every finished super-trace it receives the loss it was allowed
// (target_loss, a fixed percentage of its Big-only cycles) and the loss it
// actually suffered (actual_loss, zero when it ran on Big). The error
// e = target_loss - actual_loss is accumulated into slack, the cycles still
// in hand against the target since reset. A proportional-integral law sets
//   threshold = (e >>> KP_SHIFT) + (slack >>> KI_SHIFT),
// clamped to [0, 2**CYC_W-1]. Running ahead of the target raises the
// threshold and sends more super-traces to Little; falling behind lowers it.
// A PI loop steering the threshold from the proximity to the target
// follows the design description; the gains are not published, so the
// power-of-two gains, the widths and the saturating slack register are this
// implementation's choices.
//
// Timing: upd_valid is sampled on a clock edge; threshold and slack take
// their new values at that edge. Until the first update the threshold is
// THR_INIT.
module perf_monitor
  import stp_pkg::*;
#(
  parameter int unsigned KP_SHIFT = 0,   // Kp = 2**-KP_SHIFT
  parameter int unsigned KI_SHIFT = 3,   // Ki = 2**-KI_SHIFT
  parameter int unsigned SLACK_W  = 32,
  parameter int unsigned THR_INIT = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      upd_valid,
  input  logic [CYC_W-1:0]          target_loss,
  input  logic signed [CYC_W:0]     actual_loss,
  output logic [CYC_W-1:0]          threshold,
  output logic signed [SLACK_W-1:0] slack
);

  localparam logic signed [SLACK_W:0] SL_MAX = (SLACK_W+1)'((64'sd1 <<< (SLACK_W-1)) - 1);
  localparam logic signed [SLACK_W:0] SL_MIN = -(SLACK_W+1)'(64'sd1 <<< (SLACK_W-1));

  logic signed [CYC_W+1:0]  err;
  logic signed [SLACK_W:0]  slack_wide;
  logic signed [SLACK_W-1:0] slack_n;
  logic signed [SLACK_W+1:0] thr_wide;

  always_comb begin
    err        = $signed({2'b00, target_loss}) - (CYC_W+2)'(actual_loss);
    slack_wide = (SLACK_W+1)'(slack) + (SLACK_W+1)'(err);
    if (slack_wide > SL_MAX)      slack_n = SL_MAX[SLACK_W-1:0];
    else if (slack_wide < SL_MIN) slack_n = SL_MIN[SLACK_W-1:0];
    else                          slack_n = slack_wide[SLACK_W-1:0];
    thr_wide = (SLACK_W+2)'(err >>> KP_SHIFT) + (SLACK_W+2)'(slack_n >>> KI_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slack     <= '0;
      threshold <= CYC_W'(THR_INIT);
    end else if (upd_valid) begin
      slack <= slack_n;
      if (thr_wide < 0)
        threshold <= '0;
      else if (thr_wide > (SLACK_W+2)'({CYC_W{1'b1}}))
        threshold <= '1;
      else
        threshold <= thr_wide[CYC_W-1:0];
    end
  end

endmodule
