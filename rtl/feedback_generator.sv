// feedback_generator: closes the learning loop of the controller (Block 4).
//
// When a super-trace closes, its ID is held in the previous-ID register.
// The core then reports the super-trace's performance counters; the
// perf_diff_estimator works out its local loss (Little minus Big cycles,
// one side observed and the other estimated) and its allowed loss, and the
// comparator checks local loss < threshold. The result trains the
// backend PHT entry of the held ID: toward Little when the super-trace is
// cheap enough on Little, toward Big otherwise. In the same cycle the
// perf_monitor folds the super-trace's allowed and actual loss into its
// slack and moves the threshold; the comparison uses the threshold from
// before that move. Blocks and connections follow the design's controller
// diagram; the ordering of compare and threshold update and the sample
// handshake are this implementation's choice.
//
// Interface and timing: st_valid/st_id mark the closing of a super-trace;
// its perf sample (sample_valid/sample) must come in the same cycle or
// later, and before the next closing. A sample without a preceding closing
// is dropped. pht_wr_valid pulses with pht_wr_id and pht_wr_little one
// cycle after the estimator's done: NUM_METRIC+3 clock edges (9 at the
// defaults) after the edge that accepts the sample; the threshold moves on
// the edge after that.
module feedback_generator
  import stp_pkg::*;
#(
  parameter int unsigned LOSS_PCT = 5,
  parameter int unsigned KP_SHIFT = 0,
  parameter int unsigned KI_SHIFT = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  st_valid,
  input  strace_id_t            st_id,
  input  logic                  sample_valid,
  input  perf_sample_t          sample,
  input  regr_coef_t            coef_b2l,
  input  regr_coef_t            coef_l2b,
  output logic                  pht_wr_valid,
  output strace_id_t            pht_wr_id,
  output logic                  pht_wr_little,
  output logic [CYC_W-1:0]      threshold,
  output logic signed [31:0]    slack,
  output logic signed [CYC_W:0] last_local_loss
);

  strace_id_t prev_id;
  logic       have_id;
  logic       est_busy, est_done;
  backend_e   est_ran_on;
  logic [CYC_W-1:0]      est_big, est_little, est_target;
  logic signed [CYC_W:0] est_local, est_actual;

  perf_diff_estimator #(.LOSS_PCT(LOSS_PCT)) u_est (
    .clk           (clk),
    .rst_n         (rst_n),
    .sample_valid  (sample_valid && (have_id || st_valid)),
    .sample        (sample),
    .coef_b2l      (coef_b2l),
    .coef_l2b      (coef_l2b),
    .busy          (est_busy),
    .done          (est_done),
    .ran_on        (est_ran_on),
    .big_cycles    (est_big),
    .little_cycles (est_little),
    .local_loss    (est_local),
    .actual_loss   (est_actual),
    .target_loss   (est_target)
  );

  perf_monitor #(.KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT), .SLACK_W(32)) u_mon (
    .clk         (clk),
    .rst_n       (rst_n),
    .upd_valid   (est_done),
    .target_loss (est_target),
    .actual_loss (est_actual),
    .threshold   (threshold),
    .slack       (slack)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_id         <= '0;
      have_id         <= 1'b0;
      pht_wr_valid    <= 1'b0;
      pht_wr_id       <= '0;
      pht_wr_little   <= 1'b0;
      last_local_loss <= '0;
    end else begin
      // the estimator must be free when a sample arrives
      if (sample_valid)
        a_sample_free: assert (!est_busy)
          else $error("perf sample while the estimator is busy");
      pht_wr_valid <= 1'b0;
      if (st_valid) begin
        prev_id <= st_id;
        have_id <= !sample_valid;  // a same-cycle sample consumes it
      end else if (sample_valid) begin
        have_id <= 1'b0;
      end
      if (est_done) begin
        pht_wr_valid    <= 1'b1;
        pht_wr_id       <= prev_id;
        pht_wr_little   <= est_local < $signed({1'b0, threshold});
        last_local_loss <= est_local;
      end
    end
  end

  // unused estimator outputs are part of its interface
  logic unused;
  assign unused = ^{est_big, est_little, est_ran_on};

endmodule
