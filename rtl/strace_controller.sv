// strace_controller: predictive super-trace switching controller for a
// core with two tightly coupled backends, Big (out-of-order) and Little
// (in-order), that share frontend and caches.
//
// Instead of assuming that the next interval behaves like the last one,
// the controller learns recurring code sequences and predicts, one
// super-trace ahead, which backend the coming code should run on:
//   1. strace_index_gen cuts the retired stream at backedges into
//      super-traces of at least MIN_LEN instructions and hashes the last
//      12 backedge PCs of each into a 9-bit ID.
//   2. next_strace_predictor, indexed by that ID and tagged by the head PC
//      of the next super-trace, predicts the ID of the next super-trace.
//   3. backend_pht, a table of 2-bit counters indexed by the predicted ID,
//      says Big or Little for it; a change of backend is requested from the
//      core (switch_req) and held on backend_sel.
//   4. feedback_generator estimates each finished super-trace's loss on
//      Little with a linear regression model, compares it with a threshold
//      that a PI loop keeps in line with the 5% loss target, and trains the
//      PHT entry of that super-trace.
// The block structure follows the design description. On a tag miss in
// step 2 the current backend is kept; that and the handshakes are this
// implementation's choices.
//
// Interface: the core reports retired instructions (ret_count) and taken
// control transfers (br_valid, br_pc, br_target), and after each closing
// (st_valid, st_id) returns the super-trace's perf counters through
// sample_valid/sample, at the latest before the next closing. The
// regression coefficients are configuration inputs. The evt_* outputs are
// one-cycle event pulses for performance counters.
//
// Timing: st_valid is high in the cycle after the closing backedge
// retires; pred_valid follows four clock edges later and backend_sel /
// switch_req two edges after that, seven edges after the closing backedge.
// The core is expected to drain for that long (a backedge is a natural
// switch point, as a mispredicted one flushes the pipeline anyway).
// The tables are cleared for 512 cycles after reset (ready = 0).
module strace_controller
  import stp_pkg::*;
#(
  parameter int unsigned MIN_LEN  = 300,
  parameter int unsigned LOSS_PCT = 5,
  parameter int unsigned KP_SHIFT = 0,
  parameter int unsigned KI_SHIFT = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  // retire stream from the core
  input  logic [1:0]         ret_count,
  input  logic               br_valid,
  input  logic [PC_W-1:0]    br_pc,
  input  logic [PC_W-1:0]    br_target,
  // performance counters of the super-trace that just closed
  input  logic               sample_valid,
  input  perf_sample_t       sample,
  // regression model coefficients
  input  regr_coef_t         coef_b2l,
  input  regr_coef_t         coef_l2b,
  // to the core
  output logic               ready,
  output logic               st_valid,
  output strace_id_t         st_id,
  output logic [19:0]        st_len,
  output backend_e           backend_sel,
  output logic               switch_req,
  // prediction and feedback state
  output logic               pred_valid,
  output logic               pred_hit,
  output strace_id_t         pred_id,
  output logic [CYC_W-1:0]   threshold,
  output logic signed [31:0] slack,
  // event pulses
  output logic               evt_backedge,
  output logic               evt_pred_correct,
  output logic               evt_succ_replace,
  output logic               evt_succ_demote,
  output logic               evt_train_little,
  output logic               evt_train_big
);

  head_tag_t  st_head;
  logic       nsp_ready, pht_ready;
  logic       upd_valid;
  logic       pht_resp;
  backend_e   pht_backend;
  logic [1:0] pht_counter;
  logic       wr_valid, wr_little;
  strace_id_t wr_id;
  logic signed [CYC_W:0] last_loss;

  strace_index_gen #(.MIN_LEN(MIN_LEN), .LEN_W(20)) u_index (
    .clk       (clk),
    .rst_n     (rst_n),
    .ret_count (ret_count),
    .br_valid  (br_valid),
    .br_pc     (br_pc),
    .br_target (br_target),
    .be_seen   (evt_backedge),
    .st_valid  (st_valid),
    .st_id     (st_id),
    .st_head   (st_head),
    .st_len    (st_len)
  );

  next_strace_predictor u_next (
    .clk         (clk),
    .rst_n       (rst_n),
    .st_valid    (st_valid),
    .st_id       (st_id),
    .st_head     (st_head),
    .ready       (nsp_ready),
    .pred_valid  (pred_valid),
    .pred_hit    (pred_hit),
    .pred_id     (pred_id),
    .upd_valid   (upd_valid),
    .upd_correct (evt_pred_correct),
    .upd_replace (evt_succ_replace),
    .upd_demote  (evt_succ_demote)
  );

  backend_pht u_pht (
    .clk        (clk),
    .rst_n      (rst_n),
    .ready      (pht_ready),
    .rd_valid   (pred_valid && pred_hit),
    .rd_id      (pred_id),
    .rd_resp    (pht_resp),
    .rd_backend (pht_backend),
    .rd_counter (pht_counter),
    .wr_valid   (wr_valid),
    .wr_id      (wr_id),
    .wr_little  (wr_little)
  );

  feedback_generator #(
    .LOSS_PCT (LOSS_PCT),
    .KP_SHIFT (KP_SHIFT),
    .KI_SHIFT (KI_SHIFT)
  ) u_feedback (
    .clk             (clk),
    .rst_n           (rst_n),
    .st_valid        (st_valid),
    .st_id           (st_id),
    .sample_valid    (sample_valid),
    .sample          (sample),
    .coef_b2l        (coef_b2l),
    .coef_l2b        (coef_l2b),
    .pht_wr_valid    (wr_valid),
    .pht_wr_id       (wr_id),
    .pht_wr_little   (wr_little),
    .threshold       (threshold),
    .slack           (slack),
    .last_local_loss (last_loss)
  );

  assign evt_train_little = wr_valid && wr_little;
  assign evt_train_big    = wr_valid && !wr_little;
  assign ready            = nsp_ready && pht_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      backend_sel <= BACKEND_BIG;
      switch_req  <= 1'b0;
    end else begin
      switch_req <= 1'b0;
      if (pht_resp && pht_backend != backend_sel) begin
        backend_sel <= pht_backend;
        switch_req  <= 1'b1;
      end
    end
  end

  // observation-only signals of the sub-blocks
  logic unused;
  assign unused = ^{upd_valid, pht_counter, last_loss};

endmodule
