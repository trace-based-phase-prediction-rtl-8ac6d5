// backend_pht: per-super-trace backend predictor (Block 3 of the controller).
//
// A pattern history table of 2**ID_W two-bit saturating counters (512 at the
// default 9-bit ID), indexed by super-trace ID. A counter of 2 or 3 steers
// the super-trace to the Little backend, 0 or 1 to Big. The feedback path
// trains the counter of a finished super-trace up (toward Little) when its
// performance loss on Little was below the current threshold, and down
// (toward Big) otherwise. The single-level table of 2-bit counters follows
// the design description; the counter encoding, the weakly-Big start value
// and the read latency are this implementation's choices.
//
// Interface and timing: after reset every counter is set to 1 (weakly Big),
// one per cycle, for 2**ID_W cycles (ready = 0); requests meanwhile are
// ignored. A lookup (rd_valid, rd_id) returns rd_backend with rd_resp one
// cycle later. A training request (wr_valid, wr_id, wr_little) is a
// read-modify-write completed in its own cycle; when a lookup hits the same
// row in that cycle it sees the value before training.
module backend_pht
  import stp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       ready,
  input  logic       rd_valid,
  input  strace_id_t rd_id,
  output logic       rd_resp,
  output backend_e   rd_backend,
  output logic [1:0] rd_counter,
  input  logic       wr_valid,
  input  strace_id_t wr_id,
  input  logic       wr_little   // 1: train toward Little, 0: toward Big
);

  localparam int unsigned ROWS = 1 << ID_W;

  logic [1:0] pht_q [ROWS];
  logic       init_q;
  strace_id_t init_idx;
  logic [1:0] cur, nxt;

  always_comb begin
    cur = pht_q[wr_id];
    nxt = cur;
    if (wr_little) begin
      if (cur != 2'd3) nxt = cur + 2'd1;
    end else begin
      if (cur != 2'd0) nxt = cur - 2'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (init_q)        pht_q[init_idx] <= 2'd1;
    else if (wr_valid) pht_q[wr_id]    <= nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q     <= 1'b1;
      init_idx   <= '0;
      rd_resp    <= 1'b0;
      rd_backend <= BACKEND_BIG;
      rd_counter <= '0;
    end else begin
      if (init_q) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == strace_id_t'(ROWS - 1)) init_q <= 1'b0;
      end
      rd_resp <= rd_valid && !init_q;
      if (rd_valid && !init_q) begin
        rd_counter <= pht_q[rd_id];
        rd_backend <= pht_q[rd_id][1] ? BACKEND_LITTLE : BACKEND_BIG;
      end
    end
  end

  assign ready = !init_q;

endmodule
