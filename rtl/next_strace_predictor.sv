// next_strace_predictor: predicts which super-trace follows the one that
// just closed (Block 2 of the controller).
//
// A 2**ID_W-row table (512 rows at the default 9-bit ID) is indexed by the
// ID of the super-trace that just closed. Each row holds two candidate
// successors, each a 9-bit ID, a 3-bit head tag (PC[4:2] of the
// successor's first instruction) and a 2-bit confidence counter: 28 bits
// per row. Because the closing backedge's target is already known, its
// head tag selects between the two candidates; when both match, the one
// with the higher confidence wins (way 0 on a tie). When neither matches
// there is no prediction (pred_hit = 0).
//
// Training: when the next super-trace closes, its real ID is compared with
// the successors stored in the row of its predecessor under the tag that
// was used. A matching successor has its confidence raised by one
// (saturating). Otherwise the successor with the lower confidence (way 0 on
// a tie) is demoted by one, or, if its confidence is already zero, it is
// deleted and the real successor written in its place with confidence 1.
// Table layout, tag use, the 2-bit counters and "demote, or delete at zero"
// follow the design description; the tie-breaking, the confidence given to
// a new successor and the no-prediction-on-tag-miss policy are this
// implementation's choices.
//
// Timing and interface: after reset the table is cleared row by row
// (2**ID_W cycles, ready = 0); closings reported meanwhile are ignored. A
// closing (st_valid with st_id and st_head) is handled in four cycles:
// read the predecessor row, write it back trained, read the row of st_id,
// present the prediction. pred_valid pulses in the fourth cycle after
// st_valid with pred_hit and pred_id. The upd_* outputs pulse in the
// second cycle, describing the training step. Closings must be at least
// four cycles apart (super-traces are hundreds of instructions long). The
// table has one read and one write port and a registered read, so it maps
// onto a plain two-port RAM.
module next_strace_predictor
  import stp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        st_valid,
  input  strace_id_t  st_id,
  input  head_tag_t   st_head,
  output logic        ready,
  output logic        pred_valid,
  output logic        pred_hit,
  output strace_id_t  pred_id,
  output logic        upd_valid,     // a training step was done
  output logic        upd_correct,   // the previous prediction was right
  output logic        upd_replace,   // a successor was deleted and replaced
  output logic        upd_demote     // a successor was demoted
);

  localparam int unsigned ROWS = 1 << ID_W;
  localparam logic [CONF_W-1:0] CONF_MAX = '1;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_UPD_RD, S_UPD_WR, S_LK_RD, S_LK} state_e;

  succ_row_t  table_q [ROWS];
  state_e     state;
  strace_id_t init_idx;

  // read port
  logic       rd_en;
  strace_id_t rd_addr;
  succ_row_t  rd_data;
  // write port
  logic       wr_en;
  strace_id_t wr_addr;
  succ_row_t  wr_data;

  // closing being processed and the history needed to train
  strace_id_t cur_id;
  head_tag_t  cur_head;
  logic       prev_valid;
  strace_id_t prev_id;
  head_tag_t  prev_head;
  logic       prev_hit;
  strace_id_t prev_pred;

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_addr] <= wr_data;
    if (rd_en) rd_data <= table_q[rd_addr];
  end

  // ---- training of the predecessor row -------------------------------------
  succ_row_t trained;
  logic      t_match0, t_match1, t_victim1;
  logic      t_correct, t_replace, t_demote;

  always_comb begin
    trained   = rd_data;
    t_match0  = (rd_data.way0.id == cur_id) && (rd_data.way0.head == prev_head);
    t_match1  = (rd_data.way1.id == cur_id) && (rd_data.way1.head == prev_head);
    t_victim1 = rd_data.way1.conf < rd_data.way0.conf;
    t_correct = prev_hit && (prev_pred == cur_id);
    t_replace = 1'b0;
    t_demote  = 1'b0;
    if (t_match0) begin
      if (rd_data.way0.conf != CONF_MAX) trained.way0.conf = rd_data.way0.conf + 1'b1;
    end else if (t_match1) begin
      if (rd_data.way1.conf != CONF_MAX) trained.way1.conf = rd_data.way1.conf + 1'b1;
    end else if (t_victim1) begin
      if (rd_data.way1.conf == '0) begin
        trained.way1 = '{id: cur_id, head: prev_head, conf: CONF_W'(1)};
        t_replace    = 1'b1;
      end else begin
        trained.way1.conf = rd_data.way1.conf - 1'b1;
        t_demote          = 1'b1;
      end
    end else begin
      if (rd_data.way0.conf == '0) begin
        trained.way0 = '{id: cur_id, head: prev_head, conf: CONF_W'(1)};
        t_replace    = 1'b1;
      end else begin
        trained.way0.conf = rd_data.way0.conf - 1'b1;
        t_demote          = 1'b1;
      end
    end
  end

  // ---- lookup ----------------------------------------------------------------
  logic       l_m0, l_m1, l_hit;
  strace_id_t l_id;

  always_comb begin
    l_m0  = rd_data.way0.head == cur_head;
    l_m1  = rd_data.way1.head == cur_head;
    l_hit = l_m0 || l_m1;
    if (l_m0 && l_m1)
      l_id = (rd_data.way1.conf > rd_data.way0.conf) ? rd_data.way1.id : rd_data.way0.id;
    else if (l_m1)
      l_id = rd_data.way1.id;
    else
      l_id = rd_data.way0.id;
  end

  // ---- port control ------------------------------------------------------------
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = cur_id;
    wr_en   = 1'b0;
    wr_addr = prev_id;
    wr_data = trained;
    unique case (state)
      S_INIT: begin
        wr_en   = 1'b1;
        wr_addr = init_idx;
        wr_data = '0;
      end
      S_IDLE: ;
      S_UPD_RD: begin
        rd_en   = 1'b1;
        rd_addr = prev_id;
      end
      S_UPD_WR: wr_en = prev_valid;
      S_LK_RD: begin
        rd_en   = 1'b1;
        rd_addr = cur_id;
      end
      S_LK: ;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      init_idx    <= '0;
      cur_id      <= '0;
      cur_head    <= '0;
      prev_valid  <= 1'b0;
      prev_id     <= '0;
      prev_head   <= '0;
      prev_hit    <= 1'b0;
      prev_pred   <= '0;
      pred_valid  <= 1'b0;
      pred_hit    <= 1'b0;
      pred_id     <= '0;
      upd_valid   <= 1'b0;
      upd_correct <= 1'b0;
      upd_replace <= 1'b0;
      upd_demote  <= 1'b0;
    end else begin
      // a closing may only arrive while the previous one is finished
      if (st_valid && ready)
        a_no_overlap: assert (state == S_IDLE)
          else $error("super-trace closing while the previous one is in progress");
      pred_valid  <= 1'b0;
      upd_valid   <= 1'b0;
      upd_correct <= 1'b0;
      upd_replace <= 1'b0;
      upd_demote  <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == strace_id_t'(ROWS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (st_valid) begin
            cur_id   <= st_id;
            cur_head <= st_head;
            state    <= S_UPD_RD;
          end
        end
        S_UPD_RD: state <= S_UPD_WR;
        S_UPD_WR: begin
          upd_valid   <= prev_valid;
          upd_correct <= prev_valid && t_correct;
          upd_replace <= prev_valid && t_replace;
          upd_demote  <= prev_valid && t_demote;
          state       <= S_LK_RD;
        end
        S_LK_RD: state <= S_LK;
        S_LK: begin
          pred_valid <= 1'b1;
          pred_hit   <= l_hit;
          pred_id    <= l_id;
          prev_valid <= 1'b1;
          prev_id    <= cur_id;
          prev_head  <= cur_head;
          prev_hit   <= l_hit;
          prev_pred  <= l_id;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state != S_INIT);

endmodule
