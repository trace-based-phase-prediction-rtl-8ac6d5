// tb_core_model: a strace_controller with a behavioural two-backend core
// around it, for a given minimum super-trace length. Used by
// tb_strace_granularity to run the controller at several lengths.
//
// The program has six code regions; each is a loop nest of four equal
// pieces ending in backward branches, sized so that the fourth backedge
// closes the super-trace (piece = ceil(MIN_LEN/4) instructions). The last
// backedge jumps to a dispatcher whose PC[4:2] names the next region.
// Regions follow a repeating order with 8% random deviations. Costs scale
// with the length: regions 0 and 1 cost about the same on both backends,
// regions 2 and 3 are far slower on Little. Reported through the ports:
// checks and failures of ID/length, prediction accuracy (>= 75%),
// placement in the second half of the run (regions 0 and 1 together mostly
// on Little; regions 2 and 3 together on Big at least 85% of the time, the
// rest coming from the 8% random deviations the predictor cannot foresee)
// and total loss (<= 6%).
module tb_core_model
  import stp_pkg::*;
#(
  parameter int unsigned MIN_LEN = 300,
  parameter int          NTRACE  = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NKIND = 6;
  localparam int PIECE = (MIN_LEN + 3) / 4;
  localparam int LEN   = 4 * PIECE;

  logic               rst_n = 0;
  logic [1:0]         ret_count = 0;
  logic               br_valid = 0;
  logic [PC_W-1:0]    br_pc = '0, br_target = '0;
  logic               sample_valid = 0;
  perf_sample_t       sample;
  regr_coef_t         coef_b2l, coef_l2b;
  logic               ready, st_valid, pred_valid, pred_hit, switch_req;
  strace_id_t         st_id, pred_id;
  logic [19:0]        st_len;
  backend_e           backend_sel;
  logic [CYC_W-1:0]   threshold;
  logic signed [31:0] slack;
  logic evt_backedge, evt_pred_correct, evt_succ_replace, evt_succ_demote;
  logic evt_train_little, evt_train_big;

  strace_controller #(.MIN_LEN(MIN_LEN)) dut (.*);

  int big_per_k  [NKIND] = '{750, 650, 625, 720, 690, 810};   // cycles per 1000 instructions
  int diff_per_k [NKIND] = '{12, 25, 375, 500, 75, 190};
  int pattern    [8]     = '{0, 2, 1, 3, 4, 0, 5, 1};
  int late_little [NKIND];
  int late_runs   [NKIND];
  longint sum_big = 0, sum_actual = 0;
  int n_hit = 0, n_ok = 0;
  int exp_kind_q [$];
  int next_kind_q [$];

  function automatic logic [PC_W-1:0] be_pc_of(input int kind, input int seg);
    return PC_W'(32'h1000 * (kind + 1) + 32'h100 + 32'h44 * seg + 4 * kind);
  endfunction

  function automatic strace_id_t ref_id(input int kind);
    logic [PC_W-1:0] p [NUM_BE];
    for (int k = 0; k < NUM_BE; k++) p[k] = '0;
    for (int s = 0; s < 4; s++) p[3 - s] = be_pc_of(kind, s);
    return p[0][10:2] ^ {p[2][4:2], p[1][7:2]} ^ {p[5][4:2], p[4][4:2], p[3][4:2]}
         ^ {p[8][4:2], p[7][4:2], p[6][4:2]} ^ {p[11][4:2], p[10][4:2], p[9][4:2]};
  endfunction

  task automatic retire_piece(input int n, input logic [PC_W-1:0] pc, input logic [PC_W-1:0] tgt);
    int left;
    int c;
    left = n;
    while (left > 0) begin
      c = $urandom_range(1, 3);
      if (c > left) c = left;
      left -= c;
      ret_count = 2'(c);
      br_valid  = (left == 0);
      br_pc     = pc;
      br_target = tgt;
      @(posedge clk); #1;
    end
    ret_count = 0; br_valid = 0;
  endtask

  always @(posedge clk) begin
    #1;
    if (rst_n && st_valid) begin
      int k;
      k = exp_kind_q.pop_front();
      checks++;
      if (st_id != ref_id(k) || st_len != 20'(LEN)) begin
        failures++;
        $display("FAIL [MIN_LEN %0d] kind %0d id %h/%h len %0d/%0d", MIN_LEN, k, st_id, ref_id(k), st_len, LEN);
      end
    end
    if (rst_n && pred_valid) begin
      int nk;
      nk = next_kind_q.pop_front();
      if (pred_hit) begin n_hit++; if (pred_id == ref_id(nk)) n_ok++; end
    end
  end

  initial begin
    int kind, next, cb, cl;
    backend_e ran;
    done = 0; checks = 0; failures = 0;
    sample = '0;
    coef_b2l = '0; coef_l2b = '0;
    coef_b2l.coef[0] = 16'sd256;  coef_b2l.coef[5] = 16'sd512;
    coef_l2b.coef[0] = 16'sd256;  coef_l2b.coef[5] = -16'sd512;
    for (int k = 0; k < NKIND; k++) begin late_little[k] = 0; late_runs[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (!ready) begin @(posedge clk); #1; end
    kind = 0;
    for (int t = 0; t < NTRACE; t++) begin
      next = pattern[(t + 1) % 8];
      if ($urandom_range(0, 99) < 8) next = $urandom_range(0, NKIND - 1);
      ran = backend_sel;
      exp_kind_q.push_back(kind);
      next_kind_q.push_back(next);
      for (int s = 0; s < 3; s++) retire_piece(PIECE, be_pc_of(kind, s), be_pc_of(kind, s) - 32'h80);
      retire_piece(PIECE, be_pc_of(kind, 3), PC_W'(32'h100 + 4 * next));
      repeat (8) begin @(posedge clk); #1; end
      cb = big_per_k[kind] * LEN / 1000;
      cl = cb + 2 * (diff_per_k[kind] * LEN / 2000);
      sample.ran_on    = ran;
      sample.cycles    = CYC_W'(ran == BACKEND_BIG ? cb : cl);
      sample.metric    = '0;
      sample.metric[0] = METRIC_W'(LEN);
      sample.metric[4] = METRIC_W'(diff_per_k[kind] * LEN / 2000);
      sample_valid = 1;
      @(posedge clk); #1;
      sample_valid = 0;
      sum_big    += longint'(cb);
      sum_actual += (ran == BACKEND_BIG) ? longint'(cb) : longint'(cl);
      if (t >= NTRACE / 2) begin
        late_runs[kind]++;
        if (ran == BACKEND_LITTLE) late_little[kind]++;
      end
      kind = next;
    end
    repeat (20) @(posedge clk);
    #1;
    $display("[MIN_LEN %0d] %0d super-traces of %0d instructions: predictions %0d/%0d correct, loss %0.2f%%",
             MIN_LEN, NTRACE, LEN, n_ok, n_hit, 100.0 * real'(sum_actual - sum_big) / real'(sum_big));
    for (int k = 0; k < 4; k++)
      $display("[MIN_LEN %0d]   region %0d on Little %0d/%0d in the second half", MIN_LEN, k,
               late_little[k], late_runs[k]);
    checks++;
    if (n_hit == 0 || n_ok * 100 < 75 * n_hit) begin failures++; $display("FAIL [MIN_LEN %0d] accuracy", MIN_LEN); end
    checks++;
    if ((late_little[0] + late_little[1]) * 2 < late_runs[0] + late_runs[1]) begin
      failures++; $display("FAIL [MIN_LEN %0d] memory-bound regions not on Little", MIN_LEN);
    end
    checks++;
    if ((late_little[2] + late_little[3]) * 100 > 15 * (late_runs[2] + late_runs[3])) begin
      failures++; $display("FAIL [MIN_LEN %0d] compute-bound regions on Little", MIN_LEN);
    end
    checks++;
    if (real'(sum_actual - sum_big) > 0.06 * real'(sum_big)) begin
      failures++; $display("FAIL [MIN_LEN %0d] loss above target", MIN_LEN);
    end
    done = 1;
  end
endmodule
