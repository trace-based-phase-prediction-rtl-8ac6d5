// End-to-end testbench for strace_controller at its default parameters
// (300-instruction super-traces, 9-bit IDs, 5% loss target).
//
// A behavioural stand-in for the two-backend core runs a synthetic program
// made of six code regions ("kinds"). Every kind is a loop nest of four
// 80-instruction pieces, each ended by a backward branch, with some forward
// branches in between; its last backward branch jumps to a dispatcher whose
// address (and so PC[4:2]) names the kind that follows. Kinds follow a
// repeating order with 8% random deviations. Each kind has a fixed cost on
// Big and a fixed extra cost on Little: kinds 0 and 1 cost almost the same
// on both (memory-bound), kinds 2 and 3 are much slower on Little, kinds 4
// and 5 are in between. After each closing the model spends a short drain
// (no retirement) so the controller's decision applies to the next
// super-trace, then reports the finished super-trace's counters.
//
// Checked: every super-trace ID and length against a reference hash;
// switch_req against changes of backend_sel; next-super-trace prediction
// accuracy; that memory-bound kinds end up mostly on Little and
// compute-bound kinds on Big; that the accumulated loss stays near the 5%
// target. Every mechanism (backedge, forward branch, closing, prediction
// hit and tag miss, correct prediction, successor demotion and replacement,
// PHT training both ways, switches both ways, threshold at zero) is counted
// and must have happened.
module tb_strace_controller;
  import stp_pkg::*;

  localparam int NKIND  = 6;
  localparam int NTRACE = 3000;

  logic               clk = 0, rst_n = 0;
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

  strace_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int big_cost  [NKIND] = '{240, 210, 200, 230, 220, 260};
  int diff_cost [NKIND] = '{4, 8, 120, 160, 24, 60};
  int pattern   [8]     = '{0, 2, 1, 3, 4, 0, 5, 1};
  int on_little [NKIND];
  int runs      [NKIND];
  int late_little [NKIND];
  int late_runs   [NKIND];
  longint sum_big = 0, sum_actual = 0;
  int n_backedge = 0, n_forward = 0, n_close = 0, n_hit = 0, n_miss = 0, n_pred_ok = 0;
  int n_correct_evt = 0, n_replace = 0, n_demote = 0, n_tr_little = 0, n_tr_big = 0;
  int n_sw_little = 0, n_sw_big = 0, n_thr_zero = 0, n_sw_pulse = 0;

  function automatic logic [PC_W-1:0] be_pc_of(input int kind, input int seg);
    return PC_W'(32'h1000 * (kind + 1) + 32'h100 + 32'h44 * seg + 4 * kind);
  endfunction

  function automatic strace_id_t ref_id(input int kind);
    // four backedges; most recent last. Unused slots are zero.
    logic [PC_W-1:0] p [NUM_BE];
    for (int k = 0; k < NUM_BE; k++) p[k] = '0;
    for (int s = 0; s < 4; s++) p[3 - s] = be_pc_of(kind, s);
    return p[0][10:2] ^ {p[2][4:2], p[1][7:2]} ^ {p[5][4:2], p[4][4:2], p[3][4:2]}
         ^ {p[8][4:2], p[7][4:2], p[6][4:2]} ^ {p[11][4:2], p[10][4:2], p[9][4:2]};
  endfunction

  // retire n instructions, the last one being a taken branch pc -> tgt
  task automatic retire_piece(input int n, input logic [PC_W-1:0] pc, input logic [PC_W-1:0] tgt,
                              input bit fwd);
    int left = n;
    int fwd_at = fwd ? $urandom_range(2, 10) : -1;
    int cyc = 0;
    while (left > 0) begin
      int c = $urandom_range(1, 3);
      if (c > left) c = left;
      left -= c;
      ret_count = 2'(c);
      br_valid  = 0;
      if (left == 0) begin
        br_valid = 1; br_pc = pc; br_target = tgt;
      end else if (cyc == fwd_at) begin
        br_valid = 1; br_pc = pc - 32'h20; br_target = pc - 32'h10;  // forward, inside the loop
        n_forward++;
      end
      @(posedge clk); #1;
      cyc++;
    end
    ret_count = 0; br_valid = 0;
  endtask

  // -------- observers --------------------------------------------------------
  int exp_kind_q [$];
  int next_kind_q [$];
  always @(posedge clk) if (rst_n) begin
    if (evt_backedge) n_backedge++;
    if (evt_pred_correct) n_correct_evt++;
    if (evt_succ_replace) n_replace++;
    if (evt_succ_demote) n_demote++;
    if (evt_train_little) n_tr_little++;
    if (evt_train_big) n_tr_big++;
    if (switch_req) n_sw_pulse++;
  end

  backend_e sel_q;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (switch_req != (backend_sel != sel_q)) begin
        failures++; $display("FAIL switch_req %0b without matching change", switch_req);
      end
      if (switch_req && backend_sel == BACKEND_LITTLE) n_sw_little++;
      if (switch_req && backend_sel == BACKEND_BIG) n_sw_big++;
      if (st_valid) begin
        int k;
        n_close++;
        k = exp_kind_q.pop_front();
        checks++;
        if (st_id != ref_id(k) || st_len != 20'd320) begin
          failures++;
          $display("FAIL closing kind %0d id %h/%h len %0d", k, st_id, ref_id(k), st_len);
        end
      end
      if (pred_valid) begin
        int nk;
        nk = next_kind_q.pop_front();
        if (pred_hit) begin
          n_hit++;
          if (pred_id == ref_id(nk)) n_pred_ok++;
        end else n_miss++;
      end
      if (threshold == '0 && n_close > 50) n_thr_zero++;
    end
    sel_q = backend_sel;
  end

  // -------- the program --------------------------------------------------------
  initial begin
    int kind, next;
    backend_e ran;
    int cyc_big, cyc_little;
    sample = '0;
    coef_b2l = '0; coef_l2b = '0;
    coef_b2l.coef[0] = 16'sd256;  coef_b2l.coef[5] = 16'sd512;   // little = big + 2*metric[4]
    coef_l2b.coef[0] = 16'sd256;  coef_l2b.coef[5] = -16'sd512;  // big = little - 2*metric[4]
    for (int k = 0; k < NKIND; k++) begin on_little[k] = 0; runs[k] = 0; late_little[k] = 0; late_runs[k] = 0; end
    sel_q = BACKEND_BIG;
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
      for (int s = 0; s < 3; s++)
        retire_piece(80, be_pc_of(kind, s), be_pc_of(kind, s) - 32'h80, s == 1);
      retire_piece(80, be_pc_of(kind, 3), PC_W'(32'h100 + 4 * next), 1'b0);
      // drain: nothing retires while the decision for the next kind is made
      repeat (8) begin @(posedge clk); #1; end
      // report the finished super-trace
      cyc_big    = big_cost[kind];
      cyc_little = big_cost[kind] + diff_cost[kind];
      sample.ran_on    = ran;
      sample.cycles    = CYC_W'(ran == BACKEND_BIG ? cyc_big : cyc_little);
      sample.metric    = '0;
      sample.metric[0] = 16'd320;
      sample.metric[4] = METRIC_W'(diff_cost[kind] / 2);
      sample_valid = 1;
      @(posedge clk); #1;
      sample_valid = 0;
      sum_big    += longint'(cyc_big);
      sum_actual += (ran == BACKEND_BIG) ? longint'(cyc_big) : longint'(cyc_little);
      runs[kind]++;
      if (ran == BACKEND_LITTLE) on_little[kind]++;
      if (t >= NTRACE / 2) begin
        late_runs[kind]++;
        if (ran == BACKEND_LITTLE) late_little[kind]++;
      end
      kind = next;
    end
    repeat (20) @(posedge clk);
    #1;

    $display("closings %0d backedges %0d forward %0d", n_close, n_backedge, n_forward);
    $display("predictions: hit %0d (correct %0d) miss %0d; trained-correct %0d replace %0d demote %0d",
             n_hit, n_pred_ok, n_miss, n_correct_evt, n_replace, n_demote);
    $display("PHT training little %0d big %0d; switches to little %0d to big %0d; thr-zero cycles %0d",
             n_tr_little, n_tr_big, n_sw_little, n_sw_big, n_thr_zero);
    for (int k = 0; k < NKIND; k++)
      $display("kind %0d (extra %0d on Little): %0d/%0d on Little, second half %0d/%0d", k,
               diff_cost[k], on_little[k], runs[k], late_little[k], late_runs[k]);
    $display("performance loss %0.2f%%", 100.0 * real'(sum_actual - sum_big) / real'(sum_big));

    checks++;
    if (n_close != NTRACE) begin failures++; $display("FAIL closings %0d", n_close); end
    checks++;
    if (n_backedge != 4 * NTRACE) begin failures++; $display("FAIL backedges %0d", n_backedge); end
    checks++;
    if (n_pred_ok * 100 < 75 * n_hit) begin failures++; $display("FAIL prediction accuracy"); end
    checks++;
    if (late_little[0] * 2 < late_runs[0] || late_little[1] * 2 < late_runs[1]) begin
      failures++; $display("FAIL memory-bound kinds not moved to Little");
    end
    checks++;
    if (late_little[2] * 10 > late_runs[2] || late_little[3] * 10 > late_runs[3]) begin
      failures++; $display("FAIL compute-bound kinds on Little");
    end
    checks++;
    if (real'(sum_actual - sum_big) > 0.06 * real'(sum_big)) begin
      failures++; $display("FAIL loss above target");
    end
    // every mechanism must have happened
    checks++;
    if (n_forward == 0 || n_hit == 0 || n_miss == 0 || n_correct_evt == 0 || n_replace == 0 ||
        n_demote == 0 || n_tr_little == 0 || n_tr_big == 0 || n_sw_little == 0 ||
        n_sw_big == 0 || n_thr_zero == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (n_sw_pulse != n_sw_little + n_sw_big) begin failures++; $display("FAIL switch count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
