// Testbench for next_strace_predictor. A stream of super-trace closings is
// drawn from a small set of IDs following a mostly repeating pattern with
// random deviations, so that predictions hit, miss, and successors get
// strengthened, demoted and replaced. A reference model of the two-way
// successor table (kept in an associative array) predicts every output:
// pred_hit/pred_id four clock edges after st_valid is sampled and the
// training flags two edges after. The table clearing after reset is also
// timed (512 cycles).
module tb_next_strace_predictor;
  import stp_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       st_valid = 0;
  strace_id_t st_id = '0;
  head_tag_t  st_head = '0;
  logic       ready, pred_valid, pred_hit;
  strace_id_t pred_id;
  logic       upd_valid, upd_correct, upd_replace, upd_demote;
  int checks = 0, failures = 0;
  int n_hit = 0, n_correct = 0, n_replace = 0, n_demote = 0, n_miss = 0;

  next_strace_predictor dut (.*);

  always #5 clk = ~clk;

  // reference table: row -> {way1, way0}
  typedef struct { int id; int head; int conf; } slot_t;
  slot_t  m_tab [int][2];
  bit     m_prev_valid = 0;
  int     m_prev_id, m_prev_head, m_prev_pred;
  bit     m_prev_hit;

  function automatic void get_row(input int r, output slot_t s0, output slot_t s1);
    if (m_tab.exists(r)) begin s0 = m_tab[r][0]; s1 = m_tab[r][1]; end
    else begin s0 = '{0, 0, 0}; s1 = '{0, 0, 0}; end
  endfunction

  task automatic closing(input int id, input int head);
    slot_t s0, s1;
    bit e_upd, e_corr, e_rep, e_dem, e_hit;
    int e_id, v;
    // --- reference training of the predecessor row
    e_upd = m_prev_valid; e_corr = 0; e_rep = 0; e_dem = 0;
    if (m_prev_valid) begin
      get_row(m_prev_id, s0, s1);
      e_corr = m_prev_hit && (m_prev_pred == id);
      if (s0.id == id && s0.head == m_prev_head)      begin if (s0.conf < 3) s0.conf++; end
      else if (s1.id == id && s1.head == m_prev_head) begin if (s1.conf < 3) s1.conf++; end
      else begin
        v = (s1.conf < s0.conf) ? 1 : 0;
        if (v == 1) begin
          if (s1.conf == 0) begin s1 = '{id, m_prev_head, 1}; e_rep = 1; end
          else begin s1.conf--; e_dem = 1; end
        end else begin
          if (s0.conf == 0) begin s0 = '{id, m_prev_head, 1}; e_rep = 1; end
          else begin s0.conf--; e_dem = 1; end
        end
      end
      m_tab[m_prev_id][0] = s0; m_tab[m_prev_id][1] = s1;
    end
    // --- reference lookup
    get_row(id, s0, s1);
    e_hit = (s0.head == head) || (s1.head == head);
    if (s0.head == head && s1.head == head) e_id = (s1.conf > s0.conf) ? s1.id : s0.id;
    else if (s1.head == head)               e_id = s1.id;
    else                                    e_id = s0.id;
    m_prev_valid = 1; m_prev_id = id; m_prev_head = head; m_prev_hit = e_hit; m_prev_pred = e_id;

    // --- drive and compare
    st_valid = 1; st_id = strace_id_t'(id); st_head = head_tag_t'(head);
    @(posedge clk); #1;                     // edge 0 samples st_valid
    st_valid = 0;
    @(posedge clk); #1;                     // edge 1
    @(posedge clk); #1;                     // edge 2: training flags
    checks++;
    if (upd_valid != e_upd || upd_correct != e_corr || upd_replace != e_rep || upd_demote != e_dem) begin
      failures++;
      $display("FAIL train id=%0d: valid %0b/%0b correct %0b/%0b replace %0b/%0b demote %0b/%0b",
               id, upd_valid, e_upd, upd_correct, e_corr, upd_replace, e_rep, upd_demote, e_dem);
    end
    @(posedge clk); #1;                     // edge 3
    checks++;
    if (pred_valid) begin failures++; $display("FAIL pred_valid early"); end
    @(posedge clk); #1;                     // edge 4: prediction
    checks++;
    if (!pred_valid || pred_hit != e_hit || (e_hit && pred_id != strace_id_t'(e_id))) begin
      failures++;
      $display("FAIL predict id=%0d head=%0d: valid %0b hit %0b/%0b pid %0d/%0d",
               id, head, pred_valid, pred_hit, e_hit, pred_id, e_id);
    end
    n_hit += e_hit; n_miss += !e_hit; n_correct += e_corr; n_replace += e_rep; n_demote += e_dem;
    repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
  endtask

  initial begin
    static int pattern [8] = '{17, 300, 42, 17, 511, 42, 300, 8};
    int cnt;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cnt = 0;
    while (!ready) begin @(posedge clk); #1; cnt++; end
    checks++;
    if (cnt < 500 || cnt > 515) begin failures++; $display("FAIL init took %0d cycles", cnt); end
    for (int i = 0; i < 4000; i++) begin
      int id;
      id = pattern[i % 8];
      if ($urandom_range(0, 9) == 0) id = $urandom_range(0, 511);
      // head tag: low bits of the next ID in the pattern, as a program would show
      closing(id, pattern[(i + 1) % 8] % 8);
    end
    $display("hits %0d misses %0d correct %0d replaced %0d demoted %0d",
             n_hit, n_miss, n_correct, n_replace, n_demote);
    checks++;
    if (n_correct < 1000 || n_replace == 0 || n_demote == 0 || n_miss == 0) begin
      failures++; $display("FAIL mechanism coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
