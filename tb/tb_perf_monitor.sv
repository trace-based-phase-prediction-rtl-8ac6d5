// Testbench for perf_monitor: random per-super-trace allowed and actual
// losses; a reference keeps the slack sum and the PI threshold with 64-bit
// arithmetic and checks both after every update, including clamping of the
// threshold at zero. A closing phase keeps suffering more loss than allowed
// and checks that the threshold falls to zero; a phase on Big only checks
// that it rises.
module tb_perf_monitor;
  import stp_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  upd_valid = 0;
  logic [CYC_W-1:0]      target_loss = '0;
  logic signed [CYC_W:0] actual_loss = '0;
  logic [CYC_W-1:0]      threshold;
  logic signed [31:0]    slack;
  int checks = 0, failures = 0, n_zero = 0, n_pos = 0;

  perf_monitor dut (.*);

  always #5 clk = ~clk;

  longint m_slack = 0;
  longint m_thr   = 0;

  task automatic update(input int tl, input int al);
    longint err;
    target_loss = CYC_W'(tl); actual_loss = (CYC_W+1)'(al); upd_valid = 1;
    err = longint'(tl) - longint'(al);
    m_slack += err;
    m_thr = err + (m_slack >>> 3);
    if (m_thr < 0) m_thr = 0;
    @(posedge clk); #1;
    upd_valid = 0;
    checks++;
    if (slack != 32'(m_slack) || threshold != CYC_W'(m_thr)) begin
      failures++;
      if (failures < 10) $display("FAIL slack %0d/%0d thr %0d/%0d", slack, m_slack, threshold, m_thr);
    end
    if (m_thr == 0) n_zero++; else n_pos++;
  endtask

  initial begin
    longint thr_a;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (threshold != '0) begin failures++; $display("FAIL initial threshold"); end
    for (int n = 0; n < 3000; n++) begin
      update($urandom_range(0, 200), ($urandom_range(0, 1) == 1) ? 0 : int'($urandom_range(0, 500)) - 50);
      // idle cycles must not change the state
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (slack != 32'(m_slack)) begin failures++; $display("FAIL slack moved while idle"); end
      end
    end
    // every super-trace on Big: threshold must grow
    thr_a = m_thr;
    for (int n = 0; n < 300; n++) update(200, 0);
    checks++;
    if (!(m_thr > thr_a) || threshold <= CYC_W'(thr_a)) begin failures++; $display("FAIL no rise"); end
    // every super-trace loses more than allowed: threshold must drop to zero
    for (int n = 0; n < 2000; n++) update(10, 60);
    checks++;
    if (threshold != '0) begin failures++; $display("FAIL threshold did not reach zero"); end
    checks++;
    if (n_zero == 0 || n_pos == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
