// Testbench for backend_pht: after the reset-time clearing (timed), random
// training and lookup requests are applied and compared with a reference
// array of 2-bit saturating counters. Lookups must answer one cycle later
// with Little exactly when the counter is 2 or 3; a lookup and a training
// of the same row in one cycle must return the value before training.
module tb_backend_pht;
  import stp_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       ready;
  logic       rd_valid = 0, rd_resp;
  strace_id_t rd_id = '0;
  backend_e   rd_backend;
  logic [1:0] rd_counter;
  logic       wr_valid = 0, wr_little = 0;
  strace_id_t wr_id = '0;
  int checks = 0, failures = 0, n_little = 0, n_big = 0, n_sat = 0;

  backend_pht dut (.*);

  always #5 clk = ~clk;

  int m [512];

  initial begin
    int cnt, e_cnt;
    bit e_resp;
    for (int i = 0; i < 512; i++) m[i] = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cnt = 0;
    while (!ready) begin @(posedge clk); #1; cnt++; end
    checks++;
    if (cnt < 505 || cnt > 515) begin failures++; $display("FAIL init %0d cycles", cnt); end
    for (int i = 0; i < 20000; i++) begin
      rd_valid  = 1'($urandom_range(0, 1));
      rd_id     = strace_id_t'($urandom_range(0, 15) + ((i / 4000) * 16));
      wr_valid  = 1'($urandom_range(0, 1));
      wr_id     = ($urandom_range(0, 3) == 0) ? rd_id : strace_id_t'($urandom_range(0, 15) + ((i / 4000) * 16));
      wr_little = 1'($urandom_range(0, 1));
      e_resp = rd_valid;
      e_cnt  = m[rd_id];
      if (wr_valid) begin
        if (wr_little && m[wr_id] < 3) m[wr_id]++;
        else if (!wr_little && m[wr_id] > 0) m[wr_id]--;
        else n_sat++;
        if (wr_little) n_little++; else n_big++;
      end
      @(posedge clk); #1;
      checks++;
      if (rd_resp != e_resp ||
          (e_resp && (rd_counter != 2'(e_cnt) || rd_backend != (e_cnt >= 2 ? BACKEND_LITTLE : BACKEND_BIG)))) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d resp %0b/%0b cnt %0d/%0d be %0d", i, rd_resp, e_resp,
                                    rd_counter, e_cnt, rd_backend);
      end
    end
    // untouched rows still read weakly Big
    rd_valid = 1; wr_valid = 0; rd_id = 9'd500;
    @(posedge clk); #1;
    checks++;
    if (rd_counter != 2'd1 || rd_backend != BACKEND_BIG) begin failures++; $display("FAIL init value"); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
