// Testbench for feedback_generator. Each step closes a super-trace with a
// random ID (st_valid), then reports its performance sample, either in the
// same cycle or a few cycles later. The regression coefficients are chosen
// so that the cost difference between the backends is twice metric[4]:
// a reference computes the local loss, the PI threshold in force, and the
// expected PHT training (ID and direction), which must appear exactly nine
// clock edges after the sample is accepted. A sample with no closing before
// it must not train anything.
module tb_feedback_generator;
  import stp_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  st_valid = 0;
  strace_id_t            st_id = '0;
  logic                  sample_valid = 0;
  perf_sample_t          sample;
  regr_coef_t            coef_b2l, coef_l2b;
  logic                  pht_wr_valid, pht_wr_little;
  strace_id_t            pht_wr_id;
  logic [CYC_W-1:0]      threshold;
  logic signed [31:0]    slack;
  logic signed [CYC_W:0] last_local_loss;
  int checks = 0, failures = 0, n_little = 0, n_big = 0, n_same = 0;

  feedback_generator dut (.*);

  always #5 clk = ~clk;

  longint m_slack = 0, m_thr = 0;

  task automatic step(input int id, input backend_e on, input int big, input int diff, input bit same);
    longint eb, el, loss, tl, al, err;
    bit e_little;
    int lat;
    sample.ran_on = on;
    sample.cycles = CYC_W'(on == BACKEND_BIG ? big : big + 2 * diff);
    sample.metric = '0;
    sample.metric[0] = 16'd300;
    sample.metric[4] = METRIC_W'(diff);
    eb = longint'(big); el = longint'(big) + 2 * longint'(diff);
    loss = el - eb;
    tl = (eb * 5) / 100;
    al = (on == BACKEND_LITTLE) ? loss : 0;
    e_little = loss < m_thr;
    st_valid = 1; st_id = strace_id_t'(id);
    if (same) begin sample_valid = 1; n_same++; end
    @(posedge clk); #1;
    st_valid = 0;
    if (!same) begin
      repeat ($urandom_range(0, 5)) begin @(posedge clk); #1; end
      sample_valid = 1;
      @(posedge clk); #1;
    end
    sample_valid = 0;
    lat = 0;
    while (!pht_wr_valid && lat < 20) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 9 || pht_wr_id != strace_id_t'(id) || pht_wr_little != e_little) begin
      failures++;
      if (failures < 10) $display("FAIL lat %0d id %0d/%0d little %0b/%0b thr %0d loss %0d",
                                  lat, pht_wr_id, id, pht_wr_little, e_little, m_thr, loss);
    end
    if (e_little) n_little++; else n_big++;
    err = tl - al;
    m_slack += err;
    m_thr = err + (m_slack >>> 3);
    if (m_thr < 0) m_thr = 0;
    @(posedge clk); #1;
    checks++;
    if (threshold != CYC_W'(m_thr)) begin failures++; $display("FAIL threshold %0d/%0d", threshold, m_thr); end
  endtask

  initial begin
    sample = '0;
    coef_b2l = '0; coef_l2b = '0;
    coef_b2l.coef[0] = 16'sd256;  coef_b2l.coef[5] = 16'sd512;   // little = big + 2*m4
    coef_l2b.coef[0] = 16'sd256;  coef_l2b.coef[5] = -16'sd512;  // big = little - 2*m4
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      backend_e on;
      on = backend_e'($urandom_range(0, 2) == 0);
      step($urandom_range(0, 511), on, $urandom_range(150, 400), $urandom_range(0, 40),
           $urandom_range(0, 3) == 0);
    end
    // a sample with no closing before it is dropped
    sample_valid = 1;
    @(posedge clk); #1;
    sample_valid = 0;
    repeat (15) begin
      @(posedge clk); #1;
      checks++;
      if (pht_wr_valid) begin failures++; $display("FAIL training without a closing"); end
    end
    checks++;
    if (n_little == 0 || n_big == 0 || n_same == 0) begin failures++; $display("FAIL coverage"); end
    $display("little %0d big %0d", n_little, n_big);
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
