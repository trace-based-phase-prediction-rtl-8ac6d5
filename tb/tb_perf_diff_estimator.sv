// Testbench for perf_diff_estimator: random samples from both backends and
// random signed Q8.8 coefficient sets. A 64-bit reference evaluates the
// regression, the clamping and the derived losses; done must come exactly
// eight clock edges after the edge that accepts the sample (one
// multiply-accumulate per term, seven terms, plus one).
module tb_perf_diff_estimator;
  import stp_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  sample_valid = 0;
  perf_sample_t          sample;
  regr_coef_t            coef_b2l, coef_l2b;
  logic                  busy, done;
  backend_e              ran_on;
  logic [CYC_W-1:0]      big_cycles, little_cycles, target_loss;
  logic signed [CYC_W:0] local_loss, actual_loss;
  int checks = 0, failures = 0, n_clamp = 0, n_little = 0;

  perf_diff_estimator dut (.*);

  always #5 clk = ~clk;

  function automatic longint ref_est(input perf_sample_t s, input regr_coef_t c);
    longint acc;
    acc = longint'(c.bias) * 256;
    acc += longint'(s.cycles) * longint'($signed(c.coef[0]));
    for (int k = 0; k < NUM_METRIC; k++)
      acc += longint'(s.metric[k]) * longint'($signed(c.coef[k+1]));
    acc = acc >>> 8;
    if (acc < 0) acc = 0;
    if (acc > (1 << CYC_W) - 1) acc = (1 << CYC_W) - 1;
    return acc;
  endfunction

  initial begin
    longint e, eb, el;
    int lat;
    sample = '0; coef_b2l = '0; coef_l2b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      sample.ran_on = backend_e'($urandom_range(0, 1));
      sample.cycles = CYC_W'($urandom_range(50, 4000));
      for (int k = 0; k < NUM_METRIC; k++) sample.metric[k] = METRIC_W'($urandom_range(0, 600));
      coef_b2l.bias = CYC_W'($urandom_range(0, 64) - 32);
      coef_l2b.bias = CYC_W'($urandom_range(0, 64) - 32);
      for (int k = 0; k <= NUM_METRIC; k++) begin
        coef_b2l.coef[k] = COEF_W'($urandom_range(0, 1024) - 400);
        coef_l2b.coef[k] = COEF_W'($urandom_range(0, 1024) - 600);
      end
      e = ref_est(sample, sample.ran_on == BACKEND_BIG ? coef_b2l : coef_l2b);
      if (e == 0) n_clamp++;
      if (sample.ran_on == BACKEND_BIG) begin eb = longint'(sample.cycles); el = e; end
      else begin el = longint'(sample.cycles); eb = e; n_little++; end
      sample_valid = 1;
      @(posedge clk); #1;
      sample_valid = 0;
      // change the inputs: the block must have captured them
      sample = '0; coef_b2l = '0; coef_l2b = '0;
      lat = 0;
      while (!done && lat < 20) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 8) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (big_cycles != CYC_W'(eb) || little_cycles != CYC_W'(el) ||
          local_loss != (CYC_W+1)'(el - eb) ||
          actual_loss != (ran_on == BACKEND_LITTLE ? (CYC_W+1)'(el - eb) : '0) ||
          target_loss != CYC_W'((eb * 5) / 100)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d big %0d/%0d little %0d/%0d loss %0d target %0d", n,
                   big_cycles, eb, little_cycles, el, local_loss, target_loss);
      end
      repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    end
    checks++;
    if (n_clamp == 0 || n_little == 0) begin failures++; $display("FAIL coverage clamp=%0d", n_clamp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
