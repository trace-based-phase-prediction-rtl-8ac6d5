// tb_strace_granularity: runs the whole controller at three minimum
// super-trace lengths, 100, 1,000 and 10,000 instructions, side by side,
// each with its own behavioural core (tb_core_model). Every instance checks
// its super-trace IDs and lengths, its next-super-trace accuracy, that
// memory-bound code moves to Little and compute-bound code stays on Big,
// and that the loss stays near the 5% target.
module tb_strace_granularity;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d100, d1k, d10k;
  int   c100, c1k, c10k, f100, f1k, f10k;

  tb_core_model #(.MIN_LEN(100),   .NTRACE(2000)) m100 (.clk, .done(d100), .checks(c100), .failures(f100));
  tb_core_model #(.MIN_LEN(1000),  .NTRACE(800))  m1k  (.clk, .done(d1k),  .checks(c1k),  .failures(f1k));
  tb_core_model #(.MIN_LEN(10000), .NTRACE(240))  m10k (.clk, .done(d10k), .checks(c10k), .failures(f10k));

  initial begin
    #1;  // let every model clear its done flag first
    wait (d100 && d1k && d10k);
    $display("TB_RESULT checks=%0d failures=%0d", c100 + c1k + c10k, f100 + f1k + f10k);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c100 + c1k + c10k, f100 + f1k + f10k + 1);
    $finish;
  end
endmodule
