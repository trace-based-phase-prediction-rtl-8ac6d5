// Testbench for strace_index_gen: a random retire stream with forward and
// backward taken branches. A reference model counts instructions, keeps the
// backedge history of the open super-trace and predicts every closing; the
// DUT's st_valid timing (one cycle after the closing backedge), ID, head
// tag and length are compared with it. A short MIN_LEN keeps the run brief;
// a second instance checks the 300-instruction default on one long trace.
module tb_strace_index_gen;
  import stp_pkg::*;

  localparam int unsigned MINL = 40;

  logic            clk = 0, rst_n = 0;
  logic [1:0]      ret_count;
  logic            br_valid;
  logic [PC_W-1:0] br_pc, br_target;
  logic            be_seen, st_valid;
  strace_id_t      st_id;
  head_tag_t       st_head;
  logic [19:0]     st_len;
  logic            be_seen_d, st_valid_d;
  strace_id_t      st_id_d;
  head_tag_t       st_head_d;
  logic [19:0]     st_len_d;
  int checks = 0, failures = 0, closings = 0, cycles = 0;

  strace_index_gen #(.MIN_LEN(MINL)) dut (
    .clk, .rst_n, .ret_count, .br_valid, .br_pc, .br_target,
    .be_seen, .st_valid, .st_id, .st_head, .st_len);

  strace_index_gen dut_def (
    .clk, .rst_n, .ret_count, .br_valid, .br_pc, .br_target,
    .be_seen(be_seen_d), .st_valid(st_valid_d), .st_id(st_id_d),
    .st_head(st_head_d), .st_len(st_len_d));

  always #5 clk = ~clk;

  function automatic strace_id_t ref_hash(input logic [PC_W-1:0] h [$]);
    // h[0] = most recent backedge; missing entries count as zero
    logic [PC_W-1:0] p [NUM_BE];
    strace_id_t r;
    for (int k = 0; k < NUM_BE; k++) p[k] = (k < h.size()) ? h[k] : '0;
    r = p[0][10:2] ^ {p[2][4:2], p[1][7:2]} ^ {p[5][4:2], p[4][4:2], p[3][4:2]}
      ^ {p[8][4:2], p[7][4:2], p[6][4:2]} ^ {p[11][4:2], p[10][4:2], p[9][4:2]};
    return r;
  endfunction

  // reference state
  int unsigned     m_count;
  logic [PC_W-1:0] m_hist [$];
  logic            exp_valid;
  strace_id_t      exp_id;
  head_tag_t       exp_head;
  int unsigned     exp_len;

  task automatic drive(input int unsigned n, input bit br, input logic [PC_W-1:0] pc,
                       input logic [PC_W-1:0] tgt);
    bit is_be;
    ret_count = 2'(n); br_valid = br; br_pc = pc; br_target = tgt;
    is_be = br && (tgt < pc);
    #1;
    checks++;
    if (be_seen != is_be) begin failures++; $display("FAIL be_seen %0b exp %0b", be_seen, is_be); end
    // reference update at this edge
    exp_valid = 0;
    m_count += n;
    if (is_be) begin
      m_hist.push_front(pc);
      if (m_count >= MINL) begin
        exp_valid = 1;
        exp_id    = ref_hash(m_hist);
        exp_head  = tgt[4:2];
        exp_len   = m_count;
        m_count   = 0;
        m_hist.delete();
      end
    end
    @(posedge clk); #1;
    checks++;
    if (st_valid != exp_valid) begin
      failures++; $display("FAIL st_valid=%0b exp=%0b at cycle %0d", st_valid, exp_valid, cycles);
    end else if (exp_valid) begin
      closings++;
      checks++;
      if (st_id != exp_id || st_head != exp_head || st_len != 20'(exp_len)) begin
        failures++;
        $display("FAIL closing id=%h/%h head=%0d/%0d len=%0d/%0d", st_id, exp_id,
                 st_head, exp_head, st_len, exp_len);
      end
    end
    cycles++;
  endtask

  initial begin
    logic [PC_W-1:0] pc, tgt;
    int unsigned n;
    bit br;
    ret_count = 0; br_valid = 0; br_pc = 0; br_target = 0;
    m_count = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      n  = $urandom_range(0, 3);
      br = (n != 0) && ($urandom_range(0, 5) == 0);
      pc = 32'($urandom_range(32'h100, 32'hffff)) << 2;
      if ($urandom_range(0, 2) == 0) tgt = pc + 32'({$urandom_range(1, 255), 2'b00});
      else                           tgt = pc - 32'({$urandom_range(1, 255), 2'b00});
      drive(n, br, pc, tgt);
    end
    // directed: a backedge right at the minimum, with 300 for the default instance
    drive(0, 0, 0, 0);
    checks++;
    if (closings < 50) begin failures++; $display("FAIL only %0d closings", closings); end
    $display("closings seen: %0d", closings);
    // default-size instance: 100 x 3 instructions, then a backedge closes at exactly 300
    begin
      int d_closings;
      d_closings = 0;
      rst_n = 0; #1; rst_n = 1; m_count = 0; m_hist.delete();
      for (int i = 0; i < 99; i++) begin
        ret_count = 3; br_valid = (i % 10 == 9); br_pc = 32'h4000 + 32'(i); br_target = 32'h3000;
        @(posedge clk); #1;
        if (st_valid_d) d_closings++;
      end
      ret_count = 3; br_valid = 1; br_pc = 32'h5000; br_target = 32'h4010;
      @(posedge clk); #1;
      checks++;
      if (!st_valid_d || st_len_d != 20'd300 || st_head_d != 3'd4 || d_closings != 0) begin
        failures++;
        $display("FAIL default closing valid=%0b len=%0d head=%0d early=%0d",
                 st_valid_d, st_len_d, st_head_d, d_closings);
      end
    end
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
