// Testbench for strace_id_hash: random backedge PC histories, compared with
// a reference that places each backedge's bit slice at its position in the
// 9-bit ID and XORs them, plus directed checks that a single backedge in
// each slot lands in the right ID bits.
module tb_strace_id_hash;
  import stp_pkg::*;

  logic [NUM_BE-1:0][PC_W-1:0] be_pc;
  strace_id_t                  id;
  int checks = 0, failures = 0;

  strace_id_hash dut (.be_pc(be_pc), .id(id));

  // slot k (0 = most recent): bit offset of its slice inside the 9-bit word
  function automatic strace_id_t ref_hash(input logic [NUM_BE-1:0][PC_W-1:0] pcs);
    int unsigned pos [NUM_BE] = '{0, 0, 6, 0, 3, 6, 0, 3, 6, 0, 3, 6};
    strace_id_t r = '0;
    r ^= strace_id_t'(pcs[0] >> 2);                 // 9 bits of BE1
    r ^= strace_id_t'((pcs[1] >> 2) & 32'h3f);      // 6 bits of BE2
    for (int k = 2; k < NUM_BE; k++)
      r ^= strace_id_t'(((pcs[k] >> 2) & 32'h7) << pos[k]);
    return r;
  endfunction

  initial begin
    // directed: only slot k non-zero, all ones in the PC
    for (int k = 0; k < NUM_BE; k++) begin
      be_pc = '0;
      be_pc[k] = '1;
      #1;
      checks++;
      if (id != ref_hash(be_pc)) begin
        failures++;
        $display("FAIL slot %0d: id=%h exp=%h", k, id, ref_hash(be_pc));
      end
    end
    // the most recent backedge owns all 9 bits, the second 6, the rest 3
    be_pc = '0; be_pc[0] = 32'h0000_07fc; #1;
    checks++; if (id != 9'h1ff) begin failures++; $display("FAIL BE1 width id=%h", id); end
    be_pc = '0; be_pc[1] = 32'hffff_ffff; #1;
    checks++; if (id != 9'h03f) begin failures++; $display("FAIL BE2 width id=%h", id); end
    be_pc = '0; be_pc[11] = 32'hffff_ffff; #1;
    checks++; if (id != 9'h1c0) begin failures++; $display("FAIL BE12 pos id=%h", id); end
    // random
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < NUM_BE; k++) be_pc[k] = $urandom;
      #1;
      checks++;
      if (id != ref_hash(be_pc)) begin
        failures++;
        if (failures < 10) $display("FAIL random: id=%h exp=%h", id, ref_hash(be_pc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
