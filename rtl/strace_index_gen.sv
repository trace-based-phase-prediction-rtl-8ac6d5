// strace_index_gen: cuts the committed instruction stream into super-traces
// and names each one with a 9-bit ID (Block 1 of the controller).
//
// A backedge is a taken control transfer (branch, call or return) whose
// target lies below its own PC. Backedges split the stream into traces;
// consecutive traces are merged until at least MIN_LEN instructions have
// committed, and the backedge that completes that count closes the
// super-trace. At that moment the PCs of the last NUM_BE backedges of the
// super-trace are folded by strace_id_hash into the ID, and the target of
// the closing backedge - the first PC of the next super-trace - is already
// known, so its bits PC[4:2] are passed on as the head tag.
//
// Interface: each cycle the core reports how many instructions retired
// (ret_count, up to 3 for the 3-wide Big backend) and, when one of them is
// a taken control transfer, its PC and target (br_valid). A taken transfer
// ends a retire group, so it is counted as the last instruction of the
// group. The history of backedge PCs is cleared when a super-trace closes,
// so an ID depends only on the backedges inside its own super-trace; slots
// left unfilled hash as zero. The backedge definition, the merge rule, the
// 300-instruction minimum and the hash follow the design description; the
// history clearing, the retire interface and the counter width are choices
// of this implementation.
//
// Timing: st_valid pulses for one cycle, one cycle after the retire group
// with the closing backedge, together with st_id, st_head and st_len (the
// super-trace length in instructions).
module strace_index_gen
  import stp_pkg::*;
#(
  parameter int unsigned MIN_LEN = 300,  // minimum super-trace length
  parameter int unsigned LEN_W   = 20    // instruction counter width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      ret_count,   // instructions retired this cycle
  input  logic            br_valid,    // a taken control transfer retired
  input  logic [PC_W-1:0] br_pc,
  input  logic [PC_W-1:0] br_target,
  output logic            be_seen,     // combinational: this transfer is a backedge
  output logic            st_valid,
  output strace_id_t      st_id,
  output head_tag_t       st_head,
  output logic [LEN_W-1:0] st_len
);

  logic [LEN_W-1:0]               inst_count;
  logic [LEN_W-1:0]               count_next;
  logic [NUM_BE-2:0][PC_W-1:0]    hist;          // older backedges
  logic [NUM_BE-1:0][PC_W-1:0]    hist_shifted;  // with the retiring one
  strace_id_t                     id_now;
  logic                           close_now;

  always_comb begin
    be_seen      = br_valid && (br_target < br_pc);
    // saturate instead of wrapping when no backedge comes for a long time
    if (inst_count > LEN_W'((1 << LEN_W) - 4))
      count_next = inst_count;
    else
      count_next = inst_count + LEN_W'(ret_count);
    hist_shifted = {hist, br_pc};
    close_now    = be_seen && (count_next >= LEN_W'(MIN_LEN));
  end

  strace_id_hash u_hash (
    .be_pc (hist_shifted),
    .id    (id_now)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inst_count <= '0;
      hist       <= '0;
      st_valid   <= 1'b0;
      st_id      <= '0;
      st_head    <= '0;
      st_len     <= '0;
    end else begin
      st_valid <= close_now;
      if (close_now) begin
        inst_count <= '0;
        hist       <= '0;
        st_id      <= id_now;
        st_head    <= br_target[4:2];
        st_len     <= count_next;
      end else begin
        inst_count <= count_next;
        if (be_seen) hist <= hist_shifted[NUM_BE-2:0];
      end
    end
  end

endmodule
