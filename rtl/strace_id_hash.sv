// strace_id_hash: folds the PCs of the last 12 backedges of a super-trace
// into a 9-bit super-trace ID.
//
// The fold gives more bits to the more recent backedges. be_pc[0] is the
// most recent backedge (BE1), be_pc[11] the oldest (BE12). With PC bits
// counted above the 2-bit byte offset of a 4-byte instruction:
//   BE1         contributes 9 bits  (PC[10:2])
//   BE2         contributes 6 bits  (PC[7:2])
//   BE3 .. BE12 contribute  3 bits each (PC[4:2])
// The 3-bit slices of BE12,BE11,BE10 and of BE9,BE8,BE7 form two 9-bit
// words that are XORed; so are {BE6,BE5,BE4} and {BE3,BE2}; the two
// results are XORed, and the sum is XORed with BE1. The grouping, the bit
// counts and the XOR tree follow the design's published ID diagram; which
// PC bits are taken (the lowest ones above the byte offset) and the order
// of slices inside a 9-bit word (older backedge in the upper bits) are this
// design's choice. Purely combinational.
module strace_id_hash
  import stp_pkg::*;
(
  input  logic [NUM_BE-1:0][PC_W-1:0] be_pc,  // [0] = most recent backedge
  output strace_id_t                  id
);

  logic [8:0] grp_a, grp_b, grp_c, grp_d;

  always_comb begin
    grp_a = {be_pc[11][4:2], be_pc[10][4:2], be_pc[9][4:2]};
    grp_b = {be_pc[8][4:2],  be_pc[7][4:2],  be_pc[6][4:2]};
    grp_c = {be_pc[5][4:2],  be_pc[4][4:2],  be_pc[3][4:2]};
    grp_d = {be_pc[2][4:2],  be_pc[1][7:2]};
    id    = (grp_a ^ grp_b) ^ (grp_c ^ grp_d) ^ be_pc[0][10:2];
  end

endmodule
