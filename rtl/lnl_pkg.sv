// lnl_pkg: types and helpers shared by the Lock and Load (LnL) blocks.
//
// LnL triggers approximate execution of a code region when the values returned by the
// region's checked loads are similar within each thread group of a warp. A thread group
// is 2^group_log2 consecutive threads; its first active thread is the anchor thread,
// which keeps executing while the others are skipped.
package lnl_pkg;
  localparam int WARP     = 32;
  localparam int WARPS    = 48;
  localparam int NSRC     = 3;

  // decoded instruction as held in the I-buffer (field layout is this design's choice)
  typedef struct packed {
    logic [7:0]       opcode;
    logic [NSRC-1:0]  src_used;
    logic [5:0]       src2;
    logic [5:0]       src1;
    logic [5:0]       src0;
    logic [5:0]       dst;
    logic [26:0]      imm;
  } lnl_insn_t;

  // anchor thread mask: first active thread of every thread group
  function automatic logic [WARP-1:0] anchor_mask(input logic [WARP-1:0] mask,
                                                  input logic [2:0] group_log2);
    logic [WARP-1:0] a;
    logic            found;
    int              gsz;
    a     = '0;
    found = 1'b0;
    gsz   = 1 << group_log2;
    for (int i = 0; i < WARP; i++) begin
      if ((i & (gsz - 1)) == 0) found = 1'b0;   // group sizes are powers of two
      if (mask[i] && !found) begin
        a[i]  = 1'b1;
        found = 1'b1;
      end
    end
    return a;
  endfunction
endpackage
