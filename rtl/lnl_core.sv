// lnl_core: Lock and Load front-end of one SM.
//
// Wires the LnL blocks into the path an approximable region takes:
//   1. A checked load (ld_check=1) returns: lnl_load_checker compares its values per
//      thread group; three cycles later lnl_lcht records {similar, number of regions
//      that use the value} in the entry the load names, for the load's warp.
//   2. START_APPROX (sa_*) reads the entries named by loads_to_check (sa_sel); the
//      AND of their results is handed to lnl_warp_ctrl, which treats the instruction as
//      a barrier for the warp pair and fuses the pair when both may approximate.
//   3. lnl_warp_ctrl fetches (fused pairs once), decoded instructions enter
//      lnl_ibuffer with the fused bit, and issue allocates the modified operand
//      collector lnl_oc_entry, which packs the anchor threads of both source warps.
// The anchor threads of a warp come from its active mask and the thread-group size set
// at kernel launch (group_log2); approx_th is the similarity threshold register.
//
// Decode, scoreboard, register file and execution are outside: they reach this block
// through dec_*, sb_ready, the oc_* operand ports and disp_*. Loads that are not checked
// pass by without touching the table.
module lnl_core
  import lnl_pkg::*;
#(
  parameter int NWARPS  = WARPS,
  parameter int ENTRIES = 3,
  parameter int PC_W    = 32,
  localparam int WW     = $clog2(NWARPS),
  localparam int EW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0]            group_log2,
  input  logic [15:0]           approx_th,
  // load write-back
  input  logic                  ld_valid,
  input  logic                  ld_check,
  input  logic [WW-1:0]         ld_warp,
  input  logic [EW-1:0]         ld_entry,
  input  logic [1:0]            ld_nblk,
  input  logic [WARP-1:0][31:0] ld_data,
  input  logic [WARP-1:0]       ld_mask,
  output logic                  ld_checked,        // a checked load's result was recorded
  output logic                  ld_similar,
  // START_APPROX
  input  logic                  sa_valid,
  input  logic [WW-1:0]         sa_warp,
  input  logic [ENTRIES-1:0]    sa_sel,
  input  logic [PC_W-1:0]       sa_end_pc,
  output logic                  sa_ok,
  // warp management and fetch
  input  logic                  launch_en,
  input  logic [WW-1:0]         launch_warp,
  input  logic [PC_W-1:0]       launch_pc,
  input  logic                  exit_en,
  input  logic [WW-1:0]         exit_warp,
  input  logic                  br_en,
  input  logic [WW-1:0]         br_warp,
  input  logic [PC_W-1:0]       br_pc,
  input  logic                  fetch_ready,
  output logic                  fetch_valid,
  output logic [WW-1:0]         fetch_warp,
  output logic [PC_W-1:0]       fetch_pc,
  output logic                  fetch_fused,
  output logic [NWARPS-1:0]     approx,
  output logic [NWARPS-1:0]     fused,
  output logic                  fuse_event,
  output logic                  split_event,
  // decode -> I-buffer -> issue
  input  logic                  dec_valid,
  input  logic [WW-1:0]         dec_warp,
  input  lnl_insn_t             dec_insn,
  input  logic [NWARPS-1:0]     sb_ready,
  output logic                  issue_valid,
  output logic [WW-1:0]         issue_warp,
  output lnl_insn_t             issue_insn,
  output logic                  issue_fused,
  // operand collector
  output logic [NSRC-1:0][11:0] oc_idx0,
  output logic [NSRC-1:0][11:0] oc_idx1,
  input  logic                  oc_op_en,
  input  logic [1:0]            oc_op_row,
  input  logic                  oc_op_half,
  input  logic [WARP-1:0][31:0] oc_op_data,
  input  logic [WARP-1:0]       oc_op_mask,
  output logic                  disp_valid,
  input  logic                  disp_ready,
  output logic [NSRC-1:0][WARP-1:0][31:0] disp_data,
  output logic [WARP-1:0]       disp_sel,
  output logic                  disp_fused,
  output logic [5:0]            disp_warp,
  input  logic [WARP-1:0][31:0] wb_packed,
  input  logic [WARP-1:0]       wb_sel,
  output logic [WARP-1:0][31:0] wb_warp0,
  output logic [WARP-1:0][31:0] wb_warp1
);
  // ---------------------------------------------------------------- load check
  localparam int TAG_W = WW + EW + 2;
  logic [TAG_W-1:0] chk_tag;
  logic             chk_v;
  logic [WARP-1:0]  chk_anchor;

  lnl_load_checker #(.THR_W(16), .TAG_W(TAG_W)) u_chk (
    .clk, .rst_n,
    .in_valid(ld_valid && ld_check), .in_data(ld_data), .in_mask(ld_mask),
    .in_tag({ld_warp, ld_entry, ld_nblk}), .group_log2, .thr(approx_th),
    .out_valid(chk_v), .similar(ld_similar), .out_anchor(chk_anchor), .out_tag(chk_tag)
  );
  assign ld_checked = chk_v;

  logic [3:0] pk_unused;
  lnl_lcht #(.NWARPS(NWARPS), .ENTRIES(ENTRIES)) u_lcht (
    .clk, .rst_n,
    .wr_en(chk_v), .wr_warp(chk_tag[TAG_W-1 -: WW]), .wr_entry(chk_tag[2 +: EW]),
    .wr_result(ld_similar), .wr_count(chk_tag[1:0]),
    .sa_en(sa_valid), .sa_warp, .sa_sel, .sa_ok,
    .pk_warp('0), .pk_entry('0), .pk_bits(pk_unused)
  );

  // ---------------------------------------------------------------- fetch
  logic [NWARPS-1:0] ib_full, active_w, waiting_w;
  lnl_warp_ctrl #(.NWARPS(NWARPS), .PC_W(PC_W)) u_wctl (
    .clk, .rst_n,
    .launch_en, .launch_warp, .launch_pc, .exit_en, .exit_warp,
    .sa_en(sa_valid), .sa_warp, .sa_ok, .sa_end_pc,
    .br_en, .br_warp, .br_pc, .hold(ib_full),
    .fetch_ready, .fetch_valid, .fetch_warp, .fetch_pc, .fetch_fused,
    .active(active_w), .approx, .fused, .waiting(waiting_w), .fuse_event, .split_event
  );

  // ---------------------------------------------------------------- I-buffer
  logic oc_busy, issue_fire;
  lnl_ibuffer #(.NWARPS(NWARPS)) u_ib (
    .clk, .rst_n,
    .fill_en(dec_valid), .fill_warp(dec_warp), .fill_insn(dec_insn), .fill_fused(fused[dec_warp]),
    .sb_ready, .issue_ready(!oc_busy), .issue_valid, .issue_warp, .issue_insn, .issue_fused,
    .full(ib_full)
  );
  assign issue_fire = issue_valid && !oc_busy;

  // ---------------------------------------------------------------- operand collector
  lnl_oc_entry #(.NOPS(NSRC), .REGS_PER_WARP(63), .IDX_W(12)) u_oc (
    .clk, .rst_n,
    .alloc_en(issue_fire), .alloc_warp(6'(issue_warp)), .alloc_fused(issue_fused),
    .alloc_used(issue_insn.src_used),
    .alloc_lreg({issue_insn.src2, issue_insn.src1, issue_insn.src0}),
    .busy(oc_busy), .idx0(oc_idx0), .idx1(oc_idx1),
    .op_en(oc_op_en), .op_row(oc_op_row), .op_half(oc_op_half), .op_data(oc_op_data),
    .op_anchor(anchor_mask(oc_op_mask, group_log2)),
    .disp_valid, .disp_ready, .disp_data, .disp_sel, .disp_fused, .disp_warp,
    .wb_packed, .wb_sel, .wb_warp0, .wb_warp1
  );
endmodule
