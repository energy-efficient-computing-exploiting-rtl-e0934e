// ecr_top: the three hardware proposals of the dissertation side by side.
//
//   G-Scalar  (gs_*)  compressed GPU register file with scalar-execution detection: one
//                     16-bank register file (gs_regfile) and the issue-stage scalar check
//                     (gs_scalar_check). Metadata travels as a flat 74-bit word
//                     {d, fs, enc_l[3:0], enc_h[3:0], base_l[31:0], base_h[31:0]}.
//   LnL       (lnl_*) load-value similarity detection, warp fusion and the operand
//                     collector pair packing of one SM (lnl_core).
//   AxMemo    (ax_*)  the memoization unit of one CPU core with L1 and L2 lookup tables
//                     (ax_memo_unit).
// The three blocks share only clock and reset; each keeps the interface and timing of its
// own module (see there). All ports are plain logic vectors; enumerated request and
// mode codes are passed as their integer values:
//   gs_wr_mode / gs_sc_mode : 0 vector, 1 scalar, 2 half scalar, 3 divergent scalar
//   ax_req_op               : 0 CRC input, 1 lookup, 2 update, 3 invalidate
// lnl instructions are 62-bit words {opcode[7:0], src_used[2:0], src2, src1, src0, dst
// (6 bits each), imm[26:0]}.
// Parameters are the dissertation's configuration (16 banks x 64 registers of 32 lanes,
// 48 warps with three LCHT entries, 8 KB L1 and 512 KB L2 lookup tables).
module ecr_top #(
  parameter int GS_NB     = 16,
  parameter int GS_RPB    = 64,
  parameter int LNL_WARPS = 48,
  parameter int AX_L1_SETS = 128,
  parameter int AX_L2_SETS = 8192,
  localparam int GS_RW    = $clog2(GS_NB) + $clog2(GS_RPB),
  localparam int MW       = 74,
  localparam int LW       = $clog2(LNL_WARPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // ---------------- G-Scalar register file
  input  logic                gs_req_valid,
  output logic                gs_req_ready,
  input  logic                gs_req_write,
  input  logic [GS_RW-1:0]    gs_req_reg,
  input  logic [31:0]         gs_req_mask,
  input  logic [1023:0]       gs_req_data,      // lane i in bits [32i+31:32i]
  input  logic [1:0]          gs_wr_mode,
  input  logic [1:0]          gs_wr_half,
  output logic                gs_rd_valid,
  output logic [GS_RW-1:0]    gs_rd_reg,
  output logic [1023:0]       gs_rd_data,
  output logic [MW-1:0]       gs_rd_meta,
  output logic                gs_rd_bvr_only,
  output logic [4:0]          gs_arrays_active,
  output logic                gs_special_move,
  // ---------------- G-Scalar issue-stage check
  input  logic [2:0]          gs_sc_src_valid,
  input  logic [3*MW-1:0]     gs_sc_src_meta,   // source k in bits [MW*k +: MW]
  input  logic [31:0]         gs_sc_mask,
  input  logic                gs_sc_dst_valid,
  input  logic [MW-1:0]       gs_sc_dst_meta,
  output logic [1:0]          gs_sc_mode,
  output logic [1:0]          gs_sc_half_scalar,
  output logic [31:0]         gs_sc_lane_en,
  output logic                gs_sc_special_move,
  // ---------------- LnL
  input  logic [2:0]          lnl_group_log2,
  input  logic [15:0]         lnl_approx_th,
  input  logic                lnl_ld_valid,
  input  logic                lnl_ld_check,
  input  logic [LW-1:0]       lnl_ld_warp,
  input  logic [1:0]          lnl_ld_entry,
  input  logic [1:0]          lnl_ld_nblk,
  input  logic [1023:0]       lnl_ld_data,
  input  logic [31:0]         lnl_ld_mask,
  output logic                lnl_ld_checked,
  output logic                lnl_ld_similar,
  input  logic                lnl_sa_valid,
  input  logic [LW-1:0]       lnl_sa_warp,
  input  logic [2:0]          lnl_sa_sel,
  input  logic [31:0]         lnl_sa_end_pc,
  output logic                lnl_sa_ok,
  input  logic                lnl_launch_en,
  input  logic [LW-1:0]       lnl_launch_warp,
  input  logic [31:0]         lnl_launch_pc,
  input  logic                lnl_exit_en,
  input  logic [LW-1:0]       lnl_exit_warp,
  input  logic                lnl_br_en,
  input  logic [LW-1:0]       lnl_br_warp,
  input  logic [31:0]         lnl_br_pc,
  input  logic                lnl_fetch_ready,
  output logic                lnl_fetch_valid,
  output logic [LW-1:0]       lnl_fetch_warp,
  output logic [31:0]         lnl_fetch_pc,
  output logic                lnl_fetch_fused,
  output logic [LNL_WARPS-1:0] lnl_approx,
  output logic [LNL_WARPS-1:0] lnl_fused,
  output logic                lnl_fuse_event,
  output logic                lnl_split_event,
  input  logic                lnl_dec_valid,
  input  logic [LW-1:0]       lnl_dec_warp,
  input  logic [61:0]         lnl_dec_insn,
  input  logic [LNL_WARPS-1:0] lnl_sb_ready,
  output logic                lnl_issue_valid,
  output logic [LW-1:0]       lnl_issue_warp,
  output logic [61:0]         lnl_issue_insn,
  output logic                lnl_issue_fused,
  output logic [35:0]         lnl_oc_idx0,      // source k in bits [12k +: 12]
  output logic [35:0]         lnl_oc_idx1,
  input  logic                lnl_oc_op_en,
  input  logic [1:0]          lnl_oc_op_row,
  input  logic                lnl_oc_op_half,
  input  logic [1023:0]       lnl_oc_op_data,
  input  logic [31:0]         lnl_oc_op_mask,
  output logic                lnl_disp_valid,
  input  logic                lnl_disp_ready,
  output logic [3071:0]       lnl_disp_data,    // source k lane i in [1024k + 32i +: 32]
  output logic [31:0]         lnl_disp_sel,
  output logic                lnl_disp_fused,
  output logic [5:0]          lnl_disp_warp,
  input  logic [1023:0]       lnl_wb_packed,
  input  logic [31:0]         lnl_wb_sel,
  output logic [1023:0]       lnl_wb_warp0,
  output logic [1023:0]       lnl_wb_warp1,
  // ---------------- AxMemo
  input  logic                ax_wide8,
  input  logic                ax_req_valid,
  output logic                ax_req_ready,
  input  logic [1:0]          ax_req_op,
  input  logic [2:0]          ax_req_lut,
  input  logic                ax_req_tid,
  input  logic [63:0]         ax_req_data,
  input  logic [4:0]          ax_req_trunc,
  output logic                ax_resp_valid,
  output logic                ax_resp_hit,
  output logic [1:0]          ax_resp_level,
  output logic [63:0]         ax_resp_data,
  output logic                ax_memo_disabled,
  output logic                ax_lookup_stalled,
  output logic                ax_sampled_miss,
  output logic [15:0]         ax_qm_samples,
  output logic [15:0]         ax_qm_bad
);
  // ---------------------------------------------------------------- G-Scalar
  gs_pkg::gs_meta_t   rd_meta_s, dst_meta_s;
  gs_pkg::gs_meta_t   src_meta_s [3];
  gs_pkg::gs_exmode_e sc_mode_e;

  gs_regfile #(.NB(GS_NB), .RPB(GS_RPB)) u_gs_rf (
    .clk, .rst_n,
    .req_valid(gs_req_valid), .req_ready(gs_req_ready), .req_write(gs_req_write),
    .req_reg(gs_req_reg), .req_mask(gs_req_mask), .req_data(gs_req_data),
    .wr_mode(gs_pkg::gs_exmode_e'(gs_wr_mode)), .wr_half(gs_wr_half),
    .rd_valid(gs_rd_valid), .rd_reg(gs_rd_reg), .rd_data(gs_rd_data), .rd_meta(rd_meta_s),
    .rd_bvr_only(gs_rd_bvr_only), .arrays_active(gs_arrays_active),
    .special_move(gs_special_move)
  );
  assign gs_rd_meta = rd_meta_s;

  always_comb begin
    for (int k = 0; k < 3; k++) src_meta_s[k] = gs_pkg::gs_meta_t'(gs_sc_src_meta[MW*k +: MW]);
    dst_meta_s = gs_pkg::gs_meta_t'(gs_sc_dst_meta);
  end

  gs_scalar_check #(.NSRC(3)) u_gs_sc (
    .src_valid(gs_sc_src_valid), .src_meta(src_meta_s), .mask(gs_sc_mask),
    .dst_valid(gs_sc_dst_valid), .dst_meta(dst_meta_s), .mode(sc_mode_e),
    .half_scalar(gs_sc_half_scalar), .lane_en(gs_sc_lane_en),
    .special_move(gs_sc_special_move)
  );
  assign gs_sc_mode = sc_mode_e;

  // ---------------------------------------------------------------- LnL
  lnl_pkg::lnl_insn_t issue_insn_s;

  lnl_core #(.NWARPS(LNL_WARPS)) u_lnl (
    .clk, .rst_n, .group_log2(lnl_group_log2), .approx_th(lnl_approx_th),
    .ld_valid(lnl_ld_valid), .ld_check(lnl_ld_check), .ld_warp(lnl_ld_warp),
    .ld_entry(lnl_ld_entry), .ld_nblk(lnl_ld_nblk), .ld_data(lnl_ld_data),
    .ld_mask(lnl_ld_mask), .ld_checked(lnl_ld_checked), .ld_similar(lnl_ld_similar),
    .sa_valid(lnl_sa_valid), .sa_warp(lnl_sa_warp), .sa_sel(lnl_sa_sel),
    .sa_end_pc(lnl_sa_end_pc), .sa_ok(lnl_sa_ok),
    .launch_en(lnl_launch_en), .launch_warp(lnl_launch_warp), .launch_pc(lnl_launch_pc),
    .exit_en(lnl_exit_en), .exit_warp(lnl_exit_warp),
    .br_en(lnl_br_en), .br_warp(lnl_br_warp), .br_pc(lnl_br_pc),
    .fetch_ready(lnl_fetch_ready), .fetch_valid(lnl_fetch_valid), .fetch_warp(lnl_fetch_warp),
    .fetch_pc(lnl_fetch_pc), .fetch_fused(lnl_fetch_fused),
    .approx(lnl_approx), .fused(lnl_fused),
    .fuse_event(lnl_fuse_event), .split_event(lnl_split_event),
    .dec_valid(lnl_dec_valid), .dec_warp(lnl_dec_warp),
    .dec_insn(lnl_pkg::lnl_insn_t'(lnl_dec_insn)), .sb_ready(lnl_sb_ready),
    .issue_valid(lnl_issue_valid), .issue_warp(lnl_issue_warp), .issue_insn(issue_insn_s),
    .issue_fused(lnl_issue_fused),
    .oc_idx0(lnl_oc_idx0), .oc_idx1(lnl_oc_idx1),
    .oc_op_en(lnl_oc_op_en), .oc_op_row(lnl_oc_op_row), .oc_op_half(lnl_oc_op_half),
    .oc_op_data(lnl_oc_op_data), .oc_op_mask(lnl_oc_op_mask),
    .disp_valid(lnl_disp_valid), .disp_ready(lnl_disp_ready), .disp_data(lnl_disp_data),
    .disp_sel(lnl_disp_sel), .disp_fused(lnl_disp_fused), .disp_warp(lnl_disp_warp),
    .wb_packed(lnl_wb_packed), .wb_sel(lnl_wb_sel),
    .wb_warp0(lnl_wb_warp0), .wb_warp1(lnl_wb_warp1)
  );
  assign lnl_issue_insn = issue_insn_s;

  // ---------------------------------------------------------------- AxMemo
  ax_memo_unit #(.L1_SETS(AX_L1_SETS), .L2_SETS(AX_L2_SETS)) u_ax (
    .clk, .rst_n, .wide8(ax_wide8),
    .req_valid(ax_req_valid), .req_ready(ax_req_ready), .req_op(ax_pkg::ax_op_e'(ax_req_op)),
    .req_lut(ax_req_lut), .req_tid(ax_req_tid), .req_data(ax_req_data),
    .req_trunc(ax_req_trunc),
    .resp_valid(ax_resp_valid), .resp_hit(ax_resp_hit), .resp_level(ax_resp_level),
    .resp_data(ax_resp_data), .memo_disabled(ax_memo_disabled),
    .lookup_stalled(ax_lookup_stalled), .sampled_miss(ax_sampled_miss),
    .qm_samples(ax_qm_samples), .qm_bad(ax_qm_bad)
  );
endmodule
