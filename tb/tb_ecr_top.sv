// tb_ecr_top: end-to-end test of the top level at its full default size (no parameter
// overrides: 16x64-register G-Scalar file, 48-warp LnL core, 128-set L1 and 8192-set L2
// AxMemo tables).
//
// Three independent scenarios run one after the other, each driving only the plain
// top-level ports:
//   G-Scalar: vector, scalar and divergent writes and reads through the register file,
//     and the issue-stage check for scalar, half-scalar, divergent-scalar and
//     special-move cases.
//   LnL: checked loads for warps 0 and 1 (smooth data) and warp 2 (outliers), a small
//     front end that decodes every fetched instruction and issues START_APPROX at PC
//     0x40 (region end 0x80), and an operand source that keeps offering all rows and
//     halves to the operand collector while dispatch is always accepted.
//   AxMemo: 1200 distinct single-input keys on one LUT_ID (more than the 1024 L1
//     entries) so that early keys are found again in L2; lookups right after their
//     input (lookup stall); an invalidate; finally results 50% off after sampled
//     misses until the quality monitor switches memoization off.
// Each mechanism is counted and the test fails if any of them never happened: special
// move, base-value-only read, scalar / half-scalar / divergent-scalar decisions, similar
// and dissimilar loads, table entry used up, fuse, split, fused dispatch, L1 hit (3
// cycles), L2 hit (16 cycles), miss, lookup stall, sampled miss, invalidate, memoization
// switched off. Watchdog: 5M cycles.
module tb_ecr_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // G-Scalar
  logic gs_req_valid = 0, gs_req_ready, gs_req_write = 0;
  logic [9:0] gs_req_reg = 0, gs_rd_reg;
  logic [31:0] gs_req_mask = '1;
  logic [31:0][31:0] gs_req_data = '0, gs_rd_data;
  logic [1:0] gs_wr_mode = 0, gs_wr_half = 0;
  logic gs_rd_valid, gs_rd_bvr_only, gs_special_move;
  logic [73:0] gs_rd_meta;
  logic [4:0] gs_arrays_active;
  logic [2:0] gs_sc_src_valid = 0;
  logic [2:0][73:0] gs_sc_src_meta = '0;
  logic [31:0] gs_sc_mask = '1, gs_sc_lane_en;
  logic gs_sc_dst_valid = 0, gs_sc_special_move;
  logic [73:0] gs_sc_dst_meta = '0;
  logic [1:0] gs_sc_mode, gs_sc_half_scalar;
  // LnL
  logic [2:0] lnl_group_log2 = 3;
  logic [15:0] lnl_approx_th = 16'd3277;
  logic lnl_ld_valid = 0, lnl_ld_check = 0, lnl_ld_checked, lnl_ld_similar;
  logic [5:0] lnl_ld_warp = 0, lnl_sa_warp = 0, lnl_launch_warp = 0, lnl_exit_warp = 0,
              lnl_br_warp = 0, lnl_dec_warp = 0, lnl_fetch_warp, lnl_issue_warp, lnl_disp_warp;
  logic [1:0] lnl_ld_entry = 0, lnl_ld_nblk = 0, lnl_oc_op_row = 0;
  logic [31:0][31:0] lnl_ld_data = '0, lnl_oc_op_data = '0, lnl_wb_packed = '0, lnl_wb_warp0, lnl_wb_warp1;
  logic [31:0] lnl_ld_mask = '1, lnl_oc_op_mask = '1, lnl_disp_sel, lnl_wb_sel = 0;
  logic lnl_sa_valid = 0, lnl_sa_ok, lnl_launch_en = 0, lnl_exit_en = 0, lnl_br_en = 0;
  logic lnl_fetch_ready = 1, lnl_fetch_valid, lnl_fetch_fused, lnl_fuse_event, lnl_split_event;
  logic [2:0] lnl_sa_sel = 0;
  logic [31:0] lnl_sa_end_pc = 0, lnl_launch_pc = 0, lnl_br_pc = 0, lnl_fetch_pc;
  logic [47:0] lnl_approx, lnl_fused, lnl_sb_ready = '1;
  logic lnl_dec_valid = 0, lnl_issue_valid, lnl_issue_fused, lnl_oc_op_en = 0, lnl_oc_op_half = 0;
  logic [61:0] lnl_dec_insn = '0, lnl_issue_insn;
  logic [35:0] lnl_oc_idx0, lnl_oc_idx1;
  logic lnl_disp_valid, lnl_disp_ready = 1, lnl_disp_fused;
  logic [3071:0] lnl_disp_data;
  // AxMemo
  logic ax_wide8 = 0, ax_req_valid = 0, ax_req_ready, ax_req_tid = 0;
  logic [1:0] ax_req_op = 0;
  logic [2:0] ax_req_lut = 0;
  logic [63:0] ax_req_data = 0, ax_resp_data;
  logic [4:0] ax_req_trunc = 0;
  logic ax_resp_valid, ax_resp_hit, ax_memo_disabled, ax_lookup_stalled, ax_sampled_miss;
  logic [1:0] ax_resp_level;
  logic [15:0] ax_qm_samples, ax_qm_bad;

  ecr_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  function automatic logic [31:0] f32(input real v);
    logic [63:0] d;
    d = $realtobits(v);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction
  function automatic real from_f32(input logic [31:0] x);
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'h0});
  endfunction

  // mechanism counters
  int n_special = 0, n_bvr = 0, n_sc_scalar = 0, n_sc_half = 0, n_sc_div = 0, n_sc_sm = 0;
  int n_similar = 0, n_dissimilar = 0, n_lcht_gone = 0, n_fuse = 0, n_split = 0, n_disp_fused = 0;
  int n_l1 = 0, n_l2 = 0, n_miss = 0, n_stall = 0, n_sampled = 0, n_inval = 0, n_off = 0;

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ================================================================ G-Scalar
  always @(negedge clk) if (gs_special_move) n_special++;

  task automatic gs_req(input bit w, input logic [9:0] r, input logic [31:0] m,
                        input logic [31:0][31:0] d, input logic [1:0] md);
    bit acc;
    @(negedge clk);
    gs_req_valid = 1; gs_req_write = w; gs_req_reg = r; gs_req_mask = m; gs_req_data = d;
    gs_wr_mode = md; gs_wr_half = 0;
    do begin
      #4 acc = gs_req_ready;
      @(posedge clk);
      if (!acc) @(negedge clk);
    end while (!acc);
    #1 gs_req_valid = 0;
  endtask

  task automatic gs_read(input logic [9:0] r, output logic [31:0][31:0] d, output bit bvr,
                         output logic [73:0] meta);
    int t0;
    gs_req(0, r, '1, '0, 0);
    t0 = cyc;
    while (!gs_rd_valid && cyc < t0 + 10) @(negedge clk);
    chk(gs_rd_valid && gs_rd_reg == r, "register read returns");
    d = gs_rd_data; bvr = gs_rd_bvr_only; meta = gs_rd_meta;
  endtask

  task automatic run_gs();
    logic [31:0][31:0] v, d;
    logic [73:0] meta, scal_meta;
    bit bvr;
    for (int i = 0; i < 32; i++) v[i] = $urandom;
    gs_req(1, 10'd5, '1, v, 0);
    gs_read(10'd5, d, bvr, meta);
    chk(d == v && !bvr, "vector register round trip");
    for (int i = 0; i < 32; i++) v[i] = (i == 0) ? 32'h4000_1234 : $urandom;
    gs_req(1, 10'd6, '1, v, 1);                       // scalar instruction result
    gs_read(10'd6, d, bvr, scal_meta);
    chk(bvr && d == {32{32'h4000_1234}}, "scalar register read from the base values only");
    if (bvr) n_bvr++;
    for (int i = 0; i < 32; i++) v[i] = 32'h100 + i;
    gs_req(1, 10'd6, 32'h0000_FFFF, v, 0);             // divergent write to a compressed register
    repeat (2) @(negedge clk);
    gs_read(10'd6, d, bvr, meta);
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 32; i++) if (d[i] != (i < 16 ? 32'h100 + i : 32'h4000_1234)) ok = 0;
      chk(ok && !bvr && meta[73], "merged divergent write stored uncompressed");
    end
    chk(n_special == 1, $sformatf("one special move (%0d)", n_special));
    // issue-stage check
    @(negedge clk);
    gs_sc_src_valid = 3'b011; gs_sc_src_meta[0] = scal_meta; gs_sc_src_meta[1] = scal_meta;
    gs_sc_mask = '1;
    #1 chk(gs_sc_mode == 1 && gs_sc_lane_en == 32'h1, "scalar instruction");
    if (gs_sc_mode == 1) n_sc_scalar++;
    gs_sc_src_meta[1] = {1'b0, 1'b0, 4'b0000, 4'b1111, 32'h0, 32'h7};   // upper half uniform
    #1 chk(gs_sc_mode == 2 && gs_sc_half_scalar == 2'b10, "half-scalar instruction");
    if (gs_sc_mode == 2) n_sc_half++;
    gs_sc_src_meta[1] = scal_meta; gs_sc_mask = 32'h0000_0F0F;
    #1 chk(gs_sc_mode == 3 && gs_sc_lane_en == 32'h0000_0800, "divergent-scalar instruction");
    if (gs_sc_mode == 3) n_sc_div++;
    gs_sc_dst_valid = 1; gs_sc_dst_meta = scal_meta;
    #1 chk(gs_sc_special_move, "divergent write to a compressed destination");
    if (gs_sc_special_move) n_sc_sm++;
    gs_sc_dst_valid = 0; gs_sc_src_valid = 0;
  endtask

  // ================================================================ LnL
  int sa_res [3] = '{-1, -1, -1};
  bit lnl_run = 0;
  always @(negedge clk) if (rst_n && lnl_run) begin
    #1;
    lnl_dec_valid <= lnl_fetch_valid && lnl_fetch_ready;
    lnl_dec_warp  <= lnl_fetch_warp;
    // {opcode, src_used=011, src2=0, src1=2, src0=1, dst=3, imm=pc}
    lnl_dec_insn  <= {8'(lnl_fetch_pc >> 3), 3'b011, 6'd0, 6'd2, 6'd1, 6'd3, 27'(lnl_fetch_pc)};
    lnl_sa_valid <= lnl_fetch_valid && lnl_fetch_ready && lnl_fetch_pc == 32'h40;
    lnl_sa_warp  <= lnl_fetch_warp;
    lnl_sa_sel   <= 3'b001;
    lnl_sa_end_pc <= 32'h80;
    // operand source: offer every row/half in turn
    lnl_oc_op_en <= 1;
    {lnl_oc_op_row, lnl_oc_op_half} <= 3'((cyc % 4) / 2 * 2 + cyc % 2);
    for (int i = 0; i < 32; i++) lnl_oc_op_data[i] <= $urandom;
    lnl_oc_op_mask <= '1;
    if (lnl_fuse_event) n_fuse++;
    if (lnl_split_event) n_split++;
    if (lnl_disp_valid && lnl_disp_fused) n_disp_fused++;
  end
  always @(negedge clk) begin
    #3;
    if (lnl_sa_valid && lnl_sa_warp < 3) sa_res[lnl_sa_warp] = lnl_sa_ok;
  end

  task automatic run_lnl();
    for (int w = 0; w < 3; w++) begin
      @(negedge clk);
      lnl_ld_valid = 1; lnl_ld_check = 1; lnl_ld_warp = 6'(w); lnl_ld_entry = 0; lnl_ld_nblk = 1;
      for (int i = 0; i < 32; i++) begin
        real v;
        v = 5.0 + real'(i / 8) + real'($urandom % 100) / 10000.0;
        if (w == 2 && i % 8 == 5) v = v * 2.5;
        lnl_ld_data[i] = f32(v);
      end
      @(negedge clk);
      lnl_ld_valid = 0;
      while (!lnl_ld_checked) @(negedge clk);
      chk(lnl_ld_similar == (w != 2), $sformatf("warp %0d load similar=%0b", w, lnl_ld_similar));
      if (lnl_ld_similar) n_similar++; else n_dissimilar++;
    end
    lnl_run = 1;
    @(negedge clk);
    lnl_launch_en = 1; lnl_launch_warp = 0; lnl_launch_pc = 0;
    @(negedge clk);
    lnl_launch_warp = 2;
    @(negedge clk);
    lnl_launch_warp = 1;
    @(negedge clk);
    lnl_launch_en = 0;
    while (!(n_split > 0 && sa_res[2] >= 0) && cyc < 200000) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(sa_res[0] == 1 && sa_res[1] == 1 && sa_res[2] == 0, "START_APPROX verdicts");
    chk(n_fuse == 1 && n_split == 1, $sformatf("fuse %0d split %0d", n_fuse, n_split));
    chk(n_disp_fused > 0, "fused instructions dispatched");
    lnl_run = 0;
    @(negedge clk);
    lnl_sa_valid = 0; lnl_sa_warp = 0; lnl_sa_sel = 3'b001;
    #1 chk(!lnl_sa_ok, "table entry used up by its region");
    if (!lnl_sa_ok) n_lcht_gone++;
  endtask

  // ================================================================ AxMemo
  int last_stall = -1;
  always @(negedge clk) if (ax_lookup_stalled) begin
    n_stall++;
    last_stall = cyc;
  end
  always @(negedge clk) if (ax_memo_disabled) n_off++;

  task automatic ax_send(input logic [1:0] o, input logic [2:0] lut, input logic [63:0] d,
                         output int acc_cyc);
    bit acc;
    @(negedge clk);
    ax_req_valid = 1; ax_req_op = o; ax_req_lut = lut; ax_req_tid = 0; ax_req_data = d;
    ax_req_trunc = 5'd4;
    do begin
      #4;
      acc = ax_req_ready;
      acc_cyc = cyc;
      @(posedge clk);
      if (!acc) @(negedge clk);
    end while (!acc);
    #1 ax_req_valid = 0;
  endtask

  task automatic ax_wait(input int acc_cyc, output bit hit, output logic [1:0] lvl,
                         output logic [63:0] d, output int lat, output bit smp);
    int guard = 0;
    while (!ax_resp_valid && guard < 100) begin
      @(negedge clk);
      guard++;
    end
    chk(ax_resp_valid, "memo response arrives");
    hit = ax_resp_hit; lvl = ax_resp_level; d = ax_resp_data; smp = ax_sampled_miss;
    lat = cyc - ((last_stall >= acc_cyc) ? last_stall + 1 : acc_cyc);
    @(negedge clk);
  endtask

  // one memoized region: input, lookup, update on a miss; returns hit and level
  task automatic ax_region(input logic [2:0] lut, input int k, input logic [63:0] v,
                           input bit expect_hit);
    int a, lat;
    bit hit, smp;
    logic [1:0] lvl;
    logic [63:0] d;
    ax_send(2'd0, lut, {32'h0, 32'(k) << 8}, a);
    ax_send(2'd1, lut, 0, a);
    ax_wait(a, hit, lvl, d, lat, smp);
    if (smp) begin
      n_sampled++;
      chk(expect_hit && !hit, "sampled miss only for stored entries");
    end else begin
      chk(hit == expect_hit, $sformatf("key %0d hit %0b expected %0b", k, hit, expect_hit));
    end
    if (hit) begin
      chk(d == v, "memoized data");
      if (lvl == 1) begin n_l1++; chk(lat == 3, $sformatf("L1 hit latency %0d", lat)); end
      if (lvl == 2) begin n_l2++; chk(lat == 16, $sformatf("L2 hit latency %0d", lat)); end
    end else begin
      if (!smp) begin n_miss++; chk(lat == 16, $sformatf("miss latency %0d", lat)); end
      ax_send(2'd2, lut, v, a);
      ax_wait(a, hit, lvl, d, lat, smp);
    end
  endtask

  task automatic run_ax();
    int a, lat, base, exp_win;
    real cur;
    bit hit, smp;
    logic [1:0] lvl;
    logic [63:0] d;
    for (int k = 0; k < 1200; k++) ax_region(3'd0, k, {32'h0, f32(1.0 + k)}, 0);
    for (int k = 0; k < 1200; k += 3) ax_region(3'd0, k, {32'h0, f32(1.0 + k)}, 1);
    for (int r = 0; r < 3; r++)
      for (int k = 1190; k < 1200; k++) ax_region(3'd0, k, {32'h0, f32(1.0 + k)}, 1);
    chk(n_l1 > 20 && n_l2 > 20 && n_miss >= 1200 && n_sampled > 0 && n_stall > 0,
        $sformatf("L1 %0d L2 %0d miss %0d sampled %0d stall %0d", n_l1, n_l2, n_miss, n_sampled, n_stall));
    // invalidate the LUT_ID: its entries are gone
    ax_send(2'd3, 3'd0, 0, a);
    ax_wait(a, hit, lvl, d, lat, smp);
    n_inval++;
    for (int k = 1190; k < 1195; k++) ax_region(3'd0, k, {32'h0, f32(1.0 + k)}, 0);
    chk(!ax_memo_disabled && ax_qm_bad == 0, "good samples keep memoization on");
    // quality: results 50% off after every sampled miss
    ax_region(3'd5, 7, {32'h0, f32(10.0)}, 0);
    base = ax_qm_samples;
    cur = 10.0;
    for (int g = 0; g < 40000 && !ax_memo_disabled; g++) begin
      ax_send(2'd0, 3'd5, {32'h0, 32'd7 << 8}, a);
      ax_send(2'd1, 3'd5, 0, a);
      ax_wait(a, hit, lvl, d, lat, smp);
      if (!hit) begin
        cur = cur * 1.5;                  // stored value becomes the next reference
        ax_send(2'd2, 3'd5, {32'h0, f32(cur)}, a);
        ax_wait(a, hit, lvl, d, lat, smp);
        repeat (4) @(negedge clk);
      end
    end
    chk(ax_memo_disabled, "bad results switch memoization off");
    exp_win = 100 - base % 100;
    if (exp_win < 11) exp_win += 100;
    chk(ax_qm_samples - base == exp_win,
        $sformatf("off at the end of the window (%0d samples, expected %0d)", ax_qm_samples - base, exp_win));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_gs();
    run_lnl();
    run_ax();
    chk(n_special > 0, "mechanism: special move");
    chk(n_bvr > 0, "mechanism: base-value-only read");
    chk(n_sc_scalar > 0 && n_sc_half > 0 && n_sc_div > 0 && n_sc_sm > 0, "mechanism: scalar check modes");
    chk(n_similar > 0 && n_dissimilar > 0, "mechanism: similar and dissimilar loads");
    chk(n_lcht_gone > 0, "mechanism: table entry used up");
    chk(n_fuse > 0 && n_split > 0 && n_disp_fused > 0, "mechanism: fuse, fused dispatch, split");
    chk(n_l1 > 0 && n_l2 > 0 && n_miss > 0, "mechanism: L1 hit, L2 hit, miss");
    chk(n_stall > 0 && n_sampled > 0 && n_inval > 0 && n_off > 0,
        "mechanism: lookup stall, sampled miss, invalidate, memoization off");
    $display("counts: sm %0d bvr %0d sc %0d/%0d/%0d/%0d ld %0d/%0d fuse %0d split %0d fdisp %0d l1 %0d l2 %0d miss %0d stall %0d smp %0d inv %0d",
             n_special, n_bvr, n_sc_scalar, n_sc_half, n_sc_div, n_sc_sm, n_similar, n_dissimilar,
             n_fuse, n_split, n_disp_fused, n_l1, n_l2, n_miss, n_stall, n_sampled, n_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
