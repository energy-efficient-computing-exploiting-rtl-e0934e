// tb_lnl_core: scenario test of the Lock and Load front-end (checker, history table,
// warp fusion, instruction buffer and operand collector together).
//
// Warps 0 and 1 (a fusion pair) and warp 2 (partner idle) run the same small kernel:
// a checked load at the start, START_APPROX at PC 0x40 naming that load's table entry,
// the approximable region up to PC 0x80, then more code. Warps 0 and 1 load smooth data
// (similar within groups of 8 threads), warp 2 loads data with outliers. A small front
// end here decodes every fetched instruction one cycle later, raises START_APPROX when
// PC 0x40 is fetched, and plays register file for the operand collector (operands for
// both source warps of a fused instruction, anchors from random active masks).
// Checks: load check results and their 3-cycle latency into the table; sa_ok per warp;
// warp 0 waits at the barrier until warp 1 arrives; exactly one fuse and one split;
// while fused the odd warp is never fetched and fused instructions are dispatched with
// the two warps' anchor operands packed into one 32-lane operand; warp 2 runs
// unapproximated; the used table entry (one region) is gone after START_APPROX.
// Watchdog: 20k cycles.
module tb_lnl_core;
  import lnl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] group_log2 = 3;
  logic [15:0] approx_th = 16'd3277;
  logic ld_valid = 0, ld_check = 0, ld_checked, ld_similar;
  logic [5:0] ld_warp = 0, sa_warp = 0, launch_warp = 0, exit_warp = 0, br_warp = 0, dec_warp = 0;
  logic [1:0] ld_entry = 0, ld_nblk = 0, oc_op_row = 0;
  logic [31:0][31:0] ld_data = 0, oc_op_data = 0, wb_packed = 0, wb_warp0, wb_warp1;
  logic [31:0] ld_mask = '1, oc_op_mask = '1, disp_sel, wb_sel = 0;
  logic sa_valid = 0, sa_ok, launch_en = 0, exit_en = 0, br_en = 0, fetch_ready = 1;
  logic [2:0] sa_sel = 0;
  logic [31:0] sa_end_pc = 0, launch_pc = 0, br_pc = 0, fetch_pc;
  logic fetch_valid, fetch_fused, fuse_event, split_event;
  logic [5:0] fetch_warp, issue_warp, disp_warp;
  logic [47:0] approx, fused, sb_ready = '1;
  logic dec_valid = 0, issue_valid, issue_fused, oc_op_en = 0, oc_op_half = 0;
  lnl_insn_t dec_insn = '0, issue_insn;
  logic [2:0][11:0] oc_idx0, oc_idx1;
  logic disp_valid, disp_ready = 0, disp_fused;
  logic [2:0][31:0][31:0] disp_data;

  lnl_core dut (.*);

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- front end: decode one cycle after fetch, START_APPROX at 0x40
  int n_fuse = 0, n_split = 0, n_fused_fetch = 0, n_odd_fetch_fused = 0, n_w2_approx = 0;
  int sa_res [3] = '{-1, -1, -1};
  int w0_wait_cycles = 0;
  always @(negedge clk) if (rst_n) begin
    #1;
    dec_valid <= fetch_valid && fetch_ready;
    dec_warp  <= fetch_warp;
    dec_insn  <= '{opcode: 8'(fetch_pc >> 3), src_used: 3'b011, src2: 6'd0, src1: 6'd2, src0: 6'd1,
                   dst: 6'd3, imm: 27'(fetch_pc)};
    sa_valid <= 0;
    if (fetch_valid && fetch_ready && fetch_pc == 32'h40) begin
      sa_valid  <= 1;
      sa_warp   <= fetch_warp;
      sa_sel    <= 3'b001;
      sa_end_pc <= 32'h80;
    end
    if (fetch_valid && fetch_fused) n_fused_fetch++;
    if (fetch_valid && fused[1] && fetch_warp == 1) n_odd_fetch_fused++;
    if (fuse_event) n_fuse++;
    if (split_event) n_split++;
    if (approx[2]) n_w2_approx++;
    if (dut.u_wctl.waiting[0] && !dut.u_wctl.waiting[1]) w0_wait_cycles++;
  end
  always @(negedge clk) begin
    #3;
    if (sa_valid) sa_res[sa_warp] = sa_ok;
  end

  // ---------------- operand collector service
  int n_disp = 0, n_disp_fused = 0;
  logic [31:0] anc0, anc1;
  logic [31:0][31:0] opv [2][2];
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && dut.u_oc.busy && !dut.u_oc.disp_valid && !oc_op_en) begin
        bit f;
        f = dut.u_oc.f_q;
        for (int r = 0; r < 2; r++)
          for (int h = 0; h < (f ? 2 : 1); h++) begin
            logic [31:0] m;
            m = $urandom | 32'h0101_0101;
            for (int i = 0; i < 32; i++) opv[r][h][i] = $urandom;
            if (h == 0) anc0 = anchor_mask(m, group_log2); else anc1 = anchor_mask(m, group_log2);
            oc_op_en = 1; oc_op_row = 2'(r); oc_op_half = h; oc_op_data = opv[r][h]; oc_op_mask = m;
            @(negedge clk);
          end
        oc_op_en = 0;
        #1;
        chk(disp_valid, "dispatch after the operands");
        if (f) begin
          bit ok;
          ok = 1;
          for (int j = 0; j < 16; j++) begin
            if (anc0[2*j] && disp_data[0][j] != opv[0][0][2*j]) ok = 0;
            if (anc0[2*j+1] && disp_data[0][j] != opv[0][0][2*j+1]) ok = 0;
            if (anc1[2*j] && disp_data[0][16+j] != opv[0][1][2*j]) ok = 0;
            if (anc1[2*j+1] && disp_data[0][16+j] != opv[0][1][2*j+1]) ok = 0;
          end
          chk(ok, "fused operands packed from both warps' anchors");
          chk(disp_warp == 0, "fused instruction dispatched for warp 0");
          n_disp_fused++;
        end
        n_disp++;
        disp_ready = 1;
        @(negedge clk);
        disp_ready = 0;
      end
    end
  end

  initial begin
    #200_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- checked loads
    for (int w = 0; w < 3; w++) begin
      @(negedge clk);
      ld_valid = 1; ld_check = 1; ld_warp = 6'(w); ld_entry = 0; ld_nblk = 1; ld_mask = '1;
      for (int i = 0; i < 32; i++) begin
        real v;
        v = 5.0 + real'(i / 8) + real'($urandom % 100) / 10000.0;
        if (w == 2 && i % 8 == 5) v = v * 2.5;
        ld_data[i] = f32(v);
      end
      t0 = cyc;
      @(negedge clk);
      ld_valid = 0;
      while (!ld_checked) @(negedge clk);
      chk(cyc - t0 == 3, $sformatf("load check result after %0d cycles", cyc - t0));
      chk(ld_similar == (w != 2), $sformatf("warp %0d load similar=%0b", w, ld_similar));
    end
    // an unchecked load does not touch the table
    @(negedge clk);
    ld_valid = 1; ld_check = 0; ld_warp = 0;
    @(negedge clk);
    ld_valid = 0;
    repeat (4) begin
      @(negedge clk);
      chk(!ld_checked, "unchecked load passes by");
    end
    // ---- launch; warp 1 starts later so warp 0 reaches the barrier first
    @(negedge clk);
    launch_en = 1; launch_warp = 0; launch_pc = 32'h0;
    @(negedge clk);
    launch_warp = 2;
    @(negedge clk);
    launch_en = 0;
    repeat (30) @(negedge clk);
    launch_en = 1; launch_warp = 1; launch_pc = 32'h0;
    @(negedge clk);
    launch_en = 0;
    // ---- run until every warp is past the region
    while (!(dut.u_wctl.tbl[0].pc > 32'hC0 && dut.u_wctl.tbl[1].pc > 32'hC0 && dut.u_wctl.tbl[2].pc > 32'hC0)
           && cyc < 15000) @(negedge clk);
    chk(sa_res[0] == 1 && sa_res[1] == 1, "warps 0 and 1 may approximate");
    chk(sa_res[2] == 0, "warp 2 may not approximate (dissimilar load)");
    chk(w0_wait_cycles > 10, $sformatf("warp 0 waited at the barrier (%0d cycles)", w0_wait_cycles));
    chk(n_fuse == 1 && n_split == 1, $sformatf("one fuse (%0d) and one split (%0d)", n_fuse, n_split));
    chk(n_fused_fetch == 7, $sformatf("region fetched once for both warps (%0d fused fetches)", n_fused_fetch));
    chk(n_odd_fetch_fused == 0, "odd warp not fetched while fused");
    chk(n_w2_approx == 0, "warp 2 never approximates");
    chk(n_disp_fused >= 5 && n_disp > 40, $sformatf("dispatches %0d, fused %0d", n_disp, n_disp_fused));
    chk(!fused[0] && !fused[1] && !approx[0] && !approx[1], "pair split after the region");
    // the table entry was used by its only region: a second START_APPROX fails
    @(negedge clk);
    sa_warp = 0; sa_sel = 3'b001;
    #1 chk(!sa_ok, "table entry invalidated after its last region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
