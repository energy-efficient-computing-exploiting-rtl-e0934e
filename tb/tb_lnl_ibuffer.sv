// tb_lnl_ibuffer: self-checking test of the fusion-aware instruction buffer.
//
// Random fills (fused entries only for even warps), random scoreboard readiness and issue
// back-pressure on 48 warps, against a model kept here: two-entry FIFO per warp,
// ready bits registered from the warp's own scoreboard (rdy0) and the partner's (rdy1),
// a fused entry needing both, round-robin issue. Checks every cycle: issue_valid,
// issue_warp, the instruction and f bit, full flags; that a fused entry never issues
// while the partner warp is not ready; and that instructions of a warp leave in fill
// order. Also checks the one-cycle delay from scoreboard ready to issue. Watchdog: 200k
// cycles.
module tb_lnl_ibuffer;
  import lnl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fill_en = 0, fill_fused = 0, issue_ready = 1;
  logic [5:0] fill_warp = 0;
  lnl_insn_t fill_insn = '0;
  logic [47:0] sb_ready = 0;
  logic issue_valid, issue_fused;
  logic [5:0] issue_warp;
  lnl_insn_t issue_insn;
  logic [47:0] full;

  lnl_ibuffer dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  typedef struct { lnl_insn_t insn; bit f; } ent_t;
  ent_t mq [48][$];
  bit r0 [48], r1 [48];
  int m_rr = 0;
  int n_fused_issue = 0, n_issue = 0, n_blocked_fused = 0;

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int w = 0; w < 48; w++) begin r0[w] = 0; r1[w] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- directed: ready one cycle after the scoreboard
    @(negedge clk);
    fill_en = 1; fill_warp = 6; fill_fused = 0; fill_insn = 62'h123;
    @(negedge clk);
    fill_en = 0;
    mq[6].push_back('{62'h123, 0});
    #1 chk(!issue_valid, "not ready before scoreboard");
    sb_ready[6] = 1;
    #1 chk(!issue_valid, "ready bit is registered");
    @(negedge clk);
    r0[6] = 1; r1[7] = 1; r1[6] = 0;
    #1 chk(issue_valid && issue_warp == 6 && issue_insn == 62'h123, "issues one cycle after ready");
    void'(mq[6].pop_front());
    m_rr = 6;
    @(negedge clk);
    // ---- random
    for (int t = 0; t < 8000; t++) begin
      bit e_valid;
      int e_warp;
      bit acc_fill;
      // inputs for this cycle
      issue_ready = ($urandom % 4 != 0);
      for (int w = 0; w < 48; w++) if ($urandom % 4 == 0) sb_ready[w] = ~sb_ready[w];
      fill_en = $urandom % 2;
      fill_warp = 6'($urandom % 48);
      fill_fused = (fill_warp % 2 == 0) && ($urandom % 2);
      fill_insn = {$urandom, $urandom};
      #1;
      // model issue choice
      e_valid = 0; e_warp = 0;
      for (int k = 1; k <= 48; k++) begin
        int w;
        w = (m_rr + k) % 48;
        if (!e_valid && mq[w].size() > 0 && r0[w] && (!mq[w][0].f || r1[w])) begin
          e_valid = 1; e_warp = w;
        end
      end
      for (int w = 0; w < 48; w += 2)
        if (mq[w].size() > 0 && mq[w][0].f && r0[w] && !r1[w]) n_blocked_fused++;
      // a full warp may be filled only when it issues now
      if (fill_en && mq[fill_warp].size() == 2 && !(e_valid && issue_ready && e_warp == fill_warp))
        fill_en = 0;
      #1;
      chk(issue_valid == e_valid, "issue_valid");
      for (int w = 0; w < 48; w++) chk(full[w] == (mq[w].size() == 2), $sformatf("full[%0d]", w));
      if (e_valid) begin
        chk(issue_warp == 6'(e_warp), $sformatf("issue_warp %0d exp %0d", issue_warp, e_warp));
        chk(issue_insn == mq[e_warp][0].insn, "issue_insn (fill order)");
        chk(issue_fused == mq[e_warp][0].f, "issue_fused");
        if (issue_ready) begin
          if (mq[e_warp][0].f) n_fused_issue++;
          n_issue++;
          void'(mq[e_warp].pop_front());
          m_rr = e_warp;
        end
      end
      if (fill_en) mq[fill_warp].push_back('{fill_insn, fill_fused});
      for (int w = 0; w < 48; w++) begin
        r0[w] = sb_ready[w];
        r1[w] = sb_ready[w ^ 1];
      end
      @(negedge clk);
    end
    chk(n_fused_issue > 100 && n_blocked_fused > 100 && n_issue > 2000,
        $sformatf("fused issue %0d, fused blocked by partner %0d", n_fused_issue, n_blocked_fused));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
