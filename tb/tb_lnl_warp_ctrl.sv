// tb_lnl_warp_ctrl: self-checking test of the Lock and Load warp state and fusion fetch.
//
// Directed part: warps 0 and 1 reach START_APPROX; the first waits at the barrier (is
// not fetched) until the second arrives, then both approximate and are fused: one fetch
// per cycle through warp 0 advances both PCs by 8; at the end PC the pair splits and
// both warps are fetched separately again. A lone warp whose partner is idle does not
// wait. Random part: launches, exits, START_APPROX with random history-table results,
// branches, fetch holds and back-pressure on all 48 warps, compared every cycle against
// a model of the documented rules (round-robin fetch, barrier per pair, fuse only when
// both pass, split at the end PC): fetch choice, PC, fused bit, the per-warp state
// vectors and the fuse/split events. Watchdog: 200k cycles.
module tb_lnl_warp_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic launch_en = 0, exit_en = 0, sa_en = 0, sa_ok = 0, br_en = 0, fetch_ready = 1;
  logic [5:0] launch_warp = 0, exit_warp = 0, sa_warp = 0, br_warp = 0;
  logic [31:0] launch_pc = 0, sa_end_pc = 0, br_pc = 0;
  logic [47:0] hold = 0;
  logic fetch_valid, fetch_fused, fuse_event, split_event;
  logic [5:0] fetch_warp;
  logic [31:0] fetch_pc;
  logic [47:0] active, approx, fused, waiting;

  lnl_warp_ctrl dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- model
  bit m_act [48], m_wait [48], m_apx [48], m_fus [48], m_ok [48];
  logic [31:0] m_pc [48], m_end [48];
  int m_rr = 0;
  int e_warp;
  bit e_valid, e_fused, e_at_end, e_fuse_ev, e_split_ev;
  int n_fuse = 0, n_split = 0, n_fused_fetch = 0;

  function automatic bit elig(input int w);
    return m_act[w] && !m_wait[w] && !hold[w] && !(m_fus[w] && w % 2 == 1);
  endfunction

  task automatic model_outputs();
    e_valid = 0; e_warp = 0;
    for (int k = 1; k <= 48; k++) begin
      int w;
      w = (m_rr + k) % 48;
      if (!e_valid && elig(w)) begin e_valid = 1; e_warp = w; end
    end
    e_at_end = m_apx[e_warp] && m_pc[e_warp] == m_end[e_warp];
    e_fused = m_fus[e_warp] && !e_at_end;
    e_fuse_ev = 0;
    for (int w = 0; w < 48; w += 2)
      if (m_wait[w] && m_wait[w+1] && m_ok[w] && m_ok[w+1]) e_fuse_ev = 1;
    e_split_ev = e_valid && fetch_ready && e_at_end && m_fus[e_warp];
  endtask

  task automatic model_step();
    bit rel [48];
    bit fus_n [48];
    for (int w = 0; w < 48; w++) rel[w] = m_wait[w] && (!m_act[w ^ 1] || m_wait[w ^ 1]);
    for (int w = 0; w < 48; w++) fus_n[w] = m_fus[w];
    for (int w = 0; w < 48; w++) if (rel[w]) fus_n[w] = m_wait[w ^ 1] && m_ok[w] && m_ok[w ^ 1];
    for (int w = 0; w < 48; w++) if (rel[w]) begin
      m_wait[w] = 0;
      m_apx[w] = m_ok[w];
    end
    if (e_valid && fetch_ready) begin
      int w;
      logic [31:0] npc;
      w = e_warp;
      npc = m_pc[w] + 8;
      m_rr = w;
      if (m_fus[w]) m_pc[w ^ 1] = npc;
      m_pc[w] = npc;
      if (e_at_end) begin
        if (m_fus[w]) begin
          m_apx[w ^ 1] = 0;
          fus_n[w ^ 1] = 0;
        end
        m_apx[w] = 0;
        fus_n[w] = 0;
      end
    end
    if (br_en) begin
      if (m_fus[br_warp]) m_pc[br_warp ^ 1] = br_pc;
      m_pc[br_warp] = br_pc;
    end
    if (sa_en) begin
      m_wait[sa_warp] = 1; m_ok[sa_warp] = sa_ok; m_end[sa_warp] = sa_end_pc;
    end
    if (launch_en) begin
      m_act[launch_warp] = 1; m_apx[launch_warp] = 0; fus_n[launch_warp] = 0;
      m_wait[launch_warp] = 0; m_pc[launch_warp] = launch_pc;
    end
    if (exit_en) begin
      if (m_fus[exit_warp]) fus_n[exit_warp ^ 1] = 0;
      m_act[exit_warp] = 0; m_apx[exit_warp] = 0; fus_n[exit_warp] = 0; m_wait[exit_warp] = 0;
    end
    for (int w = 0; w < 48; w++) m_fus[w] = fus_n[w];
  endtask

  // one cycle: inputs already set after a negedge; check, then advance model and clock
  task automatic cycle();
    #1;
    model_outputs();
    chk(fetch_valid == e_valid, "fetch_valid");
    if (e_valid) begin
      chk(fetch_warp == 6'(e_warp), $sformatf("fetch_warp %0d exp %0d", fetch_warp, e_warp));
      chk(fetch_pc == m_pc[e_warp], $sformatf("fetch_pc %h exp %h", fetch_pc, m_pc[e_warp]));
      chk(fetch_fused == e_fused, "fetch_fused");
      if (fetch_ready && e_fused) n_fused_fetch++;
    end
    chk(fuse_event == e_fuse_ev, "fuse_event");
    chk(split_event == e_split_ev, "split_event");
    if (e_fuse_ev) n_fuse++;
    if (e_split_ev) n_split++;
    model_step();
    @(negedge clk);
    for (int w = 0; w < 48; w++) begin
      chk(active[w] == m_act[w] && waiting[w] == m_wait[w] && approx[w] == m_apx[w] &&
          fused[w] == m_fus[w], $sformatf("state of warp %0d", w));
    end
    launch_en = 0; exit_en = 0; sa_en = 0; br_en = 0;
  endtask

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int w0_fetches, pair_fetches;
  initial begin
    for (int w = 0; w < 48; w++) begin
      m_act[w] = 0; m_wait[w] = 0; m_apx[w] = 0; m_fus[w] = 0; m_ok[w] = 0;
      m_pc[w] = 0; m_end[w] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- directed: pair 0/1 and lone warp 4
    launch_en = 1; launch_warp = 0; launch_pc = 32'h100; cycle();
    launch_en = 1; launch_warp = 1; launch_pc = 32'h100; cycle();
    launch_en = 1; launch_warp = 4; launch_pc = 32'h900; cycle();
    sa_en = 1; sa_warp = 0; sa_ok = 1; sa_end_pc = 32'h140; cycle();
    repeat (3) begin
      chk(!(fetch_valid && fetch_warp == 0), "warp 0 waits at the barrier");
      cycle();
    end
    chk(waiting[0], "warp 0 still waiting");
    sa_en = 1; sa_warp = 4; sa_ok = 1; sa_end_pc = 32'h920; cycle();   // partner 5 idle
    cycle();
    chk(!waiting[4] && approx[4] && !fused[4], "lone warp released at once, not fused");
    // warp 1 arrives at its START_APPROX
    while (!(fetch_valid && fetch_warp == 1)) cycle();
    sa_en = 1; sa_warp = 1; sa_ok = 1; sa_end_pc = 32'h140; cycle();
    cycle();
    chk(fused[0] && fused[1] && approx[0] && approx[1], "pair fused after the barrier");
    pair_fetches = 0; w0_fetches = 0;
    while (fused[0]) begin
      #1;
      if (fetch_valid && fetch_ready) begin
        chk(fetch_warp != 1, "odd warp of a fused pair is not fetched");
        if (fetch_warp == 0) w0_fetches++;
      end
      cycle();
      if (++pair_fetches > 200) break;
    end
    chk(!fused[1] && !approx[0] && !approx[1], "pair split at the end PC");
    chk(dut.tbl[0].pc == dut.tbl[1].pc, "both PCs advanced together");
    chk(n_split == 1 && n_fuse == 1, "one fuse and one split event");
    // ---- random
    for (int t = 0; t < 6000; t++) begin
      int w;
      fetch_ready = ($urandom % 5 != 0);
      hold = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      w = $urandom % 48;
      case ($urandom % 8)
        0: if (!m_act[w]) begin launch_en = 1; launch_warp = 6'(w); launch_pc = 32'($urandom % 64) * 8; end
        1: if ($urandom % 8 == 0) begin exit_en = 1; exit_warp = 6'(w); end
        2, 3: if (m_act[w] && !m_wait[w] && !m_apx[w] && !(m_fus[w] && w % 2 == 1)) begin
             sa_en = 1; sa_warp = 6'(w); sa_ok = ($urandom % 4 != 0);
             sa_end_pc = m_pc[w] + 8 * ($urandom % 6 + 1);
           end
        4: if (m_act[w] && !m_apx[w] && !(m_fus[w] && w % 2 == 1)) begin
             br_en = 1; br_warp = 6'(w); br_pc = 32'($urandom % 64) * 8;
           end
        default: ;
      endcase
      cycle();
    end
    chk(n_fuse > 20 && n_split > 20 && n_fused_fetch > 100,
        $sformatf("fusion exercised (%0d fuse, %0d split, %0d fused fetches)", n_fuse, n_split, n_fused_fetch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
