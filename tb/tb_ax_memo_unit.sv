// tb_ax_memo_unit: self-checking test of the AxMemo memoization unit.
//
// Plays the role of the CPU core. Memoized code regions on four LUT_IDs and both thread
// contexts send 1-3 input words (with random noise in the truncated low bits), then a
// lookup; on a miss the "original code" result is sent with an update. A dictionary
// here, keyed on {LUT_ID, truncated inputs}, predicts hits and data; LUT_IDs are
// invalidated now and then. The L1 table is shrunk to 4 sets so entries fall out of L1
// and are found again in L2 (256 sets, no L2 evictions at this load).
// Checks: hit and data of every lookup; response 3 cycles after acceptance for an L1
// hit and 16 (2 + 13 + 1) for an L2 hit or an L1+L2 miss, counted from the cycle the
// lookup starts (after any wait for its inputs); every 100th hit answered as a
// sampled miss; a lookup right after its inputs waits for them (lookup_stalled);
// invalidated entries miss. Last phase: results 50% off sent after sampled misses must
// switch memoization off at the end of the current window of 100 samples, after which every lookup
// misses at once. Watchdog: 2M cycles.
module tb_ax_memo_unit;
  import ax_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wide8 = 0, req_valid = 0, req_ready, req_tid = 0;
  ax_op_e req_op = OP_CRC;
  logic [2:0] req_lut = 0;
  logic [63:0] req_data = 0;
  logic [4:0] req_trunc = 0;
  logic resp_valid, resp_hit, memo_disabled, lookup_stalled, sampled_miss;
  logic [1:0] resp_level;
  logic [63:0] resp_data;
  logic [15:0] qm_samples, qm_bad;

  ax_memo_unit #(.L1_SETS(4), .L2_SETS(256)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int n_stall_cycles = 0;
  int last_stall = -1;
  always @(negedge clk) if (lookup_stalled) begin
    n_stall_cycles++;
    last_stall = cyc;
  end

  function automatic logic [31:0] f32(input real v);
    logic [63:0] d;
    d = $realtobits(v);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction
  function automatic real from_f32(input logic [31:0] x);
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'h0});
  endfunction

  // present a request until accepted; return the acceptance cycle
  task automatic send(input ax_op_e o, input logic [2:0] lut, input logic tid,
                      input logic [63:0] d, input logic [4:0] tr, output int acc_cyc);
    bit acc;
    @(negedge clk);
    req_valid = 1; req_op = o; req_lut = lut; req_tid = tid; req_data = d; req_trunc = tr;
    do begin
      #4;
      acc = req_ready;
      acc_cyc = cyc;
      @(posedge clk);
      if (!acc) @(negedge clk);
    end while (!acc);
    #1 req_valid = 0;
  endtask

  task automatic wait_resp(input int acc_cyc, output bit hit, output logic [1:0] lvl,
                           output logic [63:0] d, output int lat, output bit smp);
    int guard = 0;
    while (!resp_valid) begin
      @(negedge clk);
      if (++guard > 100) break;
    end
    chk(resp_valid, "response arrives");
    hit = resp_hit; lvl = resp_level; d = resp_data; smp = sampled_miss;
    // a lookup that waited for its inputs starts the cycle after the wait
    lat = cyc - ((last_stall >= acc_cyc) ? last_stall + 1 : acc_cyc);
    @(negedge clk);
  endtask

  logic [63:0] dict [string];
  int hit_count = 0;
  int n_l1 = 0, n_l2 = 0, n_miss = 0, n_sampled = 0, n_inval = 0;

  function automatic string key(input logic [2:0] lut, input logic [31:0] w [3], input int n);
    return $sformatf("%0d:%0d:%h:%h:%h", lut, n, w[0], n > 1 ? w[1] : 0, n > 2 ? w[2] : 0);
  endfunction

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [31:0] pool [4][6];
  initial begin
    int a;
    bit hit, smp;
    logic [1:0] lvl;
    logic [63:0] d;
    int lat;
    for (int l = 0; l < 4; l++) for (int i = 0; i < 6; i++) pool[l][i] = $urandom & 32'hFFFF_FFF0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- functional phase
    for (int t = 0; t < 4000; t++) begin
      logic [2:0] lut;
      logic tid;
      int n;
      logic [31:0] w [3];
      string k;
      bit e_hit;
      lut = 3'($urandom % 4); tid = $urandom % 2; n = 1 + $urandom % 3;
      if ($urandom % 150 == 0) begin
        send(OP_INVAL, lut, tid, 0, 0, a);
        wait_resp(a, hit, lvl, d, lat, smp);
        chk(lat == 10, $sformatf("invalidate takes %0d cycles", lat));
        foreach (dict[s]) if (s.substr(0, 0) == $sformatf("%0d", lut)) dict.delete(s);
        n_inval++;
        continue;
      end
      for (int i = 0; i < n; i++) begin
        w[i] = pool[lut][$urandom % ((t < 2000) ? 3 : 6)];
        send(OP_CRC, lut, tid, {32'h0, w[i] | 32'($urandom % 16)}, 5'd4, a);
      end
      k = key(lut, w, n);
      send(OP_LOOKUP, lut, tid, 0, 0, a);
      wait_resp(a, hit, lvl, d, lat, smp);
      e_hit = dict.exists(k);
      if (e_hit) begin
        hit_count++;
        if (hit_count % 100 == 0) begin
          chk(!hit && smp, "every 100th hit is a sampled miss");
          n_sampled++;
          e_hit = 0;
        end
      end
      chk(hit == e_hit, $sformatf("t=%0d hit %0b exp %0b key %s", t, hit, e_hit, k));
      if (hit && e_hit) begin
        chk(d == {32'h0, dict[k][31:0]}, "hit data");
        chk(lvl != 0, "hit level");
        if (lvl == 1) begin n_l1++; chk(lat == 3, $sformatf("L1 hit latency %0d", lat)); end
        else begin n_l2++; chk(lat == 16, $sformatf("L2 hit latency %0d", lat)); end
      end
      if (!hit) begin
        logic [63:0] v;
        n_miss++;
        if (!smp) chk(lat == 16, $sformatf("miss latency %0d", lat));
        v = e_hit ? dict[k] : {32'h0, f32(1.0 + real'($urandom % 10000))};
        if (smp) v = dict[k];             // the original code computes the same value
        send(OP_UPDATE, lut, tid, v, 0, a);
        wait_resp(a, hit, lvl, d, lat, smp);
        chk(lat == 3, $sformatf("update answered after %0d cycles", lat));
        dict[k] = v;
      end
    end
    chk(n_l1 > 300 && n_l2 > 100 && n_miss > 300 && n_sampled > 5 && n_inval > 5,
        $sformatf("L1 %0d L2 %0d miss %0d sampled %0d inval %0d", n_l1, n_l2, n_miss, n_sampled, n_inval));
    chk(n_stall_cycles > 100, "lookups waited for queued inputs");
    chk(!memo_disabled && qm_bad == 0, "good samples keep memoization on");
    // ---- quality phase: results far off after every sampled miss
    begin
      logic [31:0] w [3];
      int base_samples, guard, exp_win;
      w[0] = 32'h1234_5670;
      send(OP_CRC, 3'd5, 1'b0, {32'h0, w[0]}, 5'd4, a);
      send(OP_LOOKUP, 3'd5, 1'b0, 0, 0, a);
      wait_resp(a, hit, lvl, d, lat, smp);
      send(OP_UPDATE, 3'd5, 1'b0, {32'h0, f32(10.0)}, 0, a);
      wait_resp(a, hit, lvl, d, lat, smp);
      base_samples = qm_samples;
      guard = 0;
      while (!memo_disabled && guard < 30000) begin
        guard++;
        send(OP_CRC, 3'd5, 1'b0, {32'h0, w[0]}, 5'd4, a);
        send(OP_LOOKUP, 3'd5, 1'b0, 0, 0, a);
        wait_resp(a, hit, lvl, d, lat, smp);
        if (!hit) begin
          logic [31:0] cur;
          cur = smp ? d[31:0] : f32(10.0);
          if (smp) cur = dut.u_qm.sample_q[{3'd5, 1'b0}];
          send(OP_UPDATE, 3'd5, 1'b0, {32'h0, f32(from_f32(cur) * 1.5)}, 0, a);
          wait_resp(a, hit, lvl, d, lat, smp);
          repeat (4) @(negedge clk);
        end
      end
      chk(memo_disabled, "bad results switch memoization off");
      // the window that is open already holds base_samples % 100 good samples
      exp_win = 100 - base_samples % 100;
      if (exp_win < 11) exp_win += 100;
      chk(qm_samples - base_samples == exp_win,
          $sformatf("off at the end of the window (%0d samples, expected %0d)", qm_samples - base_samples, exp_win));
      send(OP_CRC, 3'd5, 1'b0, {32'h0, w[0]}, 5'd4, a);
      send(OP_LOOKUP, 3'd5, 1'b0, 0, 0, a);
      wait_resp(a, hit, lvl, d, lat, smp);
      chk(!hit && lat == 1, $sformatf("disabled: miss at once (%0d cycles)", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
