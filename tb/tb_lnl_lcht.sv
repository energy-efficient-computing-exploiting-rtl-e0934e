// tb_lnl_lcht: self-checking test of the Lock and Load load checking history table.
//
// Replays the example of the design first (three loads of one warp recorded in entries
// H0..H2 with region counts 1, 2, 2; a START_APPROX that checks H0 and H1 must pass,
// invalidate H0 and leave H1 and H2 at count 1), then random load write-backs and
// START_APPROX instructions over all 48 warps against a table model kept here: sa_ok
// (valid and similar for every named entry), count decrement and invalidation at zero,
// and the priority of a write over a START_APPROX on the same entry. The whole table is
// compared through the peek port every cycle (table state one cycle after each edge).
// Watchdog: 100k cycles.
module tb_lnl_lcht;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, wr_result = 0, sa_en = 0, sa_ok;
  logic [5:0] wr_warp = 0, sa_warp = 0, pk_warp = 0;
  logic [1:0] wr_entry = 0, wr_count = 0, pk_entry = 0;
  logic [2:0] sa_sel = 0;
  logic [3:0] pk_bits;

  lnl_lcht dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  bit       mv   [48][3];
  bit       mres [48][3];
  int       mcnt [48][3];

  function automatic bit model_ok(input int w, input logic [2:0] sel);
    for (int e = 0; e < 3; e++) if (sel[e] && !(mv[w][e] && mres[w][e])) return 0;
    return 1;
  endfunction

  task automatic model_step();
    if (sa_en)
      for (int e = 0; e < 3; e++)
        if (sa_sel[e] && mv[sa_warp][e]) begin
          mcnt[sa_warp][e] = (mcnt[sa_warp][e] + 3) % 4;
          if (mcnt[sa_warp][e] == 0) mv[sa_warp][e] = 0;
        end
    if (wr_en) begin
      mv[wr_warp][wr_entry] = (wr_count != 0);
      mres[wr_warp][wr_entry] = wr_result;
      mcnt[wr_warp][wr_entry] = wr_count;
    end
  endtask

  task automatic compare_all();
    for (int w = 0; w < 48; w++)
      for (int e = 0; e < 3; e++) begin
        pk_warp = 6'(w); pk_entry = 2'(e);
        #0.001;
        chk(pk_bits == {mv[w][e], mres[w][e], 2'(mcnt[w][e])},
            $sformatf("entry w%0d H%0d = %b exp %b%b%0d", w, e, pk_bits, mv[w][e], mres[w][e], mcnt[w][e]));
      end
  endtask

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int n_inval = 0, n_ok = 0, n_nok = 0;
  initial begin
    for (int w = 0; w < 48; w++) for (int e = 0; e < 3; e++) begin
      mv[w][e] = 0; mres[w][e] = 0; mcnt[w][e] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- the design's example on warp 5
    for (int e = 0; e < 3; e++) begin
      @(negedge clk);
      wr_en = 1; wr_warp = 5; wr_entry = 2'(e); wr_result = 1; wr_count = (e == 0) ? 2'd1 : 2'd2;
      model_step();
    end
    @(negedge clk);
    wr_en = 0; sa_en = 1; sa_warp = 5; sa_sel = 3'b011;
    #1 chk(sa_ok == 1, "example: region 4 may approximate");
    model_step();
    @(negedge clk);
    sa_en = 0;
    pk_warp = 5; pk_entry = 0; #0.001 chk(pk_bits[3] == 0, "example: H0 invalidated");
    pk_entry = 1; #0.001 chk(pk_bits == 4'b1101, "example: H1 count 1");
    pk_entry = 2; #0.001 chk(pk_bits == 4'b1110, "example: H2 count 2");
    compare_all();
    // ---- random
    for (int t = 0; t < 3000; t++) begin
      bit had_v;
      @(negedge clk);
      compare_all();
      wr_en = $urandom % 2; wr_warp = 6'($urandom % 48); wr_entry = 2'($urandom % 3);
      wr_result = ($urandom % 4 != 0); wr_count = 2'($urandom);
      sa_en = $urandom % 2; sa_warp = ($urandom % 3 == 0) ? wr_warp : 6'($urandom % 48);
      sa_sel = 3'($urandom);
      #1;
      chk(sa_ok == model_ok(sa_warp, sa_sel), "sa_ok");
      if (sa_en) begin
        if (sa_ok) n_ok++; else n_nok++;
        for (int e = 0; e < 3; e++)
          if (sa_sel[e] && mv[sa_warp][e] && mcnt[sa_warp][e] == 1 &&
              !(wr_en && wr_warp == sa_warp && wr_entry == 2'(e))) n_inval++;
      end
      model_step();
    end
    @(negedge clk);
    wr_en = 0; sa_en = 0;
    compare_all();
    chk(n_inval > 50 && n_ok > 50 && n_nok > 50, "invalidation and both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
