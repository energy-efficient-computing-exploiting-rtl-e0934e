// tb_lnl_load_checker: self-checking test of the Lock and Load warp-level load check.
//
// Random warps of loaded values (smooth data with a few outliers, random active masks)
// for group sizes 4, 8, 16 and 32 threads. The reference here picks the first active
// thread of each group as anchor and applies a bit-level model of the comparator to every
// other active thread; the load is similar only if every comparison passes. Checks the
// similar bit, the anchor mask, the tag, and out_valid exactly 3 cycles after in_valid at
// one warp per cycle. Watchdog: 200k cycles.
module tb_lnl_load_checker;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [31:0][31:0] in_data = '0;
  logic [31:0] in_mask = '1;
  logic [15:0] in_tag = 0, out_tag;
  logic [2:0] group_log2 = 2;
  logic [15:0] thr = 16'd3277;
  logic out_valid, similar;
  logic [31:0] out_anchor;

  lnl_load_checker dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  function automatic bit cmp_model(input logic [31:0] x, input logic [31:0] y, input int th);
    int ex, ey, mx, my, div, d, r;
    if (x == y) return 1;
    ex = x[30:23]; ey = y[30:23];
    if (x[31] != y[31] || ex == 0 || ey == 0) return 0;
    if (ex - ey > 1 || ey - ex > 1) return 0;
    mx = (x[22:0] | (1 << 23)) >> 16;
    my = (y[22:0] | (1 << 23)) >> 16;
    if (ex == ey + 1) begin my = ((y[22:0] | (1 << 23)) >> 17); div = mx - 128; end
    else if (ey == ex + 1) begin mx = ((x[22:0] | (1 << 23)) >> 17); div = my - 128; end
    else div = mx - 128;
    d = (mx > my) ? mx - my : my - mx;
    if (div <= 16) r = 255 - 2 * div;
    else if (div <= 96) r = 246 - div;
    else r = 194 - div / 2;
    return (d * r) < th;
  endfunction

  typedef struct { bit sim; logic [31:0] anc; logic [15:0] tag; int cyc; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_sim = 0, n_dis = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (q.size() == 0) chk(0, "unexpected out_valid");
    else begin
      e = q.pop_front();
      chk(cyc == e.cyc + 3, $sformatf("latency %0d", cyc - e.cyc));
      chk(similar == e.sim, $sformatf("similar %0b exp %0b tag %h", similar, e.sim, e.tag));
      chk(out_anchor == e.anc, "anchor mask");
      chk(out_tag == e.tag, "tag");
      if (similar) n_sim++; else n_dis++;
    end
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int gsz_seen [4];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      exp_t e;
      int gs, nout;
      logic [31:0] base;
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      group_log2 = 3'(2 + $urandom % 4);           // 4, 8, 16, 32 threads
      gs = 1 << group_log2;
      in_tag = $urandom;
      in_mask = ($urandom % 2) ? '1 : $urandom;
      base = {1'b0, 8'(120 + $urandom % 10), 23'($urandom)};
      nout = $urandom % 3;                          // 0: smooth, 1-2: outliers
      for (int i = 0; i < 32; i++) begin
        logic [31:0] v;
        v = base + 32'($urandom % 20000) * 32'(1 + i % 3);   // small mantissa spread
        if (nout != 0 && $urandom % 12 == 0) v = v ^ 32'h0040_0000;   // large error
        in_data[i] = v;
      end
      // reference
      e.sim = 1; e.anc = 0; e.tag = in_tag;
      for (int g = 0; g < 32; g += gs) begin
        int a;
        a = -1;
        for (int i = g; i < g + gs; i++) if (in_mask[i] && a < 0) a = i;
        if (a >= 0) begin
          e.anc[a] = 1;
          for (int i = g; i < g + gs; i++)
            if (in_mask[i] && !cmp_model(in_data[a], in_data[i], 3277)) e.sim = 0;
        end
      end
      #4;
      e.cyc = cyc;
      if (in_valid) begin
        q.push_back(e);
        gsz_seen[group_log2 - 2]++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    chk(q.size() == 0, "every load answered");
    chk(n_sim > 500 && n_dis > 500, $sformatf("both outcomes exercised (%0d/%0d)", n_sim, n_dis));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
