// tb_lnl_cmp_unit: self-checking test of the Lock and Load approximate comparator.
//
// Feeds one pair per cycle (with random bubbles) of single-precision values: b derived
// from a with a relative error of up to +-40%, plus pairs with opposite signs, exponents
// far apart, identical values and zeros. Two references computed here:
//   * exact relative error |a-b|/|a| in real arithmetic: with the 10% threshold (3277),
//     pairs below 6% must be similar and pairs above 15% must not (the band between is
//     where the 8-bit datapath may round either way);
//   * a bit-level model of the documented datapath (8-bit mantissas, three-piece
//     reciprocal, P < threshold) that must agree on every pair.
// Also checks out_valid exactly 3 cycles after in_valid, one result per cycle.
// Watchdog: 200k cycles.
module tb_lnl_cmp_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [31:0] a = 0, b = 0;
  logic [15:0] thr = 16'd3277;
  logic out_valid, similar;

  lnl_cmp_unit dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  function automatic bit model(input logic [31:0] x, input logic [31:0] y, input int th);
    int ex, ey, mx, my, div, d, r;
    if (x == y) return 1;
    ex = x[30:23]; ey = y[30:23];
    if (x[31] != y[31] || ex == 0 || ey == 0) return 0;
    if (ex - ey > 1 || ey - ex > 1) return 0;
    mx = (x[22:0] | (1 << 23)) >> 16;         // 8 bits, hidden one on top
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

  // single-precision conversion by field manipulation (values here are normal or zero)
  function automatic logic [31:0] to_f32(input real v);
    logic [63:0] d;
    if (v == 0.0) return 32'h0;
    d = $realtobits(v);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction
  function automatic real from_f32(input logic [31:0] x);
    if (x[30:0] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'h0});
  endfunction

  typedef struct { logic [31:0] a, b; bit sim; bit chk_band; bit must; int cyc; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_pass = 0, n_fail = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (q.size() == 0) chk(0, "unexpected out_valid");
    else begin
      e = q.pop_front();
      chk(cyc == e.cyc + 3, $sformatf("latency %0d", cyc - e.cyc));
      chk(similar == e.sim, "bit-level model");
      if (e.chk_band) chk(similar == e.must, $sformatf("exact relative error band %h %h", e.a, e.b));
      if (similar) n_pass++; else n_fail++;
    end
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      real fa, fb;
      real er;
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom % 5 != 0);
      fa = real'(($urandom % 100000) + 1) / 1000.0;
      if ($urandom % 2) fa = -fa;
      case ($urandom % 10)
        0: fb = -fa;
        1: fb = fa * 5.0;
        2: fb = fa;
        3: fb = 0.0;
        default: fb = fa * (1.0 + (real'($urandom % 80001) - 40000.0) / 100000.0);
      endcase
      a = to_f32(fa);
      b = to_f32(fb);
      er = (from_f32(a) - from_f32(b)) / from_f32(a);
      if (er < 0) er = -er;
      e.sim = model(a, b, 3277);
      e.a = a; e.b = b;
      e.chk_band = (er < 0.06) || (er > 0.15);
      e.must = (er < 0.06);
      #4;
      e.cyc = cyc;                  // the cycle in which the pair is presented
      if (in_valid) q.push_back(e);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    chk(q.size() == 0, "every input answered");
    chk(n_pass > 1000 && n_fail > 1000, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
