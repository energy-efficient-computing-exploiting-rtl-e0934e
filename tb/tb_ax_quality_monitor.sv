// tb_ax_quality_monitor: self-checking test of the AxMemo output-quality monitor.
//
// Streams LUT hits on random contexts: exactly every 100th hit must be answered with
// force_miss. The update that follows a sampled hit carries the exact result, either
// within 2% of the sampled value (good) or 30% off (bad). Three windows of 100
// comparisons are run with 0, 10 and 11 bad samples: memoization must stay on after the
// first two (10 is not more than 10) and switch off right after the last comparison of
// the third, and n_samples / n_bad_total must count every comparison three cycles after
// its update. An update of a context without a sample is not compared.
// Watchdog: 200k cycles.
module tb_ax_quality_monitor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic hit_valid = 0, force_miss, upd_valid = 0, disabled;
  logic [3:0] hit_ctx = 0, upd_ctx = 0;
  logic [31:0] hit_data = 0, upd_data = 0;
  logic [15:0] n_samples, n_bad_total;

  ax_quality_monitor dut (.*);

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

  initial begin
    #3_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int exp_samples = 0, exp_bad = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // an update without a sample is not compared
    @(negedge clk); upd_valid = 1; upd_ctx = 3; upd_data = 32'h3F80_0000;
    @(negedge clk); upd_valid = 0;
    repeat (4) @(negedge clk);
    chk(n_samples == 0, "update without sample not compared");
    for (int win = 0; win < 3; win++) begin
      int nbad;
      nbad = (win == 0) ? 0 : (win == 1) ? 10 : 11;
      for (int s = 0; s < 100; s++) begin
        real v;
        logic [3:0] c;
        bit bad;
        bad = (s < nbad);
        for (int h = 0; h < 100; h++) begin
          @(negedge clk);
          hit_valid = 1; hit_ctx = 4'($urandom); hit_data = $urandom;
          c = hit_ctx;
          v = 1.0 + real'($urandom % 1000) / 10.0;
          if (h == 99) hit_data = f32(v);
          #1 chk(force_miss == (h == 99), $sformatf("force_miss on hit %0d", h + 1));
        end
        @(negedge clk);
        hit_valid = 0;
        upd_valid = 1; upd_ctx = c; upd_data = f32(bad ? v * 1.3 : v * 1.02);
        @(negedge clk);
        upd_valid = 0;
        exp_samples++;
        if (bad) exp_bad++;
        repeat (3) @(negedge clk);
        chk(n_samples == 16'(exp_samples) && n_bad_total == 16'(exp_bad),
            $sformatf("counters %0d/%0d exp %0d/%0d", n_samples, n_bad_total, exp_samples, exp_bad));
        if (win < 2 || s < 99) chk(!disabled, $sformatf("enabled in window %0d", win));
      end
    end
    chk(disabled, "disabled after a window with 11 bad samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
