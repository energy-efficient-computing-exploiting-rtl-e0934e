// tb_ax_hvr: self-checking test of the AxMemo hash value registers.
//
// Random writes, re-initialisations and reads on the 16 contexts against a model kept
// here: every register reads 0xFFFFFFFF after reset, a write is visible on both
// combinational read ports after the clock edge, a re-initialisation returns the seed and
// wins over a write to the same context in the same cycle. Watchdog: 100k cycles.
module tb_ax_hvr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] ra_addr = 0, rb_addr = 0, wr_addr = 0, init_addr = 0;
  logic [31:0] ra_data, rb_data, wr_data = 0;
  logic wr_en = 0, init_en = 0;

  ax_hvr dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  logic [31:0] m [16];
  int n_conflict = 0;

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) m[i] = 32'hFFFF_FFFF;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        ra_addr = $urandom; rb_addr = $urandom;
        #1;
        chk(ra_data == m[ra_addr] && rb_data == m[rb_addr], "read ports");
      end
      wr_en = $urandom % 2; wr_addr = $urandom; wr_data = $urandom;
      init_en = $urandom % 4 == 0; init_addr = ($urandom % 3 == 0) ? wr_addr : 4'($urandom);
      if (wr_en && init_en && wr_addr == init_addr) n_conflict++;
      if (wr_en) m[wr_addr] = wr_data;
      if (init_en) m[init_addr] = 32'hFFFF_FFFF;
    end
    chk(n_conflict > 50, "write/initialise conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
