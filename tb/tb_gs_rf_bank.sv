// tb_gs_rf_bank: self-checking test of one G-Scalar register bank.
//
// Random metadata writes/reads and byte-plane accesses with random array enables and
// per-lane write enables, checked against a byte-level model kept here:
//   * metadata reads return the reset record (uncompressed) until written, then the
//     last value, one cycle after mr_en;
//   * a plane read returns, one cycle later, the stored bytes for enabled arrays and
//     zero for disabled ones; a write changes only bytes whose array and lane are enabled;
//   * array_act equals pa_act while pa_en is high and is zero otherwise.
// Watchdog: 100k cycles.
module tb_gs_rf_bank;
  import gs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mr_en = 0, mw_en = 0, pa_en = 0, pa_we = 0;
  logic [5:0] mr_addr = 0, mw_addr = 0, pa_addr = 0;
  gs_meta_t mr_data, mw_data;
  logic [3:0][1:0] pa_act = 0, array_act;
  logic [31:0] pa_lane_we = 0;
  logic [3:0][31:0][7:0] pa_wdata = 0, pa_rdata;

  gs_rf_bank dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  gs_meta_t   mmeta [64];
  logic [7:0] mbyte [64][4][32];
  bit         mknown [64][4][32];

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    gs_meta_t exp_meta;
    logic [3:0][31:0][7:0] exp_rd;
    logic [3:0][31:0] exp_k;
    bit chk_meta, chk_rd;
    for (int r = 0; r < 64; r++) begin
      mmeta[r] = META_UNCOMPRESSED;
      for (int p = 0; p < 4; p++) for (int i = 0; i < 32; i++) mknown[r][p][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk_meta = 0; chk_rd = 0;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      // check the outputs of the previous cycle's reads
      if (chk_meta) chk(mr_data == exp_meta, $sformatf("meta read got %h exp %h", mr_data, exp_meta));
      if (chk_rd) begin
        bit ok;
        ok = 1;
        for (int p = 0; p < 4; p++) for (int i = 0; i < 32; i++)
          if (exp_k[p][i] && pa_rdata[p][i] != exp_rd[p][i]) ok = 0;
        chk(ok, "plane read data");
      end
      mr_en = $urandom % 2; mr_addr = $urandom;
      mw_en = $urandom % 3 == 0; mw_addr = $urandom;
      mw_data = {$urandom, $urandom, $urandom};
      pa_en = $urandom % 4 != 0; pa_we = $urandom % 2; pa_addr = $urandom % 8;
      pa_act = $urandom; pa_lane_we = $urandom;
      for (int p = 0; p < 4; p++) for (int i = 0; i < 32; i++) pa_wdata[p][i] = $urandom;
      #1;
      chk(array_act == (pa_en ? pa_act : 8'h0), "array_act");
      // expectations (reads see the contents before this edge)
      chk_meta = mr_en;
      exp_meta = mmeta[mr_addr];
      chk_rd = pa_en && !pa_we;
      for (int p = 0; p < 4; p++) for (int i = 0; i < 32; i++) begin
        exp_k[p][i]  = pa_act[p][i / 16] ? mknown[pa_addr][p][i] : 1'b1;
        exp_rd[p][i] = pa_act[p][i / 16] ? mbyte[pa_addr][p][i] : 8'h00;
      end
      if (mw_en) mmeta[mw_addr] = mw_data;
      if (pa_en && pa_we)
        for (int p = 0; p < 4; p++) for (int i = 0; i < 32; i++)
          if (pa_act[p][i / 16] && pa_lane_we[i]) begin
            mbyte[pa_addr][p][i] = pa_wdata[p][i];
            mknown[pa_addr][p][i] = 1;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
