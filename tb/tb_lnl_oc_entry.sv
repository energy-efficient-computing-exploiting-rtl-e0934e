// tb_lnl_oc_entry: self-checking test of the fusion-aware operand collector.
//
// Random unfused and fused instructions with one to three source operands:
//   * idx0 = wid*63 + register and idx1 = idx0 + 63 one cycle after allocation;
//   * operands arrive in random order with random gaps; disp_valid must stay low until
//     every used operand (both source warps when fused) has arrived, and then be high;
//   * unfused operands are dispatched unchanged; fused operands are packed: lane j (j<16)
//     holds warp 0's anchor thread of pair (2j, 2j+1), lane 16+j warp 1's, and the select
//     bit says which thread of the pair it was; anchors come from random active masks
//     and group sizes 4, 8 and 16;
//   * a random packed result is unpacked onto the anchor threads of both warps.
// Watchdog: 200k cycles.
module tb_lnl_oc_entry;
  import lnl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_en = 0, alloc_fused = 0, busy, op_en = 0, op_half = 0;
  logic [5:0] alloc_warp = 0, disp_warp;
  logic [2:0] alloc_used = 0;
  logic [2:0][5:0] alloc_lreg = 0;
  logic [2:0][11:0] idx0, idx1;
  logic [1:0] op_row = 0;
  logic [31:0][31:0] op_data = 0, wb_packed = 0, wb_warp0, wb_warp1;
  logic [31:0] op_anchor = 0, disp_sel, wb_sel = 0;
  logic disp_valid, disp_ready = 0, disp_fused;
  logic [2:0][31:0][31:0] disp_data;

  lnl_oc_entry dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  function automatic logic [31:0] anchors(input logic [31:0] m, input int gs);
    logic [31:0] a = 0;
    for (int g = 0; g < 32; g += gs)
      for (int i = g; i < g + gs; i++) if (m[i]) begin a[i] = 1; break; end
    return a;
  endfunction

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int n_fused = 0, n_plain = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      logic [31:0][31:0] val [3][2];
      logic [31:0] anc [2];
      bit f;
      int nop, order [6], gs;
      logic [5:0] w;
      f = $urandom % 2;
      w = 6'(($urandom % 24) * 2 + (f ? 0 : $urandom % 2));
      @(negedge clk);
      alloc_en = 1; alloc_warp = w; alloc_fused = f;
      alloc_used = 3'($urandom % 7 + 1);
      for (int r = 0; r < 3; r++) alloc_lreg[r] = 6'($urandom % 63);
      @(negedge clk);
      alloc_en = 0;
      for (int r = 0; r < 3; r++) begin
        chk(idx0[r] == 12'(w * 63 + alloc_lreg[r]), "idx0");
        chk(idx1[r] == 12'(w * 63 + alloc_lreg[r] + 63), "idx1");
      end
      chk(busy, "busy after allocation");
      gs = 4 << ($urandom % 3);
      for (int h = 0; h < 2; h++) anc[h] = anchors($urandom | 1, gs);
      for (int r = 0; r < 3; r++) for (int h = 0; h < 2; h++)
        for (int i = 0; i < 32; i++) val[r][h][i] = $urandom;
      // arrival order of (row, half)
      nop = 0;
      for (int r = 0; r < 3; r++) if (alloc_used[r])
        for (int h = 0; h < (f ? 2 : 1); h++) order[nop++] = r * 2 + h;
      for (int i = nop - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom % (i + 1);
        tmp = order[i]; order[i] = order[j]; order[j] = tmp;
      end
      disp_ready = 0;
      for (int k = 0; k < nop; k++) begin
        int r, h;
        r = order[k] / 2; h = order[k] % 2;
        repeat ($urandom % 3) begin
          #1 chk(!disp_valid, "no dispatch before all operands");
          @(negedge clk);
        end
        #1 chk(!disp_valid, "no dispatch before all operands");
        op_en = 1; op_row = 2'(r); op_half = h; op_data = val[r][h]; op_anchor = anc[h];
        @(negedge clk);
        op_en = 0;
      end
      #1 chk(disp_valid, "dispatch once all operands are in");
      chk(disp_fused == f && disp_warp == w, "dispatch warp and fused bit");
      for (int r = 0; r < 3; r++) if (alloc_used[r]) begin
        if (!f) chk(disp_data[r] == val[r][0], "unfused operand unchanged");
        else begin
          bit ok;
          ok = 1;
          for (int h = 0; h < 2; h++)
            for (int j = 0; j < 16; j++) begin
              if (anc[h][2*j] && disp_data[r][16*h + j] != val[r][h][2*j]) ok = 0;
              if (anc[h][2*j+1] && disp_data[r][16*h + j] != val[r][h][2*j+1]) ok = 0;
              if ((anc[h][2*j] || anc[h][2*j+1]) && disp_sel[16*h + j] != anc[h][2*j+1]) ok = 0;
            end
          chk(ok, "fused operand packing");
        end
      end
      if (f) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 32; i++) wb_packed[i] = $urandom;
        wb_sel = disp_sel;
        #1;
        for (int h = 0; h < 2; h++)
          for (int i = 0; i < 32; i++)
            if (anc[h][i] && (h == 0 ? wb_warp0[i] : wb_warp1[i]) != wb_packed[16*h + i/2]) ok = 0;
        chk(ok, "write-back unpacking");
        n_fused++;
      end else n_plain++;
      disp_ready = 1;
      @(negedge clk);
      disp_ready = 0;
      chk(!busy, "free after dispatch");
    end
    chk(n_fused > 500 && n_plain > 500, "both kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
