// tb_gs_compressor: self-checking test of the G-Scalar write-side compressor.
//
// Drives random 32-lane writes built to hit every encoding (all lanes equal, upper
// 1/2/3 bytes equal per half, nothing equal) with full, random and single-lane masks.
// A reference model written here from the encoding rules (per-half byte equality for
// full-mask writes; equality over the active lanes only and the active mask as base
// value for divergent writes) predicts the metadata. Checks: metadata, data and mask
// pass-through, and the one-cycle latency (out_valid exactly one cycle after in_valid,
// never otherwise). Watchdog: 200k cycles.
module tb_gs_compressor;
  import gs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [31:0][31:0] in_data;
  logic [31:0] in_mask;
  logic out_valid;
  gs_meta_t out_meta;
  logic [31:0][31:0] out_data;
  logic [31:0] out_mask;

  gs_compressor dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [3:0] run_from_msb(input logic [3:0] eq);
    logic [3:0] e = 0;
    for (int b = 3; b >= 0; b--) begin
      if (!eq[b]) break;
      e[b] = 1;
    end
    return e;
  endfunction

  function automatic gs_meta_t ref_meta(input logic [31:0][31:0] d, input logic [31:0] m);
    gs_meta_t r = '0;
    logic [3:0] eq_l, eq_h, eq_a;
    int first;
    if (&m) begin
      for (int b = 0; b < 4; b++) begin
        eq_l[b] = 1; eq_h[b] = 1;
        for (int i = 1; i < 16; i++) begin
          if (d[i][8*b +: 8] != d[0][8*b +: 8]) eq_l[b] = 0;
          if (d[16+i][8*b +: 8] != d[16][8*b +: 8]) eq_h[b] = 0;
        end
      end
      r.d = 0;
      r.enc_l = run_from_msb(eq_l);
      r.enc_h = run_from_msb(eq_h);
      r.fs = (eq_l == 4'hF) && (eq_h == 4'hF) && d[0] == d[16];
      r.base_l = d[0];
      r.base_h = d[16];
    end else begin
      first = -1;
      for (int i = 0; i < 32; i++) if (m[i] && first < 0) first = i;
      eq_a = 4'hF;
      if (first >= 0)
        for (int i = 0; i < 32; i++)
          for (int b = 0; b < 4; b++)
            if (m[i] && d[i][8*b +: 8] != d[first][8*b +: 8]) eq_a[b] = 0;
      r.d = 1;
      r.enc_l = run_from_msb(eq_a);
      r.enc_h = r.enc_l;
      r.fs = (eq_a == 4'hF);
      r.base_l = m;
      r.base_h = 0;
    end
    return r;
  endfunction

  // random register value: lanes share the upper 4-k bytes of a base, k chosen per half
  task automatic make_value(output logic [31:0][31:0] d);
    logic [31:0] base [2];
    int k [2];
    base[0] = $urandom;
    base[1] = ($urandom % 3 == 0) ? base[0] : $urandom;
    for (int h = 0; h < 2; h++) k[h] = $urandom % 5;
    for (int i = 0; i < 32; i++) begin
      int h = i / 16;
      logic [31:0] r = $urandom;
      logic [31:0] keep = (k[h] == 0) ? 32'hFFFF_FFFF : ~((32'd1 << (8 * k[h])) - 1);
      if (k[h] == 4) keep = 0;
      d[i] = (base[h] & keep) | (r & ~keep);
    end
  endtask

  gs_meta_t exp_meta;
  logic [31:0][31:0] exp_data;
  logic [31:0] exp_mask;
  logic exp_valid = 0;
  int cycles = 0;

  always @(negedge clk) begin
    cycles <= cycles + 1;
    if (rst_n) begin
      // sample what the DUT shows for the previous cycle's input
      chk(out_valid == exp_valid, $sformatf("out_valid at cycle %0d", cycles));
      if (exp_valid && out_valid) begin
        chk(out_meta == exp_meta, $sformatf("meta got %h exp %h", out_meta, exp_meta));
        chk(out_data == exp_data, "data pass-through");
        chk(out_mask == exp_mask, "mask pass-through");
      end
    end
  end

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int nfs = 0, nhalf = 0, ndiv = 0;
  initial begin
    in_data = '0; in_mask = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      make_value(in_data);
      case ($urandom % 4)
        0, 1: in_mask = '1;
        2:    in_mask = $urandom;
        default: in_mask = 32'd1 << ($urandom % 32);
      endcase
      if (in_mask == 0) in_mask = 1;
      // expectation for the output that appears after the next edge
      @(posedge clk);
      #1;
      exp_valid = in_valid;
      exp_meta  = ref_meta(in_data, in_mask);
      exp_data  = in_data;
      exp_mask  = in_mask;
      if (in_valid && exp_meta.fs && !exp_meta.d) nfs++;
      if (in_valid && !exp_meta.d && exp_meta.enc_l != 0 && !exp_meta.fs) nhalf++;
      if (in_valid && exp_meta.d) ndiv++;
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1 exp_valid = 0;
    repeat (3) @(posedge clk);
    chk(nfs > 10 && nhalf > 10 && ndiv > 10, "stimulus covered scalar, partial and divergent writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
