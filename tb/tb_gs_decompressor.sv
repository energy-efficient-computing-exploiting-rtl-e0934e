// tb_gs_decompressor: self-checking test of the G-Scalar read-side decompressor.
//
// For random register values the test builds the metadata a compressor would keep
// (per-half encoding bits and base values, or d=1 for divergently written registers),
// puts the original bytes in the byte planes that are not compressed and random garbage
// in the ones that are (those arrays are not read in hardware), and checks that the
// decompressor rebuilds the original 32 lane values. It is combinational, so every
// check is made 1 ns after the inputs change. Watchdog: 1 ms of simulated time.
module tb_gs_decompressor;
  import gs_pkg::*;
  int checks = 0, failures = 0;
  gs_meta_t meta;
  logic [3:0][31:0][7:0] planes;
  logic [31:0][31:0] data, orig;

  gs_decompressor dut (.*);

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int ncomp = 0;
  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] base [2];
      int k [2];
      bit div;
      div = ($urandom % 4 == 0);
      base[0] = $urandom;
      base[1] = ($urandom % 2) ? base[0] : $urandom;
      for (int h = 0; h < 2; h++) k[h] = $urandom % 5;     // k low bytes differ per lane
      for (int i = 0; i < 32; i++) begin
        logic [31:0] keep;
        int h;
        h = i / 16;
        keep = (k[h] == 4) ? 32'h0 : ~((32'd1 << (8 * k[h])) - 1);
        if (k[h] == 0) keep = '1;
        orig[i] = (base[h] & keep) | ($urandom & ~keep);
      end
      meta = '0;
      meta.d = div;
      meta.base_l = div ? $urandom : base[0];
      meta.base_h = div ? $urandom : base[1];
      for (int b = 0; b < 4; b++) begin
        meta.enc_l[b] = (b >= k[0]);
        meta.enc_h[b] = (b >= k[1]);
      end
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < 32; i++) begin
          bit comp;
          comp = !div && ((i < 16) ? meta.enc_l[b] : meta.enc_h[b]);
          planes[b][i] = comp ? 8'($urandom) : orig[i][8*b +: 8];
          if (comp) ncomp++;
        end
      #1;
      checks++;
      if (data !== orig) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d meta=%h", t, meta);
      end
    end
    checks++;
    if (ncomp < 1000) failures++;   // stimulus must exercise compressed planes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
