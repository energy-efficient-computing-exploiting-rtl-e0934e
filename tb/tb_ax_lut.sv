// tb_ax_lut: self-checking test of the AxMemo lookup table.
//
// Two tables with 16 sets (so that sets overflow and LRU replacement happens), one with
// the L1 latency of 2 cycles and one with the L2 latency of 13, receive the same random
// lookups, updates and invalidates over four LUT_IDs and a small pool of CRC values.
// The reference here keeps, per set and way, {valid, LUT_ID, tag, data, last-use time}
// and picks the victim as: the way holding the tag, else the lowest invalid way, else
// the least recently used. Checks: hit and data of every lookup (in both data widths:
// the 4-byte phase, then after a reset the 8-byte phase with 4 ways), that an invalidate
// removes exactly one LUT_ID, done exactly LAT / 2 / 9 cycles after the request for
// lookup / update / invalidate with busy high in between. Watchdog: 200k cycles.
module tb_ax_lut;
  import ax_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wide8 = 0, in_valid = 0;
  lut_op_e in_op = LUT_LOOKUP;
  logic [2:0] in_lut = 0;
  logic [31:0] in_crc = 0;
  logic [63:0] in_data = 0;
  logic busy1, done1, hit1, busy2, done2, hit2;
  logic [63:0] rdata1, rdata2;

  ax_lut #(.SETS(16), .LAT(2))  u1 (.clk, .rst_n, .wide8, .in_valid, .in_op, .in_lut, .in_crc, .in_data,
                                     .busy(busy1), .done(done1), .hit(hit1), .rdata(rdata1));
  ax_lut #(.SETS(16), .LAT(13)) u2 (.clk, .rst_n, .wide8, .in_valid, .in_op, .in_lut, .in_crc, .in_data,
                                     .busy(busy2), .done(done2), .hit(hit2), .rdata(rdata2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- model
  bit          mv   [16][8];
  logic [2:0]  mlid [16][8];
  logic [27:0] mtag [16][8];
  logic [63:0] mdat [16][8];
  longint      mts  [16][8];
  longint      now = 1;

  task automatic model_reset();
    for (int s = 0; s < 16; s++) for (int w = 0; w < 8; w++) begin
      mv[s][w] = 0; mts[s][w] = -w;
    end
  endtask

  function automatic int find(input logic [31:0] crc, input logic [2:0] lut);
    for (int w = 0; w < 8; w++)
      if ((!wide8 || w % 2 == 0) && mv[crc[3:0]][w] && mlid[crc[3:0]][w] == lut && mtag[crc[3:0]][w] == crc[31:4])
        return w;
    return -1;
  endfunction

  // issue one request, wait for done on both tables, return the L1 outputs
  int n_hit = 0, n_miss = 0, n_evict = 0;
  task automatic op(input lut_op_e o, input logic [2:0] lut, input logic [31:0] crc, input logic [63:0] d);
    int lat1, lat2, c;
    bit seen1, seen2;
    int s, w;
    @(negedge clk);
    in_valid = 1; in_op = o; in_lut = lut; in_crc = crc; in_data = d;
    @(negedge clk);
    in_valid = 0;
    lat1 = (o == LUT_LOOKUP) ? 2 : (o == LUT_UPDATE) ? 2 : 9;
    lat2 = (o == LUT_LOOKUP) ? 13 : lat1;
    seen1 = 0; seen2 = 0;
    for (c = 1; c <= 20; c++) begin
      if (done1) begin chk(c == lat1, $sformatf("L1 done after %0d cycles, expected %0d", c, lat1)); seen1 = 1; end
      else if (!seen1) chk(busy1, "L1 busy until done");
      if (done2) begin chk(c == lat2, $sformatf("L2 done after %0d cycles, expected %0d", c, lat2)); seen2 = 1; end
      else if (!seen2) chk(busy2, "L2 busy until done");
      if (done1 && o == LUT_LOOKUP) begin
        w = find(crc, lut);
        chk(hit1 == (w >= 0), $sformatf("L1 hit %0b exp %0b", hit1, w >= 0));
        if (w >= 0) begin
          chk(rdata1 == (wide8 ? mdat[crc[3:0]][w] : {32'h0, mdat[crc[3:0]][w][31:0]}), "L1 data");
          n_hit++;
        end else n_miss++;
      end
      if (done2 && o == LUT_LOOKUP) begin
        w = find(crc, lut);
        chk(hit2 == (w >= 0), "L2 hit");
        if (w >= 0) chk(rdata2 == (wide8 ? mdat[crc[3:0]][w] : {32'h0, mdat[crc[3:0]][w][31:0]}), "L2 data");
      end
      if (seen1 && seen2) break;
      @(negedge clk);
    end
    chk(seen1 && seen2, "done pulses");
    // model update
    s = crc[3:0];
    case (o)
      LUT_LOOKUP: begin
        w = find(crc, lut);
        if (w >= 0) mts[s][w] = now++;
      end
      LUT_UPDATE: begin
        w = find(crc, lut);
        if (w < 0)
          for (int k = 0; k < 8; k++) if ((!wide8 || k % 2 == 0) && !mv[s][k] && w < 0) w = k;
        if (w < 0) begin
          longint best;
          best = 64'h7FFF_FFFF_FFFF_FFFF;
          for (int k = 0; k < 8; k++)
            if ((!wide8 || k % 2 == 0) && mts[s][k] < best) begin best = mts[s][k]; w = k; end
          n_evict++;
        end
        mv[s][w] = 1; mlid[s][w] = lut; mtag[s][w] = crc[31:4]; mdat[s][w] = d; mts[s][w] = now++;
        if (wide8) mv[s][w | 1] = 0;
      end
      default:
        for (int ss = 0; ss < 16; ss++) for (int k = 0; k < 8; k++)
          if (mlid[ss][k] == lut) mv[ss][k] = 0;
    endcase
  endtask

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [31:0] pool [200];
  int n_inv = 0;
  initial begin
    for (int i = 0; i < 200; i++) pool[i] = {28'($urandom), 4'(i % 3)};   // crowd three sets
    for (int phase = 0; phase < 2; phase++) begin
      rst_n = 0;
      wide8 = phase;
      model_reset();
      repeat (3) @(posedge clk);
      rst_n = 1;
      for (int t = 0; t < 1500; t++) begin
        logic [31:0] crc;
        logic [2:0] lut;
        crc = pool[$urandom % 48];
        lut = 3'($urandom % 4);
        case ($urandom % 40)
          0: begin op(LUT_INVAL, lut, 0, 0); n_inv++; end
          1, 2, 3, 4, 5, 6, 7, 8: op(LUT_UPDATE, lut, crc, {$urandom, $urandom});
          default: op(LUT_LOOKUP, lut, crc, 0);
        endcase
      end
    end
    chk(n_hit > 100 && n_miss > 300 && n_evict > 100 && n_inv > 30,
        $sformatf("hits %0d misses %0d evictions %0d invalidates %0d", n_hit, n_miss, n_evict, n_inv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
