// tb_ax_crc32: self-checking test of the four-byte-per-cycle CRC-32 unit.
//
// A bit-serial CRC-32 (reflected polynomial 0xEDB88320, one shift/xor per bit) written
// here is the reference. Checks: random running values and words; chained words from
// the 0xFFFFFFFF seed, including the standard check value of CRC-32 over the ASCII
// string "12345678" followed by the final inversion, and that one input bit flip always
// changes the hash. The unit is combinational: each check is made 1 ns after the inputs
// change. Watchdog: 1 ms.
module tb_ax_crc32;
  int checks = 0, failures = 0;
  logic [31:0] crc_in, data, crc_out;

  ax_crc32 dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] ref_crc(input logic [31:0] c, input logic [31:0] d);
    for (int b = 0; b < 32; b++) begin
      logic fb;
      fb = c[0] ^ d[b];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB8_8320;
    end
    return c;
  endfunction

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] c;
    // "1234" = 31 32 33 34, sent least significant byte first
    crc_in = 32'hFFFF_FFFF; data = 32'h3433_3231;
    #1 c = crc_out;
    chk(c == ref_crc(32'hFFFF_FFFF, data), "first word");
    crc_in = c; data = 32'h3837_3635;
    #1 chk(~crc_out == 32'h9AE0_DAAF, $sformatf("CRC-32 of \"12345678\" = %h", ~crc_out));
    for (int t = 0; t < 20000; t++) begin
      crc_in = $urandom; data = $urandom;
      #1;
      chk(crc_out == ref_crc(crc_in, data), "random word");
      c = crc_out;
      data = data ^ (32'd1 << ($urandom % 32));
      #1;
      chk(crc_out != c, "single bit flip changes the hash");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
