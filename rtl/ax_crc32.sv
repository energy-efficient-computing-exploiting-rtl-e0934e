// ax_crc32: 32-bit CRC hashing unit of AxMemo, four bytes per cycle.
//
// The memoization inputs of a code block are hashed into one 32-bit value that serves
// as the lookup tag, whatever their number and type. The unit is the byte-parallel
// table form of CRC-32: for each byte, crc = (crc >> 8) ^ T[(crc ^ byte) & 0xFF], with
// T the 256 x 32-bit table of the reflected IEEE polynomial 0xEDB88320 (T[i] is the
// eight-step shift/xor remainder of i; computed at elaboration, 1 KB of constants).
// Four such steps are chained (the unit unrolled four times) so one 4-byte input word is
// absorbed per cycle, least significant byte first. The running value lives in the hash
// value registers, so this block is combinational: crc_out = f(crc_in, data).
// The polynomial and byte order are choices of this implementation.
module ax_crc32
  import ax_pkg::*;
#(
  parameter int BYTES = 4
) (
  input  logic [31:0]        crc_in,
  input  logic [8*BYTES-1:0] data,
  output logic [31:0]        crc_out
);
  localparam crc_tab_t TAB = gen_crc_tab();

  always_comb begin
    logic [31:0] c;
    c = crc_in;
    for (int b = 0; b < BYTES; b++)
      c = (c >> 8) ^ TAB[c[7:0] ^ data[8*b +: 8]];
    crc_out = c;
  end
endmodule
