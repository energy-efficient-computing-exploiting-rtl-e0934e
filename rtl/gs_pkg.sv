// gs_pkg: types and sizes shared by the G-Scalar register file blocks.
//
// A vector register holds one 4-byte value per lane of a 32-thread warp. Next to the
// data arrays every register owns a small metadata record:
//   enc_l / enc_h : encoding bits of the low and high 16-lane halves. enc[3] set means
//                   byte 3 is identical in every lane of the half, enc[3:2] set means
//                   bytes 3 and 2, and so on (1000, 1100, 1110, 1111 or 0000).
//   base_l/base_h : base value registers (BVR). For a non-divergent write they hold
//                   op[0] and op[16]; for a divergent write base_l holds the active mask.
//   d             : written by a divergent instruction (values not compressed).
//   fs            : full scalar, every lane (every active lane when d=1) holds one value.
// The half-register split and the 16-bank, 64-register-per-bank sizes follow the GTX 480
// style baseline the design is built on.
package gs_pkg;
  localparam int LANES         = 32;
  localparam int HALF          = 16;
  localparam int NBANKS        = 16;
  localparam int REGS_PER_BANK = 64;

  typedef struct packed {
    logic        d;
    logic        fs;
    logic [3:0]  enc_l;
    logic [3:0]  enc_h;
    logic [31:0] base_l;
    logic [31:0] base_h;
  } gs_meta_t;

  // metadata of a register whose values sit uncompressed in all four byte planes
  localparam gs_meta_t META_UNCOMPRESSED = '{d: 1'b1, fs: 1'b0, enc_l: 4'b0000, enc_h: 4'b0000,
                                             base_l: 32'hFFFF_FFFF, base_h: 32'h0};

  // Encoding bits from per-byte equality flags: only a run of equal bytes starting at
  // the most significant byte is kept (1000, 1100, 1110, 1111).
  function automatic logic [3:0] enc_from_eq(input logic [3:0] eq);
    logic [3:0] e;
    e[3] = eq[3];
    e[2] = e[3] & eq[2];
    e[1] = e[2] & eq[1];
    e[0] = e[1] & eq[0];
    return e;
  endfunction

  typedef enum logic [1:0] {EX_VECTOR = 2'd0, EX_SCALAR = 2'd1, EX_HALF = 2'd2, EX_DIV_SCALAR = 2'd3} gs_exmode_e;
endpackage
