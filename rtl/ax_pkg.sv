// ax_pkg: shared types of the AxMemo memoization unit.
//
// The unit is addressed with a LUT_ID (up to 8 logical lookup tables) and a hardware
// thread id (2 SMT threads); {LUT_ID, TID} names one hash context (hash value register).
package ax_pkg;
  localparam int LUTS    = 8;
  localparam int THREADS = 2;
  localparam int NCTX    = LUTS * THREADS;
  localparam int CTX_W   = $clog2(NCTX);

  // requests from the core, one per AxMemo instruction
  typedef enum logic [1:0] {
    OP_CRC    = 2'd0,   // ld_crc / reg_crc: one memoization input word
    OP_LOOKUP = 2'd1,   // lookup dst, LUT_ID
    OP_UPDATE = 2'd2,   // update src, LUT_ID
    OP_INVAL  = 2'd3    // invalidate LUT_ID
  } ax_op_e;

  typedef enum logic [1:0] {LUT_LOOKUP = 2'd0, LUT_UPDATE = 2'd1, LUT_INVAL = 2'd2} lut_op_e;

  // CRC-32, reflected IEEE 802.3 polynomial, table form: entry i is the CRC remainder
  // of byte i (eight shift/xor steps).
  localparam logic [31:0] CRC_POLY = 32'hEDB8_8320;
  typedef logic [31:0] crc_tab_t [256];
  function automatic crc_tab_t gen_crc_tab();
    crc_tab_t t;
    for (int i = 0; i < 256; i++) begin
      logic [31:0] c;
      c = 32'(i);
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ CRC_POLY) : (c >> 1);
      t[i] = c;
    end
    return t;
  endfunction
endpackage
