// gs_decompressor: read-side decompression of a G-Scalar vector register.
//
// The bank stores a register byte-reordered: byte plane b holds byte b of all 32 lanes.
// A compressed register only has the planes whose encoding bit is 0; the bytes whose
// encoding bit is 1 are common to every lane of that half and are taken from the base
// value register (base_l for lanes 0..15, base_h for lanes 16..31). A register written
// by a divergent instruction (d=1) is never compressed, so every byte comes from the
// planes. The byte multiplexers are the whole of this block.
//
// Purely combinational; the register file places a pipeline register after it (one
// cycle for decompression, as the design budgets).
module gs_decompressor
  import gs_pkg::*;
(
  input  gs_meta_t                    meta,
  input  logic [3:0][LANES-1:0][7:0]  planes,
  output logic [LANES-1:0][31:0]      data
);
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      for (int b = 0; b < 4; b++) begin
        logic       use_base;
        logic [7:0] base_byte;
        use_base  = !meta.d && ((i < HALF) ? meta.enc_l[b] : meta.enc_h[b]);
        base_byte = (i < HALF) ? meta.base_l[8*b +: 8] : meta.base_h[8*b +: 8];
        data[i][8*b +: 8] = use_base ? base_byte : planes[b][i];
      end
    end
  end
endmodule
