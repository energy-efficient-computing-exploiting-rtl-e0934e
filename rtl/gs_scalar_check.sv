// gs_scalar_check: scalar-execution eligibility of one instruction in G-Scalar.
//
// From the metadata of the instruction's source registers and its active mask this block
// decides how the SIMT pipeline runs it:
//   EX_SCALAR     non-divergent, every source holds one value for the whole warp
//                 (d=0 and fs=1, or d=1 written under an all-ones mask with enc=1111):
//                 only lane 0 is clocked.
//   EX_HALF       non-divergent, not fully scalar, but every source is scalar within a
//                 16-lane half (enc_h=1111 with d=0). half_scalar[h] marks such a half;
//                 it runs on one lane (0 or 16), the other half on all its lanes.
//   EX_DIV_SCALAR divergent, and every source is scalar over the active lanes: either a
//                 d=0, fs=1 register, or a d=1 register with enc=1111 whose stored mask
//                 (in base_l) equals the current active mask. Only the leading active
//                 lane (highest-numbered) runs.
//   EX_VECTOR     otherwise; lane enables are the active mask.
// Half-warp scalar execution is for non-divergent instructions only, as in the design.
// Which single lane stays on is this implementation's choice.
//
// special_move flags a divergent instruction whose destination is compressed (d=0 and
// some encoding bit set): the register must be decompressed and rewritten uncompressed
// before the partial write.
//
// Purely combinational.
module gs_scalar_check
  import gs_pkg::*;
#(
  parameter int NSRC = 3
) (
  input  logic [NSRC-1:0]   src_valid,
  input  gs_meta_t          src_meta [NSRC],
  input  logic [LANES-1:0]  mask,
  input  logic              dst_valid,
  input  gs_meta_t          dst_meta,
  output gs_exmode_e        mode,
  output logic [1:0]        half_scalar,
  output logic [LANES-1:0]  lane_en,
  output logic              special_move
);
  logic nondiv, full_ok, div_ok;
  logic [1:0] half_ok;
  logic [LANES-1:0] lead;
  logic [NSRC-1:0]  uni, dscal;   // per source: uniform register, divergent-scalar register

  assign nondiv = &mask;

  always_comb begin
    full_ok = nondiv;
    div_ok  = !nondiv && (|mask);
    half_ok = {2{nondiv}};
    for (int s = 0; s < NSRC; s++) begin
      uni[s]   = !src_meta[s].d && src_meta[s].fs;
      dscal[s] = src_meta[s].d && (src_meta[s].enc_l == 4'hF);
      if (src_valid[s]) begin
        if (!(uni[s] || (dscal[s] && src_meta[s].base_l == 32'hFFFF_FFFF))) full_ok = 1'b0;
        if (!(uni[s] || (dscal[s] && src_meta[s].base_l == 32'(mask))))    div_ok  = 1'b0;
        if (!(uni[s] || (!src_meta[s].d && src_meta[s].enc_l == 4'hF))) half_ok[0] = 1'b0;
        if (!(uni[s] || (!src_meta[s].d && src_meta[s].enc_h == 4'hF))) half_ok[1] = 1'b0;
      end
    end
  end

  always_comb begin
    lead = '0;
    for (int i = 0; i < LANES; i++)
      if (mask[i]) lead = LANES'(1) << i;
  end

  always_comb begin
    half_scalar = 2'b00;
    if (full_ok) begin
      mode    = EX_SCALAR;
      lane_en = LANES'(1);
    end else if (|half_ok) begin
      mode        = EX_HALF;
      half_scalar = half_ok;
      lane_en[HALF-1:0]     = half_ok[0] ? HALF'(1) : '1;
      lane_en[LANES-1:HALF] = half_ok[1] ? HALF'(1) : '1;
    end else if (div_ok) begin
      mode    = EX_DIV_SCALAR;
      lane_en = lead;
    end else begin
      mode    = EX_VECTOR;
      lane_en = mask;
    end
  end

  assign special_move = dst_valid && !nondiv && !dst_meta.d &&
                        ((dst_meta.enc_l != 4'h0) || (dst_meta.enc_h != 4'h0));
endmodule
