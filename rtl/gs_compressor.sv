// gs_compressor: write-back compressor of the G-Scalar register file.
//
// Every write-back of a vector register passes through this block. It compares the 32
// lane values byte by byte (each lane against its neighbour, so a byte position is
// "equal" when the whole comparison chain holds) separately for the low lanes 0..15 and
// the high lanes 16..31, and turns the per-byte equality flags into encoding bits
// (1000/1100/1110/1111/0000). The base value registers get op[0] and op[16].
//
// Divergent writes (active mask not all ones): inactive lanes have no valid value, so
// they are fed the value of the leading active lane (the highest-numbered one) before
// the comparison; the result then says whether all *active* lanes agree. Such a
// register is not compressed: d=1, both enc fields carry the whole-warp result, and
// base_l holds the active mask the comparison was made under, as the design requires.
// Half-warp results are used for non-divergent writes only.
//
// fs (full scalar) is set when both halves are scalar and op[0]==op[16] (non-divergent),
// or when all active lanes are equal (divergent).
//
// Timing: one register stage; out_* follow in_* by one clock. The tristate bus of the
// original comparison circuit is written as a multiplexer here (a design choice).
module gs_compressor
  import gs_pkg::*;
#(
  parameter int LANES_P = LANES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [LANES_P-1:0][31:0] in_data,
  input  logic [LANES_P-1:0]     in_mask,
  output logic                   out_valid,
  output gs_meta_t               out_meta,
  output logic [LANES_P-1:0][31:0] out_data,
  output logic [LANES_P-1:0]     out_mask
);
  localparam int H = LANES_P / 2;

  logic [31:0]              lead_val;
  logic [LANES_P-1:0][31:0] cmp_val;
  logic [3:0]               eq_l, eq_h, eq_all;
  logic                     divergent;
  gs_meta_t                 meta_c;

  always_comb begin
    // leading-one detector: highest-numbered active lane drives the shared bus
    lead_val = in_data[0];
    for (int i = 0; i < LANES_P; i++)
      if (in_mask[i]) lead_val = in_data[i];
    for (int i = 0; i < LANES_P; i++)
      cmp_val[i] = in_mask[i] ? in_data[i] : lead_val;
  end

  always_comb begin
    eq_l = 4'hF;
    eq_h = 4'hF;
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < H - 1; i++) begin
        if (cmp_val[i][8*b +: 8] != cmp_val[i+1][8*b +: 8]) eq_l[b] = 1'b0;
        if (cmp_val[H+i][8*b +: 8] != cmp_val[H+i+1][8*b +: 8]) eq_h[b] = 1'b0;
      end
      eq_all[b] = eq_l[b] & eq_h[b] & (cmp_val[H-1][8*b +: 8] == cmp_val[H][8*b +: 8]);
    end
  end

  assign divergent = ~&in_mask;

  always_comb begin
    meta_c = '0;
    if (divergent) begin
      meta_c.d      = 1'b1;
      meta_c.enc_l  = enc_from_eq(eq_all);
      meta_c.enc_h  = enc_from_eq(eq_all);
      meta_c.fs     = &eq_all;
      meta_c.base_l = 32'(in_mask);
      meta_c.base_h = 32'h0;
    end else begin
      meta_c.d      = 1'b0;
      meta_c.enc_l  = enc_from_eq(eq_l);
      meta_c.enc_h  = enc_from_eq(eq_h);
      meta_c.fs     = (&eq_l) & (&eq_h) & (cmp_val[0] == cmp_val[H]);
      meta_c.base_l = cmp_val[0];
      meta_c.base_h = cmp_val[H];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_meta <= meta_c;
      out_data <= in_data;
      out_mask <= in_mask;
    end
  end
endmodule
