// tb_gs_scalar_check: self-checking test of the G-Scalar issue-stage scalar check.
//
// Random instructions with up to three sources whose metadata is drawn from the kinds a
// register can be in (warp-uniform, scalar in one or both halves, partly compressed,
// divergently written scalar with a matching or different stored mask, uncompressed) and
// full, random or single-lane active masks. A reference model here applies the rules:
// full-mask instructions run on lane 0 if every source is warp-uniform, else per half on
// one lane if every source is scalar in that half; divergent instructions run on the
// highest-numbered active lane if every source is uniform or a scalar written under the
// same mask; otherwise all active lanes. special_move is expected for a divergent write
// to a compressed register. Combinational: checked 1 ns after each input change; every
// mode must occur. Watchdog: 1 ms.
module tb_gs_scalar_check;
  import gs_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0]  src_valid;
  gs_meta_t    src_meta [3];
  logic [31:0] mask;
  logic        dst_valid;
  gs_meta_t    dst_meta;
  gs_exmode_e  mode;
  logic [1:0]  half_scalar;
  logic [31:0] lane_en;
  logic        special_move;

  gs_scalar_check #(.NSRC(3)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic gs_meta_t rand_meta(input logic [31:0] cur_mask);
    gs_meta_t m = '0;
    case ($urandom % 7)
      0: begin m.fs = 1; m.enc_l = 4'hF; m.enc_h = 4'hF; m.base_l = $urandom; m.base_h = m.base_l; end
      1: begin m.enc_l = 4'hF; m.enc_h = 4'hC; end
      2: begin m.enc_l = 4'hE; m.enc_h = 4'hF; end
      3: begin m.enc_l = 4'hF; m.enc_h = 4'hF; m.base_l = 1; m.base_h = 2; end   // scalar halves, different values
      4: begin m.d = 1; m.enc_l = 4'hF; m.enc_h = 4'hF; m.fs = 1; m.base_l = cur_mask; end
      5: begin m.d = 1; m.enc_l = 4'hF; m.enc_h = 4'hF; m.fs = 1; m.base_l = $urandom; end
      default: m = META_UNCOMPRESSED;
    endcase
    return m;
  endfunction

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int seen [4];
  int nsm = 0;
  initial begin
    for (int t = 0; t < 20000; t++) begin
      gs_exmode_e e_mode;
      logic [1:0] e_half;
      logic [31:0] e_lanes;
      bit all_uni, h_ok [2], div_ok, e_sm;
      int lead;
      case ($urandom % 3)
        0: mask = '1;
        1: mask = $urandom | 1;
        default: mask = 32'd1 << ($urandom % 32);
      endcase
      if ($urandom % 2) mask = '1;
      src_valid = 3'($urandom);
      for (int s = 0; s < 3; s++) src_meta[s] = rand_meta(mask);
      dst_valid = $urandom % 2;
      dst_meta  = rand_meta(mask);
      // reference
      all_uni = 1; h_ok[0] = 1; h_ok[1] = 1; div_ok = 1;
      for (int s = 0; s < 3; s++) if (src_valid[s]) begin
        bit uni;
        uni = !src_meta[s].d && src_meta[s].fs;
        if (!(uni || (src_meta[s].d && src_meta[s].enc_l == 4'hF && src_meta[s].base_l == 32'hFFFF_FFFF))) all_uni = 0;
        if (!(uni || (!src_meta[s].d && src_meta[s].enc_l == 4'hF))) h_ok[0] = 0;
        if (!(uni || (!src_meta[s].d && src_meta[s].enc_h == 4'hF))) h_ok[1] = 0;
        if (!(uni || (src_meta[s].d && src_meta[s].enc_l == 4'hF && src_meta[s].base_l == mask))) div_ok = 0;
      end
      lead = 0;
      for (int i = 0; i < 32; i++) if (mask[i]) lead = i;
      e_half = 2'b00;
      if (&mask) begin
        if (all_uni) begin
          e_mode = EX_SCALAR; e_lanes = 32'h1;
        end else if (h_ok[0] || h_ok[1]) begin
          e_mode = EX_HALF; e_half = {h_ok[1], h_ok[0]};
          e_lanes = {h_ok[1] ? 16'h0001 : 16'hFFFF, h_ok[0] ? 16'h0001 : 16'hFFFF};
        end else begin
          e_mode = EX_VECTOR; e_lanes = mask;
        end
      end else if (div_ok) begin
        e_mode = EX_DIV_SCALAR; e_lanes = 32'd1 << lead;
      end else begin
        e_mode = EX_VECTOR; e_lanes = mask;
      end
      e_sm = dst_valid && !(&mask) && !dst_meta.d && (dst_meta.enc_l != 0 || dst_meta.enc_h != 0);
      #1;
      chk(mode == e_mode, $sformatf("t=%0d mode %0d exp %0d", t, mode, e_mode));
      chk(half_scalar == e_half, $sformatf("t=%0d half %b exp %b", t, half_scalar, e_half));
      chk(lane_en == e_lanes, $sformatf("t=%0d lanes %h exp %h", t, lane_en, e_lanes));
      chk(special_move == e_sm, $sformatf("t=%0d special move", t));
      seen[e_mode]++;
      if (e_sm) nsm++;
    end
    for (int m = 0; m < 4; m++) chk(seen[m] > 100, $sformatf("mode %0d exercised", m));
    chk(nsm > 100, "special move exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
