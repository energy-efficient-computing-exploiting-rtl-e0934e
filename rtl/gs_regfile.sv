// gs_regfile: G-Scalar compressed register file of one SM.
//
// The register file keeps NBANKS x REGS_PER_BANK vector registers (1024 x 32 lanes x 4
// bytes = 128 KB at the defaults). Register r lives in bank r mod NBANKS. Every value
// written back goes through gs_compressor; bytes that are common to all lanes of a
// 16-lane half are kept only in the base value register, so only the byte-plane arrays
// whose encoding bit is 0 are written and later read. A scalar register (enc=1111 in both
// halves) touches no data array at all: reads are answered from the base value
// registers. Reads are rebuilt by gs_decompressor.
//
// Divergent writes (mask not all ones) are stored uncompressed with d=1 and the mask in
// base_l, so later divergent instructions can be checked for divergent-scalar execution.
// When a divergent write hits a register that is currently compressed (d=0, some
// encoding bit set), the old value is read, decompressed and merged with the new active
// lanes, and the register is rewritten in full: this is the "special move" of the
// design, done here inside the register file at the cost of one stall cycle.
//
// Scalar write-back: when the producing instruction ran as a scalar, half-scalar or
// divergent-scalar instruction (wr_mode/wr_half), the single computed value (lane 0,
// lane 16 or the leading active lane) is broadcast to the lanes it stands for before
// compression, so the result is stored as a scalar register.
//
// Interface: one request per cycle on req_* (req_write selects write or read), accepted
// when req_ready. Pipeline: S1 metadata read and compression, S2 array access (and
// metadata write), S3 decompression. A read returns on rd_valid exactly 3 cycles after it
// was accepted; a write is visible to any read accepted after it. arrays_active counts
// the data arrays enabled this cycle (for energy accounting); special_move pulses when a
// special move is carried out.
// The crossbar and operand collectors of the SM are not modelled; the byte reordering of
// the adapted crossbar is the fixed plane/lane wiring between this block and its banks.
module gs_regfile
  import gs_pkg::*;
#(
  parameter int NB   = NBANKS,
  parameter int RPB  = REGS_PER_BANK,
  localparam int BW  = $clog2(NB),
  localparam int AW  = $clog2(RPB),
  localparam int RW  = BW + AW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_write,
  input  logic [RW-1:0]            req_reg,
  input  logic [LANES-1:0]         req_mask,
  input  logic [LANES-1:0][31:0]   req_data,
  input  gs_exmode_e               wr_mode,
  input  logic [1:0]               wr_half,
  output logic                     rd_valid,
  output logic [RW-1:0]            rd_reg,
  output logic [LANES-1:0][31:0]   rd_data,
  output gs_meta_t                 rd_meta,
  output logic                     rd_bvr_only,
  output logic [4:0]               arrays_active,
  output logic                     special_move
);
  // ---------------------------------------------------------------- bank wiring
  logic [NB-1:0]                        b_mr_en, b_mw_en, b_pa_en;
  logic [AW-1:0]                        mr_addr, mw_addr, pa_addr;
  gs_meta_t                             mw_data;
  logic                                 pa_we;
  logic [3:0][1:0]                      pa_act;
  logic [LANES-1:0]                     pa_lane_we;
  logic [3:0][LANES-1:0][7:0]           pa_wdata;
  gs_meta_t                             b_mr_data   [NB];
  logic [3:0][LANES-1:0][7:0]           b_pa_rdata  [NB];
  logic [3:0][1:0]                      b_array_act [NB];

  for (genvar g = 0; g < NB; g++) begin : g_bank
    gs_rf_bank #(.REGS(RPB)) u_bank (
      .clk, .rst_n,
      .mr_en(b_mr_en[g]), .mr_addr, .mr_data(b_mr_data[g]),
      .mw_en(b_mw_en[g]), .mw_addr, .mw_data,
      .pa_en(b_pa_en[g]), .pa_we, .pa_addr, .pa_act, .pa_lane_we, .pa_wdata,
      .pa_rdata(b_pa_rdata[g]), .array_act(b_array_act[g])
    );
  end

  always_comb begin
    arrays_active = '0;
    for (int g = 0; g < NB; g++)
      for (int p = 0; p < 4; p++)
        for (int h = 0; h < 2; h++)
          arrays_active = arrays_active + 5'(b_array_act[g][p][h]);
  end

  // ---------------------------------------------------------------- S1
  logic                   accept;
  logic [LANES-1:0][31:0] bcast;
  logic                   stall;

  assign req_ready = !stall;
  assign accept    = req_valid && req_ready;

  always_comb begin
    logic [31:0] lead;
    lead = req_data[0];
    for (int i = 0; i < LANES; i++) if (req_mask[i]) lead = req_data[i];
    bcast = req_data;
    case (wr_mode)
      EX_SCALAR:     for (int i = 0; i < LANES; i++) bcast[i] = req_data[0];
      EX_HALF: begin
        if (wr_half[0]) for (int i = 0; i < HALF; i++) bcast[i] = req_data[0];
        if (wr_half[1]) for (int i = HALF; i < LANES; i++) bcast[i] = req_data[HALF];
      end
      EX_DIV_SCALAR: for (int i = 0; i < LANES; i++) bcast[i] = lead;
      default: ;
    endcase
  end

  logic                   c_valid;
  gs_meta_t               c_meta;
  logic [LANES-1:0][31:0] c_data;
  logic [LANES-1:0]       c_mask;

  gs_compressor u_comp (
    .clk, .rst_n,
    .in_valid(accept && req_write), .in_data(bcast), .in_mask(req_mask),
    .out_valid(c_valid), .out_meta(c_meta), .out_data(c_data), .out_mask(c_mask)
  );

  // ---------------------------------------------------------------- S2 registers
  logic          s2_v, s2_w, s2_sm;
  logic [RW-1:0] s2_reg;
  logic          lmw_v;            // metadata written at the last clock edge (bypass)
  logic [RW-1:0] lmw_reg;
  gs_meta_t      lmw_meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v  <= 1'b0;
      s2_w  <= 1'b0;
      s2_sm <= 1'b0;
    end else if (!stall) begin
      s2_v  <= accept;
      s2_w  <= req_write;
      s2_sm <= 1'b0;
    end else begin
      s2_sm <= 1'b1;               // second cycle of a special move
    end
  end

  always_ff @(posedge clk) begin
    if (accept) s2_reg <= req_reg;
  end

  wire [BW-1:0] s2_bank = s2_reg[BW-1:0];
  gs_meta_t     s2_meta_raw, s2_meta;
  logic         s2_meta_hold_v;
  gs_meta_t     s2_meta_hold;

  assign s2_meta_raw = b_mr_data[s2_bank];
  // the metadata seen in S2: bypass a write committed at the previous edge
  always_comb begin
    if (s2_meta_hold_v)                      s2_meta = s2_meta_hold;
    else if (lmw_v && lmw_reg == s2_reg)     s2_meta = lmw_meta;
    else                                     s2_meta = s2_meta_raw;
  end

  // keep the old metadata across the two cycles of a special move
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_meta_hold_v <= 1'b0;
    else        s2_meta_hold_v <= stall;
  end
  always_ff @(posedge clk) begin
    if (stall) s2_meta_hold <= s2_meta;
  end

  logic need_sm;
  assign need_sm = s2_v && s2_w && c_meta.d && !s2_meta.d &&
                   ((s2_meta.enc_l != 4'h0) || (s2_meta.enc_h != 4'h0));
  assign stall   = need_sm && !s2_sm;
  assign special_move = need_sm && s2_sm;

  function automatic logic [3:0][1:0] planes_needed(input gs_meta_t m);
    logic [3:0][1:0] a;
    for (int p = 0; p < 4; p++) begin
      a[p][0] = m.d || !m.enc_l[p];
      a[p][1] = m.d || !m.enc_h[p];
    end
    return a;
  endfunction

  // old register value during a special move (planes read in the first cycle)
  logic [LANES-1:0][31:0] old_full;
  logic [3:0][LANES-1:0][7:0] s3_planes;
  gs_decompressor u_dec_old (.meta(s2_meta), .planes(b_pa_rdata[s2_bank]), .data(old_full));

  always_comb begin
    b_mr_en    = '0;
    b_mw_en    = '0;
    b_pa_en    = '0;
    mr_addr    = req_reg[RW-1:BW];
    mw_addr    = s2_reg[RW-1:BW];
    pa_addr    = s2_reg[RW-1:BW];
    mw_data    = c_meta;
    pa_we      = 1'b0;
    pa_act     = '0;
    pa_lane_we = '0;
    pa_wdata   = '0;
    // S1: metadata read (reads for their own use, writes to detect a special move)
    if (accept) b_mr_en[req_reg[BW-1:0]] = 1'b1;
    // S2
    if (s2_v) begin
      if (!s2_w) begin
        pa_act = planes_needed(s2_meta);
        b_pa_en[s2_bank] = |pa_act;
      end else if (stall) begin
        pa_act = planes_needed(s2_meta);       // read the compressed old value
        b_pa_en[s2_bank] = 1'b1;
      end else begin
        pa_we = 1'b1;
        b_mw_en[s2_bank] = 1'b1;
        if (special_move) begin
          pa_act     = '1;
          pa_lane_we = '1;
          for (int i = 0; i < LANES; i++)
            for (int p = 0; p < 4; p++)
              pa_wdata[p][i] = c_mask[i] ? c_data[i][8*p +: 8] : old_full[i][8*p +: 8];
        end else begin
          pa_act     = planes_needed(c_meta);
          pa_lane_we = c_meta.d ? c_mask : '1;
          for (int i = 0; i < LANES; i++)
            for (int p = 0; p < 4; p++)
              pa_wdata[p][i] = c_data[i][8*p +: 8];
        end
        b_pa_en[s2_bank] = |pa_act;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lmw_v <= 1'b0;
    else        lmw_v <= |b_mw_en;
  end
  always_ff @(posedge clk) begin
    lmw_reg  <= s2_reg;
    lmw_meta <= c_meta;
  end

  // ---------------------------------------------------------------- S3
  logic          s3_v;
  logic [RW-1:0] s3_reg;
  gs_meta_t      s3_meta;
  logic [LANES-1:0][31:0] s3_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_v <= 1'b0;
    else        s3_v <= s2_v && !s2_w;
  end
  always_ff @(posedge clk) begin
    s3_reg  <= s2_reg;
    s3_meta <= s2_meta;
  end
  assign s3_planes = b_pa_rdata[s3_reg[BW-1:0]];
  gs_decompressor u_dec (.meta(s3_meta), .planes(s3_planes), .data(s3_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= s3_v;
  end
  always_ff @(posedge clk) begin
    if (s3_v) begin
      rd_reg      <= s3_reg;
      rd_data     <= s3_data;
      rd_meta     <= s3_meta;
      rd_bvr_only <= !s3_meta.d && (s3_meta.enc_l == 4'hF) && (s3_meta.enc_h == 4'hF);
    end
  end
endmodule
