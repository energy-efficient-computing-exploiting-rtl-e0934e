// ax_lut: set-associative memoization lookup table (LUT) of AxMemo.
//
// Organised like a cache: SETS sets of WAYS entries, each entry a tag and a 4-byte data
// word; one set (8 tags + 8 words of 4 bytes) is 64 bytes, a last-level cache line. The
// low log2(SETS) bits of the 32-bit CRC pick the set; the tag keeps the remaining CRC
// bits, the 3-bit LUT_ID and a valid bit, so several logical LUTs share one array.
// With wide8 set, every set acts as 4 ways of 8-byte data: ways 2k and 2k+1 form one
// entry, the tag lives in way 2k and the data is {word 2k+1, word 2k}.
//
//   LUT_LOOKUP  compares {LUT_ID, CRC} with the set; hit returns the data and makes the
//               way most recently used.
//   LUT_UPDATE  writes {LUT_ID, CRC} and data: into the way that already holds the tag,
//               else into an invalid way, else into the least recently used way (true
//               LRU, 3-bit ages). Sets the valid bit.
//   LUT_INVAL   removes every entry of one LUT_ID; it occupies the table one cycle per
//               way, as the design's dedicated invalidation hardware does.
//
// Storage: the tags of a set (valid, LUT_ID, generation, CRC bits) form one memory word,
// the data of a set another, the LRU ages a third; only one "set written since reset" bit
// per set is a register. Invalidation is done with a 16-bit generation number per LUT_ID
// kept in each tag: an entry counts as valid only while its generation equals the
// current one of its LUT_ID, and LUT_INVAL advances that number. This keeps a 512 KB
// table in plain memory arrays; an entry could only come back to life after 65,536
// invalidations of the same LUT_ID, none of them followed by an update of that way.
//
// Timing: one operation at a time, accepted when !busy; done pulses LAT cycles after a
// lookup, UPD_LAT cycles after an update and WAYS+1 cycles after an invalidate.
// The L1 LUT uses LAT=2 and the L2 LUT LAT=13. The victim is chosen when the update
// arrives (rather than at the miss); the generation scheme is this implementation's way
// of clearing a LUT in one cycle per way.
module ax_lut
  import ax_pkg::*;
#(
  parameter int SETS    = 128,
  parameter int LAT     = 2,
  parameter int UPD_LAT = 2,
  localparam int WAYS   = 8,
  localparam int IW     = $clog2(SETS),
  localparam int TW     = 32 - IW,
  localparam int GW     = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wide8,
  input  logic          in_valid,
  input  lut_op_e       in_op,
  input  logic [2:0]    in_lut,
  input  logic [31:0]   in_crc,
  input  logic [63:0]   in_data,
  output logic          busy,
  output logic          done,
  output logic          hit,
  output logic [63:0]   rdata
);
  typedef struct packed {
    logic          v;
    logic [2:0]    lid;
    logic [GW-1:0] gen;
    logic [TW-1:0] tag;
  } tag_t;

  tag_t [WAYS-1:0]         tag_m  [SETS];
  logic [WAYS-1:0][31:0]   data_m [SETS];
  logic [WAYS-1:0][2:0]    age_m  [SETS];
  logic [SETS-1:0]         set_ok;           // set written since reset
  logic [7:0][GW-1:0]      gen_q;            // current generation of each LUT_ID

  wire [IW-1:0] set = in_crc[IW-1:0];
  wire [TW-1:0] tag = in_crc[31:IW];

  localparam logic [WAYS-1:0][2:0] AGE_RESET = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0};

  // ---------------------------------------------------------------- tag compare
  tag_t [WAYS-1:0]         s_tag, n_tag;
  logic [WAYS-1:0][31:0]   s_data;
  logic [WAYS-1:0][2:0]    s_age, n_age;
  logic [WAYS-1:0]         s_v;
  logic           c_hit, c_inv_found;
  logic [2:0]     c_way, c_inv, c_lru, c_victim, c_touch;

  assign s_tag  = tag_m[set];
  assign s_data = data_m[set];
  assign s_age  = set_ok[set] ? age_m[set] : AGE_RESET;
  always_comb
    for (int w = 0; w < WAYS; w++)
      s_v[w] = set_ok[set] && s_tag[w].v && s_tag[w].gen == gen_q[s_tag[w].lid];

  always_comb begin
    c_hit = 1'b0; c_way = '0; c_inv_found = 1'b0; c_inv = '0; c_lru = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!wide8 || w % 2 == 0) begin
        if (s_v[w] && s_tag[w].lid == in_lut && s_tag[w].tag == tag) begin
          c_hit = 1'b1; c_way = 3'(w);
        end
        if (!s_v[w]) begin
          c_inv_found = 1'b1; c_inv = 3'(w);
        end
      end
    end
    for (int w = 0; w < WAYS; w++)
      if ((!wide8 || w % 2 == 0) && s_age[w] >= s_age[c_lru]) c_lru = 3'(w);
    if (wide8 && c_lru[0]) c_lru = c_lru & 3'b110;
    c_victim = c_hit ? c_way : (c_inv_found ? c_inv : c_lru);
    // make the way used now most recently used
    c_touch = (in_op == LUT_LOOKUP) ? c_way : c_victim;
    for (int w = 0; w < WAYS; w++)
      if (w == int'(c_touch)) n_age[w] = 3'd0;
      else if (s_age[w] < s_age[c_touch] && s_age[w] != 3'd7) n_age[w] = s_age[w] + 3'd1;
      else n_age[w] = s_age[w];
    // tag word after an update: a never-written set starts with every way invalid
    for (int w = 0; w < WAYS; w++) begin
      n_tag[w] = s_tag[w];
      if (!set_ok[set]) n_tag[w].v = 1'b0;
    end
    n_tag[c_victim] = '{v: 1'b1, lid: in_lut, gen: gen_q[in_lut], tag: tag};
    if (wide8) n_tag[c_victim | 3'd1].v = 1'b0;
  end

  // ---------------------------------------------------------------- control
  logic [4:0] cnt;
  wire        start  = (cnt == 0) && in_valid;
  wire        upd    = start && in_op == LUT_UPDATE;
  wire        touch  = upd || (start && in_op == LUT_LOOKUP && c_hit);

  assign busy = (cnt != 5'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      done   <= 1'b0;
      set_ok <= '0;
      gen_q  <= '0;
    end else begin
      done <= 1'b0;
      if (cnt != 0) begin
        cnt <= cnt - 5'd1;
        if (cnt == 5'd1) done <= 1'b1;
      end else if (in_valid) begin
        case (in_op)
          LUT_LOOKUP: begin
            cnt <= 5'(LAT - 1);
            if (LAT == 1) done <= 1'b1;
          end
          LUT_UPDATE: begin
            cnt <= 5'(UPD_LAT - 1);
            if (UPD_LAT == 1) done <= 1'b1;
          end
          default: begin
            cnt <= 5'(WAYS);
            gen_q[in_lut] <= gen_q[in_lut] + GW'(1);
          end
        endcase
      end
      if (touch) set_ok[set] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      if (in_op == LUT_LOOKUP) begin
        hit   <= c_hit;
        rdata <= wide8 ? {s_data[c_way | 3'd1], s_data[c_way]} : {32'h0, s_data[c_way]};
      end else begin
        hit   <= 1'b0;
        rdata <= '0;
      end
    end
    if (upd) begin
      tag_m[set] <= n_tag;
      data_m[set][c_victim] <= in_data[31:0];
      if (wide8) data_m[set][c_victim | 3'd1] <= in_data[63:32];
    end
    if (touch) age_m[set] <= n_age;
  end
endmodule
