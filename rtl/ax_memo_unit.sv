// ax_memo_unit: AxMemo memoization unit of one CPU core.
//
// AxMemo replaces a whole block of code by a table lookup keyed on a hash of the block's
// inputs. The core drives it with one request per AxMemo instruction:
//   OP_CRC     (ld_crc / reg_crc) one 32-bit memoization input for {LUT_ID, TID}; its n
//              least significant bits are cleared (the approximation) and the word is
//              queued. Accepted whenever the input queue is not full; the queue drains
//              one word per cycle through the CRC unit into the hash value register of
//              the context.
//   OP_LOOKUP  waits until no input of its context is still queued, then looks the hash
//              up as {LUT_ID, CRC} in the L1 LUT (2 cycles) and, on a miss, in the
//              inclusive L2 LUT (13 cycles); an L2 hit is copied into L1. A hit returns
//              the data (resp_hit=1, like the condition code the branch uses) and resets
//              the context's hash register; a miss keeps it for the update.
//   OP_UPDATE  writes {LUT_ID, CRC} and the result of the original code into both LUT
//              levels (answer after the L1 write, 2 cycles) and resets the hash register.
//   OP_INVAL   retires every entry of a LUT_ID in both levels (ax_lut advances the
//              LUT_ID's generation number; answer 10 cycles after acceptance).
// Response times, counted from the cycle a lookup starts: L1 hit 3, L2 hit or miss 16
// (2 + 13 + 1); update 3. With memoization off a lookup misses after 1 cycle.
// ax_quality_monitor turns every 100th hit into a miss, checks the value the core later
// supplies against it and can switch memoization off; when off, every lookup misses.
//
// wide8 selects 8-byte LUT data (4-way sets) for the whole unit. Only one lookup, update
// or invalidate is in flight at a time (req_ready low otherwise), while OP_CRC words keep
// flowing. A new operation starts only when both LUTs are idle, so an L2 write never
// overlaps the next lookup. A response (resp_valid) ends every request but OP_CRC.
// L2_SETS = 0 builds the unit without an L2 LUT. The L2 LUT stands for the part of the
// core's last-level cache the design lends to memoization.
module ax_memo_unit
  import ax_pkg::*;
#(
  parameter int L1_SETS = 128,      // 8 KB
  parameter int L2_SETS = 8192,     // 512 KB
  parameter int L2_LAT  = 13,
  parameter int QDEPTH  = 4,
  parameter int QM_SAMPLE = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wide8,
  input  logic         req_valid,
  output logic         req_ready,
  input  ax_op_e       req_op,
  input  logic [2:0]   req_lut,
  input  logic         req_tid,
  input  logic [63:0]  req_data,
  input  logic [4:0]   req_trunc,
  output logic         resp_valid,
  output logic         resp_hit,
  output logic [1:0]   resp_level,     // 0 miss, 1 L1 hit, 2 L2 hit
  output logic [63:0]  resp_data,
  output logic         memo_disabled,
  output logic         lookup_stalled, // a request waits (queued inputs of its context)
  output logic         sampled_miss,   // a hit was turned into a miss for quality checking
  output logic [15:0]  qm_samples,     // quality samples compared so far
  output logic [15:0]  qm_bad          // of which above the error threshold
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_L1, S_L2, S_FILL, S_UPD, S_INV} state_e;
  state_e st;
  ax_op_e      op_q;
  logic [2:0]  ctx_lut;
  logic [31:0] crc_q;
  logic [63:0] data_q, req_or_q_data;
  logic        go;           // the held or new request can start now
  ax_op_e      go_op;
  logic        fill_sent;    // the L1 refill after an L2 hit has been issued

  wire [CTX_W-1:0] req_ctx = {req_lut, req_tid};

  // ---------------------------------------------------------------- input queue + CRC
  logic             q_empty, q_full, q_pending;
  logic [CTX_W-1:0] q_head_ctx, ctx_q, pend_ctx;
  logic [31:0]      q_head_data, crc_cur, crc_nxt, hv_b;
  logic             push;
  logic [31:0]      trunc_word;

  assign trunc_word = req_data[31:0] & ~((32'd1 << req_trunc) - 32'd1);
  assign push       = req_valid && req_op == OP_CRC && !q_full;

  ax_input_queue #(.DEPTH(QDEPTH), .W(32)) u_q (
    .clk, .rst_n, .push, .push_ctx(req_ctx), .push_data(trunc_word), .pop(!q_empty),
    .empty(q_empty), .full(q_full), .head_ctx(q_head_ctx), .head_data(q_head_data),
    .q_ctx(pend_ctx), .pending(q_pending)
  );

  ax_crc32 #(.BYTES(4)) u_crc (.crc_in(crc_cur), .data(q_head_data), .crc_out(crc_nxt));

  logic             hv_init;
  logic [CTX_W-1:0] hv_init_ctx;
  ax_hvr #(.N(NCTX)) u_hvr (
    .clk, .rst_n, .ra_addr(q_head_ctx), .ra_data(crc_cur),
    .rb_addr(pend_ctx), .rb_data(hv_b),
    .wr_en(!q_empty), .wr_addr(q_head_ctx), .wr_data(crc_nxt),
    .init_en(hv_init), .init_addr(hv_init_ctx)
  );

  // ---------------------------------------------------------------- LUTs
  logic        l1_v, l1_busy, l1_done, l1_hit;
  lut_op_e     l1_op;
  logic [31:0] l1_crc;
  logic [63:0] l1_wdata, l1_rdata;
  logic        l2_v, l2_busy, l2_done, l2_hit;
  lut_op_e     l2_op;
  logic [63:0] l2_rdata;

  ax_lut #(.SETS(L1_SETS), .LAT(2), .UPD_LAT(2)) u_l1 (
    .clk, .rst_n, .wide8, .in_valid(l1_v), .in_op(l1_op), .in_lut(ctx_lut), .in_crc(l1_crc),
    .in_data(l1_wdata), .busy(l1_busy), .done(l1_done), .hit(l1_hit), .rdata(l1_rdata)
  );

  localparam bit HAS_L2 = (L2_SETS > 0);
  if (HAS_L2) begin : g_l2
    ax_lut #(.SETS(L2_SETS), .LAT(L2_LAT), .UPD_LAT(2)) u_l2 (
      .clk, .rst_n, .wide8, .in_valid(l2_v), .in_op(l2_op), .in_lut(ctx_lut), .in_crc(go ? hv_b : crc_q),
      .in_data(go ? req_or_q_data : data_q), .busy(l2_busy), .done(l2_done), .hit(l2_hit), .rdata(l2_rdata)
    );
  end else begin : g_no_l2
    assign l2_busy  = 1'b0;
    assign l2_done  = 1'b0;
    assign l2_hit   = 1'b0;
    assign l2_rdata = '0;
  end

  // ---------------------------------------------------------------- quality monitor
  logic qm_hit_v, qm_force, qm_upd_v;
  logic [31:0] qm_hit_data;
  ax_quality_monitor #(.SAMPLE(QM_SAMPLE)) u_qm (
    .clk, .rst_n, .hit_valid(qm_hit_v), .hit_ctx(ctx_q), .hit_data(qm_hit_data),
    .force_miss(qm_force), .upd_valid(qm_upd_v), .upd_ctx(pend_ctx), .upd_data(req_or_q_data[31:0]),
    .disabled(memo_disabled), .n_samples(qm_samples), .n_bad_total(qm_bad)
  );

  // ---------------------------------------------------------------- request FSM

  assign req_ready = (req_op == OP_CRC) ? !q_full : (st == S_IDLE);
  assign pend_ctx  = (st == S_IDLE) ? req_ctx : ctx_q;
  assign ctx_lut   = pend_ctx[CTX_W-1:1];
  assign req_or_q_data = (st == S_IDLE) ? req_data : data_q;
  assign go_op     = (st == S_IDLE) ? req_op : op_q;
  assign go        = ((st == S_IDLE && req_valid && req_op != OP_CRC) || st == S_WAIT) &&
                     !q_pending && !l1_busy && !l2_busy;
  assign lookup_stalled = ((st == S_IDLE && req_valid && req_op != OP_CRC) || st == S_WAIT) && !go;

  always_comb begin
    l1_v = 1'b0; l1_op = LUT_LOOKUP; l1_crc = hv_b; l1_wdata = req_or_q_data;
    l2_v = 1'b0; l2_op = LUT_LOOKUP;
    hv_init = 1'b0; hv_init_ctx = pend_ctx;
    qm_hit_v = 1'b0; qm_hit_data = l1_rdata[31:0]; qm_upd_v = 1'b0;
    if (go && !(go_op == OP_LOOKUP && memo_disabled)) begin
      l1_v = 1'b1;
      case (go_op)
        OP_LOOKUP: l1_op = LUT_LOOKUP;
        OP_UPDATE: begin
          l1_op = LUT_UPDATE;
          l2_v  = HAS_L2;
          l2_op = LUT_UPDATE;
          hv_init  = 1'b1;
          qm_upd_v = 1'b1;
        end
        default: begin
          l1_op = LUT_INVAL;
          l2_v  = HAS_L2;
          l2_op = LUT_INVAL;
        end
      endcase
    end
    if (st == S_L1 && l1_done && l1_hit) begin
      qm_hit_v = 1'b1;
      hv_init  = !qm_force;
    end
    if (st == S_L1 && l1_done && !l1_hit && HAS_L2) l2_v = 1'b1;
    if (st == S_L2 && l2_done && l2_hit) begin
      qm_hit_v    = 1'b1;
      qm_hit_data = l2_rdata[31:0];
      hv_init     = !qm_force;
    end
    if (st == S_FILL && !l1_busy && !fill_sent) begin
      l1_v = 1'b1; l1_op = LUT_UPDATE; l1_crc = crc_q; l1_wdata = data_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      resp_valid <= 1'b0;
      resp_hit   <= 1'b0;
      resp_level <= '0;
      resp_data  <= '0;
      sampled_miss <= 1'b0;
      fill_sent  <= 1'b0;
      op_q       <= OP_CRC;
      ctx_q      <= '0;
      crc_q      <= '0;
      data_q     <= '0;
    end else begin
      resp_valid   <= 1'b0;
      sampled_miss <= 1'b0;
      if (st == S_IDLE && req_valid && req_op != OP_CRC) begin
        op_q   <= req_op;
        ctx_q  <= req_ctx;
        data_q <= req_data;
      end
      if (go) crc_q <= hv_b;
      case (st)
        S_IDLE, S_WAIT: begin
          if (st == S_IDLE && !(req_valid && req_op != OP_CRC)) st <= S_IDLE;
          else if (!go) st <= S_WAIT;
          else if (go_op == OP_LOOKUP && memo_disabled) begin
            resp_valid <= 1'b1; resp_hit <= 1'b0; resp_level <= 2'd0; resp_data <= '0;
            st <= S_IDLE;
          end else
            st <= (go_op == OP_LOOKUP) ? S_L1 : (go_op == OP_UPDATE) ? S_UPD : S_INV;
        end
        S_L1: if (l1_done) begin
          if (l1_hit) begin
            resp_valid <= 1'b1; resp_hit <= !qm_force; resp_level <= qm_force ? 2'd0 : 2'd1;
            resp_data  <= qm_force ? '0 : l1_rdata;
            sampled_miss <= qm_force;
            st <= S_IDLE;
          end else if (HAS_L2) begin
            st <= S_L2;
          end else begin
            resp_valid <= 1'b1; resp_hit <= 1'b0; resp_level <= 2'd0; resp_data <= '0;
            st <= S_IDLE;
          end
        end
        S_L2: if (l2_done) begin
          resp_valid <= 1'b1; resp_hit <= l2_hit && !qm_force;
          resp_level <= (l2_hit && !qm_force) ? 2'd2 : 2'd0;
          resp_data  <= (l2_hit && !qm_force) ? l2_rdata : '0;
          sampled_miss <= l2_hit && qm_force;
          data_q     <= l2_rdata;
          fill_sent  <= 1'b0;
          st <= (l2_hit && !qm_force) ? S_FILL : S_IDLE;
        end
        S_FILL: begin
          if (l1_v) fill_sent <= 1'b1;
          if (fill_sent && l1_done) st <= S_IDLE;
        end
        S_UPD: if (l1_done) begin
          resp_valid <= 1'b1; resp_hit <= 1'b0; resp_level <= 2'd0; resp_data <= '0;
          st <= S_IDLE;
        end
        S_INV: if (l1_done) begin
          resp_valid <= 1'b1; resp_hit <= 1'b0; resp_level <= 2'd0; resp_data <= '0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
