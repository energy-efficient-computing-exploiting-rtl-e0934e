// lnl_load_checker: loaded-value similarity check of Lock and Load.
//
// Sits between the load/store unit's write-back port and the register file. For a
// checked load it splits the warp into thread groups of 2^group_log2 consecutive threads
// (4, 8 or 16 in the evaluated configurations), takes the first active thread of each
// group as its anchor, and compares the value of every thread with its group's anchor
// in one of 32 comparison units (one per thread, which keeps the routing simple). Anchor
// threads, inactive threads and groups without an active thread count as similar. An
// all-one detector over the 32 results gives the single "similar" bit of the load.
//
// A TAG_W-bit tag (e.g. warp id and history-table entry) travels with the load.
// Timing: pipelined, one warp per cycle; out_valid three cycles after in_valid (the
// latency of the comparison units).
module lnl_load_checker
  import lnl_pkg::*;
#(
  parameter int THR_W = 16,
  parameter int TAG_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [WARP-1:0][31:0] in_data,
  input  logic [WARP-1:0]      in_mask,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic [2:0]           group_log2,
  input  logic [THR_W-1:0]     thr,
  output logic                 out_valid,
  output logic                 similar,
  output logic [WARP-1:0]      out_anchor,
  output logic [TAG_W-1:0]     out_tag
);
  logic [WARP-1:0]       anchors;
  logic [WARP-1:0][31:0] anchor_val;
  logic [WARP-1:0]       cmp_ok, cmp_v;

  assign anchors = anchor_mask(in_mask, group_log2);

  always_comb begin
    logic [31:0] cur;
    cur = in_data[0];
    for (int i = 0; i < WARP; i++) begin
      if (anchors[i]) cur = in_data[i];
      anchor_val[i] = cur;    // a non-anchor thread follows the last anchor at or below it
    end
  end

  for (genvar i = 0; i < WARP; i++) begin : g_cmp
    lnl_cmp_unit #(.THR_W(THR_W)) u_cmp (
      .clk, .rst_n, .in_valid(in_valid), .a(anchor_val[i]), .b(in_data[i]), .thr,
      .out_valid(cmp_v[i]), .similar(cmp_ok[i])
    );
  end

  // threads that must be compared: active, not anchor; delayed to meet the comparators
  logic [2:0][WARP-1:0]  care_q, anc_q;
  logic [2:0][TAG_W-1:0] tag_q;

  always_ff @(posedge clk) begin
    care_q[0] <= in_mask & ~anchors;
    anc_q[0]  <= anchors;
    tag_q[0]  <= in_tag;
    for (int s = 1; s < 3; s++) begin
      care_q[s] <= care_q[s-1];
      anc_q[s]  <= anc_q[s-1];
      tag_q[s]  <= tag_q[s-1];
    end
  end

  assign out_valid  = &cmp_v;   // all units run in lock-step
  assign similar    = &(cmp_ok | ~care_q[2]);
  assign out_anchor = anc_q[2];
  assign out_tag    = tag_q[2];
endmodule
