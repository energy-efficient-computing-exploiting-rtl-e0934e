// lnl_ibuffer: instruction buffer extended for Lock and Load warp fusion.
//
// Two entries per warp, each {decoded instruction, WID, valid, rdy0, rdy1, f}. A fused
// pair has its instructions fetched and decoded once, through the even warp, so a single
// entry with f=1 stands for both source warps. rdy0 follows the scoreboard of the entry's
// own warp and rdy1 that of the partner warp (wid xor 1); an entry with f=0 needs rdy0
// only, an entry with f=1 needs both before it may issue.
//
// Each warp's two entries form a small FIFO (the older one issues first). Issue picks a
// warp round-robin among those whose oldest entry is ready. full[w] tells fetch to hold
// warp w; a fill of a full warp is allowed only in a cycle in which that warp issues.
//
// Timing: fill and issue act at the clock edge; ready bits are sampled from sb_ready at
// every edge, so an entry can issue one cycle after its scoreboard reports ready.
// issue_* is combinational. Round-robin and the per-warp ready inputs are choices of
// this implementation.
module lnl_ibuffer
  import lnl_pkg::*;
#(
  parameter int NWARPS = WARPS,
  localparam int WW    = $clog2(NWARPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fill_en,
  input  logic [WW-1:0]     fill_warp,
  input  lnl_insn_t         fill_insn,
  input  logic              fill_fused,
  input  logic [NWARPS-1:0] sb_ready,
  input  logic              issue_ready,
  output logic              issue_valid,
  output logic [WW-1:0]     issue_warp,
  output lnl_insn_t         issue_insn,
  output logic              issue_fused,
  output logic [NWARPS-1:0] full
);
  typedef struct packed {
    lnl_insn_t insn;
    logic      valid;
    logic      rdy0;
    logic      rdy1;
    logic      f;
  } ibe_t;

  ibe_t ent [NWARPS][2];
  logic [NWARPS-1:0] head;          // index of the older entry
  logic [WW-1:0]     rr;
  logic [NWARPS-1:0] can_issue;

  always_comb begin
    for (int w = 0; w < NWARPS; w++) begin
      ibe_t e;
      e = ent[w][head[w]];
      can_issue[w] = e.valid && e.rdy0 && (!e.f || e.rdy1);
      full[w]      = ent[w][0].valid && ent[w][1].valid;
    end
  end

  always_comb begin
    issue_valid = 1'b0;
    issue_warp  = '0;
    for (int k = NWARPS; k >= 1; k--) begin
      int w;
      w = int'(rr) + k;                 // < 2*NWARPS: one conditional subtract
      if (w >= NWARPS) w = w - NWARPS;
      if (can_issue[w]) begin
        issue_valid = 1'b1;
        issue_warp  = WW'(w);
      end
    end
  end
  assign issue_insn  = ent[issue_warp][head[issue_warp]].insn;
  assign issue_fused = ent[issue_warp][head[issue_warp]].f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      rr   <= '0;
      for (int w = 0; w < NWARPS; w++) begin
        ent[w][0] <= '0;
        ent[w][1] <= '0;
      end
    end else begin
      for (int w = 0; w < NWARPS; w++)
        for (int i = 0; i < 2; i++) begin
          ent[w][i].rdy0 <= sb_ready[w];
          ent[w][i].rdy1 <= sb_ready[w ^ 1];
        end
      if (issue_valid && issue_ready) begin
        ent[issue_warp][head[issue_warp]].valid <= 1'b0;
        head[issue_warp] <= ~head[issue_warp];
        rr <= issue_warp;
      end
      if (fill_en) begin
        // the free slot: head if empty, else the other one; when the warp is full and
        // issues in the same cycle, the head slot being freed
        logic slot;
        if (!ent[fill_warp][head[fill_warp]].valid)       slot = head[fill_warp];
        else if (!ent[fill_warp][~head[fill_warp]].valid) slot = ~head[fill_warp];
        else                                              slot = head[fill_warp];
        ent[fill_warp][slot].insn  <= fill_insn;
        ent[fill_warp][slot].valid <= 1'b1;
        ent[fill_warp][slot].f     <= fill_fused;
      end
    end
  end
endmodule
