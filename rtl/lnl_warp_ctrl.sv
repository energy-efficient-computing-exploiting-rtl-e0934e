// lnl_warp_ctrl: approximation state and warp-fusion fetch table of Lock and Load.
//
// Per warp it keeps the fetch PC-table entry {PC, WID, f, p} extended with the LnL state
// {approximating, end PC, waiting at START_APPROX}. Warps 2k and 2k+1 form a fusion pair
// (p always points at the partner, wid xor 1).
//
// START_APPROX (sa_*) is a barrier for the pair: the warp records whether the history
// table allowed approximation (sa_ok) and its end PC, and waits. When both warps of the
// pair wait, each starts approximated execution if its own check passed, and the pair is
// fused when both passed. A warp whose partner is not active does not wait.
//
// Fetch: a round-robin scheduler picks an active, non-waiting warp that is not held
// (hold[w], e.g. its I-buffer is full) and is not the odd member of a fused pair. A
// fused pair is fetched once, through the even warp, and both PCs advance by 8 so either
// warp can continue alone after the split. When an approximating warp fetches its end
// PC, approximation ends and a fused pair is split (that instruction is fetched
// unfused). A branch redirect (br_*) sets the PC, of both warps when fused. A warp that
// exits while fused leaves its partner unfused.
//
// Timing: fetch_* is combinational from the state; the state updates at the clock edge
// when fetch_valid && fetch_ready. Launch/exit/START_APPROX/redirect also act at the edge.
// The round-robin policy, PC step and barrier rules for an inactive partner are choices
// of this implementation.
module lnl_warp_ctrl
  import lnl_pkg::*;
#(
  parameter int NWARPS = WARPS,
  parameter int PC_W   = 32,
  localparam int WW    = $clog2(NWARPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              launch_en,
  input  logic [WW-1:0]     launch_warp,
  input  logic [PC_W-1:0]   launch_pc,
  input  logic              exit_en,
  input  logic [WW-1:0]     exit_warp,
  input  logic              sa_en,
  input  logic [WW-1:0]     sa_warp,
  input  logic              sa_ok,
  input  logic [PC_W-1:0]   sa_end_pc,
  input  logic              br_en,
  input  logic [WW-1:0]     br_warp,
  input  logic [PC_W-1:0]   br_pc,
  input  logic [NWARPS-1:0] hold,
  input  logic              fetch_ready,
  output logic              fetch_valid,
  output logic [WW-1:0]     fetch_warp,
  output logic [PC_W-1:0]   fetch_pc,
  output logic              fetch_fused,
  output logic [NWARPS-1:0] active,
  output logic [NWARPS-1:0] approx,
  output logic [NWARPS-1:0] fused,
  output logic [NWARPS-1:0] waiting,
  output logic              fuse_event,
  output logic              split_event
);
  typedef struct packed {
    logic [PC_W-1:0] pc;
    logic [PC_W-1:0] end_pc;
    logic [5:0]      p;       // partner pointer
    logic            ok;      // result of the history-table check at the barrier
  } wentry_t;

  wentry_t         tbl [NWARPS];
  logic [WW-1:0]   rr;

  function automatic logic [WW-1:0] partner(input logic [WW-1:0] w);
    return w ^ WW'(1);
  endfunction

  // ---------------------------------------------------------------- fetch select
  logic [NWARPS-1:0] elig;
  always_comb begin
    for (int w = 0; w < NWARPS; w++)
      elig[w] = active[w] && !waiting[w] && !hold[w] && !(fused[w] && w[0]);
  end

  always_comb begin
    fetch_valid = 1'b0;
    fetch_warp  = '0;
    for (int k = NWARPS; k >= 1; k--) begin
      int w;
      w = int'(rr) + k;                 // < 2*NWARPS: one conditional subtract
      if (w >= NWARPS) w = w - NWARPS;
      if (elig[w]) begin
        fetch_valid = 1'b1;
        fetch_warp  = WW'(w);
      end
    end
  end

  logic fetch_fire, at_end;
  assign fetch_pc    = tbl[fetch_warp].pc;
  assign at_end      = approx[fetch_warp] && (tbl[fetch_warp].pc == tbl[fetch_warp].end_pc);
  assign fetch_fused = fused[fetch_warp] && !at_end;
  assign fetch_fire  = fetch_valid && fetch_ready;

  // barrier resolution: per pair, both waiting, or one waiting with an inactive partner
  logic [NWARPS-1:0] release_w;
  always_comb begin
    for (int w = 0; w < NWARPS; w++) begin
      int q;
      q = w ^ 1;
      release_w[w] = waiting[w] && ((q >= NWARPS) || !active[q] || waiting[q]);
    end
  end

  always_comb begin
    fuse_event = 1'b0;
    for (int w = 0; w + 1 < NWARPS; w += 2)
      if (release_w[w] && release_w[w+1] && waiting[w+1] && tbl[w].ok && tbl[w+1].ok) fuse_event = 1'b1;
  end
  assign split_event = fetch_fire && at_end && fused[fetch_warp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= '0;
      approx  <= '0;
      fused   <= '0;
      waiting <= '0;
      rr      <= '0;
      for (int w = 0; w < NWARPS; w++) tbl[w] <= '0;
    end else begin
      // barrier release
      for (int w = 0; w < NWARPS; w++) begin
        if (release_w[w]) begin
          int q;
          q = w ^ 1;
          waiting[w] <= 1'b0;
          approx[w]  <= tbl[w].ok;
          fused[w]   <= (q < NWARPS) && waiting[q] && release_w[q] && tbl[w].ok && tbl[q].ok;
        end
      end
      // fetch
      if (fetch_fire) begin
        rr <= fetch_warp;
        tbl[fetch_warp].pc <= tbl[fetch_warp].pc + PC_W'(8);
        if (fused[fetch_warp]) tbl[partner(fetch_warp)].pc <= tbl[fetch_warp].pc + PC_W'(8);
        if (at_end) begin
          approx[fetch_warp] <= 1'b0;
          fused[fetch_warp]  <= 1'b0;
          if (fused[fetch_warp]) begin
            approx[partner(fetch_warp)] <= 1'b0;
            fused[partner(fetch_warp)]  <= 1'b0;
          end
        end
      end
      if (br_en) begin
        tbl[br_warp].pc <= br_pc;
        if (fused[br_warp]) tbl[partner(br_warp)].pc <= br_pc;
      end
      if (sa_en) begin
        waiting[sa_warp]     <= 1'b1;
        tbl[sa_warp].ok      <= sa_ok;
        tbl[sa_warp].end_pc  <= sa_end_pc;
        tbl[sa_warp].p       <= 6'(partner(sa_warp));
      end
      if (launch_en) begin
        active[launch_warp]      <= 1'b1;
        approx[launch_warp]      <= 1'b0;
        fused[launch_warp]       <= 1'b0;
        waiting[launch_warp]     <= 1'b0;
        tbl[launch_warp].pc      <= launch_pc;
        tbl[launch_warp].p       <= 6'(partner(launch_warp));
      end
      if (exit_en) begin
        if (fused[exit_warp]) fused[partner(exit_warp)] <= 1'b0;
        active[exit_warp]  <= 1'b0;
        approx[exit_warp]  <= 1'b0;
        fused[exit_warp]   <= 1'b0;
        waiting[exit_warp] <= 1'b0;
      end
    end
  end
endmodule
