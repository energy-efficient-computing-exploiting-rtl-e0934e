// ax_quality_monitor: output-quality guard of the AxMemo memoization unit.
//
// Memoization is approximate (inputs are truncated, hashes can collide), so the unit
// audits itself. Every SAMPLE-th LUT hit is reported to the core as a miss (force_miss):
// the core then runs the original code and sends the exact result with its update. The
// LUT value that would have been returned is kept per {LUT_ID, TID} context, and when the
// update arrives the two are compared with the Lock and Load comparison unit
// (lnl_cmp_unit, threshold 10% in its 2^-15 fixed-point format, values read as
// single-precision numbers). After every WINDOW comparisons, if more than MAX_BAD of them
// exceeded 10%, memoization is disabled (sticky until reset).
//
// Interface: hit_* reports a LUT hit (force_miss answers in the same cycle); upd_*
// reports an update. The verdict of a comparison is counted three cycles after the
// update. Keeping the sample per context and the sticky disable are this
// implementation's choices.
module ax_quality_monitor
  import ax_pkg::*;
#(
  parameter int SAMPLE  = 100,
  parameter int WINDOW  = 100,
  parameter int MAX_BAD = 10,
  parameter logic [15:0] THR = 16'd3277     // 0.1 * 2^15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hit_valid,
  input  logic [CTX_W-1:0] hit_ctx,
  input  logic [31:0]      hit_data,
  output logic             force_miss,
  input  logic             upd_valid,
  input  logic [CTX_W-1:0] upd_ctx,
  input  logic [31:0]      upd_data,
  output logic             disabled,
  output logic [15:0]      n_samples,
  output logic [15:0]      n_bad_total
);
  logic [$clog2(SAMPLE+1)-1:0] hit_cnt;
  logic [31:0]                 sample_q [NCTX];
  logic [NCTX-1:0]             sample_v;
  logic [$clog2(WINDOW+1)-1:0] cmp_cnt, bad_cnt;
  logic                        cmp_v, cmp_ok, cmp_in;

  assign force_miss = hit_valid && (32'(hit_cnt) == SAMPLE - 1);
  assign cmp_in     = upd_valid && sample_v[upd_ctx];

  lnl_cmp_unit #(.THR_W(16)) u_cmp (
    .clk, .rst_n, .in_valid(cmp_in), .a(upd_data), .b(sample_q[upd_ctx]), .thr(THR),
    .out_valid(cmp_v), .similar(cmp_ok)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_cnt     <= '0;
      sample_v    <= '0;
      cmp_cnt     <= '0;
      bad_cnt     <= '0;
      disabled    <= 1'b0;
      n_samples   <= '0;
      n_bad_total <= '0;
    end else begin
      if (hit_valid) hit_cnt <= force_miss ? '0 : hit_cnt + 1'b1;
      if (force_miss) sample_v[hit_ctx] <= 1'b1;
      if (cmp_in) sample_v[upd_ctx] <= 1'b0;
      if (cmp_v) begin
        n_samples <= n_samples + 16'd1;
        if (!cmp_ok) n_bad_total <= n_bad_total + 16'd1;
        if (32'(cmp_cnt) == WINDOW - 1) begin
          if (32'(bad_cnt) + (cmp_ok ? 0 : 1) > MAX_BAD) disabled <= 1'b1;
          cmp_cnt <= '0;
          bad_cnt <= '0;
        end else begin
          cmp_cnt <= cmp_cnt + 1'b1;
          if (!cmp_ok) bad_cnt <= bad_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (force_miss) sample_q[hit_ctx] <= hit_data;
  end
endmodule
