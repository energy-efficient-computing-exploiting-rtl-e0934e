// lnl_lcht: Load Checking History Table of Lock and Load.
//
// Each warp has ENTRIES entries of {V, checking result, remaining regions (2 bits)}.
// A checked load, once its values have been compared, writes its entry (the entry number
// is assigned statically by the compiler and carried by the load): V=1, the similarity
// bit, and the number of approximable regions that will use the loaded value.
// A START_APPROX instruction names the entries it depends on (loads_to_check, one bit per
// entry). The region may be approximated only if every named entry is valid and similar
// (sa_ok). Each named entry's count is decremented; an entry reaching zero is
// invalidated.
//
// Interface: sa_ok is combinational from sa_warp/sa_sel; the table updates at the clock
// edge. If a load write and a START_APPROX touch the same entry in one cycle the write
// wins. One table per warp is this implementation's reading of the design.
module lnl_lcht
  import lnl_pkg::*;
#(
  parameter int NWARPS  = WARPS,
  parameter int ENTRIES = 3,
  localparam int WW = $clog2(NWARPS),
  localparam int EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [WW-1:0]      wr_warp,
  input  logic [EW-1:0]      wr_entry,
  input  logic               wr_result,
  input  logic [1:0]         wr_count,
  input  logic               sa_en,
  input  logic [WW-1:0]      sa_warp,
  input  logic [ENTRIES-1:0] sa_sel,
  output logic               sa_ok,
  // status read of one entry (for the scheduler and for observation)
  input  logic [WW-1:0]      pk_warp,
  input  logic [EW-1:0]      pk_entry,
  output logic [3:0]         pk_bits       // {V, result, count}
);
  typedef struct packed {
    logic       v;
    logic       res;
    logic [1:0] cnt;
  } lcht_entry_t;

  lcht_entry_t tbl [NWARPS][ENTRIES];

  always_comb begin
    sa_ok = 1'b1;
    for (int e = 0; e < ENTRIES; e++)
      if (sa_sel[e] && !(tbl[sa_warp][e].v && tbl[sa_warp][e].res)) sa_ok = 1'b0;
  end

  assign pk_bits = tbl[pk_warp][pk_entry];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NWARPS; w++)
        for (int e = 0; e < ENTRIES; e++) tbl[w][e] <= '0;
    end else begin
      if (sa_en) begin
        for (int e = 0; e < ENTRIES; e++)
          if (sa_sel[e] && tbl[sa_warp][e].v) begin
            tbl[sa_warp][e].cnt <= tbl[sa_warp][e].cnt - 2'd1;
            if (tbl[sa_warp][e].cnt <= 2'd1) tbl[sa_warp][e].v <= 1'b0;
          end
      end
      if (wr_en) tbl[wr_warp][wr_entry] <= '{v: (wr_count != 2'd0), res: wr_result, cnt: wr_count};
    end
  end
endmodule
