// ax_hvr: hash value registers of AxMemo.
//
// NCTX x 32-bit registers addressed by {LUT_ID, TID}. Each holds the running CRC of the
// memoization inputs sent so far for that logical LUT and thread, so inputs of
// different LUTs may arrive interleaved: the registers are the CRC unit's contexts.
// Two read ports (one for the CRC unit, one for lookup/update) are combinational. The
// CRC write (wr_*) stores a new running value; init_* returns a context to the CRC seed
// 0xFFFFFFFF once its hash has been consumed. Init wins over a write to the same
// context in one cycle. Reset sets every register to the seed.
module ax_hvr
  import ax_pkg::*;
#(
  parameter int N  = NCTX,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra_addr,
  output logic [31:0]   ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [31:0]   rb_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          init_en,
  input  logic [AW-1:0] init_addr
);
  logic [31:0] r [N];

  assign ra_data = r[ra_addr];
  assign rb_data = r[rb_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= 32'hFFFF_FFFF;
    end else begin
      if (wr_en)   r[wr_addr]   <= wr_data;
      if (init_en) r[init_addr] <= 32'hFFFF_FFFF;
    end
  end
endmodule
