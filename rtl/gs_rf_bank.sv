// gs_rf_bank: one bank of the G-Scalar register file.
//
// Data: REGS vector registers of 32 lanes x 4 bytes, stored byte-reordered. Array
// (p, h) holds byte p of the 16 lanes of half h of every register, so the bank is eight
// 128-bit wide arrays. Each array is enabled on its own (act[p][h]) so that a compressed
// register reads or writes only the byte planes it needs. Writes have one enable per
// byte (one per lane within an array) so divergent instructions can write active lanes
// only. Read data of an array that is not enabled is returned as zero.
//
// Metadata: a small REGS-entry array of gs_meta_t (base value registers, encoding bits,
// d and fs) with one synchronous read port and one write port. It is reset to the
// "uncompressed" record so that a register never written reads its array bytes. The
// data arrays are not reset.
//
// Timing: both arrays read synchronously, data valid the cycle after the enable. A write
// and a read of the same address in the same cycle return the old data.
// The eight-array organisation and per-byte write enables follow the design; the
// one-read-one-write metadata port is this implementation's choice.
module gs_rf_bank
  import gs_pkg::*;
#(
  parameter int REGS = REGS_PER_BANK,
  localparam int AW  = $clog2(REGS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // metadata array
  input  logic                        mr_en,
  input  logic [AW-1:0]               mr_addr,
  output gs_meta_t                    mr_data,
  input  logic                        mw_en,
  input  logic [AW-1:0]               mw_addr,
  input  gs_meta_t                    mw_data,
  // byte-plane arrays
  input  logic                        pa_en,
  input  logic                        pa_we,
  input  logic [AW-1:0]               pa_addr,
  input  logic [3:0][1:0]             pa_act,
  input  logic [LANES-1:0]            pa_lane_we,
  input  logic [3:0][LANES-1:0][7:0]  pa_wdata,
  output logic [3:0][LANES-1:0][7:0]  pa_rdata,
  output logic [3:0][1:0]             array_act
);
  gs_meta_t   meta_q [REGS];

  assign array_act = pa_en ? pa_act : '0;

  // one memory per byte plane and half: 16 lanes x 8 bits wide, a byte write enable per
  // lane. A disabled array is not accessed; its read output is forced to zero.
  for (genvar p = 0; p < 4; p++) begin : g_plane
    for (genvar h = 0; h < 2; h++) begin : g_half
      logic [HALF-1:0][7:0] m [REGS];
      logic [HALF-1:0][7:0] rd_q;
      logic                 off_q;
      always_ff @(posedge clk) begin
        if (pa_en && pa_act[p][h]) begin
          if (pa_we) begin
            for (int l = 0; l < HALF; l++)
              if (pa_lane_we[h*HALF+l]) m[pa_addr][l] <= pa_wdata[p][h*HALF+l];
          end else begin
            rd_q <= m[pa_addr];
          end
        end
      end
      always_ff @(posedge clk) begin
        if (pa_en && !pa_we) off_q <= !pa_act[p][h];
      end
      for (genvar l = 0; l < HALF; l++) begin : g_lane
        assign pa_rdata[p][h*HALF+l] = off_q ? 8'h00 : rd_q[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < REGS; r++) meta_q[r] <= META_UNCOMPRESSED;
    end else if (mw_en) begin
      meta_q[mw_addr] <= mw_data;
    end
  end

  always_ff @(posedge clk) begin
    if (mr_en) mr_data <= meta_q[mr_addr];
  end
endmodule
