// lnl_oc_entry: one operand collector extended for Lock and Load warp fusion.
//
// Each of the NOPS operand rows holds {f, valid, idx0, idx1, rdy0, rdy1, 32 x 32-bit
// operand data}. idx0 is the physical register of the even (or only) source warp,
// wid*REGS_PER_WARP + logical register; idx1 = idx0 + REGS_PER_WARP is the same register
// of the partner warp wid+1 (only consecutive warps are fused, so one adder suffices).
//
// A fused instruction uses one collector for both warps. Only anchor threads execute in
// an approximated warp, and threads 2j and 2j+1 always share a thread group, so at most
// one of each pair is active: 16 2:1 multiplexers per source warp pack its operands into
// 16 lanes (warp 0 into lanes 0..15, warp 1 into lanes 16..31), and one select bit per
// pair (set when the odd thread was chosen) records the choice. An unfused operand is
// stored as it is and only rdy0 is used.
//
// The collector dispatches when every valid row is ready (rdy0, and rdy1 too when
// fused). wb_* unpacks a packed 32-lane result back into the lanes of the two source
// warps using the select bits, for the register write-back.
//
// Timing: alloc, operand arrival and dispatch act at the clock edge; disp_valid and the
// unpack path are combinational.
module lnl_oc_entry
  import lnl_pkg::*;
#(
  parameter int NOPS          = NSRC,
  parameter int REGS_PER_WARP = 63,
  parameter int IDX_W         = 12,
  localparam int WW           = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // allocation at issue
  input  logic                  alloc_en,
  input  logic [WW-1:0]         alloc_warp,
  input  logic                  alloc_fused,
  input  logic [NOPS-1:0]       alloc_used,
  input  logic [NOPS-1:0][5:0]  alloc_lreg,
  output logic                  busy,
  output logic [NOPS-1:0][IDX_W-1:0] idx0,
  output logic [NOPS-1:0][IDX_W-1:0] idx1,
  // operand arrival from the register file
  input  logic                  op_en,
  input  logic [$clog2(NOPS)-1:0] op_row,
  input  logic                  op_half,          // 0: warp wid, 1: warp wid+1
  input  logic [WARP-1:0][31:0] op_data,
  input  logic [WARP-1:0]       op_anchor,        // anchor threads of that source warp
  // dispatch
  output logic                  disp_valid,
  input  logic                  disp_ready,
  output logic [NOPS-1:0][WARP-1:0][31:0] disp_data,
  output logic [WARP-1:0]       disp_sel,
  output logic                  disp_fused,
  output logic [WW-1:0]         disp_warp,
  // write-back unpacking
  input  logic [WARP-1:0][31:0] wb_packed,
  input  logic [WARP-1:0]       wb_sel,
  output logic [WARP-1:0][31:0] wb_warp0,
  output logic [WARP-1:0][31:0] wb_warp1
);
  localparam int P = WARP / 2;

  logic [NOPS-1:0] valid_q, rdy0_q, rdy1_q;
  logic            f_q;
  logic [WW-1:0]   warp_q;

  assign disp_fused = f_q;
  assign disp_warp  = warp_q;

  always_comb begin
    disp_valid = busy;
    for (int r = 0; r < NOPS; r++)
      if (valid_q[r] && !(rdy0_q[r] && (!f_q || rdy1_q[r]))) disp_valid = 1'b0;
  end

  // packing of one source warp: pair j -> lane j (select bit = odd thread chosen)
  logic [P-1:0][31:0] packed_v;
  logic [P-1:0]       packed_s;
  always_comb begin
    for (int j = 0; j < P; j++) begin
      packed_s[j] = op_anchor[2*j+1];
      packed_v[j] = packed_s[j] ? op_data[2*j+1] : op_data[2*j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      valid_q <= '0;
      rdy0_q  <= '0;
      rdy1_q  <= '0;
      f_q     <= 1'b0;
      warp_q  <= '0;
    end else begin
      if (disp_valid && disp_ready) begin
        busy    <= 1'b0;
        valid_q <= '0;
      end
      if (alloc_en && !busy) begin
        busy    <= 1'b1;
        f_q     <= alloc_fused;
        warp_q  <= alloc_warp;
        valid_q <= alloc_used;
        rdy0_q  <= '0;
        rdy1_q  <= '0;
        for (int r = 0; r < NOPS; r++) begin
          idx0[r] <= IDX_W'(alloc_warp) * IDX_W'(REGS_PER_WARP) + IDX_W'(alloc_lreg[r]);
          idx1[r] <= IDX_W'(alloc_warp) * IDX_W'(REGS_PER_WARP) + IDX_W'(alloc_lreg[r]) + IDX_W'(REGS_PER_WARP);
        end
      end
      if (op_en && busy) begin
        if (!f_q) begin
          disp_data[op_row] <= op_data;
          rdy0_q[op_row]    <= 1'b1;
        end else if (!op_half) begin
          disp_data[op_row][P-1:0] <= packed_v;
          disp_sel[P-1:0]          <= packed_s;
          rdy0_q[op_row]           <= 1'b1;
        end else begin
          disp_data[op_row][WARP-1:P] <= packed_v;
          disp_sel[WARP-1:P]          <= packed_s;
          rdy1_q[op_row]              <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    wb_warp0 = '0;
    wb_warp1 = '0;
    for (int j = 0; j < P; j++) begin
      wb_warp0[2*j + int'(wb_sel[j])]   = wb_packed[j];
      wb_warp1[2*j + int'(wb_sel[P+j])] = wb_packed[P+j];
    end
  end
endmodule
