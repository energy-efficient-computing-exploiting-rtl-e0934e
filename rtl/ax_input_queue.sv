// ax_input_queue: input queue of the AxMemo memoization unit.
//
// Memoization inputs (already truncated) wait here for the CRC unit as {context, word}.
// The core only stalls on an ld_crc/reg_crc when the queue is full. pending tells whether
// any queued input belongs to the context q_ctx: a lookup of that context must wait until
// it has been hashed.
// A DEPTH-entry FIFO: push and pop at the clock edge (both allowed in one cycle),
// head entry visible combinationally. Depth is this implementation's choice.
module ax_input_queue
  import ax_pkg::*;
#(
  parameter int DEPTH = 4,
  parameter int W     = 32,
  localparam int PW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [CTX_W-1:0] push_ctx,
  input  logic [W-1:0]     push_data,
  input  logic             pop,
  output logic             empty,
  output logic             full,
  output logic [CTX_W-1:0] head_ctx,
  output logic [W-1:0]     head_data,
  input  logic [CTX_W-1:0] q_ctx,
  output logic             pending
);
  logic [CTX_W-1:0] ctx_q  [DEPTH];
  logic [W-1:0]     data_q [DEPTH];
  logic [DEPTH-1:0] v_q;
  logic [PW-1:0]    rd_p, wr_p;

  assign empty     = !v_q[rd_p];
  assign full      = v_q[wr_p];
  assign head_ctx  = ctx_q[rd_p];
  assign head_data = data_q[rd_p];

  always_comb begin
    pending = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (v_q[i] && ctx_q[i] == q_ctx) pending = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q  <= '0;
      rd_p <= '0;
      wr_p <= '0;
    end else begin
      if (pop && !empty) begin
        v_q[rd_p] <= 1'b0;
        rd_p      <= PW'((32'(rd_p) + 1) % DEPTH);
      end
      if (push && !full) begin
        v_q[wr_p] <= 1'b1;
        wr_p      <= PW'((32'(wr_p) + 1) % DEPTH);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) begin
      ctx_q[wr_p]  <= push_ctx;
      data_q[wr_p] <= push_data;
    end
  end
endmodule
