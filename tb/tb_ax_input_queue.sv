// tb_ax_input_queue: self-checking test of the AxMemo input queue.
//
// Random pushes and pops (together in one cycle too) against a FIFO model kept here.
// Checks every cycle: empty and full flags (full after 4 entries, a push into a full
// queue is ignored), the head entry in push order, and pending for a random context
// (true exactly when a queued entry belongs to it). Watchdog: 100k cycles.
module tb_ax_input_queue;
  import ax_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push = 0, pop = 0, empty, full, pending;
  logic [3:0] push_ctx = 0, head_ctx, q_ctx = 0;
  logic [31:0] push_data = 0, head_data;

  ax_input_queue dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  typedef struct { logic [3:0] c; logic [31:0] d; } ent_t;
  ent_t q [$];
  int n_full = 0, n_pend = 0;

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      bit e_pend;
      @(negedge clk);
      push = $urandom % 3 != 0; pop = $urandom % 2;
      push_ctx = $urandom; push_data = $urandom; q_ctx = $urandom % 4;
      push_ctx = push_ctx % 4;
      #1;
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 4), "full");
      if (q.size() > 0) chk(head_ctx == q[0].c && head_data == q[0].d, "head entry");
      e_pend = 0;
      foreach (q[i]) if (q[i].c == q_ctx) e_pend = 1;
      chk(pending == e_pend, "pending");
      if (full) n_full++;
      if (e_pend) n_pend++;
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !full) q.push_back('{push_ctx, push_data});
    end
    chk(n_full > 100 && n_pend > 1000, "full queue and pending inputs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
