// tb_gs_regfile: self-checking test of the G-Scalar compressed register file.
//
// A behavioural model here keeps the plain 32-lane contents of every register (with a
// per-lane "known" flag, since data arrays are not reset) and applies each write: the
// scalar broadcast of wr_mode/wr_half, then the active mask. Random reads and writes on
// a pool of registers spread over all banks (back-to-back write/read of one register
// included) are checked against it:
//   * read data of every known lane, and that rd_valid comes exactly 3 cycles after the
//     read was accepted, in order, with the right rd_reg;
//   * rd_bvr_only exactly when the last write was non-divergent and both halves hold
//     one value;
//   * special_move exactly for divergent writes to a compressed register, each costing
//     one cycle of req_ready low;
//   * directed reads on an idle pipeline: a scalar register enables no data array, a
//     register whose upper two bytes are common enables 4, an uncompressed one 8.
// Watchdog: 200k cycles.
module tb_gs_regfile;
  import gs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, req_write = 0;
  logic [9:0] req_reg = 0;
  logic [31:0] req_mask = '1;
  logic [31:0][31:0] req_data = '0;
  gs_exmode_e wr_mode = EX_VECTOR;
  logic [1:0] wr_half = 0;
  logic rd_valid, rd_bvr_only, special_move;
  logic [9:0] rd_reg;
  logic [31:0][31:0] rd_data;
  gs_meta_t rd_meta;
  logic [4:0] arrays_active;

  gs_regfile dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- model
  logic [31:0] mdl   [1024][32];
  bit          known [1024][32];
  bit          last_full [1024];

  typedef struct {
    logic [9:0]  r;
    logic [31:0] v [32];
    bit          k [32];
    bit          bvr;
    int          cyc;
  } rd_exp_t;
  rd_exp_t q [$];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_sm_exp = 0, n_sm_seen = 0;
  always @(negedge clk) if (rst_n) begin
    if (special_move) n_sm_seen++;
    if (rd_valid) begin
      if (q.size() == 0) chk(0, "unexpected rd_valid");
      else begin
        rd_exp_t e;
        bit ok;
        e = q.pop_front();
        chk(rd_reg == e.r, $sformatf("rd_reg %0d exp %0d", rd_reg, e.r));
        chk(cyc == e.cyc + 3, $sformatf("read latency %0d cycles, expected 3", cyc - e.cyc));
        ok = 1;
        for (int i = 0; i < 32; i++) if (e.k[i] && rd_data[i] != e.v[i]) ok = 0;
        chk(ok, $sformatf("read data of r%0d", e.r));
        chk(rd_bvr_only == e.bvr, $sformatf("rd_bvr_only of r%0d = %0b exp %0b", e.r, rd_bvr_only, e.bvr));
      end
    end
  end

  function automatic bit half_uniform(input logic [9:0] r, input int h);
    for (int i = 1; i < 16; i++)
      if (!known[r][16*h + i] || !known[r][16*h] || mdl[r][16*h + i] != mdl[r][16*h]) return 0;
    return 1;
  endfunction

  // compressed in the design's sense: written non-divergently with a common top byte in a half
  function automatic bit compressed(input logic [9:0] r);
    bit c = 0;
    if (!last_full[r]) return 0;
    for (int h = 0; h < 2; h++) begin
      bit same = 1;
      for (int i = 1; i < 16; i++) if (mdl[r][16*h + i][31:24] != mdl[r][16*h][31:24]) same = 0;
      if (same) c = 1;
    end
    return c;
  endfunction

  task automatic make_value(output logic [31:0][31:0] d);
    logic [31:0] base [2];
    int k [2];
    base[0] = $urandom;
    base[1] = ($urandom % 2) ? base[0] : $urandom;
    for (int h = 0; h < 2; h++) k[h] = $urandom % 5;
    for (int i = 0; i < 32; i++) begin
      int h;
      logic [31:0] keep;
      h = i / 16;
      keep = (k[h] == 4) ? 32'h0 : ~((32'd1 << (8 * k[h])) - 1);
      if (k[h] == 0) keep = '1;
      d[i] = (base[h] & keep) | ($urandom & ~keep);
    end
  endtask

  // present one request and wait until it is accepted; update the model on acceptance
  task automatic do_req(input bit w, input logic [9:0] r, input logic [31:0] m,
                        input logic [31:0][31:0] d, input gs_exmode_e md, input logic [1:0] hs);
    logic [31:0] bc [32];
    logic [31:0] lead;
    bit acc;
    int acc_cyc;
    @(negedge clk);
    req_valid = 1; req_write = w; req_reg = r; req_mask = m; req_data = d;
    wr_mode = md; wr_half = hs;
    do begin
      #4;
      acc = req_ready;
      acc_cyc = cyc;
      @(posedge clk);
      if (!acc) @(negedge clk);
    end while (!acc);
    if (w) begin
      lead = d[0];
      for (int i = 0; i < 32; i++) begin
        bc[i] = d[i];
        if (m[i]) lead = d[i];
      end
      for (int i = 0; i < 32; i++)
        case (md)
          EX_SCALAR:     bc[i] = d[0];
          EX_HALF:       if (hs[i / 16]) bc[i] = d[(i / 16) * 16];
          EX_DIV_SCALAR: bc[i] = lead;
          default: ;
        endcase
      if (!(&m) && compressed(r)) n_sm_exp++;
      for (int i = 0; i < 32; i++) if (m[i]) begin
        mdl[r][i] = bc[i];
        known[r][i] = 1;
      end
      last_full[r] = &m;
    end else begin
      rd_exp_t e;
      e.r = r; e.cyc = acc_cyc;
      for (int i = 0; i < 32; i++) begin
        e.v[i] = mdl[r][i];
        e.k[i] = known[r][i];
      end
      e.bvr = last_full[r] && half_uniform(r, 0) && half_uniform(r, 1);
      q.push_back(e);
    end
    #1;
    // leave the port idle unless the caller presents the next request
    req_valid = 0;
  endtask

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic [9:0] pool [24];
  int max_act;
  int stall_cycles;
  initial begin
    for (int r = 0; r < 1024; r++) begin
      last_full[r] = 0;
      for (int i = 0; i < 32; i++) known[r][i] = 0;
    end
    for (int p = 0; p < 24; p++) pool[p] = 10'(p * 43 + 5);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- directed: array enables on an idle pipeline
    begin
      logic [31:0][31:0] d;
      for (int i = 0; i < 32; i++) d[i] = 32'h1234_5678;
      do_req(1, 10'd1, '1, d, EX_VECTOR, 0);                            // scalar
      for (int i = 0; i < 32; i++) d[i] = {16'hABCD, 16'($urandom)};
      do_req(1, 10'd2, '1, d, EX_VECTOR, 0);                            // 1100 / 1100
      for (int i = 0; i < 32; i++) d[i] = $urandom;
      do_req(1, 10'd3, '1, d, EX_VECTOR, 0);                            // uncompressed
      repeat (6) @(posedge clk);
      for (int r = 1; r <= 3; r++) begin
        do_req(0, 10'(r), '1, d, EX_VECTOR, 0);
        max_act = 0;
        repeat (5) begin
          @(negedge clk);
          if (arrays_active > max_act) max_act = arrays_active;
        end
        chk(max_act == ((r == 1) ? 0 : (r == 2) ? 4 : 8),
            $sformatf("arrays enabled for read of r%0d: %0d", r, max_act));
      end
    end

    // ---- random traffic
    for (int t = 0; t < 6000; t++) begin
      logic [31:0][31:0] d;
      logic [31:0] m;
      logic [9:0] r;
      gs_exmode_e md;
      r = pool[$urandom % 24];
      make_value(d);
      case ($urandom % 4)
        0, 1: m = '1;
        2: m = $urandom | 32'h1;
        default: m = 32'd1 << ($urandom % 32);
      endcase
      md = gs_exmode_e'($urandom % 4);
      if ($urandom % 2) do_req(1, r, m, d, md, 2'($urandom));
      else do_req(0, r, m, d, md, 0);
      if ($urandom % 3 == 0) do_req(0, r, '1, d, EX_VECTOR, 0);   // read right after
    end
    repeat (8) @(posedge clk);
    chk(q.size() == 0, "all reads answered");
    chk(n_sm_seen == n_sm_exp, $sformatf("special moves %0d expected %0d", n_sm_seen, n_sm_exp));
    chk(n_sm_exp > 50, "special moves exercised");

    // ---- a special move stalls the port for exactly one cycle
    begin
      logic [31:0][31:0] d;
      for (int i = 0; i < 32; i++) d[i] = 32'h7700_0000 | i;
      do_req(1, 10'd7, '1, d, EX_VECTOR, 0);
      repeat (4) @(posedge clk);
      @(negedge clk);
      req_valid = 1; req_write = 1; req_reg = 10'd7; req_mask = 32'h0000_00F0;
      wr_mode = EX_VECTOR;
      stall_cycles = 0;
      @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        req_valid = 0;
        if (!req_ready) stall_cycles++;
      end
      for (int i = 4; i < 8; i++) begin
        mdl[7][i] = d[i];
        known[7][i] = 1;
      end
      last_full[7] = 0;
      chk(stall_cycles == 1, $sformatf("special move stall %0d cycles", stall_cycles));
      do_req(0, 10'd7, '1, d, EX_VECTOR, 0);
      repeat (6) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
