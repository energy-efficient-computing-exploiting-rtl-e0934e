// lnl_cmp_unit: low-cost approximate relative-error comparator of Lock and Load.
//
// Decides whether a loaded single-precision value b is similar to the anchor thread's
// value a, i.e. whether Er = |a-b|/|a| is below a threshold, without an FP subtractor or
// divider:
//   stage 1  reject different signs (Er > 100%) or exponents two or more apart (Er > 50%);
//            restore the hidden 1 of both mantissas and shift the one with the smaller
//            exponent right by one bit (the only de-normalisation ever needed). The value
//            whose MSB is 1 (larger exponent; the anchor when exponents are equal) is the
//            divisor. Only the top 8 bits of each go on.
//   stage 2  d = |a8 - b8| (8-bit subtract) and R ~ 1/divisor from a three-piece linear
//            approximation on the 7 fraction bits of the divisor:
//              DIV <= 16 : R = 0xFF - 2*DIV;  DIV <= 96 : R = 0xF6 - DIV;
//              else      : R = 0xC2 - DIV/2
//   stage 3  P = d * R (Er in units of 2^-15) and pass = P < thr.
// Bit-identical values always pass; a zero or denormal exponent otherwise fails.
// The structure and the first two reciprocal constants follow the design; the third
// constant (0xC2) was chosen here to keep the reciprocal error below about 2%, and the
// threshold format and zero handling are this implementation's choices.
//
// Timing: fully pipelined, one comparison per cycle, out_valid three cycles after in_valid.
module lnl_cmp_unit #(
  parameter int THR_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [THR_W-1:0] thr,
  output logic             out_valid,
  output logic             similar
);
  // ---------------- stage 1
  logic        s1_v, s1_same, s1_fail;
  logic [7:0]  s1_a8, s1_b8;
  logic [6:0]  s1_div;

  logic [7:0] s1_a8_c, s1_b8_c;
  logic [6:0] s1_div_c;
  logic       s1_fail_c;

  always_comb begin : st1
    logic [7:0]  ea, eb;
    logic [23:0] fa, fb;
    ea = a[30:23];
    eb = b[30:23];
    fa = {1'b1, a[22:0]};
    fb = {1'b1, b[22:0]};
    if (ea == eb + 8'd1)      fb = fb >> 1;
    else if (eb == ea + 8'd1) fa = fa >> 1;
    s1_a8_c  = fa[23:16];
    s1_b8_c  = fb[23:16];
    s1_div_c = (eb == ea + 8'd1) ? fb[22:16] : fa[22:16];
    s1_fail_c = (a[31] != b[31]) || (ea == 8'd0) || (eb == 8'd0) ||
                !((ea == eb) || (ea == eb + 8'd1) || (eb == ea + 8'd1));
  end

  // ---------------- stage 2
  logic        s2_v, s2_same, s2_fail;
  logic [7:0]  s2_d, s2_r;
  logic [7:0]  recip_c;

  always_comb begin
    if (s1_div <= 7'd16)      recip_c = 8'hFF - {s1_div, 1'b0};
    else if (s1_div <= 7'd96) recip_c = 8'hF6 - {1'b0, s1_div};
    else                      recip_c = 8'hC2 - {2'b00, s1_div[6:1]};
  end

  // ---------------- stage 3
  logic [15:0] prod;
  assign prod = s2_d * s2_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; out_valid <= 1'b0;
    end else begin
      s1_v <= in_valid; s2_v <= s1_v; out_valid <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    s1_same <= (a == b);
    s1_fail <= s1_fail_c;
    s1_a8   <= s1_a8_c;
    s1_b8   <= s1_b8_c;
    s1_div  <= s1_div_c;
    s2_same <= s1_same;
    s2_fail <= s1_fail;
    s2_d    <= (s1_a8 >= s1_b8) ? s1_a8 - s1_b8 : s1_b8 - s1_a8;
    s2_r    <= recip_c;
    similar <= s2_same || (!s2_fail && (THR_W'(prod) < thr));
  end
endmodule
