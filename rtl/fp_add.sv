// fp_add: pipelined IEEE-754 single precision adder/subtractor.
//
// The result y = a + b (sub = 0) or y = a - b (sub = 1) appears ADD_LAT = 3
// clock cycles after the operands, with a new operation accepted every
// cycle; out_valid follows in_valid through the same pipeline. Subtraction is
// an addition with the sign of b inverted. The three stages follow the
// library's adder:
//   stage 1  order the operands so that |a| >= |b| (swap if needed), form the
//            exponent difference e1 - e2 and prefix the hidden one, 1.f;
//   stage 2  shift the smaller significand right by the exponent difference,
//            then add the significands when the signs agree and subtract the
//            smaller from the larger when they differ; the result takes the
//            sign of the larger operand;
//   stage 3  normalize: shift left until the leading bit is one (or right by
//            one after a carry) and adjust the larger exponent by the shift.
// Design choices not fixed by the library description: three guard bits are
// kept during alignment and the result is truncated (no rounding); an
// exponent field of zero is read as zero; underflow flushes to +0, overflow
// saturates to infinity; an exact zero result is +0.
module fp_add
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sub,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  // ---------------- stage 1: compare, swap, exponent difference ----------
  typedef struct packed {
    logic        valid;
    logic        sign;      // sign of the larger operand
    logic        eff_sub;   // signs differ: subtract significands
    logic [7:0]  exp;       // exponent of the larger operand
    logic [7:0]  ediff;     // e1 - e2 after the swap
    logic [23:0] m_big;     // 1.f1
    logic [23:0] m_small;   // 1.f2
  } s1_t;

  typedef struct packed {
    logic        valid;
    logic        sign;
    logic [7:0]  exp;
    logic [27:0] sum;       // carry bit, 24 significand bits, 3 guard bits
  } s2_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;

  always_comb begin
    fp32_t bs, x, z;
    logic  swap;
    bs      = b;
    bs.sign = b.sign ^ sub;
    swap = {a.exp, a.frac} < {bs.exp, bs.frac};
    x = swap ? bs : a;
    z = swap ? a  : bs;
    s1_d.valid   = in_valid;
    s1_d.sign    = x.sign;
    s1_d.eff_sub = x.sign ^ z.sign;
    s1_d.exp     = x.exp;
    s1_d.ediff   = x.exp - z.exp;
    s1_d.m_big   = (x.exp == 8'd0) ? 24'd0 : {1'b1, x.frac};
    s1_d.m_small = (z.exp == 8'd0) ? 24'd0 : {1'b1, z.frac};
  end

  // ---------------- stage 2: align and add/subtract ----------------------
  always_comb begin
    logic [26:0] big_g, small_g;
    big_g   = {s1_q.m_big, 3'b000};
    small_g = (s1_q.ediff > 8'd26) ? 27'd0 : ({s1_q.m_small, 3'b000} >> s1_q.ediff);
    s2_d.valid = s1_q.valid;
    s2_d.sign  = s1_q.sign;
    s2_d.exp   = s1_q.exp;
    if (s1_q.eff_sub) s2_d.sum = {1'b0, big_g} - {1'b0, small_g};
    else              s2_d.sum = {1'b0, big_g} + {1'b0, small_g};
  end

  // ---------------- stage 3: normalize and adjust exponent ---------------
  fp32_t y_d;
  always_comb begin
    logic [4:0]  lz;
    logic [26:0] norm;
    logic [9:0]  e;
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) begin
      if (s2_q.sum[i]) lz = 5'(26 - i);
    end
    norm = s2_q.sum[26:0] << lz;
    e    = {2'b00, s2_q.exp} + 10'd1;
    y_d  = FP_ZERO;
    if (s2_q.sum == 28'd0) begin
      y_d = FP_ZERO;
    end else if (s2_q.sum[27]) begin
      if (e >= 10'd255) y_d = fp_inf(s2_q.sign);
      else y_d = '{sign: s2_q.sign, exp: e[7:0], frac: s2_q.sum[26:4]};
    end else begin
      if ({2'b00, s2_q.exp} <= {5'd0, lz}) y_d = FP_ZERO;
      else y_d = '{sign: s2_q.sign, exp: s2_q.exp - {3'd0, lz}, frac: norm[25:3]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q      <= '0;
      s2_q      <= '0;
      y         <= FP_ZERO;
      out_valid <= 1'b0;
    end else begin
      s1_q      <= s1_d;
      s2_q      <= s2_d;
      y         <= y_d;
      out_valid <= s2_q.valid;
    end
  end
endmodule
