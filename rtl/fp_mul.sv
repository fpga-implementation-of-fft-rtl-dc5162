// fp_mul: pipelined IEEE-754 single precision multiplier.
//
// y = a * b appears MUL_LAT = 2 clock cycles after the operands, one new
// operation per cycle; out_valid follows in_valid. The two stages follow the
// library's multiplier:
//   stage 1  add the exponents, prefix the hidden one to both fractions
//            (1.f1, 1.f2) and register both sign bits;
//   stage 2  multiply the 24-bit significands, keep the 23 fraction bits
//            below the leading one of the 48-bit product (truncation), adjust
//            the exponent by the normalization shift and take the sign as the
//            exclusive or of the two signs.
// Design choices: the exponent bias 127 is removed from the exponent sum; an
// exponent field of zero is read as zero and gives a +0 product; underflow
// flushes to +0 and overflow saturates to infinity. No rounding.
module fp_mul
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);
  typedef struct packed {
    logic        valid;
    logic        s1;
    logic        s2;
    logic        zero;
    logic [9:0]  esum;   // e1 + e2, bias still counted twice
    logic [23:0] m1;
    logic [23:0] m2;
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    s1_d.valid = in_valid;
    s1_d.s1    = a.sign;
    s1_d.s2    = b.sign;
    s1_d.zero  = (a.exp == 8'd0) || (b.exp == 8'd0);
    s1_d.esum  = {2'b00, a.exp} + {2'b00, b.exp};
    s1_d.m1    = {1'b1, a.frac};
    s1_d.m2    = {1'b1, b.frac};
  end

  fp32_t y_d;
  always_comb begin
    logic [47:0] prod;
    logic [22:0] f;
    logic [10:0] e;    // signed: e1 + e2 - 127 + shift
    logic        s;
    prod = s1_q.m1 * s1_q.m2;
    s    = s1_q.s1 ^ s1_q.s2;
    if (prod[47]) begin
      f = prod[46:24];
      e = {1'b0, s1_q.esum} - 11'd126;
    end else begin
      f = prod[45:23];
      e = {1'b0, s1_q.esum} - 11'd127;
    end
    if (s1_q.zero || e[10] || e == 11'd0) y_d = FP_ZERO;
    else if (e >= 11'd255)                 y_d = fp_inf(s);
    else                                   y_d = '{sign: s, exp: e[7:0], frac: f};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q      <= '0;
      y         <= FP_ZERO;
      out_valid <= 1'b0;
    end else begin
      s1_q      <= s1_d;
      y         <= y_d;
      out_valid <= s1_q.valid;
    end
  end
endmodule
