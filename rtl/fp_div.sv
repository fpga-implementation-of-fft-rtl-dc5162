// fp_div: pipelined IEEE-754 single precision divider, subtractive
// (restoring) significand division.
//
// y = a / b appears DIV_LAT = 3 clock cycles after the operands, one new
// operation per cycle; out_valid follows in_valid. The three stages follow
// the library's divider:
//   stage 1  subtract the exponents (e1 - e2, bias restored), prefix the
//            hidden one to both fractions and register both sign bits;
//   stage 2  divide 1.f1 by 1.f2 by repeated trial subtraction of the
//            divisor from the partial remainder, one quotient bit per step;
//            the 26 steps are unrolled into one combinational array so the
//            stage takes a single clock; the exponent is adjusted here by
//            the size of the quotient (it lies in (0.5, 2));
//   stage 3  normalize the quotient (at most one left shift) and take the
//            sign as the exclusive or of the two signs.
// Design choices: no rounding (the quotient is truncated); a zero dividend
// gives +0; a zero divisor saturates to infinity with the quotient's sign;
// underflow flushes to +0, overflow saturates to infinity.
module fp_div
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
    logic        a_zero;
    logic        b_zero;
    logic [9:0]  ediff;   // e1 - e2 + 127, two's complement
    logic [23:0] m1;
    logic [23:0] m2;
  } s1_t;

  typedef struct packed {
    logic        valid;
    logic        s1;
    logic        s2;
    logic        a_zero;
    logic        b_zero;
    logic [9:0]  eadj;    // result exponent, already adjusted
    logic [25:0] q;       // quotient, q[25] has weight 1
  } s2_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;

  always_comb begin
    s1_d.valid  = in_valid;
    s1_d.s1     = a.sign;
    s1_d.s2     = b.sign;
    s1_d.a_zero = (a.exp == 8'd0);
    s1_d.b_zero = (b.exp == 8'd0);
    s1_d.ediff  = {2'b00, a.exp} - {2'b00, b.exp} + 10'd127;
    s1_d.m1     = {1'b1, a.frac};
    s1_d.m2     = {1'b1, b.frac};
  end

  // Restoring division: quotient bits of m1/m2 from weight 2^0 down to 2^-25.
  always_comb begin
    logic [24:0] r;
    r = {1'b0, s1_q.m1};
    s2_d.q = '0;
    for (int i = 25; i >= 0; i--) begin
      if (r >= {1'b0, s1_q.m2}) begin
        s2_d.q[i] = 1'b1;
        r = r - {1'b0, s1_q.m2};
      end
      r = {r[23:0], 1'b0};
    end
    s2_d.valid  = s1_q.valid;
    s2_d.s1     = s1_q.s1;
    s2_d.s2     = s1_q.s2;
    s2_d.a_zero = s1_q.a_zero;
    s2_d.b_zero = s1_q.b_zero;
    // exponent adjust: one less when the quotient is below one
    s2_d.eadj   = s2_d.q[25] ? s1_q.ediff : s1_q.ediff - 10'd1;
  end

  fp32_t y_d;
  always_comb begin
    logic        s;
    logic [22:0] f;
    logic [9:0]  e;
    s = s2_q.s1 ^ s2_q.s2;
    f = s2_q.q[25] ? s2_q.q[24:2] : s2_q.q[23:1];
    e = s2_q.eadj;
    if (s2_q.a_zero)                 y_d = FP_ZERO;
    else if (s2_q.b_zero)            y_d = fp_inf(s);
    else if (e[9] || e == 10'd0)     y_d = FP_ZERO;
    else if (e >= 10'd255)           y_d = fp_inf(s);
    else                             y_d = '{sign: s, exp: e[7:0], frac: f};
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
