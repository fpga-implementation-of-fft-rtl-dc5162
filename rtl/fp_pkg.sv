// fp_pkg: types and constants shared by the floating point library and the
// FFT engine built on it.
//
// Numbers are IEEE-754 single precision words (1 sign bit, 8 exponent bits
// with bias 127, 23 fraction bits and a hidden leading one). Like the
// library it models, the arithmetic units do not handle NaN, infinity
// operands, denormals or negative zero: an exponent field of zero is read as
// the value zero, and results that overflow saturate to an infinity pattern.
// The pipeline depths below are those of the three-stage adder, two-stage
// multiplier and three-stage divider; the butterfly latencies follow from
// them. The phase factor table holds W8^k = exp(-j*2*pi*k/8) for k = 0..3,
// rounded to single precision; W4 and W2 factors are taken from it. The
// word format and the stage counts follow the source design; the special
// value handling and the complex type are this design's own.
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam int unsigned ADD_LAT  = 3;
  localparam int unsigned MUL_LAT  = 2;
  localparam int unsigned DIV_LAT  = 3;
  localparam int unsigned CMUL_LAT = MUL_LAT + ADD_LAT;
  localparam int unsigned DIT_LAT  = CMUL_LAT + ADD_LAT;
  localparam int unsigned DIF_LAT  = ADD_LAT + DIV_LAT + CMUL_LAT;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;
  localparam fp32_t FP_M1   = 32'hBF80_0000;
  localparam fp32_t FP_R2   = 32'h3F35_04F3;  // 0.70710677
  localparam fp32_t FP_MR2  = 32'hBF35_04F3;  // -0.70710677

  // Saturated result for exponent overflow.
  function automatic fp32_t fp_inf(input logic s);
    return '{sign: s, exp: 8'hFF, frac: '0};
  endfunction

  // W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8), k = 0..3.
  function automatic cplx_t twiddle8(input logic [1:0] k);
    unique case (k)
      2'd0:    return '{re: FP_ONE,  im: FP_ZERO};
      2'd1:    return '{re: FP_R2,   im: FP_MR2};
      2'd2:    return '{re: FP_ZERO, im: FP_M1};
      default: return '{re: FP_MR2,  im: FP_MR2};
    endcase
  endfunction

  // Complex conjugate; the conjugate of a zero imaginary part stays +0.
  function automatic cplx_t conj(input cplx_t z);
    cplx_t r;
    r = z;
    if (z.im.exp != 8'd0) r.im.sign = ~z.im.sign;
    return r;
  endfunction

endpackage
