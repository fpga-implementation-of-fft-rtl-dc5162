// fp_ref_pkg: reference arithmetic for the testbenches. Converts IEEE-754
// single precision words to and from double precision reals by decoding the
// fields directly (no simulator conversion routines), and compares results
// with a relative tolerance. Conversions to single precision truncate, like
// the design, and an exponent field of zero is read as zero.
package fp_ref_pkg;

  function automatic real fp2r(input logic [31:0] w);
    real m;
    int  e;
    if (w[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(w[22:0]) / 8388608.0;
    e = int'(w[30:23]) - 127;
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    return w[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2fp(input real r);
    real a;
    int  e;
    logic s;
    if (r == 0.0) return 32'h0;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return {s, 8'(e + 127), 23'($rtoi((a - 1.0) * 8388608.0))};
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // |got - exp| <= rel * scale + 1e-30
  function automatic bit close(input real got, input real expv, input real scale, input real rel);
    return rabs(got - expv) <= rel * rabs(scale) + 1.0e-30;
  endfunction

  // Random normal number with exponent field in [emin, emax] and random sign.
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
