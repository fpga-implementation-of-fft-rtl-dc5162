// tb_cmul: self-checking testbench for the pipelined complex multiplier.
// Streams random complex operands one per clock, plus products with the
// phase factors 1, -j and (1-j)/sqrt(2), and compares p = x*w, CMUL_LAT
// cycles later, with the product computed in double precision.
module tb_cmul;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, out_valid;
  cplx_t x = '0, w = '0, p;
  int    checks = 0, failures = 0, cycle = 0;

  cmul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real re, im, scale; int t; } exp_t;
  exp_t q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (cycle - e.t != int'(CMUL_LAT)) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.t);
        end
        if (!close(fp2r(p.re), e.re, e.scale, 2.0**-20) ||
            !close(fp2r(p.im), e.im, e.scale, 2.0**-20)) begin
          failures++;
          $display("FAIL got (%g,%g) exp (%g,%g)", fp2r(p.re), fp2r(p.im), e.re, e.im);
        end
      end
    end
  end

  task automatic send(input cplx_t xv, input cplx_t wv);
    exp_t e;
    real xr, xi, wr, wi;
    x <= xv; w <= wv; in_valid <= 1'b1;
    xr = fp2r(xv.re); xi = fp2r(xv.im); wr = fp2r(wv.re); wi = fp2r(wv.im);
    e.re    = xr * wr - xi * wi;
    e.im    = xr * wi + xi * wr;
    e.scale = (rabs(xr) + rabs(xi)) * (rabs(wr) + rabs(wi));
    e.t     = cycle + 1;
    q.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    cplx_t xv;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    xv = '{re: r2fp(3.0), im: r2fp(-2.0)};
    send(xv, '{re: r2fp(1.0), im: r2fp(0.0)});
    send(xv, '{re: r2fp(0.0), im: r2fp(-1.0)});
    send(xv, '{re: r2fp(0.70710678), im: r2fp(-0.70710678)});
    for (int i = 0; i < 2000; i++)
      send('{re: rand_fp(110, 140), im: rand_fp(110, 140)},
           '{re: rand_fp(110, 140), im: rand_fp(110, 140)});
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
