// tb_dit_bfly: self-checking testbench for the forward (decimation in time)
// butterfly. Streams random operands one per clock with random complex
// phase factors, half of them with the multiplier bypassed, and compares
// y0 = a + W*b and y1 = a - W*b (W = 1 when bypassed), DIT_LAT cycles later,
// with values computed in double precision. The tag must come back with its
// butterfly.
module tb_dit_bfly;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, bypass = 1'b0, out_valid;
  cplx_t      a = '0, b = '0, w = '0, y0, y1;
  logic [3:0] tag_in = '0, tag_out;
  int         checks = 0, failures = 0, cycle = 0, n_bypass = 0;

  dit_bfly #(.TAG_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real r0, i0, r1, i1, scale; int t; logic [3:0] tag; } exp_t;
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
        if (cycle - e.t != int'(DIT_LAT) || tag_out != e.tag) begin
          failures++;
          $display("FAIL latency %0d tag %0d/%0d", cycle - e.t, tag_out, e.tag);
        end
        if (!close(fp2r(y0.re), e.r0, e.scale, 2.0**-20) || !close(fp2r(y0.im), e.i0, e.scale, 2.0**-20) ||
            !close(fp2r(y1.re), e.r1, e.scale, 2.0**-20) || !close(fp2r(y1.im), e.i1, e.scale, 2.0**-20)) begin
          failures++;
          $display("FAIL got (%g,%g) (%g,%g) exp (%g,%g) (%g,%g)", fp2r(y0.re), fp2r(y0.im),
                   fp2r(y1.re), fp2r(y1.im), e.r0, e.i0, e.r1, e.i1);
        end
      end
    end
  end

  task automatic send(input cplx_t av, input cplx_t bv, input cplx_t wv, input logic byp,
                      input logic [3:0] t);
    exp_t e;
    real ar, ai, br, bi, wr, wi, pr, pi;
    a <= av; b <= bv; w <= wv; bypass <= byp; tag_in <= t; in_valid <= 1'b1;
    ar = fp2r(av.re); ai = fp2r(av.im); br = fp2r(bv.re); bi = fp2r(bv.im);
    wr = byp ? 1.0 : fp2r(wv.re); wi = byp ? 0.0 : fp2r(wv.im);
    pr = br * wr - bi * wi;
    pi = br * wi + bi * wr;
    e.r0 = ar + pr; e.i0 = ai + pi; e.r1 = ar - pr; e.i1 = ai - pi;
    e.scale = rabs(ar) + rabs(ai) + (rabs(br) + rabs(bi)) * (rabs(wr) + rabs(wi));
    e.t = cycle + 1;
    e.tag = t;
    q.push_back(e);
    if (byp) n_bypass++;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // 2-point DFT of [1, 3]: [4, -2]
    send('{re: r2fp(1.0), im: '0}, '{re: r2fp(3.0), im: '0}, '{re: rand_fp(120, 130), im: rand_fp(120, 130)}, 1'b1, 4'd5);
    for (int i = 0; i < 2000; i++)
      send('{re: rand_fp(115, 135), im: rand_fp(115, 135)},
           '{re: rand_fp(115, 135), im: rand_fp(115, 135)},
           '{re: rand_fp(120, 127), im: rand_fp(120, 127)}, 1'($urandom), 4'($urandom));
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
