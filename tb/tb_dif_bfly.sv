// tb_dif_bfly: self-checking testbench for the inverse (decimation in
// frequency) butterfly. Streams random operands one per clock with phase
// factors W8^k (k = 0..3, built here from cos/sin) and compares
// y0 = (a + b)/2 and y1 = (a - b)/(2W), DIF_LAT cycles later, with values
// computed in double precision using complex division.
module tb_dif_bfly;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, out_valid;
  cplx_t      a = '0, b = '0, w = '0, y0, y1;
  logic [3:0] tag_in = '0, tag_out;
  int         checks = 0, failures = 0, cycle = 0;

  dif_bfly #(.TAG_W(4)) dut (.*);

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
        if (cycle - e.t != int'(DIF_LAT) || tag_out != e.tag) begin
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

  task automatic send(input cplx_t av, input cplx_t bv, input int k, input logic [3:0] t);
    exp_t e;
    cplx_t wv;
    real ar, ai, br, bi, wr, wi, dr, di, den;
    wv = '{re: r2fp($cos(2.0 * 3.14159265358979 * k / 8.0)),
           im: r2fp(-$sin(2.0 * 3.14159265358979 * k / 8.0))};
    if (k == 2) wv.re = '0;       // exact zeros where cos/sin vanish
    if (k == 0) wv.im = '0;
    a <= av; b <= bv; w <= wv; tag_in <= t; in_valid <= 1'b1;
    ar = fp2r(av.re); ai = fp2r(av.im); br = fp2r(bv.re); bi = fp2r(bv.im);
    wr = fp2r(wv.re); wi = fp2r(wv.im);
    e.r0 = (ar + br) / 2.0; e.i0 = (ai + bi) / 2.0;
    dr = (ar - br) / 2.0;   di = (ai - bi) / 2.0;
    den = wr * wr + wi * wi;
    e.r1 = (dr * wr + di * wi) / den;
    e.i1 = (di * wr - dr * wi) / den;
    e.scale = rabs(ar) + rabs(ai) + rabs(br) + rabs(bi);
    e.t = cycle + 1;
    e.tag = t;
    q.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // (6 + -4)/2 = 1 and (6 - -4)/2 = 5 with W = 1
    send('{re: r2fp(6.0), im: '0}, '{re: r2fp(-4.0), im: '0}, 0, 4'd9);
    for (int i = 0; i < 2000; i++)
      send('{re: rand_fp(115, 135), im: rand_fp(115, 135)},
           '{re: rand_fp(115, 135), im: rand_fp(115, 135)}, int'($urandom_range(0, 3)), 4'($urandom));
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
