// tb_fft: end-to-end testbench for the FFT/IFFT engine at its default size
// (N = 8). It runs forward transforms of fixed and random inputs, inverse
// transforms, and a forward-then-inverse round trip that must return the
// original samples, switching mode between runs. Every transform is checked
// against a DFT (or inverse DFT with 1/N scale) computed in double
// precision from the decoded inputs; the serial output must deliver 2N
// words with consecutive indexes (re, im of bin 0, then bin 1, ...) and
// done must follow the last word, and the run must take
// log2(N)*(N/2 + butterfly latency + 1) + 2N + 2 cycles (57 for the FFT,
// 66 for the IFFT). Mechanisms counted and required at least
// once: forward runs, inverse runs, mode switches, first-stage multiplier
// bypass, pipeline drain waits between stages, serial output words.
module tb_fft;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 8;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, mode = 1'b0;
  fp32_t entry_re [N];
  fp32_t entry_im [N];
  logic  busy, done, out_valid;
  logic [$clog2(2*N)-1:0] out_index;
  fp32_t out_data;

  int checks = 0, failures = 0, cycle = 0;
  int n_fft = 0, n_ifft = 0, n_switch = 0, n_bypass = 0, n_drain = 0, n_words = 0;
  int max_cycles = 0;

  fft dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism probes
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dit.in_valid && dut.u_dit.bypass) n_bypass++;
    if (dut.busy && !dut.issue && dut.inflight != 0) n_drain++;
    if (out_valid) n_words++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real res_re [N], res_im [N];
  logic last_mode = 1'b0;
  int   runs = 0;

  // Run one transform; results land in res_re/res_im (as reals) and the
  // raw words in got.
  fp32_t got [2*N];
  task automatic run(input logic m, input fp32_t xr [N], input fp32_t xi [N]);
    int t0, idx;
    real sr, si, ang, scale;
    entry_re = xr; entry_im = xi;
    mode <= m; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cycle;
    if (runs > 0 && m != last_mode) n_switch++;
    last_mode = m;
    runs++;
    if (m) n_ifft++; else n_fft++;
    idx = 0;
    while (!done) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (int'(out_index) != idx) begin
          failures++;
          $display("FAIL output index %0d, expected %0d", out_index, idx);
        end
        got[idx % (2*N)] = out_data;
        idx++;
      end
      if (cycle - t0 > 1000) break;
    end
    checks++;
    if (idx != 2 * N || !done) begin
      failures++;
      $display("FAIL %0d output words, done=%b", idx, done);
    end
    if (cycle - t0 > max_cycles) max_cycles = cycle - t0;
    // cycles from the clock after start to done: log2(N) stages of N/2
    // issue cycles + butterfly latency + 1 drain check, 2N output words, done
    checks++;
    if (cycle - t0 != $clog2(N) * (N/2 + int'(m ? DIF_LAT : DIT_LAT) + 1) + 2*N + 2) begin
      failures++;
      $display("FAIL %s took %0d cycles", m ? "IFFT" : "FFT", cycle - t0);
    end
    // reference transform
    scale = 0.0;
    for (int n = 0; n < N; n++) scale += rabs(fp2r(xr[n])) + rabs(fp2r(xi[n]));
    if (m) scale = scale / N;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = (m ? 2.0 : -2.0) * PI * k * n / N;
        sr += fp2r(xr[n]) * $cos(ang) - fp2r(xi[n]) * $sin(ang);
        si += fp2r(xr[n]) * $sin(ang) + fp2r(xi[n]) * $cos(ang);
      end
      if (m) begin sr = sr / N; si = si / N; end
      res_re[k] = fp2r(got[2*k]);
      res_im[k] = fp2r(got[2*k+1]);
      checks++;
      if (!close(res_re[k], sr, scale, 2.0**-19) || !close(res_im[k], si, scale, 2.0**-19)) begin
        failures++;
        $display("FAIL %s bin %0d: got (%g,%g) exp (%g,%g)", m ? "IFFT" : "FFT", k,
                 res_re[k], res_im[k], sr, si);
      end
    end
    @(posedge clk);
  endtask

  initial begin
    fp32_t xr [N], xi [N], yr [N], yi [N];
    for (int i = 0; i < N; i++) begin entry_re[i] = '0; entry_im[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // x = [1 3 0 2 0 0 0 0]
    for (int i = 0; i < N; i++) begin xr[i] = '0; xi[i] = '0; end
    xr[0] = r2fp(1.0); xr[1] = r2fp(3.0); xr[3] = r2fp(2.0);
    run(1'b0, xr, xi);
    // X[0] must be exactly 6
    checks++;
    if (got[0] != r2fp(6.0)) begin failures++; $display("FAIL X[0] = %h", got[0]); end

    // impulse: flat spectrum
    for (int i = 0; i < N; i++) begin xr[i] = '0; xi[i] = '0; end
    xr[0] = r2fp(1.0);
    run(1'b0, xr, xi);

    // random forward and inverse, alternating
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < N; i++) begin xr[i] = rand_fp(118, 132); xi[i] = rand_fp(118, 132); end
      run(1'(r % 2), xr, xi);
    end

    // round trip: IFFT(FFT(x)) = x
    for (int i = 0; i < N; i++) begin xr[i] = rand_fp(120, 130); xi[i] = rand_fp(120, 130); end
    run(1'b0, xr, xi);
    for (int i = 0; i < N; i++) begin yr[i] = got[2*i]; yi[i] = got[2*i+1]; end
    run(1'b1, yr, yi);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (!close(res_re[i], fp2r(xr[i]), 4.0, 2.0**-18) || !close(res_im[i], fp2r(xi[i]), 4.0, 2.0**-18)) begin
        failures++;
        $display("FAIL round trip %0d: (%g,%g) vs (%g,%g)", i, res_re[i], res_im[i], fp2r(xr[i]), fp2r(xi[i]));
      end
    end

    // the engine is idle again after done
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end

    $display("runs: fft=%0d ifft=%0d switches=%0d bypass=%0d drain_waits=%0d words=%0d max_cycles=%0d",
             n_fft, n_ifft, n_switch, n_bypass, n_drain, n_words, max_cycles);
    if (n_fft == 0 || n_ifft == 0 || n_switch == 0 || n_bypass == 0 || n_drain == 0 || n_words == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
