// tb_fft_example: the 4-point worked example of the radix-2 decimation in
// time method, run on the engine built with N = 4. The input
// x = [1 3 0 2] is split into even samples [1 0] and odd samples [3 2];
// their 2-point DFTs are Xt = [1 1] and Xc = [5 1] (checked in the register
// file after the first stage), and the 4-point result is
// X = [6, 1-j, -4, 1+j], all exact in single precision. The inverse
// transform of that X must return [1 3 0 2] exactly.
module tb_fft_example;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 4;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, mode = 1'b0;
  fp32_t entry_re [N];
  fp32_t entry_im [N];
  logic  busy, done, out_valid;
  logic [$clog2(2*N)-1:0] out_index;
  fp32_t out_data;
  fp32_t got [2*N];
  int    checks = 0, failures = 0, n_stage1 = 0;
  cplx_t dut_mem [N];
  assign dut_mem = dut.mem;

  fft #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_valid) got[out_index] <= out_data;
  end

  // Intermediate 2-point DFTs, seen in the first cycle of stage 2 in FFT mode.
  logic [1:0] stage_q = '0;
  always @(posedge clk) begin
    stage_q <= dut.stage;
    if (rst_n && !dut.mode_q && dut.stage == 1 && stage_q == 0) begin
      n_stage1++;
      checks++;
      if (dut_mem[0].re != r2fp(1.0) || dut_mem[1].re != r2fp(1.0) ||
          dut_mem[2].re != r2fp(5.0) || dut_mem[3].re != r2fp(1.0)) begin
        failures++;
        $display("FAIL stage 1: %h %h %h %h", dut_mem[0].re, dut_mem[1].re, dut_mem[2].re, dut_mem[3].re);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic m);
    mode <= m; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic expect_word(input int i, input real v);
    checks++;
    if (got[i] != r2fp(v)) begin
      failures++;
      $display("FAIL word %0d: %h (%g), expected %g", i, got[i], fp2r(got[i]), v);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin entry_re[i] = '0; entry_im[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    entry_re[0] = r2fp(1.0); entry_re[1] = r2fp(3.0); entry_re[2] = '0; entry_re[3] = r2fp(2.0);
    run(1'b0);
    // X = [6, 1-j, -4, 1+j]
    expect_word(0, 6.0);  expect_word(1, 0.0);
    expect_word(2, 1.0);  expect_word(3, -1.0);
    expect_word(4, -4.0); expect_word(5, 0.0);
    expect_word(6, 1.0);  expect_word(7, 1.0);
    // inverse of X
    entry_re[0] = r2fp(6.0);  entry_im[0] = '0;
    entry_re[1] = r2fp(1.0);  entry_im[1] = r2fp(-1.0);
    entry_re[2] = r2fp(-4.0); entry_im[2] = '0;
    entry_re[3] = r2fp(1.0);  entry_im[3] = r2fp(1.0);
    run(1'b1);
    expect_word(0, 1.0); expect_word(1, 0.0);
    expect_word(2, 3.0); expect_word(3, 0.0);
    expect_word(4, 0.0); expect_word(5, 0.0);
    expect_word(6, 2.0); expect_word(7, 0.0);
    checks++;
    if (n_stage1 == 0) begin failures++; $display("FAIL stage 1 never observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
