// tb_fp_div: self-checking testbench for the pipelined floating point
// divider. Streams one operation per clock (fixed cases, zero operands and
// random operands of both signs) and compares each result, DIV_LAT cycles
// later, with the value computed in double precision from the decoded
// operands.
module tb_fp_div;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, out_valid;
  fp32_t a = '0, b = '0, y;
  int    checks = 0, failures = 0, cycle = 0;

  fp_div dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real expv; int t; logic [31:0] a, b; logic [31:0] exact; } exp_t;
  exp_t q[$];

  initial begin
    repeat (200000) @(posedge clk);
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
        if (cycle - e.t != int'(DIV_LAT)) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.t);
        end
        if (e.exact != 32'h1) begin
          if (y != fp32_t'(e.exact)) begin
            failures++;
            $display("FAIL %h / %h: got %h exp %h", e.a, e.b, y, e.exact);
          end
        end else if (!close(fp2r(y), e.expv, e.expv, 2.0**-22)) begin
          failures++;
          $display("FAIL %h / %h: got %h (%g) exp %g", e.a, e.b, y, fp2r(y), e.expv);
        end
      end
    end
  end

  // exact = 1 means "compare numerically", anything else is the exact word
  task automatic send(input logic [31:0] x, input logic [31:0] z, input logic [31:0] exact);
    exp_t e;
    a <= x; b <= z; in_valid <= 1'b1;
    e.a = x; e.b = z; e.exact = exact;
    e.expv = (z[30:23] == 8'd0) ? 0.0 : fp2r(x) / fp2r(z);
    e.t    = cycle + 1;
    q.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send(32'h40C00000, 32'h40000000, 32'h40400000);  // 6 / 2 = 3
    send(32'h3F800000, 32'h40400000, 32'h1);         // 1 / 3
    send(32'hC0000000, 32'h40000000, 32'hBF800000);  // -2 / 2 = -1
    send(32'h00000000, 32'h40000000, 32'h00000000);  // 0 / 2 = +0
    send(32'h3F800000, 32'h00000000, 32'h7F800000);  // 1 / 0 saturates
    send(32'h3F3504F3, 32'h40000000, 32'h3EB504F3);  // 0.7071 / 2
    send(32'h7E800000, 32'h1F800000, 32'h7F800000);  // 2^126 / 2^-64 saturates
    send(32'h00800000, 32'h5F800000, 32'h00000000);  // 2^-126 / 2^64 flushes to 0
    send(32'h40400000, 32'hC0400000, 32'hBF800000);  // 3 / -3 = -1
    for (int i = 0; i < 3000; i++) send(rand_fp(90, 164), rand_fp(90, 164), 32'h1);
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
