// tb_fp_add: self-checking testbench for the pipelined floating point
// adder/subtractor. Streams one operation per clock (random operands with
// nearby and distant exponents, cancellations, zero operands, subtractions)
// and compares each result, ADD_LAT cycles later, with the sum computed in
// double precision from the decoded operands.
module tb_fp_add;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, sub = 1'b0, out_valid;
  fp32_t a = '0, b = '0, y;
  int    checks = 0, failures = 0, cycle = 0;

  fp_add dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real expv; real scale; int t; logic [31:0] a, b, exact; logic s; } exp_t;
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
        if (cycle - e.t != int'(ADD_LAT)) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.t);
        end
        if (e.exact != 32'h1) begin
          if (y != fp32_t'(e.exact)) begin
            failures++;
            $display("FAIL %h %s %h: got %h exp %h", e.a, e.s ? "-" : "+", e.b, y, e.exact);
          end
        end else if (!close(fp2r(y), e.expv, e.scale, 2.0**-22)) begin
          failures++;
          $display("FAIL %h %s %h: got %h (%g) exp %g", e.a, e.s ? "-" : "+", e.b, y, fp2r(y), e.expv);
        end
      end
    end
  end

  // exact = 1 means "compare numerically", anything else is the exact word
  task automatic send(input logic [31:0] x, input logic [31:0] z, input logic s,
                      input logic [31:0] exact = 32'h1);
    exp_t e;
    e.exact = exact;
    a <= x; b <= z; sub <= s; in_valid <= 1'b1;
    e.a = x; e.b = z; e.s = s;
    e.expv  = s ? fp2r(x) - fp2r(z) : fp2r(x) + fp2r(z);
    e.scale = e.expv;
    e.t     = cycle + 1;
    q.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] x, z;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // fixed cases
    send(32'h3F800000, 32'h3F800000, 1'b0);  // 1 + 1
    send(32'h3F800000, 32'h3F800000, 1'b1);  // 1 - 1
    send(32'h40400000, 32'h3F800000, 1'b1);  // 3 - 1
    send(32'h00000000, 32'hC0A00000, 1'b0);  // 0 + -5
    send(32'h3F800000, 32'h00000000, 1'b1);  // 1 - 0
    send(32'h3F800000, 32'h33800000, 1'b0);  // 1 + 2^-24
    send(32'h3FFFFFFF, 32'h3F800001, 1'b1);  // close subtraction
    send(32'h40400000, 32'h40400000, 1'b1, 32'h00000000);  // 3 - 3 = +0
    send(32'h7F400000, 32'h7F400000, 1'b0, 32'h7F800000);  // 1.5*2^127 twice saturates
    send(32'h00C00000, 32'h00800000, 1'b1, 32'h00000000);  // 1.5*2^-126 - 2^-126 flushes to 0
    send(32'hC0000000, 32'h3F800000, 1'b0, 32'hBF800000);  // -2 + 1 = -1
    send(32'h3F800000, 32'hC0000000, 1'b1, 32'h40400000);  // 1 - -2 = 3
    // random, back to back
    for (int i = 0; i < 3000; i++) begin
      x = rand_fp(100, 154);
      z = (i % 3 == 0) ? {1'($urandom), x[30:23], 23'($urandom)} : rand_fp(100, 154);
      send(x, z, 1'($urandom));
    end
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
