// dit_bfly: pipelined radix-2 decimation-in-time butterfly for the forward
// transform.
//
//   y0 = a + W*b      (X[k]       = Xt[k] + W_N^k Xc[k])
//   y1 = a - W*b      (X[k + N/2] = Xt[k] - W_N^k Xc[k])
//
// The phase factor product W*b is formed by cmul while a waits in a delay
// line; four fp_add units then form the sums and differences of the real and
// imaginary parts. With bypass = 1 the multiplier is skipped and b itself
// (delayed by the same number of cycles) is used, which is how the first
// stage forms its 2-point DFTs with the adders alone. Latency is
// DIT_LAT = CMUL_LAT + ADD_LAT = 8 cycles, one butterfly per cycle. A tag of
// TAG_W bits travels with each butterfly so that the caller knows where to
// write the results. The butterfly equations and the adder-only first
// stage follow the source design; the pipelining, the bypass input and the
// tag are this design's own.
module dit_bfly
  import fp_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             bypass,
  input  cplx_t            a,
  input  cplx_t            b,
  input  cplx_t            w,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output cplx_t            y0,
  output cplx_t            y1,
  output logic [TAG_W-1:0] tag_out
);
  cplx_t wb, a_d, b_d, q;
  logic  v_m, byp_d, v_r, v_i, v_s;
  logic [TAG_W-1:0] tag_d;

  cmul u_cmul (.clk, .rst_n, .in_valid, .x(b), .w(w), .out_valid(v_m), .p(wb));

  delay_line #(.WIDTH(2*$bits(cplx_t) + 1 + TAG_W), .DEPTH(CMUL_LAT)) u_dly_ab (
    .clk, .rst_n, .d({a, b, bypass, tag_in}), .q({a_d, b_d, byp_d, tag_d}));

  assign q = byp_d ? b_d : wb;

  fp_add u_add_re (.clk, .rst_n, .in_valid(v_m), .sub(1'b0), .a(a_d.re), .b(q.re),
                   .out_valid(out_valid), .y(y0.re));
  fp_add u_add_im (.clk, .rst_n, .in_valid(v_m), .sub(1'b0), .a(a_d.im), .b(q.im),
                   .out_valid(v_i), .y(y0.im));
  fp_add u_sub_re (.clk, .rst_n, .in_valid(v_m), .sub(1'b1), .a(a_d.re), .b(q.re),
                   .out_valid(v_r), .y(y1.re));
  fp_add u_sub_im (.clk, .rst_n, .in_valid(v_m), .sub(1'b1), .a(a_d.im), .b(q.im),
                   .out_valid(v_s), .y(y1.im));

  delay_line #(.WIDTH(TAG_W), .DEPTH(ADD_LAT)) u_dly_tag (
    .clk, .rst_n, .d(tag_d), .q(tag_out));

  a_lanes: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid == v_i && out_valid == v_r && out_valid == v_s))
      else $error("dit_bfly: adder lanes out of step");
endmodule
