// dif_bfly: pipelined radix-2 decimation-in-frequency butterfly for the
// inverse transform.
//
//   y0 = (a + b) / 2           (Xt[k] = (X[k] + X[k+N/2]) / 2)
//   y1 = (a - b) / (2 W^k)     (Xc[k] = (X[k] - X[k+N/2]) / (2 W_N^k))
//
// Four fp_add units form the sum and difference; four fp_div units divide
// them by two; the difference is then divided by the phase factor. Because
// |W^k| = 1, dividing by W^k is done as a multiplication by its conjugate in
// cmul (this design's choice), while the sum waits in a delay line. The
// caller passes W^k itself in w. Latency is DIF_LAT = ADD_LAT + DIV_LAT +
// CMUL_LAT = 11 cycles, one butterfly per cycle; the tag travels with it.
module dif_bfly
  import fp_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            a,
  input  cplx_t            b,
  input  cplx_t            w,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output cplx_t            y0,
  output cplx_t            y1,
  output logic [TAG_W-1:0] tag_out
);
  cplx_t s, d, sh, dh, w_d;
  logic  v_a, v_a1, v_a2, v_a3, v_d, v_d1, v_d2, v_d3, v_c;
  logic [TAG_W-1:0] tag_d;

  // sum and difference
  fp_add u_add_re (.clk, .rst_n, .in_valid, .sub(1'b0), .a(a.re), .b(b.re), .out_valid(v_a),  .y(s.re));
  fp_add u_add_im (.clk, .rst_n, .in_valid, .sub(1'b0), .a(a.im), .b(b.im), .out_valid(v_a1), .y(s.im));
  fp_add u_sub_re (.clk, .rst_n, .in_valid, .sub(1'b1), .a(a.re), .b(b.re), .out_valid(v_a2), .y(d.re));
  fp_add u_sub_im (.clk, .rst_n, .in_valid, .sub(1'b1), .a(a.im), .b(b.im), .out_valid(v_a3), .y(d.im));

  // halve
  fp_div u_div_sre (.clk, .rst_n, .in_valid(v_a), .a(s.re), .b(FP_TWO), .out_valid(v_d),  .y(sh.re));
  fp_div u_div_sim (.clk, .rst_n, .in_valid(v_a), .a(s.im), .b(FP_TWO), .out_valid(v_d1), .y(sh.im));
  fp_div u_div_dre (.clk, .rst_n, .in_valid(v_a), .a(d.re), .b(FP_TWO), .out_valid(v_d2), .y(dh.re));
  fp_div u_div_dim (.clk, .rst_n, .in_valid(v_a), .a(d.im), .b(FP_TWO), .out_valid(v_d3), .y(dh.im));

  // phase factor waits for the adders and dividers
  delay_line #(.WIDTH($bits(cplx_t)), .DEPTH(ADD_LAT + DIV_LAT)) u_dly_w (
    .clk, .rst_n, .d(w), .q(w_d));

  // divide the difference by W^k: multiply by conj(W^k)
  cmul u_cmul (.clk, .rst_n, .in_valid(v_d), .x(dh), .w(conj(w_d)), .out_valid(out_valid), .p(y1));

  delay_line #(.WIDTH($bits(cplx_t)), .DEPTH(CMUL_LAT)) u_dly_s (
    .clk, .rst_n, .d(sh), .q(y0));

  delay_line #(.WIDTH(TAG_W), .DEPTH(DIF_LAT)) u_dly_tag (
    .clk, .rst_n, .d(tag_in), .q(tag_d));
  assign tag_out = tag_d;

  delay_line #(.WIDTH(1), .DEPTH(CMUL_LAT)) u_dly_v (
    .clk, .rst_n, .d(v_d), .q(v_c));

  a_lanes: assert property (@(posedge clk) disable iff (!rst_n)
    (v_a == v_a1 && v_a == v_a2 && v_a == v_a3 &&
                       v_d == v_d1 && v_d == v_d2 && v_d == v_d3 && v_c == out_valid))
      else $error("dif_bfly: pipeline lanes out of step");
endmodule
