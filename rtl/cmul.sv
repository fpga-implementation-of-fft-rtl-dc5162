// cmul: pipelined complex multiplier, p = x * w.
//
// Four fp_mul units form the partial products xr*wr, xi*wi, xr*wi and xi*wr
// in parallel; two fp_add units then form re = xr*wr - xi*wi and
// im = xr*wi + xi*wr. The result appears CMUL_LAT = MUL_LAT + ADD_LAT = 5
// cycles after the operands and one product is accepted per cycle;
// out_valid follows in_valid. The arrangement of four real multipliers and
// two adders is this design's choice; the engine uses it to multiply data by
// a phase factor.
module cmul
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t p
);
  fp32_t rr, ii, ri, ir;
  logic  v_rr, v_ii, v_ri, v_ir, v_im;

  fp_mul u_rr (.clk, .rst_n, .in_valid, .a(x.re), .b(w.re), .out_valid(v_rr), .y(rr));
  fp_mul u_ii (.clk, .rst_n, .in_valid, .a(x.im), .b(w.im), .out_valid(v_ii), .y(ii));
  fp_mul u_ri (.clk, .rst_n, .in_valid, .a(x.re), .b(w.im), .out_valid(v_ri), .y(ri));
  fp_mul u_ir (.clk, .rst_n, .in_valid, .a(x.im), .b(w.re), .out_valid(v_ir), .y(ir));

  fp_add u_re (.clk, .rst_n, .in_valid(v_rr), .sub(1'b1), .a(rr), .b(ii),
               .out_valid(out_valid), .y(p.re));
  fp_add u_im (.clk, .rst_n, .in_valid(v_ri), .sub(1'b0), .a(ri), .b(ir),
               .out_valid(v_im), .y(p.im));

  // All four multipliers run in lock step.
  a_lanes: assert property (@(posedge clk) disable iff (!rst_n)
    (v_rr == v_ii && v_rr == v_ri && v_rr == v_ir && out_valid == v_im))
      else $error("cmul: pipeline lanes out of step");
endmodule
