// fft_butterfly: complex base-2 (radix-2) butterfly in binary64 floating
// point, the computation the FFT engine repeats N/2 times per factor 2 of N.
//     y0 = x0 + x1
//     y1 = (x0 - x1) * w
// with w the twiddle factor read from the TRIG table. This is the
// decimation-in-frequency form that matches the self-sorting stage order
// used by the engine. The complex product uses four multipliers and two
// adders (re = dr*wr - di*wi, im = dr*wi + di*wr).
// Combinational: outputs follow the inputs in the same clock; the engine
// registers them. The butterfly itself is named in the source; its form,
// the operator count and the product formula are this design's choices.
module fft_butterfly
  import src6_pkg::*;
(
  input  cplx_t x0,
  input  cplx_t x1,
  input  cplx_t w,
  output cplx_t y0,
  output cplx_t y1
);
  fp64_t dr, di, p_rr, p_ii, p_ri, p_ir;

  fp_add #(.EW(FP_EW), .MW(FP_MW)) u_sum_re (.a(x0.re), .b(x1.re), .y(y0.re));
  fp_add #(.EW(FP_EW), .MW(FP_MW)) u_sum_im (.a(x0.im), .b(x1.im), .y(y0.im));
  fp_add #(.EW(FP_EW), .MW(FP_MW)) u_dif_re (.a(x0.re), .b({~x1.re[FP_W-1], x1.re[FP_W-2:0]}), .y(dr));
  fp_add #(.EW(FP_EW), .MW(FP_MW)) u_dif_im (.a(x0.im), .b({~x1.im[FP_W-1], x1.im[FP_W-2:0]}), .y(di));

  fp_mul #(.EW(FP_EW), .MW(FP_MW)) u_m_rr (.a(dr), .b(w.re), .y(p_rr));
  fp_mul #(.EW(FP_EW), .MW(FP_MW)) u_m_ii (.a(di), .b(w.im), .y(p_ii));
  fp_mul #(.EW(FP_EW), .MW(FP_MW)) u_m_ri (.a(dr), .b(w.im), .y(p_ri));
  fp_mul #(.EW(FP_EW), .MW(FP_MW)) u_m_ir (.a(di), .b(w.re), .y(p_ir));

  fp_add #(.EW(FP_EW), .MW(FP_MW)) u_y1_re (.a(p_rr), .b({~p_ii[FP_W-1], p_ii[FP_W-2:0]}), .y(y1.re));
  fp_add #(.EW(FP_EW), .MW(FP_MW)) u_y1_im (.a(p_ri), .b(p_ir), .y(y1.im));
endmodule
