// src6_map_kernels: the three user-logic kernels of this design side by side,
// as each would occupy a user FPGA of the reconfigurable processor board:
//   mm1_*  matrix multiply with a linear array of 16 floating-point MACs
//          (mm_mac_array, "Algorithm 1"),
//   mm2_*  matrix multiply with a delay pipeline, B in parallel block RAM
//          banks and the active row of A in registers (mm_delay_pipe,
//          "Algorithm 2"),
//   fft_*  forward complex FFT over an array of vectors with one base-2
//          butterfly, TRIG/VA/VB in block RAM and one on-board memory bank
//          for input and output (cfftf_engine).
// The kernels are independent and share only clock and reset. On the real
// board only one of them is loaded into an FPGA at a time; placing them in
// one top is a choice of this design that lets them be built and simulated
// together. The on-board memory bank, the board controller, the host and
// the chain ports are outside this design: the FFT's memory port is brought
// out as fft_obm_*.
// Timing and protocol of each port group are those of the kernel behind it.
module src6_map_kernels
  import src6_pkg::*;
#(
  parameter int unsigned MM_DIM    = 4,
  parameter int unsigned MM_KDIM   = 4,
  parameter int unsigned LOG2N_MAX = 11,
  localparam int unsigned MM1_IW   = $clog2(MM_DIM > MM_KDIM ? MM_DIM : MM_KDIM),
  localparam int unsigned MM2_IW   = (MM_DIM > 1) ? $clog2(MM_DIM) : 1,
  localparam int unsigned MM1_RW   = $clog2(MM_DIM * MM_DIM)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Algorithm 1
  input  logic                   mm1_ld_we,
  input  logic                   mm1_ld_is_b,
  input  logic [MM1_IW-1:0]      mm1_ld_row,
  input  logic [MM1_IW-1:0]      mm1_ld_col,
  input  fp64_t                  mm1_ld_data,
  input  logic                   mm1_start,
  output logic                   mm1_busy,
  output logic                   mm1_done,
  output logic                   mm1_res_valid,
  output fp64_t                  mm1_res_data,
  output logic [MM1_RW-1:0]      mm1_res_idx,
  // Algorithm 2
  input  logic                   mm2_b_we,
  input  logic [MM2_IW-1:0]      mm2_b_row,
  input  logic [MM2_IW-1:0]      mm2_b_col,
  input  fp64_t                  mm2_b_data,
  input  logic                   mm2_start,
  input  logic                   mm2_a_valid,
  output logic                   mm2_a_ready,
  input  fp64_t                  mm2_a_data,
  output logic                   mm2_busy,
  output logic                   mm2_done,
  output logic                   mm2_c_valid,
  output fp64_t                  mm2_c_data,
  output logic [MM2_IW-1:0]      mm2_c_row,
  output logic [MM2_IW-1:0]      mm2_c_col,
  // FFT
  input  logic                   fft_trig_we,
  input  logic [LOG2N_MAX-2:0]   fft_trig_addr,
  input  cplx_t                  fft_trig_data,
  input  logic                   fft_start,
  input  logic [3:0]             fft_log2n,
  input  logic [15:0]            fft_mvecs,
  input  logic [OBM_AW-1:0]      fft_cjump,
  input  logic [OBM_AW-1:0]      fft_y_base,
  output logic                   fft_busy,
  output logic                   fft_done,
  output fft_state_e             fft_state,
  output logic [OBM_AW-1:0]      fft_obm_addr,
  output logic                   fft_obm_re,
  output logic                   fft_obm_we,
  output logic [OBM_DW-1:0]      fft_obm_wdata,
  input  logic [OBM_DW-1:0]      fft_obm_rdata
);
  mm_mac_array #(.DIM(MM_DIM), .KDIM(MM_KDIM)) u_mm1 (
    .clk(clk), .rst_n(rst_n),
    .ld_we(mm1_ld_we), .ld_is_b(mm1_ld_is_b), .ld_row(mm1_ld_row), .ld_col(mm1_ld_col),
    .ld_data(mm1_ld_data), .start(mm1_start), .busy(mm1_busy), .done(mm1_done),
    .res_valid(mm1_res_valid), .res_data(mm1_res_data), .res_idx(mm1_res_idx));

  mm_delay_pipe #(.DIM(MM_DIM)) u_mm2 (
    .clk(clk), .rst_n(rst_n),
    .b_we(mm2_b_we), .b_row(mm2_b_row), .b_col(mm2_b_col), .b_data(mm2_b_data),
    .start(mm2_start), .a_valid(mm2_a_valid), .a_ready(mm2_a_ready), .a_data(mm2_a_data),
    .busy(mm2_busy), .done(mm2_done), .c_valid(mm2_c_valid), .c_data(mm2_c_data),
    .c_row(mm2_c_row), .c_col(mm2_c_col));

  cfftf_engine #(.LOG2N_MAX(LOG2N_MAX), .AW(OBM_AW)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .trig_we(fft_trig_we), .trig_addr(fft_trig_addr), .trig_data(fft_trig_data),
    .start(fft_start), .log2n(fft_log2n), .mvecs(fft_mvecs), .cjump(fft_cjump),
    .y_base(fft_y_base), .busy(fft_busy), .done(fft_done), .state_o(fft_state),
    .obm_addr(fft_obm_addr), .obm_re(fft_obm_re), .obm_we(fft_obm_we),
    .obm_wdata(fft_obm_wdata), .obm_rdata(fft_obm_rdata));
endmodule
