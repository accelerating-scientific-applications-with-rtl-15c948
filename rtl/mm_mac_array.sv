// mm_mac_array: matrix-matrix multiply with a linear array of floating-point
// MACs ("Algorithm 1"). C = A x B for A of DIM x KDIM and B of KDIM x DIM;
// one MAC per element of C, DIM*DIM = 16 MACs by default, numbered left to
// right. MAC m computes c(r,c) with r = m / DIM, c = m % DIM.
//
// How it works: A and B are first loaded into on-chip block RAM, A stored
// by columns and B by rows, so that one read of word k gives column k of A
// and row k of B. After start, word k = 0..KDIM-1 is read one per clock and
// enters the array at MAC 0 as a packet; each MAC takes its own a and b
// from the packet, accumulates a*b and hands the packet to the next MAC a
// clock later, so MAC j works on step k at clock k + j. When the last
// packet has left the last MAC, all sums are copied into a result chain that
// shifts from right to left: results leave at MAC 0, c11 first, c(DIM,DIM)
// last, one per clock.
// The array structure, the MAC-to-MAC propagation, the right-to-left result
// transfer, the 16 MACs and the 4 x 4 tile follow the source; the load
// port, the packet format, the control and the inner dimension KDIM = 4
// (the 4 x 4 matrices of its figure) are choices of this design.
//
// Interface: ld_we writes ld_data to A(ld_row, ld_col) (ld_is_b = 0) or
// B(ld_row, ld_col) (ld_is_b = 1); only while idle. start (one clock, while
// idle) runs one product. res_valid marks res_data = C(res_idx / DIM,
// res_idx % DIM); done pulses with the last result.
// Timing: counting the clock edge that samples start as edge 0, the MACs
// are busy from edge 2 to edge KDIM + DIM*DIM, the first result is out
// after edge KDIM + DIM*DIM + 2 and done (with the last result) after edge
// KDIM + 2*DIM*DIM + 1: 37 clocks for the default 4 x 4 product.
module mm_mac_array
  import src6_pkg::*;
#(
  parameter int unsigned DIM  = 4,
  parameter int unsigned KDIM = 4,
  localparam int unsigned IW  = $clog2(DIM > KDIM ? DIM : KDIM)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ld_we,
  input  logic                         ld_is_b,
  input  logic [IW-1:0]                ld_row,
  input  logic [IW-1:0]                ld_col,
  input  fp64_t                        ld_data,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  output logic                         res_valid,
  output fp64_t                        res_data,
  output logic [$clog2(DIM*DIM)-1:0]   res_idx
);
  localparam int unsigned M  = DIM * DIM;
  localparam int unsigned KW = (KDIM > 1) ? $clog2(KDIM) : 1;
  localparam int unsigned MW_ = $clog2(M);
  localparam int unsigned DW_ = (DIM > 1) ? $clog2(DIM) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_RUN, S_DRAIN} state_e;
  state_e state;

  // block RAM: word k = column k of A, row k of B
  fp64_t a_mem [KDIM][DIM];
  fp64_t b_mem [KDIM][DIM];

  always_ff @(posedge clk) begin
    if (ld_we && state == S_IDLE) begin
      if (!ld_is_b) a_mem[KW'(ld_col)][DW_'(ld_row)] <= ld_data;
      else          b_mem[KW'(ld_row)][DW_'(ld_col)] <= ld_data;
    end
  end

  // packet chain: stage 0 is the block RAM output register
  logic  st_valid [M];
  logic  st_first [M];
  fp64_t st_a     [M][DIM];
  fp64_t st_b     [M][DIM];
  fp64_t acc      [M];
  fp64_t res_sr   [M];

  logic [KW:0]  rd_k;
  logic [MW_:0] drain_cnt;
  logic         any_valid;

  always_comb begin
    any_valid = 1'b0;
    for (int j = 0; j < int'(M); j++) any_valid |= st_valid[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rd_k      <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
      res_valid <= 1'b0;
      res_idx   <= '0;
      for (int j = 0; j < int'(M); j++) begin
        st_valid[j] <= 1'b0;
        st_first[j] <= 1'b0;
      end
    end else begin
      done      <= 1'b0;
      res_valid <= 1'b0;
      // packets move one MAC to the right every clock
      st_valid[0] <= (state == S_FEED);
      st_first[0] <= (state == S_FEED) && (rd_k == '0);
      for (int j = 1; j < int'(M); j++) begin
        st_valid[j] <= st_valid[j-1];
        st_first[j] <= st_first[j-1];
      end
      case (state)
        S_IDLE: if (start) begin
          state <= S_FEED;
          rd_k  <= '0;
        end
        S_FEED: begin
          rd_k <= rd_k + 1'b1;
          if (rd_k == (KW+1)'(KDIM - 1)) state <= S_RUN;
        end
        S_RUN: if (!any_valid) begin
          state     <= S_DRAIN;
          drain_cnt <= '0;
        end
        S_DRAIN: begin
          res_valid <= 1'b1;
          res_idx   <= drain_cnt[MW_-1:0];
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == (MW_+1)'(M - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // packet data (no reset needed: qualified by st_valid)
  always_ff @(posedge clk) begin
    if (state == S_FEED) begin
      st_a[0] <= a_mem[KW'(rd_k)];
      st_b[0] <= b_mem[KW'(rd_k)];
    end
    for (int j = 1; j < int'(M); j++) begin
      st_a[j] <= st_a[j-1];
      st_b[j] <= st_b[j-1];
    end
  end

  // the MACs
  for (genvar m = 0; m < int'(M); m++) begin : g_mac
    fp_mac #(.EW(FP_EW), .MW(FP_MW)) u_mac (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (st_valid[m]),
      .clr   (st_first[m]),
      .a     (st_a[m][m / DIM]),
      .b     (st_b[m][m % DIM]),
      .acc   (acc[m])
    );
  end

  // result chain: loaded in parallel, shifted right to left
  always_ff @(posedge clk) begin
    if (state == S_RUN && !any_valid) begin
      for (int j = 0; j < int'(M); j++) res_sr[j] <= acc[j];
    end else if (state == S_DRAIN) begin
      res_data <= res_sr[0];
      for (int j = 0; j < int'(M) - 1; j++) res_sr[j] <= res_sr[j+1];
      res_sr[M-1] <= '0;
    end
  end

  assign busy     = (state != S_IDLE);

  // loads are only legal while idle, start only while idle
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld_we |-> state == S_IDLE);
endmodule
