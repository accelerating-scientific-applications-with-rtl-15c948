// mm_delay_pipe: matrix-matrix multiply with a delay pipeline ("Algorithm
// 2"). C = A x B for DIM x DIM matrices (4 x 4 by default). B is held in
// on-chip block RAM split into DIM banks, bank r holding row r of B, so one
// address i reads b1(i)..bDIM(i) (column i of B) in parallel. A is read
// once, as a stream in row-major order, into a delay pipeline (a shift
// register of DIM elements); a full row is moved into the active-row
// registers a1..aDIM while the next row streams in behind it. For each
// column i the unit then forms
//     c(j,i) = ((a1*b1(i) + a2*b2(i)) + a3*b3(i)) + ... + aDIM*bDIM(i)
// with DIM multipliers side by side and the additions in the order written,
// one element of C per clock.
// From the source: B in block RAM accessed in parallel, the active row of A
// in registers, A read once through a delay pipeline, the expression above.
// This design's choices: the stream and load ports, the order of the
// additions (left to right, as the expression reads), and the three-stage
// pipeline (bank read, products, sum).
//
// Interface: b_we writes b_data to B(b_row, b_col), only while idle. start
// (one clock, while idle) runs one product; A is then taken from a_data
// when a_valid && a_ready. Each result is c_data = C(c_row, c_col) with
// c_valid; done pulses one clock after the last result.
// Timing: a result leaves 3 clocks after its column is read; a row of C
// takes DIM clocks, and row j+1 starts one clock after row j if its A
// elements have arrived (DIM + 1 clocks per row).
module mm_delay_pipe
  import src6_pkg::*;
#(
  parameter int unsigned DIM = 4,
  localparam int unsigned IW = (DIM > 1) ? $clog2(DIM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          b_we,
  input  logic [IW-1:0] b_row,
  input  logic [IW-1:0] b_col,
  input  fp64_t         b_data,
  input  logic          start,
  input  logic          a_valid,
  output logic          a_ready,
  input  fp64_t         a_data,
  output logic          busy,
  output logic          done,
  output logic          c_valid,
  output fp64_t         c_data,
  output logic [IW-1:0] c_row,
  output logic [IW-1:0] c_col
);
  // B banks: bank r holds row r of B, addressed by column
  fp64_t b_bank [DIM][DIM];
  always_ff @(posedge clk) begin
    if (b_we && !busy) b_bank[b_row][b_col] <= b_data;
  end

  // delay pipeline for A and the active row
  fp64_t       a_sr  [DIM];
  fp64_t       a_reg [DIM];
  logic [IW:0] a_cnt;           // elements waiting in the delay pipeline
  logic [IW:0] rows_in;         // rows of A taken in
  logic [IW:0] rows_done;       // rows of C issued
  logic        issuing;         // a row is being read out of the banks
  logic [IW-1:0] col, row;
  logic        take_a, latch_row;

  assign a_ready   = busy && (a_cnt != (IW+1)'(DIM)) && (rows_in != (IW+1)'(DIM));
  assign take_a    = a_valid && a_ready;
  assign latch_row = (a_cnt == (IW+1)'(DIM)) && !issuing;

  // pipeline registers
  logic          s1_valid, s2_valid;
  logic [IW-1:0] s1_row, s1_col, s2_row, s2_col;
  fp64_t         s1_b [DIM];
  fp64_t         s2_p [DIM];
  fp64_t         prod [DIM];
  fp64_t         psum [DIM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      a_cnt     <= '0;
      rows_in   <= '0;
      rows_done <= '0;
      issuing   <= 1'b0;
      col       <= '0;
      row       <= '0;
      s1_valid  <= 1'b0;
      s2_valid  <= 1'b0;
      c_valid   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        a_cnt     <= '0;
        rows_in   <= '0;
        rows_done <= '0;
        row       <= '0;
      end
      // delay pipeline fill / hand-over to the active row
      if (latch_row) begin
        a_cnt   <= '0;
        issuing <= 1'b1;
        col     <= '0;
      end else if (take_a) begin
        a_cnt <= a_cnt + 1'b1;
        if (a_cnt == (IW+1)'(DIM - 1)) rows_in <= rows_in + 1'b1;
      end
      // column issue
      if (issuing) begin
        col <= col + 1'b1;
        if (col == IW'(DIM - 1)) begin
          issuing   <= 1'b0;
          row       <= row + 1'b1;
          rows_done <= rows_done + 1'b1;
        end
      end
      s1_valid <= issuing;
      s2_valid <= s1_valid;
      c_valid  <= s2_valid;
      if (busy && c_valid && !s2_valid && !s1_valid && !issuing &&
          rows_done == (IW+1)'(DIM)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take_a && !latch_row) begin
      for (int r = 0; r < int'(DIM) - 1; r++) a_sr[r] <= a_sr[r+1];
      a_sr[DIM-1] <= a_data;
    end
    if (latch_row) a_reg <= a_sr;
    // stage 1: parallel bank read
    for (int r = 0; r < int'(DIM); r++) s1_b[r] <= b_bank[r][col];
    s1_row <= row;
    s1_col <= col;
    // stage 2: products
    s2_p   <= prod;
    s2_row <= s1_row;
    s2_col <= s1_col;
    // stage 3: sum
    c_data <= psum[DIM-1];
    c_row  <= s2_row;
    c_col  <= s2_col;
  end

  for (genvar r = 0; r < int'(DIM); r++) begin : g_mul
    fp_mul #(.EW(FP_EW), .MW(FP_MW)) u_mul (.a(a_reg[r]), .b(s1_b[r]), .y(prod[r]));
  end
  assign psum[0] = s2_p[0];
  for (genvar r = 1; r < int'(DIM); r++) begin : g_add
    fp_add #(.EW(FP_EW), .MW(FP_MW)) u_add (.a(psum[r-1]), .b(s2_p[r]), .y(psum[r]));
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n) b_we |-> !busy);
endmodule
