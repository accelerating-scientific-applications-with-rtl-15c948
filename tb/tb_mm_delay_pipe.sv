// tb_mm_delay_pipe: self-checking test of the delay-pipeline matrix
// multiply. B is loaded, A is streamed row-major (once at full rate, then
// with random gaps), and each element of C is compared bit for bit with
// ((a1*b1 + a2*b2) + a3*b3) + a4*b4 formed in the simulator's double
// arithmetic. At full rate the results must come one per clock within a
// row and DIM + 1 clocks apart from row to row.
module tb_mm_delay_pipe;
  localparam int unsigned DIM = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic        b_we, start, a_valid, a_ready, busy, done, c_valid;
  logic [1:0]  b_row, b_col, c_row, c_col;
  logic [63:0] b_data, a_data, c_data;

  mm_delay_pipe dut (.clk(clk), .rst_n(rst_n), .b_we(b_we), .b_row(b_row), .b_col(b_col),
    .b_data(b_data), .start(start), .a_valid(a_valid), .a_ready(a_ready), .a_data(a_data),
    .busy(busy), .done(done), .c_valid(c_valid), .c_data(c_data), .c_row(c_row), .c_col(c_col));

  real A [DIM][DIM];
  real B [DIM][DIM];
  int  nres, first_t, last_t, cyc;

  function automatic real rnd_real();
    return (real'(int'($urandom % 200001)) - 100000.0) / 512.0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && c_valid) begin
      real c_ref;
      c_ref = A[c_row][0] * B[0][c_col];
      for (int k = 1; k < int'(DIM); k++) c_ref = c_ref + A[c_row][k] * B[k][c_col];
      checks++;
      if (c_data !== $realtobits(c_ref) || int'(c_row) != nres / DIM || int'(c_col) != nres % DIM) begin
        failures++;
        $display("FAIL result %0d at (%0d,%0d): got %f expected %f", nres, c_row, c_col,
                 $bitstoreal(c_data), c_ref);
      end
      if (nres == 0) first_t = cyc;
      last_t = cyc;
      nres++;
    end
  end

  task automatic run(input bit gaps);
    int idx;
    for (int r = 0; r < int'(DIM); r++)
      for (int c = 0; c < int'(DIM); c++) begin A[r][c] = rnd_real(); B[r][c] = rnd_real(); end
    for (int r = 0; r < int'(DIM); r++)
      for (int c = 0; c < int'(DIM); c++) begin
        @(negedge clk);
        b_we = 1; b_row = 2'(r); b_col = 2'(c); b_data = $realtobits(B[r][c]);
      end
    @(negedge clk);
    b_we = 0; start = 1; nres = 0;
    @(negedge clk);
    start = 0;
    idx = 0;
    while (idx < int'(DIM * DIM)) begin
      a_valid = gaps ? 1'($urandom % 3 != 0) : 1'b1;
      a_data  = $realtobits(A[idx / DIM][idx % DIM]);
      @(posedge clk);
      if (a_valid && a_ready) idx++;
      @(negedge clk);
    end
    a_valid = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nres != int'(DIM * DIM)) begin failures++; $display("FAIL %0d results", nres); end
    if (!gaps) begin
      checks++;
      if (last_t - first_t != int'(DIM * DIM + DIM - 2)) begin
        failures++;
        $display("FAIL result span %0d clocks, expected %0d", last_t - first_t, DIM * DIM + DIM - 2);
      end
    end
  endtask

  initial begin
    cyc = 0; nres = 0;
    rst_n = 0; b_we = 0; start = 0; a_valid = 0; a_data = 0; b_row = 0; b_col = 0; b_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0);
    for (int t = 0; t < 6; t++) run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
