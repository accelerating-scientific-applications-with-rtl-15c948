// tb_mm_mac_array: self-checking test of the 16-MAC matrix multiply array.
// Random A (DIM x KDIM) and B (KDIM x DIM) are loaded, the product is run,
// and every result is compared bit for bit with the same sum of rounded
// products formed in the simulator's double arithmetic (terms added in
// order k = 0..KDIM-1). The order of results (row-major, right-to-left
// transfer) and the number of clocks from start to done are checked.
// Runs at the default size (16 MACs, 4 x 4) and with a longer inner
// dimension.
module tb_mm_mac_array;
  localparam int unsigned DIM = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default configuration and a longer dot product
  logic        ld_we [2];
  logic        ld_is_b [2];
  logic [4:0]  ld_row [2], ld_col [2];
  logic [63:0] ld_data [2];
  logic        start [2], busy [2], done [2], res_valid [2];
  logic [63:0] res_data [2];
  logic [3:0]  res_idx [2];

  mm_mac_array dut0 (.clk(clk), .rst_n(rst_n), .ld_we(ld_we[0]), .ld_is_b(ld_is_b[0]),
    .ld_row(ld_row[0][1:0]), .ld_col(ld_col[0][1:0]), .ld_data(ld_data[0]), .start(start[0]),
    .busy(busy[0]), .done(done[0]), .res_valid(res_valid[0]), .res_data(res_data[0]),
    .res_idx(res_idx[0]));
  mm_mac_array #(.DIM(4), .KDIM(16)) dut1 (.clk(clk), .rst_n(rst_n), .ld_we(ld_we[1]),
    .ld_is_b(ld_is_b[1]), .ld_row(ld_row[1][3:0]), .ld_col(ld_col[1][3:0]), .ld_data(ld_data[1]),
    .start(start[1]), .busy(busy[1]), .done(done[1]), .res_valid(res_valid[1]),
    .res_data(res_data[1]), .res_idx(res_idx[1]));

  real A [DIM][16];
  real B [16][DIM];

  function automatic real rnd_real();
    return (real'(int'($urandom % 200001)) - 100000.0) / 256.0;
  endfunction

  task automatic run(input int u, input int kd);
    real c_ref;
    int cyc, nres;
    for (int r = 0; r < DIM; r++)
      for (int k = 0; k < kd; k++) begin A[r][k] = rnd_real(); B[k][r] = rnd_real(); end
    for (int r = 0; r < DIM; r++)
      for (int k = 0; k < kd; k++) begin
        @(negedge clk);
        ld_we[u] = 1; ld_is_b[u] = 0; ld_row[u] = 5'(r); ld_col[u] = 5'(k); ld_data[u] = $realtobits(A[r][k]);
        @(negedge clk);
        ld_is_b[u] = 1; ld_row[u] = 5'(k); ld_col[u] = 5'(r); ld_data[u] = $realtobits(B[k][r]);
      end
    @(negedge clk);
    ld_we[u] = 0; start[u] = 1;
    @(negedge clk);
    start[u] = 0;
    cyc = 1; nres = 0;
    while (!done[u]) begin
      if (res_valid[u]) begin
        int r, c;
        r = int'(res_idx[u]) / DIM; c = int'(res_idx[u]) % DIM;
        c_ref = A[r][0] * B[0][c];
        for (int k = 1; k < kd; k++) c_ref = c_ref + A[r][k] * B[k][c];
        checks++;
        if (res_data[u] !== $realtobits(c_ref) || int'(res_idx[u]) != nres) begin
          failures++;
          $display("FAIL unit %0d result %0d idx %0d: got %f expected %f", u, nres, res_idx[u],
                   $bitstoreal(res_data[u]), c_ref);
        end
        nres++;
      end
      @(negedge clk);
      cyc++;
    end
    // the last result is presented together with done
    if (res_valid[u]) begin
      c_ref = A[DIM-1][0] * B[0][DIM-1];
      for (int k = 1; k < kd; k++) c_ref = c_ref + A[DIM-1][k] * B[k][DIM-1];
      checks++;
      if (res_data[u] !== $realtobits(c_ref)) begin
        failures++; $display("FAIL unit %0d last result", u);
      end
      nres++;
    end
    checks++;
    if (nres != DIM * DIM) begin failures++; $display("FAIL unit %0d gave %0d results", u, nres); end
    checks++;
    if (cyc != kd + 2 * DIM * DIM + 2) begin
      failures++;
      $display("FAIL unit %0d took %0d clocks, expected %0d", u, cyc, kd + 2 * DIM * DIM + 2);
    end
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      ld_we[u] = 0; ld_is_b[u] = 0; ld_row[u] = 0; ld_col[u] = 0; ld_data[u] = 0; start[u] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      run(0, 4);
      run(1, 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
