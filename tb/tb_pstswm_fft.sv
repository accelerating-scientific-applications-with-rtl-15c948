// tb_pstswm_fft: the FFT workload of the shallow-water climate kernel:
// forward complex FFTs of 256 vectors for vector lengths 256, 512, 1024 and
// 2048, run through the top at its default sizes. Every output vector is
// compared with a reference radix-2 decimation-in-time FFT (bit-reversed
// input order) computed in double arithmetic; the error must stay below
// 1e-11 of the vector's largest output. 256 vectors of 1024 points fill one
// 4 MB on-board memory bank exactly (16 bytes per point), so the 2048-point
// case runs as two calls of 128 vectors. The testbench also checks that the
// butterfly passes take 2 clocks per butterfly and prints the clock count,
// which at 100 MHz gives the computation time per batch.
module tb_pstswm_fft;
  import src6_pkg::*;
  localparam int unsigned NVEC = 256;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic mm1_ld_we, mm1_ld_is_b, mm1_start, mm1_busy, mm1_done, mm1_res_valid;
  logic [1:0] mm1_ld_row, mm1_ld_col;
  logic [3:0] mm1_res_idx;
  fp64_t mm1_ld_data, mm1_res_data;
  logic mm2_b_we, mm2_start, mm2_a_valid, mm2_a_ready, mm2_busy, mm2_done, mm2_c_valid;
  logic [1:0] mm2_b_row, mm2_b_col, mm2_c_row, mm2_c_col;
  fp64_t mm2_b_data, mm2_a_data, mm2_c_data;
  logic fft_trig_we, fft_start, fft_busy, fft_done, fft_obm_re, fft_obm_we;
  logic [9:0] fft_trig_addr;
  cplx_t fft_trig_data;
  logic [3:0] fft_log2n;
  logic [15:0] fft_mvecs;
  logic [OBM_AW-1:0] fft_cjump, fft_y_base, fft_obm_addr;
  logic [63:0] fft_obm_wdata, fft_obm_rdata;
  fft_state_e fft_state;

  src6_map_kernels dut (.*);

  obm_bank_model u_obm (.clk(clk), .addr(fft_obm_addr), .re(fft_obm_re), .we(fft_obm_we),
                        .wdata(fft_obm_wdata), .rdata(fft_obm_rdata));

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc, bfly_cyc;
  always @(posedge clk) begin
    cyc++;
    if (fft_state == FFT_BFLY) bfly_cyc++;
  end

  real ctab [2048], stab [2048];
  real xr [NVEC][2048], xi [NVEC][2048];

  // reference: iterative radix-2 DIT FFT, forward sign
  task automatic ref_fft(input int lg, inout real ar [2048], inout real ai [2048]);
    int n, j, half, step;
    real tr, ti, ur, ui;
    n = 1 << lg;
    for (int i = 0; i < n; i++) begin
      j = 0;
      for (int b = 0; b < lg; b++) if (i & (1 << b)) j |= 1 << (lg - 1 - b);
      if (j > i) begin
        tr = ar[i]; ar[i] = ar[j]; ar[j] = tr;
        ti = ai[i]; ai[i] = ai[j]; ai[j] = ti;
      end
    end
    for (int len = 2; len <= n; len = len * 2) begin
      half = len / 2; step = n / len;
      for (int s = 0; s < n; s += len)
        for (int k = 0; k < half; k++) begin
          ur = ctab[k * step]; ui = -stab[k * step];
          tr = ar[s + k + half] * ur - ai[s + k + half] * ui;
          ti = ar[s + k + half] * ui + ai[s + k + half] * ur;
          ar[s + k + half] = ar[s + k] - tr; ai[s + k + half] = ai[s + k] - ti;
          ar[s + k] = ar[s + k] + tr;        ai[s + k] = ai[s + k] + ti;
        end
    end
  endtask

  task automatic batch(input int lg, input int nv);
    int n;
    longint c0, b0;
    real maxmag, maxerr, e;
    real rr [2048], ri [2048];
    n = 1 << lg;
    for (int v = 0; v < nv; v++)
      for (int k = 0; k < n; k++) begin
        xr[v][k] = (real'(int'($urandom % 20001)) - 10000.0) / 100.0;
        xi[v][k] = (real'(int'($urandom % 20001)) - 10000.0) / 100.0;
        u_obm.poke(2 * (v * n + k),     $realtobits(xr[v][k]));
        u_obm.poke(2 * (v * n + k) + 1, $realtobits(xi[v][k]));
      end
    fft_log2n = 4'(lg); fft_mvecs = 16'(nv); fft_cjump = OBM_AW'(n); fft_y_base = '0;
    @(negedge clk);
    c0 = cyc; b0 = bfly_cyc;
    fft_start = 1;
    @(negedge clk);
    fft_start = 0;
    while (!fft_done) @(negedge clk);
    $display("N=%0d, %0d vectors: %0d clocks (%0.3f ms at 100 MHz), butterfly passes %0d clocks",
             n, nv, cyc - c0, real'(cyc - c0) * 1.0e-5, bfly_cyc - b0);
    checks++;
    if (bfly_cyc - b0 != longint'(nv) * lg * (n + 3)) begin
      failures++; $display("FAIL butterfly clocks");
    end
    for (int v = 0; v < nv; v++) begin
      for (int k = 0; k < n; k++) begin rr[k] = xr[v][k]; ri[k] = xi[v][k]; end
      ref_fft(lg, rr, ri);
      maxmag = 0.0; maxerr = 0.0;
      for (int k = 0; k < n; k++) begin
        e = $bitstoreal(u_obm.peek(2 * (v * n + k))) - rr[k];
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        e = $bitstoreal(u_obm.peek(2 * (v * n + k) + 1)) - ri[k];
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        e = rr[k] < 0 ? -rr[k] : rr[k];
        if (e > maxmag) maxmag = e;
        e = ri[k] < 0 ? -ri[k] : ri[k];
        if (e > maxmag) maxmag = e;
      end
      checks++;
      if (maxerr > 1e-11 * maxmag) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d vector %0d error %e of %e", n, v, maxerr, maxmag);
      end
    end
  endtask

  initial begin
    int n;
    rst_n = 0; cyc = 0; bfly_cyc = 0;
    mm1_ld_we = 0; mm1_ld_is_b = 0; mm1_ld_row = 0; mm1_ld_col = 0; mm1_ld_data = 0; mm1_start = 0;
    mm2_b_we = 0; mm2_b_row = 0; mm2_b_col = 0; mm2_b_data = 0; mm2_start = 0; mm2_a_valid = 0; mm2_a_data = 0;
    fft_trig_we = 0; fft_trig_addr = 0; fft_trig_data = '0; fft_start = 0; fft_log2n = 1;
    fft_mvecs = 1; fft_cjump = 0; fft_y_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int lg = 8; lg <= 11; lg++) begin
      n = 1 << lg;
      for (int m = 0; m < n; m++) begin ctab[m] = $cos(6.283185307179586 * m / n); stab[m] = $sin(6.283185307179586 * m / n); end
      for (int m = 0; m < n / 2; m++) begin
        @(negedge clk);
        fft_trig_we = 1; fft_trig_addr = 10'(m);
        fft_trig_data = '{re: $realtobits(ctab[m]), im: $realtobits(-stab[m])};
      end
      @(negedge clk);
      fft_trig_we = 0;
      if (lg < 11) batch(lg, NVEC);
      else begin batch(lg, NVEC / 2); batch(lg, NVEC / 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
