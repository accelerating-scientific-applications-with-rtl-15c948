// tb_src6_map_kernels: end-to-end test of the top at its default sizes
// (16-MAC array, 4 x 4 matrices, FFT vectors up to 2048 points). It runs
// the two matrix kernels on random 4 x 4 matrices and the FFT kernel on
// one 2048-point vector and several shorter ones held in an on-board
// memory bank model, and checks every result against values computed in
// double arithmetic: C bit for bit, the FFT against a direct DFT. It also
// counts that each mechanism of the design happened at least once: MAC
// packets handed from MAC to MAC, results shifted out right to left, the
// delay pipeline stalling its A stream while a row is computed, the row
// hand-over, and the FFT load, butterfly pass, VB-to-VA copy, store, and
// the move from one vector to the next.
module tb_src6_map_kernels;
  import src6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  // Algorithm 1 port
  logic mm1_ld_we, mm1_ld_is_b, mm1_start, mm1_busy, mm1_done, mm1_res_valid;
  logic [1:0] mm1_ld_row, mm1_ld_col;
  logic [3:0] mm1_res_idx;
  fp64_t mm1_ld_data, mm1_res_data;
  // Algorithm 2 port
  logic mm2_b_we, mm2_start, mm2_a_valid, mm2_a_ready, mm2_busy, mm2_done, mm2_c_valid;
  logic [1:0] mm2_b_row, mm2_b_col, mm2_c_row, mm2_c_col;
  fp64_t mm2_b_data, mm2_a_data, mm2_c_data;
  // FFT port
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_mac_handoff, n_r2l_shift, n_a_stall, n_row_latch;
  int n_load, n_bfly_pass, n_copy, n_store, n_next_vec;
  fft_state_e prev_state;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int j = 1; j < 16; j++) if (dut.u_mm1.st_valid[j]) n_mac_handoff++;
      if (mm1_res_valid) n_r2l_shift++;
      if (mm2_busy && mm2_a_valid && !mm2_a_ready) n_a_stall++;
      if (dut.u_mm2.latch_row) n_row_latch++;
      if (fft_state != prev_state) begin
        case (fft_state)
          FFT_LOAD:  begin n_load++; if (prev_state == FFT_STORE) n_next_vec++; end
          FFT_BFLY:  n_bfly_pass++;
          FFT_COPY:  n_copy++;
          FFT_STORE: n_store++;
          default: ;
        endcase
      end
      prev_state <= fft_state;
    end
  end

  function automatic real rnd_real();
    return (real'(int'($urandom % 200001)) - 100000.0) / 256.0;
  endfunction

  // ---------------- Algorithm 1 ----------------
  real A1 [4][4], B1 [4][4];
  task automatic run_mm1();
    int nres;
    real c_ref;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin A1[r][c] = rnd_real(); B1[r][c] = rnd_real(); end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        mm1_ld_we = 1; mm1_ld_is_b = 0; mm1_ld_row = 2'(r); mm1_ld_col = 2'(c); mm1_ld_data = $realtobits(A1[r][c]);
        @(negedge clk);
        mm1_ld_is_b = 1; mm1_ld_data = $realtobits(B1[r][c]);
      end
    @(negedge clk);
    mm1_ld_we = 0; mm1_start = 1;
    @(negedge clk);
    mm1_start = 0;
    nres = 0;
    forever begin
      if (mm1_res_valid) begin
        int r, c;
        r = int'(mm1_res_idx) / 4; c = int'(mm1_res_idx) % 4;
        c_ref = A1[r][0] * B1[0][c];
        for (int k = 1; k < 4; k++) c_ref = c_ref + A1[r][k] * B1[k][c];
        checks++;
        if (mm1_res_data !== $realtobits(c_ref) || int'(mm1_res_idx) != nres) begin
          failures++; $display("FAIL mm1 result %0d", nres);
        end
        nres++;
      end
      if (mm1_done) break;
      @(negedge clk);
    end
    checks++;
    if (nres != 16) begin failures++; $display("FAIL mm1 %0d results", nres); end
  endtask

  // ---------------- Algorithm 2 ----------------
  real A2 [4][4], B2 [4][4];
  int  mm2_n;
  always @(posedge clk) begin
    if (rst_n && mm2_c_valid) begin
      real c_ref;
      c_ref = A2[mm2_c_row][0] * B2[0][mm2_c_col];
      for (int k = 1; k < 4; k++) c_ref = c_ref + A2[mm2_c_row][k] * B2[k][mm2_c_col];
      checks++;
      if (mm2_c_data !== $realtobits(c_ref) || int'({mm2_c_row, mm2_c_col}) != mm2_n) begin
        failures++; $display("FAIL mm2 result %0d", mm2_n);
      end
      mm2_n++;
    end
  end
  task automatic run_mm2();
    int idx;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin A2[r][c] = rnd_real(); B2[r][c] = rnd_real(); end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        mm2_b_we = 1; mm2_b_row = 2'(r); mm2_b_col = 2'(c); mm2_b_data = $realtobits(B2[r][c]);
      end
    @(negedge clk);
    mm2_b_we = 0; mm2_start = 1; mm2_n = 0;
    @(negedge clk);
    mm2_start = 0;
    idx = 0;
    while (idx < 16) begin
      mm2_a_valid = 1; mm2_a_data = $realtobits(A2[idx / 4][idx % 4]);
      @(posedge clk);
      if (mm2_a_ready) idx++;
      @(negedge clk);
    end
    mm2_a_valid = 0;
    while (!mm2_done) @(negedge clk);
    checks++;
    if (mm2_n != 16) begin failures++; $display("FAIL mm2 %0d results", mm2_n); end
  endtask

  // ---------------- FFT ----------------
  real xr [2048], xi [2048];
  task automatic run_fft(input int lg, input int nv, input int cj);
    int n;
    real pi2, maxmag, maxerr, sr, si, ang;
    real ctab [2048], stab [2048];
    n = 1 << lg;
    pi2 = 6.283185307179586;
    for (int m = 0; m < n; m++) begin ctab[m] = $cos(pi2 * m / n); stab[m] = $sin(pi2 * m / n); end
    for (int m = 0; m < n / 2; m++) begin
      @(negedge clk);
      fft_trig_we = 1; fft_trig_addr = 10'(m);
      fft_trig_data = '{re: $realtobits(ctab[m]), im: $realtobits(-stab[m])};
    end
    @(negedge clk);
    fft_trig_we = 0;
    for (int v = 0; v < nv; v++)
      for (int e = 0; e < n; e++) begin
        u_obm.poke(2 * (v * cj + e),     $realtobits((real'(int'($urandom % 20001)) - 10000.0) / 100.0));
        u_obm.poke(2 * (v * cj + e) + 1, $realtobits((real'(int'($urandom % 20001)) - 10000.0) / 100.0));
      end
    // keep the last vector's input for the reference
    for (int e = 0; e < n; e++) begin
      xr[e] = $bitstoreal(u_obm.peek(2 * ((nv - 1) * cj + e)));
      xi[e] = $bitstoreal(u_obm.peek(2 * ((nv - 1) * cj + e) + 1));
    end
    fft_log2n = 4'(lg); fft_mvecs = 16'(nv); fft_cjump = OBM_AW'(cj); fft_y_base = '0;
    fft_start = 1;
    @(negedge clk);
    fft_start = 0;
    while (!fft_done) @(negedge clk);
    maxmag = 0.0; maxerr = 0.0;
    for (int k = 0; k < n; k++) begin
      sr = 0.0; si = 0.0;
      for (int e = 0; e < n; e++) begin
        int p;
        p = (e * k) % n;
        sr += xr[e] * ctab[p] + xi[e] * stab[p];
        si += xi[e] * ctab[p] - xr[e] * stab[p];
      end
      ang = $bitstoreal(u_obm.peek(2 * ((nv - 1) * cj + k))) - sr;
      if (ang < 0) ang = -ang;
      if (ang > maxerr) maxerr = ang;
      ang = $bitstoreal(u_obm.peek(2 * ((nv - 1) * cj + k) + 1)) - si;
      if (ang < 0) ang = -ang;
      if (ang > maxerr) maxerr = ang;
      if ((sr < 0 ? -sr : sr) > maxmag) maxmag = (sr < 0 ? -sr : sr);
      if ((si < 0 ? -si : si) > maxmag) maxmag = (si < 0 ? -si : si);
    end
    checks++;
    if (maxerr > 1e-11 * maxmag) begin
      failures++; $display("FAIL fft N=%0d error %e of %e", n, maxerr, maxmag);
    end
  endtask

  initial begin
    rst_n = 0;
    mm1_ld_we = 0; mm1_ld_is_b = 0; mm1_ld_row = 0; mm1_ld_col = 0; mm1_ld_data = 0; mm1_start = 0;
    mm2_b_we = 0; mm2_b_row = 0; mm2_b_col = 0; mm2_b_data = 0; mm2_start = 0; mm2_a_valid = 0; mm2_a_data = 0;
    fft_trig_we = 0; fft_trig_addr = 0; fft_trig_data = '0; fft_start = 0; fft_log2n = 1;
    fft_mvecs = 1; fft_cjump = 0; fft_y_base = 0;
    n_mac_handoff = 0; n_r2l_shift = 0; n_a_stall = 0; n_row_latch = 0;
    n_load = 0; n_bfly_pass = 0; n_copy = 0; n_store = 0; n_next_vec = 0;
    prev_state = FFT_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin run_mm1(); run_mm2(); end
    run_fft(3, 3, 10);
    run_fft(11, 1, 2048);
    checks++;
    if (n_mac_handoff == 0 || n_r2l_shift == 0 || n_a_stall == 0 || n_row_latch == 0 ||
        n_load == 0 || n_bfly_pass == 0 || n_copy == 0 || n_store == 0 || n_next_vec == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: mac handoff %0d, right-to-left results %0d, A stalls %0d, row hand-overs %0d",
             n_mac_handoff, n_r2l_shift, n_a_stall, n_row_latch);
    $display("            fft loads %0d, passes %0d, copies %0d, stores %0d, next-vector %0d",
             n_load, n_bfly_pass, n_copy, n_store, n_next_vec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
