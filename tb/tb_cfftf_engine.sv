// tb_cfftf_engine: self-checking test of the FFT engine. The TRIG table is
// loaded with exp(-2*pi*i*m/N), MVECS random vectors are placed in an OBM
// bank model with a column stride CJUMP > N, and the engine transforms them
// in place. Each output is compared with a direct DFT computed in double
// arithmetic (error below 1e-12 of the largest output); the gaps between
// columns must be untouched, and the clock count of each phase must match
// 2 clocks per butterfly (N/2 butterflies + 3 drain clocks per pass).
module tb_cfftf_engine;
  import src6_pkg::*;
  localparam int unsigned LOG2N_MAX = 6;
  localparam int unsigned AW = 14;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic          trig_we, start, busy, done, obm_re, obm_we;
  logic [LOG2N_MAX-2:0] trig_addr;
  cplx_t         trig_data;
  logic [3:0]    log2n;
  logic [15:0]   mvecs;
  logic [AW-1:0] cjump, y_base, obm_addr;
  logic [63:0]   obm_wdata, obm_rdata;
  fft_state_e    st;

  cfftf_engine #(.LOG2N_MAX(LOG2N_MAX), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .trig_we(trig_we), .trig_addr(trig_addr), .trig_data(trig_data),
    .start(start), .log2n(log2n), .mvecs(mvecs), .cjump(cjump), .y_base(y_base),
    .busy(busy), .done(done), .state_o(st), .obm_addr(obm_addr), .obm_re(obm_re),
    .obm_we(obm_we), .obm_wdata(obm_wdata), .obm_rdata(obm_rdata));

  obm_bank_model #(.AW(AW), .DEPTH(1 << AW)) u_obm (.clk(clk), .addr(obm_addr), .re(obm_re),
    .we(obm_we), .wdata(obm_wdata), .rdata(obm_rdata));

  int bfly_cycles, copy_cycles, load_cycles, store_cycles;
  always @(posedge clk) begin
    if (st == FFT_BFLY)  bfly_cycles++;
    if (st == FFT_COPY)  copy_cycles++;
    if (st == FFT_LOAD)  load_cycles++;
    if (st == FFT_STORE) store_cycles++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [64][64], xi [64][64];

  task automatic run(input int lg, input int nv, input int cj, input int base);
    int n;
    real pi2, maxmag, maxerr, sr, si, ang, er, ei;
    n = 1 << lg;
    pi2 = 6.283185307179586;
    for (int m = 0; m < n / 2; m++) begin
      @(negedge clk);
      trig_we = 1; trig_addr = (LOG2N_MAX-1)'(m);
      trig_data = '{re: $realtobits($cos(pi2 * m / n)), im: $realtobits(-$sin(pi2 * m / n))};
    end
    @(negedge clk);
    trig_we = 0;
    for (int a = 0; a < (1 << AW); a++) u_obm.poke(a, 64'hDEAD_0000_0000_0000 | 64'(a));
    for (int v = 0; v < nv; v++)
      for (int e = 0; e < n; e++) begin
        xr[v][e] = (real'(int'($urandom % 20001)) - 10000.0) / 100.0;
        xi[v][e] = (real'(int'($urandom % 20001)) - 10000.0) / 100.0;
        u_obm.poke(base + 2 * (v * cj + e),     $realtobits(xr[v][e]));
        u_obm.poke(base + 2 * (v * cj + e) + 1, $realtobits(xi[v][e]));
      end
    bfly_cycles = 0; copy_cycles = 0; load_cycles = 0; store_cycles = 0;
    log2n = 4'(lg); mvecs = 16'(nv); cjump = AW'(cj); y_base = AW'(base);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int v = 0; v < nv; v++) begin
      maxmag = 0.0; maxerr = 0.0;
      for (int k = 0; k < n; k++) begin
        sr = 0.0; si = 0.0;
        for (int e = 0; e < n; e++) begin
          ang = pi2 * real'((e * k) % n) / real'(n);
          sr += xr[v][e] * $cos(ang) + xi[v][e] * $sin(ang);
          si += xi[v][e] * $cos(ang) - xr[v][e] * $sin(ang);
        end
        er = $bitstoreal(u_obm.peek(base + 2 * (v * cj + k))) - sr;
        ei = $bitstoreal(u_obm.peek(base + 2 * (v * cj + k) + 1)) - si;
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > maxerr) maxerr = er;
        if (ei > maxerr) maxerr = ei;
        if ((sr < 0 ? -sr : sr) > maxmag) maxmag = (sr < 0 ? -sr : sr);
        if ((si < 0 ? -si : si) > maxmag) maxmag = (si < 0 ? -si : si);
      end
      checks++;
      if (maxerr > 1e-12 * maxmag) begin
        failures++;
        $display("FAIL N=%0d vector %0d: max error %e (max |X| %e)", n, v, maxerr, maxmag);
      end
      // the gap after the vector in its column is untouched
      if (cj > n) begin
        checks++;
        if (u_obm.peek(base + 2 * (v * cj + n)) !== (64'hDEAD_0000_0000_0000 | 64'(base + 2 * (v * cj + n)))) begin
          failures++; $display("FAIL gap overwritten after vector %0d", v);
        end
      end
    end
    checks++;
    if (bfly_cycles != nv * lg * (n + 3) || copy_cycles != nv * (lg - 1) * (n + 1) ||
        load_cycles != nv * (2 * n + 1) || store_cycles != nv * (2 * n + 1)) begin
      failures++;
      $display("FAIL phase clocks N=%0d: bfly %0d copy %0d load %0d store %0d", n, bfly_cycles,
               copy_cycles, load_cycles, store_cycles);
    end
  endtask

  initial begin
    rst_n = 0; trig_we = 0; start = 0; trig_addr = 0; trig_data = '0;
    log2n = 1; mvecs = 1; cjump = 0; y_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 2, 2, 0);
    run(2, 3, 5, 7);
    run(4, 4, 17, 100);
    run(5, 2, 32, 3);
    run(6, 3, 64, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
