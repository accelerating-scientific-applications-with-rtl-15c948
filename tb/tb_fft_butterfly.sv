// tb_fft_butterfly: self-checking test of the complex radix-2 butterfly.
// Random inputs and unit-circle twiddles; the expected outputs are formed
// with the same operations in the simulator's double arithmetic and
// compared bit for bit.
module tb_fft_butterfly;
  import src6_pkg::*;
  cplx_t x0, x1, w, y0, y1;
  int checks = 0, failures = 0;

  fft_butterfly dut (.x0(x0), .x1(x1), .w(w), .y0(y0), .y1(y1));

  function automatic real rnd_real();
    return (real'(int'($urandom % 2000001)) - 1000000.0) / 4096.0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ar, ai, br, bi, wr, wi, ang, dr, di;
    for (int t = 0; t < 2000; t++) begin
      ar = rnd_real(); ai = rnd_real(); br = rnd_real(); bi = rnd_real();
      ang = 6.283185307179586 * real'($urandom % 4096) / 4096.0;
      wr = $cos(ang); wi = -$sin(ang);
      x0 = '{re: $realtobits(ar), im: $realtobits(ai)};
      x1 = '{re: $realtobits(br), im: $realtobits(bi)};
      w  = '{re: $realtobits(wr), im: $realtobits(wi)};
      #1;
      dr = ar - br; di = ai - bi;
      checks++;
      if (y0.re !== $realtobits(ar + br) || y0.im !== $realtobits(ai + bi) ||
          y1.re !== $realtobits(dr * wr - di * wi) || y1.im !== $realtobits(dr * wi + di * wr)) begin
        failures++;
        if (failures < 10) $display("FAIL butterfly %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
