// tb_fp_add: self-checking test of the binary64 adder. Random normal
// operands (including near-cancelling pairs and large exponent gaps) are
// added and subtracted; the expected bits come from the simulator's own
// double-precision arithmetic ($realtobits). A few special values are
// checked by hand.
module tb_fp_add;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add #(.EW(11), .MW(52)) dut (.a(a), .b(b), .y(y));

  function automatic logic [63:0] rnd_fp(int span);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 + int'($urandom % (2 * span + 1)) - span);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check(input logic [63:0] ta, input logic [63:0] tb_, input logic [63:0] exp);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] p, q;
    for (int i = 0; i < 4000; i++) begin
      p = rnd_fp(i < 2000 ? 3 : 70);
      q = rnd_fp(i < 2000 ? 3 : 70);
      if (i % 5 == 0) q = {~p[63], p[62:20], 20'($urandom)};   // near cancellation
      check(p, q, $realtobits($bitstoreal(p) + $bitstoreal(q)));
    end
    // specials
    check(64'h3FF0000000000000, 64'hBFF0000000000000, 64'h0);                // 1 + -1 = +0
    check(64'h0, 64'h4000000000000000, 64'h4000000000000000);               // 0 + 2
    check(64'h8000000000000000, 64'h8000000000000000, 64'h8000000000000000);// -0 + -0
    check(64'h7FF0000000000000, 64'h3FF0000000000000, 64'h7FF0000000000000);// inf + 1
    check(64'h7FF0000000000000, 64'hFFF0000000000000, 64'h7FF8000000000000);// inf - inf
    check(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF, 64'h7FF0000000000000);// overflow
    check(64'h3FF0000000000000, 64'h3CA0000000000000, 64'h3FF0000000000000);// 1 + 2^-53 tie to even
    check(64'h3FF0000000000001, 64'h3CA0000000000000, 64'h3FF0000000000002);// tie rounds up to even
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
