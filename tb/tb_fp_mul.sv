// tb_fp_mul: self-checking test of the binary64 multiplier. Random normal
// operands are multiplied and compared bit for bit with the simulator's
// double-precision product ($realtobits); special values are checked by
// hand.
module tb_fp_mul;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul #(.EW(11), .MW(52)) dut (.a(a), .b(b), .y(y));

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
        $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, exp);
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
      p = rnd_fp(200);
      q = rnd_fp(200);
      if (i % 7 == 0) q[51:0] = '0;      // exact products
      check(p, q, $realtobits($bitstoreal(p) * $bitstoreal(q)));
    end
    check(64'h0, 64'h4000000000000000, 64'h0);                                // 0 * 2
    check(64'h8000000000000000, 64'h4000000000000000, 64'h8000000000000000);  // -0 * 2
    check(64'h7FF0000000000000, 64'hC000000000000000, 64'hFFF0000000000000);  // inf * -2
    check(64'h7FF0000000000000, 64'h0, 64'h7FF8000000000000);                 // inf * 0
    check(64'h7FE0000000000000, 64'h4010000000000000, 64'h7FF0000000000000);  // overflow
    check(64'h0010000000000000, 64'h3F00000000000000, 64'h0);                 // underflow flush
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
