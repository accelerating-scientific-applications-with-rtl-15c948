// tb_fp_mac: self-checking test of the multiply-accumulate unit. Random
// dot products of length 1..20 are streamed one term per clock; the
// expected result is the same sequence of rounded multiplies and adds in
// the simulator's double arithmetic. Checks that en low holds the value.
module tb_fp_mac;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [63:0] a = '0, b = '0, acc;
  int checks = 0, failures = 0;
  real ref_acc;

  fp_mac dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  function automatic real rnd_real();
    return (real'(int'($urandom % 2000001)) - 1000000.0) / 1024.0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb;
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (acc !== 64'h0) begin failures++; $display("FAIL reset value %h", acc); end
    for (int t = 0; t < 200; t++) begin
      len = 1 + int'($urandom % 20);
      ref_acc = 0.0;
      for (int k = 0; k < len; k++) begin
        ra = rnd_real(); rb = rnd_real();
        ref_acc = (k == 0) ? ra * rb : ref_acc + ra * rb;
        @(negedge clk);
        en = 1; clr = (k == 0); a = $realtobits(ra); b = $realtobits(rb);
      end
      @(negedge clk);
      en = 0; clr = 0; a = $realtobits(rnd_real());
      @(negedge clk);
      checks++;
      if (acc !== $realtobits(ref_acc)) begin
        failures++;
        $display("FAIL dot %0d: got %h (%f) expected %f", t, acc, $bitstoreal(acc), ref_acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
