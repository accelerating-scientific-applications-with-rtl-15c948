// fp_add: combinational IEEE-754 adder, format set by EW/MW (binary64 by
// default). Subtraction is addition with b's sign bit inverted by the user.
// The operand of larger magnitude is kept, the other is shifted right into
// a significand with guard, round and sticky bits, the two are added or
// subtracted, the sum is normalised and rounded to nearest, ties to even.
// Subnormal inputs are read as zero and results below the normal range
// are flushed to zero; overflow gives infinity; NaN inputs and
// (+inf)+(-inf) give the default quiet NaN. An exact zero sum is +0
// (-0 only for (-0)+(-0)). These are choices of this design: the source
// only says that the arithmetic is 64b floating point.
// Interface: a, b in; y = a+b out, same cycle.
module fp_add #(
  parameter int unsigned EW = 11,
  parameter int unsigned MW = 52
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam logic [EW-1:0] EMAX = '1;
  localparam int unsigned SW = MW + 4;     // significand + guard/round/sticky

  logic          sa, sb, sx, sy_l;
  logic [EW-1:0] ea, eb, ex, el, d;
  logic [MW:0]   mx, ml;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, eff_sub;
  logic [2*MW+3:0] wide;
  logic [SW-1:0] x_ext, l_ext, n;
  logic [SW:0]   sum;
  logic signed [EW+1:0] e;
  int unsigned   top, shl;
  logic          rnd;
  logic [MW+1:0] rounded;

  always_comb begin
    sa = a[EW+MW]; sb = b[EW+MW];
    ea = a[EW+MW-1:MW]; eb = b[EW+MW-1:MW];
    a_zero = (ea == '0); b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (a[MW-1:0] == '0);
    b_inf  = (eb == EMAX) && (b[MW-1:0] == '0);
    a_nan  = (ea == EMAX) && (a[MW-1:0] != '0);
    b_nan  = (eb == EMAX) && (b[MW-1:0] != '0);

    // order the operands by magnitude
    if (a[EW+MW-1:0] >= b[EW+MW-1:0]) begin
      sx = sa; ex = ea; mx = {1'b1, a[MW-1:0]};
      sy_l = sb; el = eb; ml = {1'b1, b[MW-1:0]};
    end else begin
      sx = sb; ex = eb; mx = {1'b1, b[MW-1:0]};
      sy_l = sa; el = ea; ml = {1'b1, a[MW-1:0]};
    end
    eff_sub = sx ^ sy_l;
    d = ex - el;

    // align the smaller operand
    x_ext = {mx, 3'b000};
    wide  = {ml, {(MW+3){1'b0}}} >> d;
    if (d > EW'(MW + 3)) l_ext = SW'(1);
    else                 l_ext = {wide[2*MW+3:MW+1], |wide[MW:0]};

    sum = eff_sub ? ({1'b0, x_ext} - {1'b0, l_ext})
                  : ({1'b0, x_ext} + {1'b0, l_ext});

    // normalise
    e = $signed({2'b00, ex});
    top = 0;
    for (int unsigned i = 0; i < SW; i++) if (sum[i]) top = i;
    shl = 0;
    if (sum[SW]) begin
      n = {sum[SW:2], sum[1] | sum[0]};
      e = e + 1;
    end else begin
      shl = (SW - 1) - top;
      n = sum[SW-1:0] << shl;
      e = e - $signed((EW+2)'(shl));
    end

    // round to nearest, ties to even
    rnd = n[2] && (n[1] || n[0] || n[3]);
    rounded = {1'b0, n[SW-1:3]} + (MW+2)'(rnd);
    if (rounded[MW+1]) begin
      rounded = rounded >> 1;
      e = e + 1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = {1'b0, EMAX, 1'b1, {(MW-1){1'b0}}};
    end else if (a_inf) begin
      y = a;
    end else if (b_inf) begin
      y = b;
    end else if (a_zero && b_zero) begin
      y = {sa & sb, {(EW+MW){1'b0}}};
    end else if (a_zero) begin
      y = b;
    end else if (b_zero) begin
      y = a;
    end else if (sum == '0) begin
      y = '0;
    end else if (e <= 0) begin
      y = {sx, {(EW+MW){1'b0}}};
    end else if (e >= $signed((EW+2)'(EMAX))) begin
      y = {sx, EMAX, {MW{1'b0}}};
    end else begin
      y = {sx, e[EW-1:0], rounded[MW-1:0]};
    end
  end
endmodule
