// fp_mul: combinational IEEE-754 multiplier, format set by EW/MW
// (binary64 by default, the precision of the floating-point kernels).
// The significands are multiplied exactly, normalised by at most one place
// and rounded to nearest, ties to even. Subnormal inputs are read as zero
// and results below the normal range are flushed to signed zero; results
// past the largest finite number give infinity; NaN inputs, and zero times
// infinity, give the default quiet NaN. These are choices of this design:
// the source only states that the MACs are 64b floating point.
// Interface: a, b in; y = a*b out, same cycle.
module fp_mul #(
  parameter int unsigned EW = 11,
  parameter int unsigned MW = 52
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic          sa, sb, sy;
  logic [EW-1:0] ea, eb;
  logic [MW:0]   ma, mb;
  logic [2*MW+1:0] prod;
  logic [MW:0]   sig;      // significand before rounding, hidden bit on top
  logic          guard, sticky, rnd_up;
  logic [MW+1:0] rounded;
  logic signed [EW+2:0] ey;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    sa = a[EW+MW]; sb = b[EW+MW]; sy = sa ^ sb;
    ea = a[EW+MW-1:MW]; eb = b[EW+MW-1:MW];
    ma = {1'b1, a[MW-1:0]}; mb = {1'b1, b[MW-1:0]};
    a_zero = (ea == '0); b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (a[MW-1:0] == '0);
    b_inf  = (eb == EMAX) && (b[MW-1:0] == '0);
    a_nan  = (ea == EMAX) && (a[MW-1:0] != '0);
    b_nan  = (eb == EMAX) && (b[MW-1:0] != '0);

    prod = ma * mb;   // value in [1,4) with 2*MW fraction bits
    ey = $signed({3'b000, ea}) + $signed({3'b000, eb}) - $signed((EW+3)'(BIAS));
    if (prod[2*MW+1]) begin
      sig    = prod[2*MW+1:MW+1];
      guard  = prod[MW];
      sticky = |prod[MW-1:0];
      ey     = ey + 1;
    end else begin
      sig    = prod[2*MW:MW];
      guard  = prod[MW-1];
      sticky = |prod[MW-2:0];
    end
    rnd_up  = guard && (sticky || sig[0]);
    rounded = {1'b0, sig} + (MW+2)'(rnd_up);
    if (rounded[MW+1]) begin
      rounded = rounded >> 1;
      ey      = ey + 1;
    end

    if (a_nan || b_nan || (a_zero && b_inf) || (a_inf && b_zero)) begin
      y = {1'b0, EMAX, 1'b1, {(MW-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      y = {sy, EMAX, {MW{1'b0}}};
    end else if (a_zero || b_zero || ey <= 0) begin
      y = {sy, {(EW+MW){1'b0}}};
    end else if (ey >= $signed((EW+3)'(EMAX))) begin
      y = {sy, EMAX, {MW{1'b0}}};
    end else begin
      y = {sy, ey[EW-1:0], rounded[MW-1:0]};
    end
  end
endmodule
