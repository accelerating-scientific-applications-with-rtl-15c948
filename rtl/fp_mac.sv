// fp_mac: floating-point multiply-accumulate unit (binary64 by default).
// Each clock with en high it forms acc + a*b and stores it in the
// accumulator, so one multiplication and one addition complete per clock,
// the rate the matrix kernel's peak-performance estimate assumes for each
// MAC. With clr also high the old accumulator is ignored (acc = a*b), which
// starts a new dot product without a bubble. The product is rounded before
// the addition (no fused rounding); that, and the single-cycle loop, are
// choices of this design.
// Interface: clk, rst_n (active low, clears acc to +0), en, clr, a, b;
// acc is the registered sum, valid the clock after the last en.
module fp_mac #(
  parameter int unsigned EW = 11,
  parameter int unsigned MW = 52
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clr,
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] acc
);
  logic [EW+MW:0] prod, addend, sum;

  fp_mul #(.EW(EW), .MW(MW)) u_mul (.a(a), .b(b), .y(prod));
  assign addend = clr ? '0 : acc;
  fp_add #(.EW(EW), .MW(MW)) u_add (.a(addend), .b(prod), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end
endmodule
