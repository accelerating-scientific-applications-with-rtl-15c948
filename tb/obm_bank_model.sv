// obm_bank_model: behavioural model of one on-board memory (OBM) bank of
// the reconfigurable processor board: a 64-bit wide memory of DEPTH words
// (4 MB = 2**19 words for a real bank) with one port. A read issued with re
// returns rdata on the next clock; a write with we takes effect at the
// clock edge. The real bank is a board-level SRAM and is not modelled
// beyond this; testbenches use the backdoor tasks to fill and inspect it.
module obm_bank_model #(
  parameter int unsigned AW    = 19,
  parameter int unsigned DEPTH = 1 << 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          re,
  input  logic          we,
  input  logic [63:0]   wdata,
  output logic [63:0]   rdata
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(addr) < DEPTH) mem[addr] <= wdata;
    if (re) rdata <= (32'(addr) < DEPTH) ? mem[addr] : 64'h0;
  end

  function automatic logic [63:0] peek(input int unsigned a);
    return mem[a];
  endfunction

  task automatic poke(input int unsigned a, input logic [63:0] d);
    mem[a] = d;
  endtask
endmodule
