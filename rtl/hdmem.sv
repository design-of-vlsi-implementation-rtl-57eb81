// hdmem: hard-decision memory of one variable node unit.
//
// Holds the P current decoding decisions of variable nodes v*P .. v*P+P-1,
// one bit each (1 = code bit one). The decisions are written when the channel
// values are loaded (the sign of each channel value) and rewritten by VNU v in
// every variable node processing cycle; they are read out, P words of NS bits
// across all hdmems, once decoding stops.
//
// A separate write and read address let the decoder write and read in
// different phases without sharing an address bus. Combinational read, write
// at the clock edge, no reset.
module hdmem #(
  parameter int unsigned DEPTH = 64  // expansion factor P
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     wbit,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic                     rbit
);

  logic [DEPTH-1:0] mem;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wbit;

  assign rbit = mem[raddr];

endmodule
