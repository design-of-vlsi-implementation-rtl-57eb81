// cmem: channel-message memory CMEM(v).
//
// One CMEM exists per base-matrix column v and holds the P channel messages
// (quantized log-likelihood ratios) of variable nodes v*P .. v*P+P-1. It is
// written once per codeword, while the channel values stream in, and read
// every variable node processing cycle by VNU v. Word a belongs to variable
// node v*P + a; both accesses use the decoder's common counter, which runs
// 0..P-1 in each phase.
//
// Combinational read, write at the clock edge, no reset (every word is
// written before it is read).
module cmem #(
  parameter int unsigned DEPTH = 64,  // expansion factor P
  parameter int unsigned W     = 6    // channel message width
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic signed [W-1:0]      wdata,
  output logic signed [W-1:0]      rdata
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
