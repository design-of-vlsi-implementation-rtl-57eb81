// dmem: decoding-message memory DMEM(u,v).
//
// One DMEM exists for every 1 of the base matrix, i.e. for every P x P
// shifted identity block T(u,v) of the parity-check matrix. Word a holds the
// message on the edge between variable node v*P + a and the check node that
// block T(u,v) connects it to. Depending on the decoder mode the word holds a
// variable-to-check or a check-to-variable message; each word also carries
// the current hard decision of its variable node (bit W-1 of the word in the
// decoder, see ldpc_decoder), so the CNU can form the syndrome.
//
// One address port serves both access kinds: the read data is combinational
// from the address and the write happens at the clock edge, so a word is
// read, converted by a node unit and written back in a single cycle. This
// keeps one decoding iteration at exactly 2*P cycles. The memory has no reset;
// the decoder fills every word in its load phase before reading any.
module dmem #(
  parameter int unsigned DEPTH = 64,  // expansion factor P
  parameter int unsigned WIDTH = 7    // message bits + decision bit
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
