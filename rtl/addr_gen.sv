// addr_gen: address counter of one decoding-message memory DMEM(u,v).
//
// The parity-check block T(u,v) is an identity matrix shifted right by K
// columns, so check node u*P + t meets variable node v*P + ((t + K) mod P).
// Processing check nodes t = 0, 1, ..., P-1 in turn therefore means reading
// DMEM(u,v) at K, K+1, ..., wrapping at P: a counter that starts at K.
// Variable node processing walks the variables in order, a counter that
// starts at 0. This is all the address logic the decoder needs.
//
// Interface and timing: 'load' (priority over 'en') sets the counter at the
// next clock edge, to K when load_k = 1 and to 0 otherwise; the controller
// raises it in the last cycle of a phase so the next phase starts at the
// right address. 'en' advances the counter by one modulo P. Reset sets 0.
module addr_gen #(
  parameter int unsigned P = 64,  // expansion factor (memory depth)
  parameter int unsigned K = 0    // cyclic shift of this block, 0..P-1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,    // restart the count at the next edge
  input  logic                 load_k,  // 1: restart at K, 0: restart at 0
  input  logic                 en,      // advance by one
  output logic [$clog2(P)-1:0] addr
);

  localparam int unsigned AW = $clog2(P);
  localparam logic [AW-1:0] LAST = AW'(P - 1);
  localparam logic [AW-1:0] KVAL = AW'(K % P);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      addr <= '0;
    else if (load)   addr <= load_k ? KVAL : '0;
    else if (en)     addr <= (addr == LAST) ? '0 : addr + 1'b1;
  end

endmodule
