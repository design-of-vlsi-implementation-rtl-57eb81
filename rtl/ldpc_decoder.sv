// ldpc_decoder: partially parallel decoder for block-structured LDPC codes.
//
// The code's parity-check matrix is an MS x NS base matrix expanded by a
// factor P: each base 1 at (u,v) becomes a P x P identity matrix cyclically
// shifted right by k(u,v), each base 0 a P x P zero matrix (the code itself is
// defined in ldpc_pkg). The expansion maps straight onto hardware:
//   * MS check node units (cnu), one per base row,
//   * NS variable node units (vnu), one per base column,
//   * one decoding-message memory (dmem, P words) per base 1, L = NS*DV of
//     them, wired to exactly one CNU and one VNU,
//   * NS channel-message memories (cmem) and NS hard-decision memories
//     (hdmem), one per VNU,
//   * one address counter (addr_gen) per dmem and one controller (dec_ctrl).
// Each unit serves P graph nodes in turn, so the node logic is P times
// smaller than a fully parallel decoder and all wiring is fixed and local.
//
// One iteration of flooding min-sum belief propagation takes 2*P cycles. In
// the P check-node cycles every dmem(u,v) is read, converted by CNU u and
// written back at address (k(u,v) + t) mod P, t = 0..P-1, so CNU u handles
// check node u*P + t in cycle t. In the P variable-node cycles every memory is
// addressed by t from 0, and VNU v handles variable node v*P + t. Each dmem
// word carries, next to its W-bit message, the hard decision of its variable;
// the CNUs XOR these, so each check phase also computes the syndrome of the
// current decisions, and decoding stops as soon as it is zero (or after
// MAX_ITER iterations).
//
// Interface (clk rising edge, rst_n asynchronous active low):
//   in_valid/in_ready, in_llr[NS]: P beats per codeword; beat t carries the
//     channel LLR of variable v*P + t in in_llr[v] (positive means bit 0).
//   out_valid/out_ready, out_dec[NS]: P beats; beat t carries the decision of
//     variable v*P + t in out_dec[v] (1 = bit one). out_iter (iterations run)
//     and out_converged (all parity checks satisfied) are valid with them.
// Latency from the last input beat to the first output beat is
// P * (2*iterations + 1) cycles if decoding converged, else 2*P*MAX_ITER.
//
// The structure, the 2*P-cycle iteration and the two addressing rules follow
// the architecture this decoder implements; the default code is the
// (3,6)-regular length-4096 one (32 x 64 base matrix, P = 64) with a
// substitute base matrix and shifts. Min-sum, the 6-bit messages, the load and
// output phases and the syndrome stop are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P          = 64,   // expansion factor
  parameter int unsigned MS         = 32,   // base matrix rows (CNUs)
  parameter int unsigned NS         = 64,   // base matrix columns (VNUs)
  parameter int unsigned DV         = 3,    // variable node degree
  parameter int unsigned DC         = 6,    // check node degree
  parameter int unsigned W          = 6,    // message width
  parameter int unsigned MAX_ITER   = 20,   // iteration limit
  parameter bit          EARLY_STOP = 1'b1  // stop on zero syndrome
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // channel values in
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [W-1:0]           in_llr [NS],
  // decisions out
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [NS-1:0]                 out_dec,
  output logic [$clog2(MAX_ITER+1)-1:0] out_iter,
  output logic                          out_converged
);

  localparam int unsigned L  = NS * DV;     // base-matrix 1s = DMEMs
  localparam int unsigned AW = $clog2(P);

  // Every base row must have exactly DC ones for the CNU wiring below.
  for (genvar u = 0; u < MS; u++) begin : g_rowcheck
    if (row_weight(u, MS, NS, DV) != DC) begin : g_bad
      $error("base row %0d has weight %0d, CNU degree is %0d",
             u, row_weight(u, MS, NS, DV), DC);
    end
  end

  mode_e          mode;
  logic [AW-1:0]  t;
  logic           mem_we, ag_en, ag_load, ag_load_k;
  logic           syn_any;

  // per-edge (per-DMEM) signals
  logic signed [W-1:0] e_msg [L];   // message read from the DMEM
  logic                e_dec [L];   // decision bit read from the DMEM
  logic signed [W-1:0] e_c2v [L];   // CNU result for the edge
  logic signed [W-1:0] e_v2c [L];   // VNU result for the edge
  // per-VNU signals
  logic signed [W-1:0] v_ch  [NS];
  logic                v_dec [NS];
  // per-CNU signals
  logic [MS-1:0]       u_syn;

  dec_ctrl #(.P(P), .MAX_ITER(MAX_ITER), .EARLY_STOP(EARLY_STOP)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .out_valid, .out_ready,
    .syn_any, .mode, .t, .mem_we, .ag_en, .ag_load, .ag_load_k,
    .iter(out_iter), .converged(out_converged)
  );

  assign syn_any = |u_syn;

  // ---- decoding-message memories and their address counters ----
  for (genvar e = 0; e < L; e++) begin : g_edge
    localparam int unsigned V = e / DV;
    logic [AW-1:0] addr;
    logic [W:0]    wdata, rdata;

    addr_gen #(.P(P), .K(edge_shift(e, P))) u_ag (
      .clk, .rst_n, .load(ag_load), .load_k(ag_load_k), .en(ag_en), .addr
    );

    always_comb begin
      unique case (mode)
        MODE_LOAD:  wdata = {in_llr[V][W-1], in_llr[V]};
        MODE_CHECK: wdata = {e_dec[e], e_c2v[e]};
        default:    wdata = {v_dec[V], e_v2c[e]};
      endcase
    end

    dmem #(.DEPTH(P), .WIDTH(W + 1)) u_dmem (
      .clk, .addr, .we(mem_we), .wdata, .rdata
    );

    assign e_msg[e] = rdata[W-1:0];
    assign e_dec[e] = rdata[W];
  end

  // ---- check node units: CNU u sees the DC DMEMs of base row u ----
  for (genvar u = 0; u < MS; u++) begin : g_cnu
    logic signed [W-1:0] v2c [DC];
    logic                dec [DC];
    logic signed [W-1:0] c2v [DC];

    for (genvar s = 0; s < DC; s++) begin : g_port
      localparam int unsigned E = cnu_edge(u, s, MS, NS, DV);
      assign v2c[s]   = e_msg[E];
      assign dec[s]   = e_dec[E];
      assign e_c2v[E] = c2v[s];
    end

    cnu #(.W(W), .DC(DC)) u_cnu (.v2c, .dec, .c2v, .syn(u_syn[u]));
  end

  // ---- variable node units with their CMEM and hard-decision memory ----
  for (genvar v = 0; v < NS; v++) begin : g_vnu
    logic signed [W-1:0] c2v [DV];
    logic signed [W-1:0] v2c [DV];

    for (genvar j = 0; j < DV; j++) begin : g_port
      assign c2v[j]            = e_msg[v * DV + j];
      assign e_v2c[v * DV + j] = v2c[j];
    end

    cmem #(.DEPTH(P), .W(W)) u_cmem (
      .clk, .addr(t), .we(mem_we && mode == MODE_LOAD),
      .wdata(in_llr[v]), .rdata(v_ch[v])
    );

    vnu #(.W(W), .DV(DV)) u_vnu (.ch(v_ch[v]), .c2v, .v2c, .dec(v_dec[v]));

    hdmem #(.DEPTH(P)) u_hd (
      .clk,
      .we(mem_we && (mode == MODE_LOAD || mode == MODE_VAR)),
      .waddr(t),
      .wbit(mode == MODE_LOAD ? in_llr[v][W-1] : v_dec[v]),
      .raddr(t),
      .rbit(out_dec[v])
    );
  end

endmodule
