// dec_ctrl: mode sequencer of the partially parallel decoder.
//
// A codeword passes through four modes (ldpc_pkg::mode_e):
//   LOAD   P beats of channel values, one per accepted in_valid/in_ready
//          handshake; then CHECK.
//   CHECK  P cycles of check node processing. The CNUs' syndrome bits are
//          ORed over the phase. If every parity check held (and early
//          stopping is enabled) the decisions are final: go to OUT with
//          converged = 1. Otherwise go to VAR.
//   VAR    P cycles of variable node processing; this completes an iteration
//          (2*P cycles). After MAX_ITER iterations go to OUT with
//          converged = 0, else back to CHECK.
//   OUT    P beats of hard decisions, one per out_valid/out_ready handshake;
//          then LOAD.
// The syndrome checked in a CHECK phase is that of the decisions left by the
// previous VAR phase (or, in the first CHECK, of the channel signs), so a
// codeword that is already correct leaves after one CHECK phase, 0 iterations.
//
// Outputs: the mode, the common phase counter t (0..P-1, the address of the
// CMEMs and hard-decision memories), the write strobe of all memories, the
// advance and restart controls of the per-DMEM address counters (restart is
// raised in the last cycle of a phase, to K before CHECK and to 0 otherwise),
// and the iteration count and converged flag of the codeword being output.
//
// The two P-cycle modes and the limit of 20 iterations follow the
// architecture and its evaluation; the load/output phases, the handshakes and
// the syndrome-based stop are this design's choices.
module dec_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned P          = 64,  // expansion factor
  parameter int unsigned MAX_ITER   = 20,  // iteration limit
  parameter bit          EARLY_STOP = 1'b1 // stop when all checks hold
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  output logic                          out_valid,
  input  logic                          out_ready,
  input  logic                          syn_any,   // some check fails, this cycle
  output mode_e                         mode,
  output logic [$clog2(P)-1:0]          t,         // common phase counter
  output logic                          mem_we,    // write all memories
  output logic                          ag_en,     // advance DMEM counters
  output logic                          ag_load,   // restart DMEM counters
  output logic                          ag_load_k, // restart at K (else 0)
  output logic [$clog2(MAX_ITER+1)-1:0] iter,      // completed iterations
  output logic                          converged  // decisions satisfy H
);

  localparam int unsigned AW = $clog2(P);
  localparam int unsigned IW = $clog2(MAX_ITER + 1);
  localparam logic [AW-1:0] LAST = AW'(P - 1);

  logic  fire;       // the current cycle does one unit of work
  logic  last;       // ... and it is the last of its phase
  logic  syn_acc;    // a failed check seen earlier in this CHECK phase
  logic  pass;       // all checks of this CHECK phase held
  mode_e mode_nxt;

  always_comb begin
    unique case (mode)
      MODE_LOAD: fire = in_valid;
      MODE_OUT:  fire = out_ready;
      default:   fire = 1'b1;
    endcase
  end

  assign last      = fire && (t == LAST);
  assign pass      = !(syn_acc || syn_any);
  assign in_ready  = (mode == MODE_LOAD);
  assign out_valid = (mode == MODE_OUT);
  assign mem_we    = fire && (mode != MODE_OUT);
  assign ag_en     = fire;

  always_comb begin
    mode_nxt  = mode;
    ag_load   = 1'b0;
    ag_load_k = 1'b0;
    if (last) begin
      ag_load = 1'b1;
      unique case (mode)
        MODE_LOAD: begin
          mode_nxt  = MODE_CHECK;
          ag_load_k = 1'b1;
        end
        MODE_CHECK: mode_nxt = (EARLY_STOP && pass) ? MODE_OUT : MODE_VAR;
        MODE_VAR: begin
          if (iter == IW'(MAX_ITER - 1)) mode_nxt = MODE_OUT;
          else begin
            mode_nxt  = MODE_CHECK;
            ag_load_k = 1'b1;
          end
        end
        default: mode_nxt = MODE_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_LOAD;
      t         <= '0;
      syn_acc   <= 1'b0;
      iter      <= '0;
      converged <= 1'b0;
    end else begin
      mode <= mode_nxt;
      if (fire) t <= last ? '0 : t + 1'b1;
      if (mode == MODE_CHECK) syn_acc <= last ? 1'b0 : (syn_acc || syn_any);
      if (last) begin
        unique case (mode)
          MODE_LOAD: begin
            iter      <= '0;
            converged <= 1'b0;
          end
          MODE_CHECK: converged <= EARLY_STOP && pass;
          MODE_VAR:   iter <= iter + 1'b1;
          default: ;
        endcase
      end
    end
  end

  // A phase never runs past P units of work. (Both properties hold through
  // reset as well, since reset clears t and leaves the LOAD mode, so they
  // need no disable clause.)
  property p_phase_len;
    @(posedge clk) (t == LAST && fire) |=> (t == '0);
  endproperty
  assert property (p_phase_len);

  // Hold the output while the receiver stalls.
  assert property (@(posedge clk) (out_valid && !out_ready) |=> out_valid);

endmodule
