// vnu: variable node computation unit.
//
// In variable node processing mode the decoder presents to each VNU, every
// cycle, the channel message of one variable node (from its CMEM) and the DV
// check-to-variable messages of that node (from its DV decoding-message
// memories). The VNU returns the DV extrinsic variable-to-check messages,
// written back in the same cycle, and the new hard decision.
//
//   total   = ch + sum_j c2v[j]            (exact, W + clog2(DV+1) bits)
//   v2c[j]  = sat(total - c2v[j])          (saturated to +-(2^(W-1)-1))
//   dec     = (total < 0)                  (a non-negative LLR decides bit 0)
//
// Purely combinational. The computation is the standard belief-propagation
// variable node update; word widths, saturation and the tie rule (a total of
// zero decides 0) are this design's choices.
module vnu #(
  parameter int unsigned W  = 6,  // message width
  parameter int unsigned DV = 3   // variable node degree
) (
  input  logic signed [W-1:0] ch,         // channel message
  input  logic signed [W-1:0] c2v [DV],   // check-to-variable messages
  output logic signed [W-1:0] v2c [DV],   // variable-to-check messages
  output logic                dec         // hard decision, 1 = bit one
);

  localparam int unsigned TW = W + $clog2(DV + 1) + 1;  // total width
  localparam logic signed [TW-1:0] HI = TW'((1 << (W - 1)) - 1);
  localparam logic signed [TW-1:0] LO = -HI;

  logic signed [TW-1:0] total;

  always_comb begin
    total = TW'(ch);
    for (int j = 0; j < DV; j++) total = total + TW'(c2v[j]);
  end

  always_comb begin
    for (int j = 0; j < DV; j++) begin
      logic signed [TW-1:0] x;
      x = total - TW'(c2v[j]);
      if (x > HI)      v2c[j] = W'(HI);
      else if (x < LO) v2c[j] = W'(LO);
      else             v2c[j] = W'(x);
    end
  end

  assign dec = total[TW-1];

endmodule
