// cnu: check node computation unit (min-sum).
//
// In check node processing mode the decoder presents to each CNU, every
// cycle, the DC variable-to-check messages of one check node, read from the
// CNU's DC decoding-message memories. The CNU returns the DC check-to-variable
// messages, which are written back to the same addresses in the same cycle
// (read-computation-write).
//
// The message update is the min-sum approximation of belief propagation:
// for edge i the output sign is the product of the signs of the other DC-1
// inputs and the output magnitude is the smallest of their magnitudes. The
// unit finds the smallest and second-smallest magnitude and the position of
// the smallest once, then gives every edge min1, or min2 at that position.
// Messages are W-bit two's complement log-likelihood ratios (positive means
// bit 0); an input of -2^(W-1) is treated as magnitude 2^(W-1)-1, so every
// output lies in the symmetric range.
//
// The CNU also returns the parity (XOR) of the DC hard-decision bits stored
// alongside the messages: the syndrome bit of this check node, used by the
// controller to stop once all parity checks are satisfied.
//
// Purely combinational. Belief propagation and the check node's place in the
// schedule follow the architecture; min-sum, the word width and the syndrome
// output are this design's choices.
module cnu #(
  parameter int unsigned W  = 6,  // message width
  parameter int unsigned DC = 6   // check node degree
) (
  input  logic signed [W-1:0] v2c [DC],  // variable-to-check messages
  input  logic                dec [DC],  // hard decisions of the DC variables
  output logic signed [W-1:0] c2v [DC],  // check-to-variable messages
  output logic                syn        // 1: parity check not satisfied
);

  localparam int unsigned MW = W - 1;               // magnitude width
  localparam logic [MW-1:0] MAG_MAX = '1;           // 2^(W-1)-1
  localparam int unsigned IW = (DC > 1) ? $clog2(DC) : 1;

  logic [MW-1:0] mag [DC];
  logic          sgn [DC];
  logic [MW-1:0] min1, min2;
  logic [IW-1:0] idx1;
  logic          sgn_all;

  always_comb begin
    for (int i = 0; i < DC; i++) begin
      sgn[i] = v2c[i][W-1];
      if (v2c[i] == {1'b1, {MW{1'b0}}}) mag[i] = MAG_MAX;
      else if (sgn[i])                  mag[i] = MW'(-v2c[i]);
      else                              mag[i] = v2c[i][MW-1:0];
    end
  end

  always_comb begin
    min1    = MAG_MAX;
    min2    = MAG_MAX;
    idx1    = '0;
    sgn_all = 1'b0;
    for (int i = 0; i < DC; i++) begin
      sgn_all = sgn_all ^ sgn[i];
      if (mag[i] < min1) begin
        min2 = min1;
        min1 = mag[i];
        idx1 = IW'(i);
      end else if (mag[i] < min2) begin
        min2 = mag[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < DC; i++) begin
      logic [MW-1:0] m;
      logic          s;
      m = (idx1 == IW'(i)) ? min2 : min1;
      s = sgn_all ^ sgn[i];
      c2v[i] = s ? -$signed({1'b0, m}) : $signed({1'b0, m});
    end
  end

  always_comb begin
    syn = 1'b0;
    for (int i = 0; i < DC; i++) syn = syn ^ dec[i];
  end

endmodule
