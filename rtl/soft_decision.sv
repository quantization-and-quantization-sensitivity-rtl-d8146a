// soft_decision: overall LLR and hard decision for one row of the code array.
//
// For each of the N positions it adds the channel LLR and the two extrinsic
// LLRs of the last iteration, Lc = Lch + Le1 + Le2, and decides the bit as
// u = (Lc > 0) ? 0 : 1 (antipodal mapping 0 -> +1, 1 -> -1; Lc = 0 decides 1).
// The three (P,Q) operands are added at full precision (W+2 bits), so Lc is
// never clipped and keeps the (P,Q) scale with two extra integer bits.
//
// Purely combinational.  The equations follow the published quantization
// study; the unclipped width of the soft output is this design's choice.
module soft_decision #(
  parameter int unsigned N = tpc_pkg::DEF_N1,
  parameter int unsigned W = 1 + tpc_pkg::DEF_P + tpc_pkg::DEF_Q
) (
  input  logic [N-1:0][W-1:0]   lch,
  input  logic [N-1:0][W-1:0]   le1,
  input  logic [N-1:0][W-1:0]   le2,
  output logic [N-1:0][W+1:0]   lc,    // overall (soft output) LLR
  output logic [N-1:0]          u_hat  // hard decisions
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      lc[j]    = (W+2)'($signed(lch[j])) + (W+2)'($signed(le1[j]))
               + (W+2)'($signed(le2[j]));
      u_hat[j] = !($signed(lc[j]) > 0);
    end
  end

endmodule
