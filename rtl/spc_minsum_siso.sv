// spc_minsum_siso: min-sum soft-in soft-out decoder of one SPC component code.
//
// For one row (or column) of N positions it forms the a priori LLR of each
// position, Lo_j = Lch_j + Le_in_j (saturated to the (P,Q) range), and the
// extrinsic LLR Le_out_j = check operation of all Lo_t with t != j.  With the
// min-sum check operation this is
//     Le_out_j = prod_{t!=j} sgn(Lo_t) * min_{t!=j} |Lo_t| .
// Instead of N separate N-1 input reductions, the unit finds the overall sign
// parity, the smallest magnitude min1 with its index and the second smallest
// magnitude min2 once; position j then takes min2 if it holds min1 and min1
// otherwise, and its sign is the overall parity with its own sign removed.
// This gives exactly the same values as the pairwise chain of check
// operations.  A zero Lo_t has sgn 0 and so zeroes every other output; that
// falls out here because a zero magnitude is then the minimum of the others.
//
// Purely combinational; all inputs and outputs are (P,Q) words of 1+P+Q bits.
// The equations follow the published quantization study; the min1/min2
// structure and saturating the sum are this design's choices.
module spc_minsum_siso #(
  parameter int unsigned N = tpc_pkg::DEF_N1,
  parameter int unsigned P = tpc_pkg::DEF_P,
  parameter int unsigned Q = tpc_pkg::DEF_Q,
  localparam int unsigned W = 1 + P + Q
) (
  input  logic [N-1:0][W-1:0] lch,     // channel LLRs
  input  logic [N-1:0][W-1:0] le_in,   // extrinsic LLRs from the other dimension
  output logic [N-1:0][W-1:0] le_out,  // extrinsic LLRs of this code
  output logic [N-1:0]        sat      // the a priori sum was clipped
);

  localparam int signed MAXV = (1 << (P + Q)) - 1;
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic signed [W:0]   sum   [N];
  logic signed [W-1:0] lo    [N];
  logic        [W-2:0] mag   [N];
  logic        [N-1:0] neg;
  logic                parity;
  logic        [W-2:0] min1, min2;
  logic        [IW-1:0] idx1;
  logic        [W-2:0] m;

  always_comb begin
    // a priori LLRs, saturated
    for (int j = 0; j < N; j++) begin
      sum[j] = (W+1)'($signed(lch[j])) + (W+1)'($signed(le_in[j]));
      sat[j] = 1'b0;
      if (sum[j] > (W+1)'(MAXV)) begin
        lo[j]  = W'(MAXV);
        sat[j] = 1'b1;
      end else if (sum[j] < -(W+1)'(MAXV)) begin
        lo[j]  = -W'(MAXV);
        sat[j] = 1'b1;
      end else begin
        lo[j]  = sum[j][W-1:0];
      end
      neg[j] = lo[j][W-1];
      mag[j] = neg[j] ? (W-1)'(-lo[j]) : (W-1)'(lo[j]);
    end

    // sign parity, smallest and second smallest magnitude
    parity = ^neg;
    min1   = '1;
    min2   = '1;
    idx1   = '0;
    for (int j = 0; j < N; j++) begin
      if (mag[j] < min1) begin
        min2 = min1;
        min1 = mag[j];
        idx1 = IW'(j);
      end else if (mag[j] < min2) begin
        min2 = mag[j];
      end
    end

    // extrinsic outputs
    for (int j = 0; j < N; j++) begin
      m = (IW'(j) == idx1) ? min2 : min1;
      le_out[j] = (parity ^ neg[j]) ? -W'(m) : W'(m);
    end
  end

endmodule
