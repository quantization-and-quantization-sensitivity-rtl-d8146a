// llr_quantizer: gain control and (P,Q) uniform quantization of one channel LLR.
//
// The channel LLR x (signed, IN_W bits, IN_F fractional bits) is multiplied by
// the scaling factor s (unsigned, SCALE_W bits, SCALE_F fractional bits).  The
// magnitude of the product is rounded to Q fractional bits (round half up on
// the magnitude, so the quantizer is symmetric about zero) and clipped to the
// largest (P,Q) magnitude, 2^P - 2^-Q; the sign is then restored.  The result
// is a (P,Q) word of 1+P+Q bits in two's complement.
//
// Purely combinational.  The scaling ahead of the quantizer, the (P,Q) format
// and saturation follow the published quantization study; the input word
// format, the rounding rule and the width of the gain word are this design's
// choices.
module llr_quantizer #(
  parameter int unsigned IN_W    = tpc_pkg::DEF_IN_W,
  parameter int unsigned IN_F    = tpc_pkg::DEF_IN_F,
  parameter int unsigned SCALE_W = tpc_pkg::DEF_SCALE_W,
  parameter int unsigned SCALE_F = tpc_pkg::DEF_SCALE_F,
  parameter int unsigned P       = tpc_pkg::DEF_P,
  parameter int unsigned Q       = tpc_pkg::DEF_Q,
  localparam int unsigned W      = 1 + P + Q
) (
  input  logic signed [IN_W-1:0]    x,      // channel LLR
  input  logic        [SCALE_W-1:0] scale,  // scaling factor
  output logic signed [W-1:0]       q,      // quantized LLR
  output logic                      sat     // magnitude was clipped
);

  localparam int unsigned PW    = IN_W + SCALE_W;        // product width
  localparam int unsigned SHIFT = IN_F + SCALE_F - Q;    // drop to Q frac bits
  localparam int unsigned MAXM  = (1 << (P + Q)) - 1;    // largest magnitude

  initial begin
    assert (IN_F + SCALE_F > Q) else $error("llr_quantizer: needs IN_F+SCALE_F > Q");
  end

  logic        [IN_W-1:0] mag_in;
  logic        [PW-1:0]   prod;
  logic        [PW-1:0]   rounded;
  logic        [PW-1:0]   mag_q;
  logic        [W-1:0]    mag_sat;

  always_comb begin
    mag_in  = x[IN_W-1] ? IN_W'(-x) : IN_W'(x);
    prod    = PW'(mag_in) * PW'(scale);
    rounded = prod + (PW'(1) << (SHIFT - 1));
    mag_q   = rounded >> SHIFT;
    sat     = (mag_q > PW'(MAXM));
    mag_sat = sat ? W'(MAXM) : W'(mag_q);
    q       = x[IN_W-1] ? -$signed(mag_sat) : $signed(mag_sat);
  end

endmodule
