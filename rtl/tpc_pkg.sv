// tpc_pkg: constants and types shared by the TPC/SPC min-sum decoder.
//
// The decoder works on a two-dimensional product code whose rows and columns
// are even single-parity-check (SPC) codes, (N1,N1-1) x (N2,N2-1).  Every LLR
// inside the decoder is a (P,Q) fixed-point number: one sign bit, P integer
// bits and Q fractional bits, held here as two's complement and saturated to
// the symmetric range +-(2^(P+Q)-1) LSBs, so it takes exactly the 2^(P+Q+1)-1
// levels of a sign + magnitude word.
//
// Defaults follow the published quantization study: the (16,15)^2 code, the
// (3,1) uniform format and 3 decoding iterations.  The controller state type
// is this design's own.
package tpc_pkg;

  localparam int unsigned DEF_N1   = 16;  // row code length
  localparam int unsigned DEF_N2   = 16;  // column code length
  localparam int unsigned DEF_P    = 3;   // integer bits of an LLR
  localparam int unsigned DEF_Q    = 1;   // fractional bits of an LLR
  localparam int unsigned DEF_ITER = 3;   // decoding iterations

  // Channel LLR word delivered by the front end, and the gain word.
  localparam int unsigned DEF_IN_W    = 12; // signed channel LLR width
  localparam int unsigned DEF_IN_F    = 6;  // its fractional bits
  localparam int unsigned DEF_SCALE_W = 8;  // unsigned scaling factor width
  localparam int unsigned DEF_SCALE_F = 7;  // its fractional bits

  // Phases of one frame in the decoder.
  typedef enum logic [1:0] {
    ST_LOAD = 2'd0,   // accept channel rows
    ST_ROW  = 2'd1,   // decode row codes C1, one row per cycle
    ST_COL  = 2'd2,   // decode column codes C2, one column per cycle
    ST_OUT  = 2'd3    // deliver soft outputs and decisions, one row per beat
  } tpc_state_e;

endpackage
