// tpc_ctrl: frame sequencer of the iterative TPC/SPC decoder.
//
// One frame passes through four phases (tpc_pkg::tpc_state_e):
//   LOAD  N2 input beats, one row of channel LLRs each (in_valid/in_ready);
//   ROW   N2 cycles, one row code C1 decoded per cycle (ld/row write of Le1);
//   COL   N1 cycles, one column code C2 decoded per cycle (write of Le2);
//         ROW and COL alternate until ITER iterations are done;
//   OUT   N2 output beats, one row of soft outputs and decisions each
//         (out_valid/out_ready); the last beat also clears the extrinsic
//         buffers so the next frame starts with Le = 0.
// With no back-pressure a frame takes N2 + ITER*(N2+N1) + N2 cycles
// (32 + 96 cycles of decoding for the default (16,15)^2 code and 3 iterations).
// A valid/ready beat transfers when both are high at a rising edge.
//
// The row-then-column schedule and the iteration count follow the published
// quantization study; the one-row-or-column-per-cycle schedule and the
// handshakes are this design's choices.
module tpc_ctrl #(
  parameter int unsigned N1   = tpc_pkg::DEF_N1,
  parameter int unsigned N2   = tpc_pkg::DEF_N2,
  parameter int unsigned ITER = tpc_pkg::DEF_ITER,
  localparam int unsigned AW  = $clog2((N1 > N2 ? N1 : N2) > 1 ? (N1 > N2 ? N1 : N2) : 2),
  localparam int unsigned TW  = $clog2(ITER > 1 ? ITER : 2)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  output logic                out_valid,
  input  logic                out_ready,
  output logic                out_last,   // last row of the frame
  output tpc_pkg::tpc_state_e state,
  output logic [AW-1:0]       idx,        // row (LOAD/ROW/OUT) or column (COL)
  output logic                load_we,    // write quantized row into Lch
  output logic                row_we,     // write Le1 row from the row decoder
  output logic                col_we,     // write Le2 column from the column decoder
  output logic                clr_ext,    // clear Le1 and Le2
  output logic [TW-1:0]       iter        // current iteration, 0-based
);

  import tpc_pkg::*;

  tpc_state_e state_q;
  logic [AW-1:0] idx_q;
  logic [TW-1:0] iter_q;

  logic in_fire, out_fire, idx_last;

  always_comb begin
    state     = state_q;
    idx       = idx_q;
    iter      = iter_q;
    in_ready  = (state_q == ST_LOAD);
    out_valid = (state_q == ST_OUT);
    in_fire   = in_valid && in_ready;
    out_fire  = out_valid && out_ready;
    idx_last  = (state_q == ST_COL) ? (idx_q == AW'(N1 - 1)) : (idx_q == AW'(N2 - 1));
    out_last  = out_valid && idx_last;
    load_we   = in_fire;
    row_we    = (state_q == ST_ROW);
    col_we    = (state_q == ST_COL);
    clr_ext   = out_fire && idx_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_LOAD;
      idx_q   <= '0;
      iter_q  <= '0;
    end else begin
      unique case (state_q)
        ST_LOAD: if (in_fire) begin
          idx_q <= idx_last ? '0 : idx_q + 1'b1;
          if (idx_last) begin
            state_q <= ST_ROW;
            iter_q  <= '0;
          end
        end
        ST_ROW: begin
          idx_q <= idx_last ? '0 : idx_q + 1'b1;
          if (idx_last) state_q <= ST_COL;
        end
        ST_COL: begin
          idx_q <= idx_last ? '0 : idx_q + 1'b1;
          if (idx_last) begin
            if (iter_q == TW'(ITER - 1)) begin
              state_q <= ST_OUT;
            end else begin
              state_q <= ST_ROW;
              iter_q  <= iter_q + 1'b1;
            end
          end
        end
        ST_OUT: if (out_fire) begin
          idx_q <= idx_last ? '0 : idx_q + 1'b1;
          if (idx_last) state_q <= ST_LOAD;
        end
        default: state_q <= ST_LOAD;
      endcase
    end
  end

endmodule
