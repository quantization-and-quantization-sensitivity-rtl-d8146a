// tpc_minsum_decoder: quantized min-sum iterative decoder for 2-D TPC/SPC codes.
//
// The code is an (N1,N1-1) x (N2,N2-1) product of even single-parity-check
// codes (default (16,15)^2, rate 225/256).  Channel LLRs arrive one row of N1
// words per beat.  Each word passes through a gain (scaling factor) and a
// uniform (P,Q) quantizer (default (3,1): 5-bit words, step 0.5, range +-7.5)
// and is stored in the Lch buffer.  The decoder then runs ITER iterations
// (default 3) of the message-passing schedule:
//   row pass    for each row i:    Lo = Lch + Le2, Le1 = minsum_extrinsic(Lo)
//   column pass for each column j: Lo = Lch + Le1, Le2 = minsum_extrinsic(Lo)
// one row or column per cycle through two SISO units, with Le2 = 0 before the
// first row pass.  Finally each row is delivered with its soft output
// Lc = Lch + Le1 + Le2 and hard decisions u = (Lc > 0) ? 0 : 1.
//
// Interface: in_valid/in_ready carry in_llr (N1 signed IN_W-bit channel LLRs
// with IN_F fractional bits, element j = column j); out_valid/out_ready carry
// out_lc (N1 signed W+2-bit words on the (P,Q) scale), out_u and out_last on
// the final row.  scale is the unsigned gain (SCALE_F fractional bits) and must
// stay constant while a frame loads.  Timing: N2 load beats, ITER*(N2+N1)
// decoding cycles, N2 output beats; one frame at a time.
//
// The algorithm, the (3,1) format, the scaling ahead of the quantizer, the
// code and the iteration count follow the published quantization study.  The
// row/column-serial architecture, flip-flop buffers, word formats at the ports
// and handshakes and the per-frame saturation flags are this design's own.
module tpc_minsum_decoder #(
  parameter int unsigned N1      = tpc_pkg::DEF_N1,
  parameter int unsigned N2      = tpc_pkg::DEF_N2,
  parameter int unsigned P       = tpc_pkg::DEF_P,
  parameter int unsigned Q       = tpc_pkg::DEF_Q,
  parameter int unsigned ITER    = tpc_pkg::DEF_ITER,
  parameter int unsigned IN_W    = tpc_pkg::DEF_IN_W,
  parameter int unsigned IN_F    = tpc_pkg::DEF_IN_F,
  parameter int unsigned SCALE_W = tpc_pkg::DEF_SCALE_W,
  parameter int unsigned SCALE_F = tpc_pkg::DEF_SCALE_F,
  localparam int unsigned W      = 1 + P + Q
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [SCALE_W-1:0]        scale,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [N1-1:0][IN_W-1:0]   in_llr,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic                      out_last,
  output logic [N1-1:0][W+1:0]      out_lc,
  output logic [N1-1:0]             out_u,
  output logic                      out_qsat,  // a quantizer clipped in this frame
  output logic                      out_dsat,  // an a priori sum clipped in this frame
  output logic                      busy       // decoding or delivering a frame
);

  localparam int unsigned AW = $clog2((N1 > N2 ? N1 : N2) > 1 ? (N1 > N2 ? N1 : N2) : 2);
  localparam int unsigned RW = $clog2(N2 > 1 ? N2 : 2);
  localparam int unsigned CW = $clog2(N1 > 1 ? N1 : 2);

  tpc_pkg::tpc_state_e state;
  logic [AW-1:0] idx;
  logic load_we, row_we, col_we, clr_ext;

  tpc_ctrl #(.N1(N1), .N2(N2), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready, .out_last,
    .state, .idx, .load_we, .row_we, .col_we, .clr_ext, .iter()
  );

  // ---- quantizers, one per column of the incoming row
  logic [N1-1:0][W-1:0] q_row;
  logic [N1-1:0]        q_sat;

  for (genvar j = 0; j < N1; j++) begin : g_quant
    llr_quantizer #(
      .IN_W(IN_W), .IN_F(IN_F), .SCALE_W(SCALE_W), .SCALE_F(SCALE_F), .P(P), .Q(Q)
    ) u_q (
      .x(in_llr[j]), .scale, .q(q_row[j]), .sat(q_sat[j])
    );
  end

  // ---- buffers
  logic [N1-1:0][W-1:0] lch_row, le1_row, le2_row, le1_new;
  logic [N2-1:0][W-1:0] lch_col, le1_col, le2_new;
  logic [RW-1:0] raddr;
  logic [CW-1:0] caddr;

  assign raddr = RW'(idx);
  assign caddr = CW'(idx);

  llr_matrix #(.ROWS(N2), .COLS(N1), .W(W)) u_lch (
    .clk, .rst_n, .clr(1'b0),
    .row_we(load_we), .row_waddr(raddr), .row_wdata(q_row),
    .row_raddr(raddr), .row_rdata(lch_row),
    .col_we(1'b0), .col_waddr(caddr), .col_wdata('0),
    .col_raddr(caddr), .col_rdata(lch_col)
  );

  llr_matrix #(.ROWS(N2), .COLS(N1), .W(W)) u_le1 (
    .clk, .rst_n, .clr(clr_ext),
    .row_we(row_we), .row_waddr(raddr), .row_wdata(le1_new),
    .row_raddr(raddr), .row_rdata(le1_row),
    .col_we(1'b0), .col_waddr(caddr), .col_wdata('0),
    .col_raddr(caddr), .col_rdata(le1_col)
  );

  llr_matrix #(.ROWS(N2), .COLS(N1), .W(W)) u_le2 (
    .clk, .rst_n, .clr(clr_ext),
    .row_we(1'b0), .row_waddr(raddr), .row_wdata('0),
    .row_raddr(raddr), .row_rdata(le2_row),
    .col_we(col_we), .col_waddr(caddr), .col_wdata(le2_new),
    .col_raddr(caddr), .col_rdata()
  );

  // ---- component decoders
  logic [N1-1:0] row_sat;
  logic [N2-1:0] col_sat;

  spc_minsum_siso #(.N(N1), .P(P), .Q(Q)) u_row_dec (
    .lch(lch_row), .le_in(le2_row), .le_out(le1_new), .sat(row_sat)
  );

  spc_minsum_siso #(.N(N2), .P(P), .Q(Q)) u_col_dec (
    .lch(lch_col), .le_in(le1_col), .le_out(le2_new), .sat(col_sat)
  );

  // ---- soft output and decisions of the addressed row
  soft_decision #(.N(N1), .W(W)) u_dec (
    .lch(lch_row), .le1(le1_row), .le2(le2_row), .lc(out_lc), .u_hat(out_u)
  );

  // ---- per-frame saturation flags, cleared when the last row leaves
  logic qsat_q, dsat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qsat_q <= 1'b0;
      dsat_q <= 1'b0;
    end else if (clr_ext) begin
      qsat_q <= 1'b0;
      dsat_q <= 1'b0;
    end else begin
      if (load_we && |q_sat)                          qsat_q <= 1'b1;
      if ((row_we && |row_sat) || (col_we && |col_sat)) dsat_q <= 1'b1;
    end
  end

  assign out_qsat = qsat_q;
  assign out_dsat = dsat_q;
  assign busy     = (state != tpc_pkg::ST_LOAD);

endmodule
