// llr_matrix: ROWS x COLS buffer of (P,Q) LLR words with a row and a column port.
//
// The iterative decoder walks the code array first along rows (row code C1)
// and then along columns (column code C2), so its buffers must deliver and
// accept a whole row or a whole column in one cycle.  The array is held in
// flip-flops: reads are combinational (row_rdata follows row_raddr, col_rdata
// follows col_raddr in the same cycle), writes take effect at the rising clock
// edge.  A row write and a column write in the same cycle must not both be
// enabled; the row write wins if they are.  clr zeroes the whole array at the
// next edge (used to start a frame with Le = 0); rst_n zeroes it
// asynchronously.
//
// The published quantization study sets the word length of these buffers (the
// (P,Q) format) but not their organisation; the dual row/column flip-flop
// array is this design's choice.
module llr_matrix #(
  parameter int unsigned ROWS = tpc_pkg::DEF_N2,
  parameter int unsigned COLS = tpc_pkg::DEF_N1,
  parameter int unsigned W    = 1 + tpc_pkg::DEF_P + tpc_pkg::DEF_Q,
  localparam int unsigned RW  = $clog2(ROWS > 1 ? ROWS : 2),
  localparam int unsigned CW  = $clog2(COLS > 1 ? COLS : 2)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  // row port
  input  logic                   row_we,
  input  logic [RW-1:0]          row_waddr,
  input  logic [COLS-1:0][W-1:0] row_wdata,
  input  logic [RW-1:0]          row_raddr,
  output logic [COLS-1:0][W-1:0] row_rdata,
  // column port
  input  logic                   col_we,
  input  logic [CW-1:0]          col_waddr,
  input  logic [ROWS-1:0][W-1:0] col_wdata,
  input  logic [CW-1:0]          col_raddr,
  output logic [ROWS-1:0][W-1:0] col_rdata
);

  logic [ROWS-1:0][COLS-1:0][W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (clr) begin
      mem <= '0;
    end else if (row_we) begin
      mem[row_waddr] <= row_wdata;
    end else if (col_we) begin
      for (int r = 0; r < ROWS; r++) mem[r][col_waddr] <= col_wdata[r];
    end
  end

  always_comb begin
    row_rdata = mem[row_raddr];
    for (int r = 0; r < ROWS; r++) col_rdata[r] = mem[r][col_raddr];
  end

endmodule
