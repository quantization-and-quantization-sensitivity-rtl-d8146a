// tb_llr_matrix: self-checking test of the row/column LLR buffer.
//
// A shadow array in the testbench follows every write; random row writes,
// column writes, clears and reads on both ports are compared with it each
// cycle, including reads of a row or column just written (visible on the
// next cycle) and the priority of a row write over a simultaneous column
// write.  Ends with the TB_RESULT line.
module tb_llr_matrix;
  localparam int ROWS = 16, COLS = 16, W = 5;

  logic clk = 0, rst_n = 0, clr = 0;
  logic row_we = 0, col_we = 0;
  logic [3:0] row_waddr = 0, row_raddr = 0, col_waddr = 0, col_raddr = 0;
  logic [COLS-1:0][W-1:0] row_wdata = '0, row_rdata;
  logic [ROWS-1:0][W-1:0] col_wdata = '0, col_rdata;
  logic [W-1:0] shadow [ROWS][COLS];
  int checks = 0, failures = 0, cycles = 0, n_clr = 0;

  llr_matrix #(.ROWS(ROWS), .COLS(COLS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare();
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (row_rdata[c] != shadow[row_raddr][c]) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d col %0d", row_raddr, c);
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (col_rdata[r] != shadow[r][col_raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL col %0d row %0d", col_raddr, r);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) shadow[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      compare();
      row_we    = ($urandom_range(0, 2) == 0);
      col_we    = ($urandom_range(0, 2) == 0);
      clr       = ($urandom_range(0, 150) == 0);
      row_waddr = 4'($urandom);
      col_waddr = 4'($urandom);
      row_raddr = 4'($urandom);
      col_raddr = 4'($urandom);
      for (int c = 0; c < COLS; c++) row_wdata[c] = W'($urandom);
      for (int r = 0; r < ROWS; r++) col_wdata[r] = W'($urandom);
      #1;
      compare();
      @(posedge clk);
      if (clr) begin
        n_clr++;
        for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) shadow[r][c] = '0;
      end else if (row_we) begin
        for (int c = 0; c < COLS; c++) shadow[row_waddr][c] = row_wdata[c];
      end else if (col_we) begin
        for (int r = 0; r < ROWS; r++) shadow[r][col_waddr] = col_wdata[r];
      end
    end
    if (n_clr == 0) begin failures++; $display("FAIL no clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
