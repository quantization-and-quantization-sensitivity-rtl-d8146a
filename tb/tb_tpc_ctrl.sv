// tb_tpc_ctrl: self-checking test of the frame sequencer.
//
// Uses unequal code lengths (N1 = 6, N2 = 4) so that row and column counts
// cannot be confused.  Every cycle the testbench logs the controller's action
// (load beat, row decode, column decode, output beat) with its index and
// iteration and compares the log of each frame with the schedule written out
// by nested loops: N2 loads, then ITER times (N2 rows, N1 columns), then N2
// outputs with out_last and clr_ext on the last.  Input and output are
// stalled at random in some frames; in a frame without stalls the number of
// decoding cycles strictly between the last load beat and the first cycle
// with out_valid must be ITER*(N1+N2).  Ends with the TB_RESULT line.
module tb_tpc_ctrl;
  import tpc_pkg::*;
  localparam int N1 = 6, N2 = 4, ITER = 3, FRAMES = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  tpc_state_e state;
  logic [2:0] idx;
  logic load_we, row_we, col_we, clr_ext;
  logic [1:0] iter;
  int checks = 0, failures = 0, frames_done = 0, n_in_stall = 0, n_out_stall = 0;
  bit stall_mode;

  tpc_ctrl #(.N1(N1), .N2(N2), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  // expected action log of one frame
  string exp_log [$];
  string got_log [$];
  int    t_last_load, t_first_out, cyc = 0;
  bit    seen_out;

  function automatic void build_expected();
    exp_log.delete();
    for (int r = 0; r < N2; r++) exp_log.push_back($sformatf("L%0d", r));
    for (int it = 0; it < ITER; it++) begin
      for (int r = 0; r < N2; r++) exp_log.push_back($sformatf("R%0d.%0d", r, it));
      for (int c = 0; c < N1; c++) exp_log.push_back($sformatf("C%0d.%0d", c, it));
    end
    for (int r = 0; r < N2; r++)
      exp_log.push_back($sformatf("O%0d%s", r, (r == N2 - 1) ? "LX" : ""));
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
    if (load_we) begin got_log.push_back($sformatf("L%0d", idx)); t_last_load = cyc; end
    if (row_we) got_log.push_back($sformatf("R%0d.%0d", idx, iter));
    if (col_we) got_log.push_back($sformatf("C%0d.%0d", idx, iter));
    if (out_valid && !seen_out) begin seen_out = 1; t_first_out = cyc; end
    if (out_valid && out_ready)
      got_log.push_back($sformatf("O%0d%s%s", idx, out_last ? "L" : "", clr_ext ? "X" : ""));
    checks++;
    if ((load_we + row_we + col_we) > 1) begin failures++; $display("FAIL two actions"); end
    if (out_valid && out_ready && out_last) begin
      // frame complete: compare
      checks++;
      if (got_log.size() != exp_log.size()) begin
        failures++;
        $display("FAIL frame %0d: %0d actions, expected %0d", frames_done, got_log.size(), exp_log.size());
      end else begin
        foreach (exp_log[k]) if (got_log[k] != exp_log[k]) begin
          failures++;
          $display("FAIL frame %0d action %0d: %s expected %s", frames_done, k, got_log[k], exp_log[k]);
          break;
        end
      end
      if (!stall_mode) begin
        checks++;
        if (t_first_out - t_last_load - 1 != ITER * (N1 + N2)) begin
          failures++;
          $display("FAIL latency %0d", t_first_out - t_last_load);
        end
      end
      got_log.delete();
      seen_out = 0;
      frames_done++;
    end
  end

  // stimulus
  always @(negedge clk) begin
    stall_mode = (frames_done % 2 == 1);
    in_valid  <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
    out_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    build_expected();
    seen_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (frames_done == FRAMES);
    if (n_in_stall == 0 || n_out_stall == 0) begin
      failures++; $display("FAIL stalls not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
