// tb_tpc_workloads: the decoder at the other evaluated configurations.
//
// Runs four tpc_e2e_bench instances side by side: the (32,31)^2 code with 3
// iterations (checks that the design scales to the longer, higher-rate code
// and that the useful gain stays near 0.8 at 4 dB), and the default (16,15)^2
// code with 1, 2 and 4 iterations.  Each bench checks every output bit for
// bit against its own reference decoder and prints the BER per gain.  The
// testbench ends with the TB_RESULT line summed over all four, or after a
// cycle watchdog.
module tb_tpc_workloads;
  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;
  logic clk = 0;
  int   checks, failures;

  tpc_e2e_bench #(.N1(32), .N2(32), .ITER(3), .FRAMES(40)) b_n32_i3 (.done(d0), .checks(c0), .failures(f0));
  tpc_e2e_bench #(.N1(16), .N2(16), .ITER(1), .FRAMES(60)) b_n16_i1 (.done(d1), .checks(c1), .failures(f1));
  tpc_e2e_bench #(.N1(16), .N2(16), .ITER(2), .FRAMES(60)) b_n16_i2 (.done(d2), .checks(c2), .failures(f2));
  tpc_e2e_bench #(.N1(16), .N2(16), .ITER(4), .FRAMES(60)) b_n16_i4 (.done(d3), .checks(c3), .failures(f3));

  always #5 clk = ~clk;

  initial begin
    #1;
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
