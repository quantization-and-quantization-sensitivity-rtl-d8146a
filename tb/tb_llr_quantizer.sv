// tb_llr_quantizer: self-checking test of the gain + (P,Q) uniform quantizer.
//
// Drives directed corner values (zero, exact half steps, the clipping point,
// the most negative input) and random inputs at several scaling factors.  The
// expected value is computed with real arithmetic: |x*s| rounded to the
// nearest multiple of 2^-Q (halves away from zero), clipped to 2^P - 2^-Q,
// with the sign of x.  Ends with the TB_RESULT line.
module tb_llr_quantizer;
  localparam int IN_W = 12, IN_F = 6, SCALE_W = 8, SCALE_F = 7, P = 3, Q = 1;
  localparam int W = 1 + P + Q;

  logic signed [IN_W-1:0]  x;
  logic [SCALE_W-1:0]      scale;
  logic signed [W-1:0]     q;
  logic                    sat;
  int checks = 0, failures = 0, n_sat = 0;

  llr_quantizer #(.IN_W(IN_W), .IN_F(IN_F), .SCALE_W(SCALE_W), .SCALE_F(SCALE_F),
                  .P(P), .Q(Q)) dut (.x, .scale, .q, .sat);

  task automatic check_one(input int xi, input int si);
    real v, m;
    int  e_mag, e;
    bit  e_sat;
    x = IN_W'(xi);
    scale = SCALE_W'(si);
    #1;
    v = real'(xi) / real'(1 << IN_F) * real'(si) / real'(1 << SCALE_F);
    m = (v < 0.0) ? -v : v;
    e_mag = int'($floor(m * real'(1 << Q) + 0.5));
    e_sat = (e_mag > (1 << (P + Q)) - 1);
    if (e_sat) e_mag = (1 << (P + Q)) - 1;
    e = (v < 0.0) ? -e_mag : e_mag;
    checks++;
    if (int'(q) != e || sat != e_sat) begin
      failures++;
      $display("FAIL x=%0d s=%0d q=%0d sat=%0b exp %0d %0b", xi, si, q, sat, e, e_sat);
    end
    if (sat) n_sat++;
  endtask

  initial begin
    // directed: scale 1.0 (128) keeps the value, step is 0.5 = 32 input LSBs
    check_one(0, 128);
    check_one(15, 128);    // 0.234 -> 0
    check_one(16, 128);    // 0.25  -> 0.5 (half rounds up in magnitude)
    check_one(-16, 128);   // -0.25 -> -0.5 (symmetric)
    check_one(32, 128);    // 0.5
    check_one(-32, 128);
    check_one(480, 128);   // 7.5, the largest level
    check_one(495, 128);   // 7.73 -> 7.5 without clipping flag
    check_one(496, 128);   // 7.75 rounds to 8.0 -> clipped
    check_one(-2048, 128); // most negative input
    check_one(2047, 255);
    check_one(100, 0);     // zero gain
    check_one(-200, 102);  // gain 0.8
    for (int i = 0; i < 3000; i++) begin
      check_one(int'($urandom_range(0, 4095)) - 2048, int'($urandom_range(0, 255)));
    end
    if (n_sat == 0) begin failures++; $display("FAIL no clipping seen"); end
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
