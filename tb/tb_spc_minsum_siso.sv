// tb_spc_minsum_siso: self-checking test of the min-sum SPC SISO unit.
//
// The reference forms Lo_j = sat(Lch_j + Le_j) and, for every position j,
// folds the pairwise min-sum check operation sgn(a)sgn(b)min(|a|,|b|) over
// all t != j (sgn(0) = 0), exactly as the decoding rule is written, with no
// min1/min2 shortcut.  Random vectors are biased towards small magnitudes,
// zeros, ties and clipping.  Ends with the TB_RESULT line.
module tb_spc_minsum_siso;
  localparam int N = 16, P = 3, Q = 1, W = 1 + P + Q;
  localparam int MAXV = (1 << (P + Q)) - 1;

  logic [N-1:0][W-1:0] lch, le_in, le_out;
  logic [N-1:0]        sat;
  int checks = 0, failures = 0, n_sat = 0, n_zero = 0;

  spc_minsum_siso #(.N(N), .P(P), .Q(Q)) dut (.lch, .le_in, .le_out, .sat);

  function automatic int sgn(int a);
    return (a > 0) ? 1 : (a < 0) ? -1 : 0;
  endfunction

  function automatic int boxplus(int a, int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    return sgn(a) * sgn(b) * ((ma < mb) ? ma : mb);
  endfunction

  function automatic int rnd_llr(int mode);
    case (mode)
      0: return int'($urandom_range(0, 2*MAXV)) - MAXV;
      1: return int'($urandom_range(0, 6)) - 3;
      default: return ($urandom_range(0, 1) != 0) ? MAXV : -MAXV;
    endcase
  endfunction

  task automatic run_vec(input int mode);
    int lo [N];
    int s, e;
    bit any_sat;
    any_sat = 0;
    for (int j = 0; j < N; j++) begin
      lch[j]   = W'(rnd_llr(mode));
      le_in[j] = W'(rnd_llr($urandom_range(0, 2)));
    end
    #1;
    for (int j = 0; j < N; j++) begin
      s = int'($signed(lch[j])) + int'($signed(le_in[j]));
      if (s > MAXV) begin s = MAXV; any_sat = 1; end
      if (s < -MAXV) begin s = -MAXV; any_sat = 1; end
      lo[j] = s;
      if (s == 0) n_zero++;
    end
    if (any_sat) n_sat++;
    for (int j = 0; j < N; j++) begin
      e = MAXV;
      for (int t = 0; t < N; t++) if (t != j) e = boxplus(e, lo[t]);
      checks++;
      if (int'($signed(le_out[j])) != e) begin
        failures++;
        if (failures < 10) $display("FAIL j=%0d got %0d exp %0d", j, $signed(le_out[j]), e);
      end
    end
    checks++;
    if ((|sat) != any_sat) begin failures++; $display("FAIL sat flag"); end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) run_vec($urandom_range(0, 2));
    if (n_sat == 0 || n_zero == 0) begin failures++; $display("FAIL coverage"); end
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
