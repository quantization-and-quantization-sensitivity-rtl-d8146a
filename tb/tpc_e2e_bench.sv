// tpc_e2e_bench: parameterized end-to-end bench for one decoder configuration.
//
// Instantiates tpc_minsum_decoder with the given code lengths and iteration
// count and its own clock.  At SNR 4 dB (per code symbol, sigma^2 = 1/(2 SNR))
// it sends FRAMES random codewords at each of three gains, 0.6, 0.8 and 1.0
// (77, 102 and 128 in 1/128 units), compares every output row bit for bit
// with a reference decoder (quantizer with real arithmetic, literal pairwise
// min-sum check operations), and prints the channel and decoded BER per gain.
// It fails if a row differs, if decoding takes other than ITER*(N1+N2)
// cycles, or if decoding at gain 0.8 does not reduce the bit errors.  Used by
// tb_tpc_workloads to cover code sizes and iteration counts other than the
// defaults.  done rises when all frames have been checked.
module tpc_e2e_bench #(
  parameter int N1 = 16,
  parameter int N2 = 16,
  parameter int ITER = 3,
  parameter int FRAMES = 40
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int P = tpc_pkg::DEF_P, Q = tpc_pkg::DEF_Q;
  localparam int IN_W = tpc_pkg::DEF_IN_W, IN_F = tpc_pkg::DEF_IN_F;
  localparam int SCALE_W = tpc_pkg::DEF_SCALE_W, SCALE_F = tpc_pkg::DEF_SCALE_F;
  localparam int W = 1 + P + Q, MAXV = (1 << (P + Q)) - 1;
  localparam int NPOINTS = 3;
  localparam real SNR_DB = 4.0;

  logic clk = 0, rst_n = 0;
  logic [SCALE_W-1:0] scale = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  logic [N1-1:0][IN_W-1:0] in_llr = '0;
  logic [N1-1:0][W+1:0] out_lc;
  logic [N1-1:0] out_u;
  logic out_qsat, out_dsat, busy;

  tpc_minsum_decoder #(.N1(N1), .N2(N2), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  int gain    [NPOINTS] = '{77, 102, 128};
  int ch_err  [NPOINTS];
  int dec_err [NPOINTS];

  typedef struct {
    int lc   [N2][N1];
    bit u    [N2][N1];
    bit tx   [N2][N1];
    bit hard [N2][N1];
    int point;
  } frame_ref_t;

  frame_ref_t ref_q [$];

  function automatic int sgn(int a);
    return (a > 0) ? 1 : (a < 0) ? -1 : 0;
  endfunction

  function automatic int boxplus(int a, int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    return sgn(a) * sgn(b) * ((ma < mb) ? ma : mb);
  endfunction

  function automatic int satv(int v);
    return (v > MAXV) ? MAXV : (v < -MAXV) ? -MAXV : v;
  endfunction

  function automatic int quant(int xi, int si);
    real v, m;
    int  e;
    v = real'(xi) / real'(1 << IN_F) * real'(si) / real'(1 << SCALE_F);
    m = (v < 0.0) ? -v : v;
    e = int'($floor(m * real'(1 << Q) + 0.5));
    if (e > MAXV) e = MAXV;
    return (v < 0.0) ? -e : e;
  endfunction

  task automatic reference(input int xin [N2][N1], input int si, ref frame_ref_t f);
    int lch [N2][N1];
    int le1 [N2][N1];
    int le2 [N2][N1];
    int lo  [N2][N1];
    int e;
    for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) begin
      lch[i][j] = quant(xin[i][j], si);
      le1[i][j] = 0; le2[i][j] = 0;
    end
    for (int it = 0; it < ITER; it++) begin
      for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) lo[i][j] = satv(lch[i][j] + le2[i][j]);
      for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) begin
        e = MAXV;
        for (int t = 0; t < N1; t++) if (t != j) e = boxplus(e, lo[i][t]);
        le1[i][j] = e;
      end
      for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) lo[i][j] = satv(lch[i][j] + le1[i][j]);
      for (int j = 0; j < N1; j++) for (int i = 0; i < N2; i++) begin
        e = MAXV;
        for (int t = 0; t < N2; t++) if (t != i) e = boxplus(e, lo[t][j]);
        le2[i][j] = e;
      end
    end
    for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) begin
      f.lc[i][j] = lch[i][j] + le1[i][j] + le2[i][j];
      f.u[i][j]  = !(f.lc[i][j] > 0);
    end
  endtask

  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(6.283185307179586 * urand01());
  endfunction

  int cyc = 0, t_last_load = 0, n_in_fire = 0, row = 0;
  bit seen_first = 0;
  frame_ref_t cur;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin n_in_fire++; t_last_load = cyc; end
    if (out_valid && !seen_first && row == 0) begin
      seen_first = 1;
      checks++;
      if (cyc - t_last_load - 1 != ITER * (N1 + N2)) begin
        failures++; $display("FAIL N=%0dx%0d ITER=%0d: decoding took %0d cycles", N2, N1, ITER, cyc - t_last_load - 1);
      end
    end
    if (out_valid && out_ready) begin
      if (ref_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        cur = ref_q[0];
        for (int j = 0; j < N1; j++) begin
          checks += 2;
          if (int'($signed(out_lc[j])) != cur.lc[row][j]) failures++;
          if (out_u[j] != cur.u[row][j]) failures++;
          if (cur.hard[row][j] != cur.tx[row][j]) ch_err[cur.point]++;
          if (out_u[j] != cur.tx[row][j]) dec_err[cur.point]++;
        end
        checks++;
        if (out_last != (row == N2 - 1)) failures++;
        if (row == N2 - 1) begin
          void'(ref_q.pop_front());
          row = 0;
          seen_first = 0;
        end else row++;
      end
    end
  end

  initial begin
    real sigma2, sigma, r, llr;
    int  xin [N2][N1];
    bit  tx  [N2][N1];
    frame_ref_t f;
    int  xi, fires;
    done = 0; checks = 0; failures = 0;
    for (int pt = 0; pt < NPOINTS; pt++) begin ch_err[pt] = 0; dec_err[pt] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    sigma2 = 1.0 / (2.0 * (10.0 ** (SNR_DB / 10.0)));
    sigma  = $sqrt(sigma2);
    for (int pt = 0; pt < NPOINTS; pt++) begin
      for (int fr = 0; fr < FRAMES; fr++) begin
        for (int i = 0; i < N2 - 1; i++) for (int j = 0; j < N1 - 1; j++) tx[i][j] = 1'($urandom);
        for (int i = 0; i < N2 - 1; i++) begin
          tx[i][N1-1] = 0;
          for (int j = 0; j < N1 - 1; j++) tx[i][N1-1] ^= tx[i][j];
        end
        for (int j = 0; j < N1; j++) begin
          tx[N2-1][j] = 0;
          for (int i = 0; i < N2 - 1; i++) tx[N2-1][j] ^= tx[i][j];
        end
        for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) begin
          r   = (tx[i][j] ? -1.0 : 1.0) + sigma * gauss();
          llr = 2.0 * r / sigma2;
          xi  = int'($floor(llr * real'(1 << IN_F) + 0.5));
          if (xi > (1 << (IN_W - 1)) - 1) xi = (1 << (IN_W - 1)) - 1;
          if (xi < -(1 << (IN_W - 1))) xi = -(1 << (IN_W - 1));
          xin[i][j]    = xi;
          f.tx[i][j]   = tx[i][j];
          f.hard[i][j] = (xi <= 0);
        end
        reference(xin, gain[pt], f);
        f.point = pt;
        ref_q.push_back(f);
        scale = SCALE_W'(gain[pt]);
        @(negedge clk);
        for (int i = 0; i < N2; i++) begin
          for (int j = 0; j < N1; j++) in_llr[j] = IN_W'(xin[i][j]);
          in_valid = 1'b1;
          fires = n_in_fire;
          do @(negedge clk); while (n_in_fire == fires);
        end
        in_valid = 1'b0;
      end
    end
    wait (ref_q.size() == 0);
    for (int pt = 0; pt < NPOINTS; pt++)
      $display("code (%0d,%0d)x(%0d,%0d) ITER=%0d SNR 4 dB gain %0d/128: channel BER %e, decoded BER %e over %0d bits",
               N1, N1 - 1, N2, N2 - 1, ITER, gain[pt],
               real'(ch_err[pt]) / real'(FRAMES * N1 * N2),
               real'(dec_err[pt]) / real'(FRAMES * N1 * N2), FRAMES * N1 * N2);
    checks++;
    if (dec_err[1] >= ch_err[1]) begin
      failures++; $display("FAIL N=%0d ITER=%0d: no BER gain at gain 0.8", N1, ITER);
    end
    done = 1;
  end
endmodule
