// tb_tpc_minsum_decoder: end-to-end test of the TPC/SPC min-sum decoder at its
// default size, the (16,15)^2 code with (3,1) LLRs and 3 iterations.
//
// Each frame is a random (16,15)^2 codeword (15x15 data bits, even parity on
// every row and column, including the parity-on-parity corner), sent as
// antipodal symbols (0 -> +1, 1 -> -1) over an AWGN channel at a given SNR
// per code symbol (sigma^2 = 1/(2 SNR)).  The channel LLRs 2r/sigma^2 go to
// the decoder in a 12-bit format with 6 fractional bits.  A reference decoder
// in the testbench quantizes them with real arithmetic and runs the
// row/column min-sum schedule literally (pairwise check operations over all
// other positions), and every output row is compared bit for bit: soft output
// Lc, decisions and the two saturation flags.
//
// 100 frames each are run at SNR 2 dB (scaling factor 1.0), 4 dB (0.8, the best value near
// 4 dB), 6 dB (0.8) and at 4 dB with a deliberately large gain (1.99).  Every
// second frame stalls the input (in_valid gaps) and the output (out_ready
// low).  The testbench counts, and fails if one never happens: input stalls,
// output back-pressure, quantizer clipping, clipping of an a priori sum,
// channel bit errors corrected by the decoder, and frames whose decoding
// cycles (last load beat to first output) equal ITER*(N1+N2) = 96.  It also
// prints the channel and decoded bit error rates per SNR point and requires
// the decoded BER at 4 dB to be at most a quarter of the channel BER.  Handshake rules
// on the output are checked by assertions.
module tb_tpc_minsum_decoder;
  import tpc_pkg::*;
  localparam int N1 = DEF_N1, N2 = DEF_N2, P = DEF_P, Q = DEF_Q, ITER = DEF_ITER;
  localparam int IN_W = DEF_IN_W, IN_F = DEF_IN_F, SCALE_W = DEF_SCALE_W, SCALE_F = DEF_SCALE_F;
  localparam int W = 1 + P + Q, MAXV = (1 << (P + Q)) - 1;
  localparam int FRAMES_PER_POINT = 100;
  localparam int NPOINTS = 4;

  logic clk = 0, rst_n = 0;
  logic [SCALE_W-1:0] scale = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic [N1-1:0][IN_W-1:0] in_llr = '0;
  logic [N1-1:0][W+1:0] out_lc;
  logic [N1-1:0] out_u;
  logic out_qsat, out_dsat, busy;

  tpc_minsum_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_qsat = 0, n_dsat = 0, n_corrected = 0;
  int n_latency_ok = 0, cyc = 0;

  // ---------------------------------------------------------------- handshakes
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                out_valid && !out_ready |=> out_valid && $stable(out_lc) && $stable(out_u))
    else begin failures++; $display("FAIL out_valid dropped or data changed under back-pressure"); end
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(in_ready && out_valid))
    else begin failures++; $display("FAIL in_ready and out_valid together"); end

  // ---------------------------------------------------------------- reference
  typedef int mat_t [N2][N1];

  typedef struct {
    int  lc    [N2][N1];
    bit  u     [N2][N1];
    bit  tx    [N2][N1];
    bit  hard  [N2][N1];
    bit  qsat;
    bit  dsat;
    bit  stall;
    int  point;
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

  function automatic int satv(int v, ref bit flag);
    if (v > MAXV) begin flag = 1; return MAXV; end
    if (v < -MAXV) begin flag = 1; return -MAXV; end
    return v;
  endfunction

  function automatic int quant(int xi, int si, ref bit flag);
    real v, m;
    int  e;
    v = real'(xi) / real'(1 << IN_F) * real'(si) / real'(1 << SCALE_F);
    m = (v < 0.0) ? -v : v;
    e = int'($floor(m * real'(1 << Q) + 0.5));
    if (e > MAXV) begin e = MAXV; flag = 1; end
    return (v < 0.0) ? -e : e;
  endfunction

  task automatic reference(input int xin [N2][N1], input int si, ref frame_ref_t f);
    int lch [N2][N1];
    int le1 [N2][N1];
    int le2 [N2][N1];
    int lo  [N2][N1];
    int e;
    f.qsat = 0; f.dsat = 0;
    for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) begin
      lch[i][j] = quant(xin[i][j], si, f.qsat);
      le1[i][j] = 0; le2[i][j] = 0;
    end
    for (int it = 0; it < ITER; it++) begin
      // decoding C1 (rows)
      for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++)
        lo[i][j] = satv(lch[i][j] + le2[i][j], f.dsat);
      for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++) begin
        e = MAXV;
        for (int t = 0; t < N1; t++) if (t != j) e = boxplus(e, lo[i][t]);
        le1[i][j] = e;
      end
      // decoding C2 (columns)
      for (int i = 0; i < N2; i++) for (int j = 0; j < N1; j++)
        lo[i][j] = satv(lch[i][j] + le1[i][j], f.dsat);
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

  // ---------------------------------------------------------------- channel
  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(6.283185307179586 * urand01());
  endfunction

  // SNR in dB and gain (SCALE_F fractional bits) of each test point
  real snr_db [NPOINTS] = '{2.0, 4.0, 6.0, 4.0};
  int  gain   [NPOINTS] = '{128, 102, 102, 255};
  int  ch_err [NPOINTS];
  int  dec_err[NPOINTS];

  // ---------------------------------------------------------------- driver
  int xin_q [$];  // flattened channel words, frame after frame
  int t_last_load = 0;
  int n_in_fire = 0;

  task automatic run_point(input int pt);
    real sigma2, sigma, r, llr;
    int  xin [N2][N1];
    bit  tx  [N2][N1];
    frame_ref_t f;
    int  xi;
    int  fires;
    sigma2 = 1.0 / (2.0 * (10.0 ** (snr_db[pt] / 10.0)));
    sigma  = $sqrt(sigma2);
    for (int fr = 0; fr < FRAMES_PER_POINT; fr++) begin
      // codeword
      for (int i = 0; i < N2 - 1; i++) for (int j = 0; j < N1 - 1; j++) tx[i][j] = 1'($urandom);
      for (int i = 0; i < N2 - 1; i++) begin
        tx[i][N1-1] = 0;
        for (int j = 0; j < N1 - 1; j++) tx[i][N1-1] ^= tx[i][j];
      end
      for (int j = 0; j < N1; j++) begin
        tx[N2-1][j] = 0;
        for (int i = 0; i < N2 - 1; i++) tx[N2-1][j] ^= tx[i][j];
      end
      // channel
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
      f.stall = (fr % 2 == 1);
      f.point = pt;
      ref_q.push_back(f);
      // send the frame (the gain may change once the previous frame is loaded)
      scale = SCALE_W'(gain[pt]);
      @(negedge clk);
      for (int i = 0; i < N2; i++) begin
        if (f.stall) while ($urandom_range(0, 2) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        for (int j = 0; j < N1; j++) in_llr[j] = IN_W'(xin[i][j]);
        in_valid = 1'b1;
        fires = n_in_fire;
        do @(negedge clk); while (n_in_fire == fires);
      end
      in_valid = 1'b0;
    end
  endtask

  // ---------------------------------------------------------------- monitor
  int row = 0;
  bit seen_first = 0;
  frame_ref_t cur;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      n_in_fire++;
      t_last_load = cyc;
    end
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !seen_first && row == 0 && ref_q.size() > 0) begin
      seen_first = 1;
      if (!ref_q[0].stall) begin
        checks++;
        if (cyc - t_last_load - 1 == ITER * (N1 + N2)) n_latency_ok++;
        else begin failures++; $display("FAIL decoding took %0d cycles", cyc - t_last_load - 1); end
      end
    end
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      if (ref_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        cur = ref_q[0];
        for (int j = 0; j < N1; j++) begin
          checks += 2;
          if (int'($signed(out_lc[j])) != cur.lc[row][j]) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d col %0d lc %0d exp %0d", row, j, $signed(out_lc[j]), cur.lc[row][j]);
          end
          if (out_u[j] != cur.u[row][j]) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d col %0d u", row, j);
          end
          if (cur.hard[row][j] != cur.tx[row][j]) ch_err[cur.point]++;
          if (out_u[j] != cur.tx[row][j]) dec_err[cur.point]++;
          if (cur.hard[row][j] != cur.tx[row][j] && out_u[j] == cur.tx[row][j]) n_corrected++;
        end
        checks++;
        if (out_last != (row == N2 - 1)) begin failures++; $display("FAIL out_last"); end
        checks += 2;
        if (out_qsat != cur.qsat) begin failures++; $display("FAIL qsat flag"); end
        if (out_dsat != cur.dsat) begin failures++; $display("FAIL dsat flag"); end
        if (row == N2 - 1) begin
          if (cur.qsat) n_qsat++;
          if (cur.dsat) n_dsat++;
          void'(ref_q.pop_front());
          row = 0;
          seen_first = 0;
        end else begin
          row++;
        end
      end
    end
  end

  // output back-pressure, only in stalling frames
  always @(negedge clk)
    out_ready <= (ref_q.size() > 0 && ref_q[0].stall) ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int pt = 0; pt < NPOINTS; pt++) run_point(pt);
    wait (ref_q.size() == 0);
    repeat (2) @(posedge clk);
    for (int pt = 0; pt < NPOINTS; pt++)
      $display("SNR %0.1f dB gain %0d/128: channel BER %e (%0d), decoded BER %e (%0d) over %0d bits",
               snr_db[pt], gain[pt],
               real'(ch_err[pt]) / real'(FRAMES_PER_POINT * N1 * N2), ch_err[pt],
               real'(dec_err[pt]) / real'(FRAMES_PER_POINT * N1 * N2), dec_err[pt],
               FRAMES_PER_POINT * N1 * N2);
    $display("events: in_stall=%0d out_stall=%0d qsat_frames=%0d dsat_frames=%0d corrected=%0d latency_ok=%0d",
             n_in_stall, n_out_stall, n_qsat, n_dsat, n_corrected, n_latency_ok);
    if (n_in_stall == 0)   begin failures++; $display("FAIL no input stall"); end
    if (n_out_stall == 0)  begin failures++; $display("FAIL no output back-pressure"); end
    if (n_qsat == 0)       begin failures++; $display("FAIL no quantizer clipping"); end
    if (n_dsat == 0)       begin failures++; $display("FAIL no a priori clipping"); end
    if (n_corrected == 0)  begin failures++; $display("FAIL no corrected error"); end
    if (n_latency_ok == 0) begin failures++; $display("FAIL no latency check"); end
    checks++;
    if (4 * dec_err[1] > ch_err[1]) begin failures++; $display("FAIL less than 4x BER gain at 4 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
