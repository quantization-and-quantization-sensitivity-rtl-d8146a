// tb_soft_decision: self-checking test of the soft-output and decision unit.
//
// Random and extreme (P,Q) operands; the reference adds the three signed
// values as integers and decides 0 only for a strictly positive sum.
// Ends with the TB_RESULT line.
module tb_soft_decision;
  localparam int N = 16, W = 5, MAXV = 15;

  logic [N-1:0][W-1:0] lch, le1, le2;
  logic [N-1:0][W+1:0] lc;
  logic [N-1:0]        u_hat;
  int checks = 0, failures = 0, n_zero = 0;

  soft_decision #(.N(N), .W(W)) dut (.lch, .le1, .le2, .lc, .u_hat);

  function automatic int rv();
    case ($urandom_range(0, 3))
      0: return MAXV;
      1: return -MAXV;
      2: return int'($urandom_range(0, 4)) - 2;
      default: return int'($urandom_range(0, 2*MAXV)) - MAXV;
    endcase
  endfunction

  initial begin
    int a, b, c, s;
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < N; j++) begin
        lch[j] = W'(rv()); le1[j] = W'(rv()); le2[j] = W'(rv());
      end
      #1;
      for (int j = 0; j < N; j++) begin
        a = int'($signed(lch[j])); b = int'($signed(le1[j])); c = int'($signed(le2[j]));
        s = a + b + c;
        if (s == 0) n_zero++;
        checks += 2;
        if (int'($signed(lc[j])) != s) begin
          failures++;
          if (failures < 10) $display("FAIL lc %0d exp %0d", $signed(lc[j]), s);
        end
        if (u_hat[j] != (s > 0 ? 1'b0 : 1'b1)) begin
          failures++;
          if (failures < 10) $display("FAIL u_hat for %0d", s);
        end
      end
    end
    if (n_zero == 0) begin failures++; $display("FAIL no zero sum seen"); end
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
