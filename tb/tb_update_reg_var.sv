// tb_update_reg_var: random context states (including N = 64 and C at its
// limits) and errors. Checks the updated A, B, C, N against a model of the
// accumulate / halve / count / bias-correct sequence.
module tb_update_reg_var;
  import jls_pkg::*;
  logic signed [8:0] errval;
  ctx_vars_t cur, nxt;
  logic clk = 0;
  int checks = 0, failures = 0, nhalf = 0, nup = 0, ndn = 0;

  update_reg_var dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int A, B, C, N, e;
      N = (t % 5 == 0) ? 64 : $urandom_range(64, 1);
      A = $urandom_range(8000);
      B = -$urandom_range(N - 1);
      C = (t % 7 == 0) ? ((t % 2) ? 127 : -128) : $urandom_range(255) - 128;
      e = $urandom_range(255) - 128;
      if (t % 2) e = $urandom_range(8) - 4;
      cur = '{a: 16'(A), b: 8'(B), c: 8'(C), n: 7'(N)};
      errval = 9'(e);
      #1;
      B += e; A += (e < 0 ? -e : e);
      if (N == 64) begin A = A / 2; B = (B >= 0) ? B / 2 : -((-B + 1) / 2); N = N / 2; nhalf++; end
      N++;
      if (B <= -N) begin ndn++; B += N; if (C > -128) C--; if (B <= -N) B = -N + 1; end
      else if (B > 0) begin nup++; B -= N; if (C < 127) C++; if (B > 0) B = 0; end
      checks++;
      if (int'(nxt.a) != A || int'(nxt.b) != B || int'(nxt.c) != C || int'(nxt.n) != N) begin
        failures++;
        if (failures < 5) $display("FAIL got %0d %0d %0d %0d exp %0d %0d %0d %0d", nxt.a, nxt.b, nxt.c, nxt.n, A, B, C, N);
      end
    end
    checks++;
    if (nhalf == 0 || nup == 0 || ndn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
