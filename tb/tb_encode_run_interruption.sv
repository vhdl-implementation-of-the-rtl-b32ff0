// tb_encode_run_interruption: random interruption samples, neighbours (with
// Ra = Rb often, for RItype 1), context states and run indices. Checks RItype,
// the context number, the code word and the updated A, N, Nn against a model.
module tb_encode_run_interruption;
  import jls_pkg::*;
  pixel_t x, ra, rb;
  logic [3:0] j;
  ctx_vars_t cur, nxt;
  logic [6:0] nn, nxt_nn;
  logic ritype;
  ctx_idx_t q;
  code_t code;
  logic clk = 0;
  int checks = 0, failures = 0, nt[2] = '{0, 0}, nmap = 0, nhalf = 0;

  encode_run_interruption dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int rt, px, e, temp, k, map, em, qq, elen, glim, A, N, Nn;
      longint ebits;
      x = 8'($urandom()); ra = 8'($urandom());
      rb = ($urandom_range(1)) ? ra : 8'($urandom());
      // an interruption sample always differs from Ra, the run value
      if (x == ra) x = ra + 8'd1;
      j = 4'($urandom_range(15));
      N = (t % 6 == 0) ? 64 : $urandom_range(64, 1);
      A = $urandom_range(4000);
      Nn = $urandom_range(N);
      cur = '{a: 16'(A), b: 8'($urandom()), c: 8'($urandom()), n: 7'(N)};
      nn = 7'(Nn);
      #1;
      rt = (ra == rb);
      px = rt ? ra : rb;
      e = int'(x) - px;
      if (!rt && ra > rb) e = -e;
      e = ((e % 256) + 256 + 128) % 256 - 128;
      temp = rt ? A + (N >> 1) : A;
      k = 0; while ((N << k) < temp) k++;
      if (k == 0 && e > 0 && 2 * Nn < N) map = 1;
      else if (e < 0 && 2 * Nn >= N) map = 1;
      else if (e < 0 && k != 0) map = 1;
      else map = 0;
      nmap += map;
      em = 2 * (e < 0 ? -e : e) - rt - map;
      glim = 32 - int'(j) - 1;
      if ((em >> k) < glim - 9) begin elen = (em >> k) + 1 + k; ebits = (1 << k) | (em & ((1 << k) - 1)); end
      else begin elen = glim; ebits = 256 | ((em - 1) & 255); end
      if (e < 0) Nn++;
      A += (em + 1 - rt) >> 1;
      if (N == 64) begin A >>= 1; N >>= 1; Nn >>= 1; nhalf++; end
      N++;
      nt[rt]++;
      checks++;
      if (int'(ritype) != rt || int'(q) != 365 + rt || int'(code.len) != elen || longint'(code.bits) != ebits
          || int'(nxt.a) != A || int'(nxt.n) != N || int'(nxt_nn) != Nn || nxt.b != cur.b || nxt.c != cur.c) begin
        failures++;
        if (failures < 5) $display("FAIL x%0d a%0d b%0d: len %0d/%0d A %0d/%0d N %0d/%0d Nn %0d/%0d", x, ra, rb, code.len, elen, nxt.a, A, nxt.n, N, nxt_nn, Nn);
      end
    end
    checks++;
    if (nt[0] == 0 || nt[1] == 0 || nmap == 0 || nhalf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
