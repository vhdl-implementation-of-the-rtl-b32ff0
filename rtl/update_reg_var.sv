// update_reg_var: update of a regular context after its sample was coded.
//
// B[Q] += Errval and A[Q] += |Errval|. When N[Q] has reached RESET (64),
// A, B and N are halved by a right shift (arithmetic for B). N[Q] is then
// incremented. Finally the bias correction: if B <= -N, B += N and C is
// decremented (not below -128), B being clamped to -N+1; if B > 0, B -= N
// and C is incremented (not above 127), B being clamped to 0. C thus moves
// by at most one per sample.
//
// Purely combinational. The variables, RESET and the halving by shifting
// follow the design description; the order (accumulate, halve, count,
// correct) and the clamping are those of the JPEG-LS standard.
module update_reg_var
  import jls_pkg::*;
(
  input  logic signed [8:0] errval,
  input  ctx_vars_t         cur,
  output ctx_vars_t         nxt
);
  logic signed [17:0] a, b, n, c;

  always_comb begin
    a = 18'(cur.a);
    b = 18'(cur.b);
    n = 18'(cur.n);
    c = 18'(cur.c);
    b = b + 18'(errval);
    a = a + ((errval < 0) ? -18'(errval) : 18'(errval));
    if (cur.n == NW'(RESET)) begin
      a = a >>> 1;
      b = b >>> 1;
      n = n >>> 1;
    end
    n = n + 18'sd1;
    if (b <= -n) begin
      b = b + n;
      if (c > 18'(MIN_C)) c = c - 18'sd1;
      if (b <= -n) b = -n + 18'sd1;
    end else if (b > 0) begin
      b = b - n;
      if (c < 18'(MAX_C)) c = c + 18'sd1;
      if (b > 0) b = '0;
    end
    nxt.a = AW'(a);
    nxt.b = BW'(b);
    nxt.c = CW'(c);
    nxt.n = NW'(n);
  end
endmodule
