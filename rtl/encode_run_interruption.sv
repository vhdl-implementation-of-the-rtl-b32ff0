// encode_run_interruption: coding of the sample that ends a run, and update of
// its context.
//
// RItype = 1 when Ra = Rb (predict from Ra), else 0 (predict from Rb). The
// error x - Px is negated when RItype = 0 and Ra > Rb, then reduced modulo
// 256. The context is Q = 365 + RItype. k is found as in regular mode, but
// against TEMP = A[Q] for RItype 0 and TEMP = A[Q] + (N[Q] >> 1) for
// RItype 1. The error is mapped to EMErrval = 2|Errval| - RItype - map, where
// the map bit depends on the sign of the error, k and whether negative errors
// (Nn[Q]) have been the majority, and is Golomb coded with the limit
// LIMIT - J[RUNindex] - 1. Update: Nn[Q] counts negative errors,
// A[Q] += (EMErrval + 1 - RItype) >> 1, and when N[Q] has reached RESET then
// A, N and Nn are halved; N[Q] is then incremented.
//
// Purely combinational: the caller reads the context at q, and writes back
// nxt and nxt_nn when it takes the code word.
//
// RItype, Q = RItype + 365, TEMP and the Nn count follow the design
// description; the map rule and the exact update are those of the JPEG-LS
// standard.
module encode_run_interruption
  import jls_pkg::*;
(
  input  pixel_t              x,
  input  pixel_t              ra,
  input  pixel_t              rb,
  input  logic [3:0]          j,        // J[RUNindex]
  input  ctx_vars_t           cur,      // context vars of q
  input  logic [NW-1:0]       nn,       // Nn of q
  output logic                ritype,
  output ctx_idx_t            q,
  output code_t               code,
  output ctx_vars_t           nxt,
  output logic [NW-1:0]       nxt_nn
);
  logic signed [10:0] e;
  logic signed [8:0]  errval;
  logic [AW:0]        temp;
  logic [15:0]        below;
  logic [3:0]         k;
  logic               map;
  logic [8:0]         absval, emerr;
  logic [AW:0]        a_new;
  logic [NW:0]        n_new, nn_new;

  // The context index depends only on Ra and Rb, so it is kept apart from
  // the statistics-dependent logic below (the top feeds it back as the
  // context-memory read address).
  assign ritype = (ra == rb);
  assign q      = ritype ? ctx_idx_t'(N_REG_CTX + 1) : ctx_idx_t'(N_REG_CTX);

  always_comb begin
    e = ritype ? ($signed({3'b000, x}) - $signed({3'b000, ra}))
               : ($signed({3'b000, x}) - $signed({3'b000, rb}));
    if (!ritype && ra > rb) e = -e;
    if (e < 0)         e = e + 11'sd256;
    if (e >= 11'sd128) e = e - 11'sd256;
    errval = 9'(e);

    temp = ritype ? (AW+1)'(cur.a) + (AW+1)'(cur.n >> 1) : (AW+1)'(cur.a);
    for (int i = 0; i < 16; i++)
      below[i] = ((32'(cur.n) << i) < 32'(temp));
    k = '0;
    for (int i = 0; i < 16; i++)
      if (below[i]) k = 4'(i + 1);

    if (k == 4'd0 && errval > 0 && (8'(nn) << 1) < 8'(cur.n))        map = 1'b1;
    else if (errval < 0 && (8'(nn) << 1) >= 8'(cur.n))               map = 1'b1;
    else if (errval < 0 && k != 4'd0)                                map = 1'b1;
    else                                                             map = 1'b0;

    absval = (errval < 0) ? 9'(-errval) : 9'(errval);
    emerr  = (absval << 1) - 9'(ritype) - 9'(map);

    // update
    nn_new = (NW+1)'(nn) + ((errval < 0) ? 1 : 0);
    a_new  = (AW+1)'(cur.a) + (AW+1)'(10'(10'(emerr) + 10'd1 - 10'(ritype)) >> 1);
    n_new  = (NW+1)'(cur.n);
    if (cur.n == NW'(RESET)) begin
      a_new  = a_new >> 1;
      n_new  = n_new >> 1;
      nn_new = nn_new >> 1;
    end
    n_new = n_new + 1'b1;
    nxt.a  = AW'(a_new);
    nxt.b  = cur.b;
    nxt.c  = cur.c;
    nxt.n  = NW'(n_new);
    nxt_nn = NW'(nn_new);
  end

  golomb_coder u_gc (
    .m(emerr), .k(k), .glimit(6'(LIMIT) - 6'(j) - 6'd1), .code(code), .escape()
  );
endmodule
