// golomb_coder: length-limited Golomb-Rice code word of a mapped error value.
//
// The value m is split into a quotient m >> k, sent in unary as that many
// '0' bits closed by a '1', and the k low bits of m sent in binary. When the
// quotient would reach glimit - QBPP - 1 the code escapes instead: that many
// '0' bits, a '1', then m - 1 in QBPP bits, so no code exceeds glimit bits.
// The Golomb-Rice coding of the mapped error follows the design description;
// the escape rule is the one of the JPEG-LS standard. glimit is LIMIT (32) for
// regular samples and LIMIT - J[RUNindex] - 1 for run interruption samples.
//
// Purely combinational. The code word comes out as a code_t: the low `len`
// bits of `bits`, most significant first, with leading '0' bits implied when
// len exceeds 32.
module golomb_coder
  import jls_pkg::*;
(
  input  logic [8:0] m,        // mapped error value, 0..256
  input  logic [3:0] k,        // Golomb parameter
  input  logic [5:0] glimit,   // code length limit
  output code_t      code,
  output logic       escape    // 1 when the escape code was used
);
  logic [8:0] q;
  logic [5:0] qmax;

  always_comb begin
    q      = m >> k;
    qmax   = glimit - 6'(QBPP) - 6'd1;
    escape = (q >= 9'(qmax));
    if (!escape) begin
      code.len  = 6'(q) + 6'd1 + 6'(k);
      code.bits = (32'd1 << k) | (32'(m) & ((32'd1 << k) - 32'd1));
    end else begin
      code.len  = glimit;
      code.bits = (32'd1 << QBPP) | 32'(8'(m - 9'd1));
    end
  end
endmodule
