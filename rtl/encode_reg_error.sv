// encode_reg_error: Golomb coding of a regular-mode prediction error.
//
// The Golomb parameter k is the number of left shifts of N[Q] needed to reach
// or pass A[Q] (k = ceil(log2(A/N)) in effect), found here by comparing A
// with N << i for every i at once. The error is then mapped to a
// non-negative value: normally 2*Errval for Errval >= 0 and -2*Errval - 1
// otherwise; when k = 0 and 2*B[Q] <= -N[Q] the mapping is mirrored to
// 2*Errval + 1 and -2*(Errval + 1). The mapped value is coded by
// golomb_coder with the full limit LIMIT = 32.
//
// Purely combinational. The k search and the two mappings follow the design
// description; the mirrored mapping of negative errors is written as in the
// JPEG-LS standard, -2*(Errval+1), which keeps the code decodable.
module encode_reg_error
  import jls_pkg::*;
(
  input  logic signed [8:0]    errval,
  input  logic        [AW-1:0] a,
  input  logic signed [BW-1:0] b,
  input  logic        [NW-1:0] n,
  output logic        [3:0]    k,
  output logic        [8:0]    merrval,
  output code_t                code
);
  logic signed [9:0] twob;
  logic [15:0] below;   // below[i]: (N << i) < A

  always_comb begin
    for (int i = 0; i < 16; i++)
      below[i] = ((32'(n) << i) < 32'(a));
    k = '0;
    for (int i = 0; i < 16; i++)
      if (below[i]) k = 4'(i + 1);
    twob = 10'(b) <<< 1;
    if (k == 4'd0 && twob <= -$signed({3'b000, n})) begin
      if (errval >= 0) merrval = 9'(({errval, 1'b0}) + 10'sd1);
      else             merrval = 9'(-({errval, 1'b0}) - 10'sd2);
    end else begin
      if (errval >= 0) merrval = 9'({errval, 1'b0});
      else             merrval = 9'(-({errval, 1'b0}) - 10'sd1);
    end
  end

  golomb_coder u_gc (
    .m(merrval), .k(k), .glimit(6'(LIMIT)), .code(code), .escape()
  );
endmodule
