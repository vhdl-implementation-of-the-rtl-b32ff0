// predictor: prediction and prediction error of a regular-mode sample.
//
// The fixed median edge detector picks min(Ra,Rb) when Rc >= max(Ra,Rb),
// max(Ra,Rb) when Rc <= min(Ra,Rb) and Ra + Rb - Rc otherwise. The context's
// bias correction C[Q] is added (subtracted when the context sign is
// negative) and the result is clamped to 0..255. The error x - Px is negated
// for a negative context sign and reduced modulo 256 into -128..127.
//
// Purely combinational. The predictor and the C[Q] correction follow the
// design description; the clamp and the modulo reduction are those of the
// JPEG-LS standard.
module predictor
  import jls_pkg::*;
(
  input  pixel_t                x,
  input  pixel_t                ra,
  input  pixel_t                rb,
  input  pixel_t                rc,
  input  logic                  sign,   // 1: SIGN = -1
  input  logic signed [CW-1:0]  c,      // C[Q]
  output pixel_t                px,     // corrected prediction
  output logic signed [8:0]     errval  // reduced prediction error
);
  pixel_t             mn, mx, med;
  logic signed [10:0] pc, e;

  always_comb begin
    mn = (ra < rb) ? ra : rb;
    mx = (ra < rb) ? rb : ra;
    if (rc >= mx)      med = mn;
    else if (rc <= mn) med = mx;
    else               med = 8'(ra + rb - rc);
    pc = $signed({3'b000, med}) + (sign ? -11'(c) : 11'(c));
    if (pc < 0)            px = '0;
    else if (pc > 11'sd255) px = 8'd255;
    else                   px = 8'(pc);
    e = $signed({3'b000, x}) - $signed({3'b000, px});
    if (sign) e = -e;
    if (e < 0)             e = e + 11'sd256;
    if (e >= 11'sd128)     e = e - 11'sd256;
    errval = 9'(e);
  end
endmodule
