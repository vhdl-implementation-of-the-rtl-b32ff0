// jls_pkg: constants and types shared by the JPEG-LS encoder blocks.
//
// The encoder works on 8-bit grey-scale samples in lossless mode (NEAR = 0).
// The default thresholds T1/T2/T3 = 3/7/21, the halving threshold RESET = 64,
// the 365 regular contexts plus two run-interruption contexts (Q = 365 + RItype)
// and the 32-entry run-length order table J follow the design description.
// The code-length limit LIMIT = 2*(bpp + max(8,bpp)) = 32, MAXVAL = 255,
// RANGE = 256, the initial A value 4 and the bias limits -128/127 follow the
// JPEG-LS standard (ISO 14495-1) for 8-bit samples.
package jls_pkg;

  localparam int unsigned BPP      = 8;          // bits per sample
  localparam int unsigned MAXVAL   = 255;
  localparam int unsigned RANGE    = 256;
  localparam int unsigned QBPP     = 8;          // bits of a mapped error in escape codes
  localparam int unsigned LIMIT    = 32;         // maximum Golomb code length
  localparam int          T1       = 3;
  localparam int          T2       = 7;
  localparam int          T3       = 21;
  localparam int unsigned RESET    = 64;
  localparam int unsigned N_REG_CTX = 365;       // regular contexts 0..364
  localparam int unsigned N_CTX    = 367;        // + run interruption 365, 366
  localparam int          MIN_C    = -128;
  localparam int          MAX_C    = 127;
  localparam int unsigned A_INIT   = 4;          // max(2, (RANGE+32)/64)

  // Widths of the context variables. N never exceeds RESET, A stays below
  // RESET*2*RANGE, B stays within (-N, 0], C within [MIN_C, MAX_C].
  localparam int unsigned NW = 7;
  localparam int unsigned AW = 16;
  localparam int unsigned BW = 8;                // signed
  localparam int unsigned CW = 8;                // signed
  localparam int unsigned QW = 9;                // context index 0..366

  typedef logic [BPP-1:0] pixel_t;

  // One access to the two-row image memory.
  typedef struct packed {
    logic        en;      // access this cycle
    logic        we;      // write (1) or read (0)
    logic        prev;    // previous row (1) or current row (0)
    logic [15:0] col;     // column
    logic [7:0]  wdata;   // sample to write
  } img_req_t;
  typedef logic [QW-1:0]  ctx_idx_t;

  // Context variables of one context.
  typedef struct packed {
    logic        [AW-1:0] a;
    logic signed [BW-1:0] b;
    logic signed [CW-1:0] c;
    logic        [NW-1:0] n;
  } ctx_vars_t;

  // One variable-length code word for the output stream: the low `len` bits
  // of `bits` (MSB first), preceded by len-32 zeros when len exceeds 32.
  typedef struct packed {
    logic [5:0]  len;
    logic [31:0] bits;
  } code_t;

  // Run-length order table J[RUNindex]; the run segment length is 2**J.
  function automatic logic [3:0] j_of(input logic [4:0] idx);
    logic [3:0] j;
    if (idx < 5'd16)      j = 4'(idx >> 2);          // 0,0,0,0,1,1,1,1,...,3
    else if (idx < 5'd24) j = 4'(5'd4 + ((idx - 5'd16) >> 1)); // 4,4,5,5,6,6,7,7
    else                  j = 4'(idx - 5'd16);       // 8..15
    return j;
  endfunction

endpackage
