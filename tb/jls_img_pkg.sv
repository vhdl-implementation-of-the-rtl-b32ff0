// jls_img_pkg: test image generator shared by the encoder testbenches.
//
// kind 0: uniform noise (large errors, escape codes, frequent halving)
// kind 1: smooth ramp with +-1 noise (small errors, bias correction)
// kind 2: flat blocks with steps (runs, run interruptions, end-of-row runs)
// kind 3: rows alternating among the three
package jls_img_pkg;
  function automatic void make_image(ref byte unsigned img[], input int rows, input int cols,
                                     input int kind, input int seed);
    int s = seed;
    img = new[rows * cols];
    for (int r = 0; r < rows; r++) begin
      int k = (kind == 3) ? ((r / 2) % 3) : kind;
      for (int c = 0; c < cols; c++) begin
        int v;
        s = s * 1103515245 + 12345;
        unique case (k)
          0: v = (s >>> 16) & 255;
          1: v = (r * 3 + c * 2 + ((s >>> 16) % 3) - 1) & 255;
          default: v = (((c / 13) * 37 + (r / 5) * 11) & 255) ^ ((((s >>> 16) & 63) == 0) ? 8 : 0);
        endcase
        img[r*cols + c] = byte'(v);
      end
    end
  endfunction
endpackage
