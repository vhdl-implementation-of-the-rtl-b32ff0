// jls_ref_pkg: behavioural reference model of the lossless JPEG-LS scan
// encoder, used by the testbenches to predict the encoder's output.
//
// It is written as straight-line software following the JPEG-LS (ISO 14495-1)
// procedure for 8-bit samples, NEAR = 0, T1/T2/T3 = 3/7/21, RESET = 64 and
// LIMIT = 32, over a whole image held in an array, with no relation to the
// hardware's partitioning. Besides the byte stream (MSB first, final byte
// padded with zeros, no marker stuffing) it counts how often each coding
// mechanism occurred.
package jls_ref_pkg;

  int J[32] = '{0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,4,4,5,5,6,6,7,7,8,9,10,11,12,13,14,15};

  class jls_ref;
    int A[367], B[367], C[367], N[367], Nn[367];
    int run_index;
    bit bits[$];
    // mechanism counters
    int n_regular, n_runs, n_run_eol, n_run_int, n_escape, n_halve, n_run_seg, n_bias_up, n_bias_dn, n_k0_mirror;

    function void put(int nbits, longint unsigned value);
      for (int i = nbits - 1; i >= 0; i--) bits.push_back(value[i]);
    endfunction

    function void golomb(int m, int k, int glimit);
      int q = m >> k;
      if (q < glimit - 8 - 1) begin
        for (int i = 0; i < q; i++) bits.push_back(1'b0);
        bits.push_back(1'b1);
        put(k, m & ((1 << k) - 1));
      end else begin
        n_escape++;
        for (int i = 0; i < glimit - 8 - 1; i++) bits.push_back(1'b0);
        bits.push_back(1'b1);
        put(8, (m - 1) & 255);
      end
    endfunction

    static function int sgn_quant(int d);
      if (d <= -21) return -4;
      if (d <= -7)  return -3;
      if (d <= -3)  return -2;
      if (d < 0)    return -1;
      if (d == 0)   return 0;
      if (d < 3)    return 1;
      if (d < 7)    return 2;
      if (d < 21)   return 3;
      return 4;
    endfunction

    static function int modr(int e);
      if (e < 0) e += 256;
      if (e >= 128) e -= 256;
      return e;
    endfunction

    // img[r*cols + c]
    function void encode(ref byte unsigned img[], input int rows, input int cols, output byte unsigned out[$]);
      int r, c, ra, rb, rc, rd, x, q1, q2, q3, sign, q, px, err, k, m;
      int prev_ra0;
      bits.delete();
      for (int i = 0; i < 367; i++) begin A[i] = 4; B[i] = 0; C[i] = 0; N[i] = 1; Nn[i] = 0; end
      run_index = 0;
      n_regular = 0; n_runs = 0; n_run_eol = 0; n_run_int = 0; n_escape = 0; n_halve = 0;
      n_run_seg = 0; n_bias_up = 0; n_bias_dn = 0; n_k0_mirror = 0;
      prev_ra0 = 0;
      for (r = 0; r < rows; r++) begin
        c = 0;
        while (c < cols) begin
          // neighbourhood
          x  = img[r*cols + c];
          rb = (r == 0) ? 0 : img[(r-1)*cols + c];
          ra = (c == 0) ? rb : img[r*cols + c - 1];
          if (r == 0 && c == 0) ra = 0;
          if (r == 0) rc = 0; else if (c == 0) rc = prev_ra0; else rc = img[(r-1)*cols + c - 1];
          if (r == 0) rd = 0; else if (c == cols - 1) rd = rb; else rd = img[(r-1)*cols + c + 1];
          if (c == 0) prev_ra0 = ra;
          q1 = sgn_quant(rd - rb); q2 = sgn_quant(rb - rc); q3 = sgn_quant(rc - ra);
          if (q1 == 0 && q2 == 0 && q3 == 0) begin
            // run mode
            int cnt = 0;
            int runval = ra;
            bit eol = 0;
            n_runs++;
            while (img[r*cols + c] == runval) begin
              cnt++;
              if (c == cols - 1) begin eol = 1; break; end
              c++;
            end
            while (cnt >= (1 << J[run_index])) begin
              bits.push_back(1'b1); n_run_seg++;
              cnt -= (1 << J[run_index]);
              if (run_index < 31) run_index++;
            end
            if (eol) begin
              n_run_eol++;
              if (cnt > 0) bits.push_back(1'b1);
              c++;
            end else begin
              int ritype, temp, map, em, qq, absv;
              n_run_int++;
              bits.push_back(1'b0);
              put(J[run_index], cnt);
              // interruption sample at column c
              x  = img[r*cols + c];
              rb = (r == 0) ? 0 : img[(r-1)*cols + c];
              ra = (c == 0) ? rb : img[r*cols + c - 1];
              ritype = (ra == rb);
              px = ritype ? ra : rb;
              err = x - px;
              if (!ritype && ra > rb) err = -err;
              err = modr(err);
              qq = 365 + ritype;
              temp = ritype ? A[qq] + (N[qq] >> 1) : A[qq];
              k = 0; while ((N[qq] << k) < temp) k++;
              if (k == 0 && err > 0 && 2*Nn[qq] < N[qq]) map = 1;
              else if (err < 0 && 2*Nn[qq] >= N[qq]) map = 1;
              else if (err < 0 && k != 0) map = 1;
              else map = 0;
              absv = err < 0 ? -err : err;
              em = 2*absv - ritype - map;
              golomb(em, k, 32 - J[run_index] - 1);
              if (err < 0) Nn[qq]++;
              A[qq] += (em + 1 - ritype) >> 1;
              if (N[qq] == 64) begin A[qq] >>= 1; N[qq] >>= 1; Nn[qq] >>= 1; n_halve++; end
              N[qq]++;
              if (run_index > 0) run_index--;
              c++;
            end
          end else begin
            int mx, mn;
            n_regular++;
            sign = 1;
            if (q1 < 0 || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0)) begin
              q1 = -q1; q2 = -q2; q3 = -q3; sign = -1;
            end
            q = 81*q1 + 9*q2 + q3;
            mx = ra > rb ? ra : rb; mn = ra < rb ? ra : rb;
            if (rc >= mx) px = mn; else if (rc <= mn) px = mx; else px = ra + rb - rc;
            px = px + sign * C[q];
            if (px > 255) px = 255; if (px < 0) px = 0;
            err = x - px;
            if (sign < 0) err = -err;
            err = modr(err);
            k = 0; while ((N[q] << k) < A[q]) k++;
            if (k == 0 && 2*B[q] <= -N[q]) begin
              n_k0_mirror++;
              m = (err >= 0) ? 2*err + 1 : -2*(err + 1);
            end else
              m = (err >= 0) ? 2*err : -2*err - 1;
            golomb(m, k, 32);
            B[q] += err; A[q] += (err < 0 ? -err : err);
            if (N[q] == 64) begin A[q] >>= 1; B[q] >>>= 1; N[q] >>= 1; n_halve++; end
            N[q]++;
            if (B[q] <= -N[q]) begin
              n_bias_dn++;
              B[q] += N[q]; if (C[q] > -128) C[q]--; if (B[q] <= -N[q]) B[q] = -N[q] + 1;
            end else if (B[q] > 0) begin
              n_bias_up++;
              B[q] -= N[q]; if (C[q] < 127) C[q]++; if (B[q] > 0) B[q] = 0;
            end
            c++;
          end
        end
      end
      // pack
      out.delete();
      while (bits.size() % 8 != 0) bits.push_back(1'b0);
      for (int i = 0; i < bits.size(); i += 8) begin
        byte unsigned b8 = 0;
        for (int j = 0; j < 8; j++) b8 = {b8[6:0], bits[i+j]};
        out.push_back(b8);
      end
    endfunction
  endclass

endpackage
