// tb_find_context: random and near-threshold neighbourhoods. Checks the
// context number, the sign and the run-mode decision against a model built
// from the quantisation staircase, that skip_context leaves the result alone,
// and that run_exit clears run mode.
module tb_find_context;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, skip_context = 0, run_exit = 0, done, sign, run_mode;
  pixel_t ra, rb, rc, rd;
  ctx_idx_t q;
  int checks = 0, failures = 0, nrun = 0, nneg = 0;

  find_context dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int qz(int d);
    int t[3] = '{3, 7, 21};
    int mag = d < 0 ? -d : d;
    int lvl = (mag == 0) ? 0 : 1;
    for (int i = 0; i < 3; i++) if (mag >= t[i]) lvl++;
    // the negative side includes the threshold itself
    if (d < 0) begin
      lvl = 1;
      for (int i = 0; i < 3; i++) if (mag >= t[i]) lvl++;
      return -lvl;
    end
    return lvl;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int q1, q2, q3, s, eq;
      automatic int base = $urandom_range(200, 30);
      int dd[4];
      foreach (dd[i]) begin
        automatic int pick = $urandom_range(5);
        int th[6] = '{0, 2, 3, 7, 21, 30};
        dd[i] = (t % 3 == 0) ? 0 : th[pick] * ($urandom_range(1) ? 1 : -1) + (($urandom_range(3) == 0) ? $urandom_range(2) - 1 : 0);
      end
      rb = 8'(base); rd = 8'(base + dd[0]); rc = 8'(base - dd[1]); ra = 8'(int'(rc) - dd[2]);
      if (t % 5 == 0) begin ra = 8'($urandom()); rb = 8'($urandom()); rc = 8'($urandom()); rd = 8'($urandom()); end
      q1 = qz(int'(rd) - int'(rb)); q2 = qz(int'(rb) - int'(rc)); q3 = qz(int'(rc) - int'(ra));
      s = 0;
      if (q1 < 0 || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0)) begin q1 = -q1; q2 = -q2; q3 = -q3; s = 1; end
      eq = 81*q1 + 9*q2 + q3;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL no done"); end
      checks++;
      if (eq == 0) begin
        nrun++;
        if (!run_mode) begin failures++; $display("FAIL run not detected"); end
        run_exit = 1; @(negedge clk); run_exit = 0;
        checks++;
        if (run_mode) begin failures++; $display("FAIL run_exit"); end
      end else begin
        if (s) nneg++;
        if (run_mode || int'(q) != eq || sign != 1'(s)) begin
          failures++; $display("FAIL ra%0d rb%0d rc%0d rd%0d: q=%0d s=%0d exp %0d %0d", ra, rb, rc, rd, q, sign, eq, s);
        end
        // skip_context leaves the result unchanged
        ra = ~ra; rd = ~rd;
        skip_context = 1; start = 1; @(negedge clk); start = 0; skip_context = 0;
        checks++;
        if (int'(q) != eq || sign != 1'(s)) begin failures++; $display("FAIL skip"); end
      end
    end
    checks++;
    if (nrun == 0 || nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
