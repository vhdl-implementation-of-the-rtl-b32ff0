// tb_predictor: random neighbourhoods, corrections and signs, with values
// near 0 and 255 to reach the clamp. Checks the corrected prediction and the
// reduced error against a model.
module tb_predictor;
  import jls_pkg::*;
  pixel_t x, ra, rb, rc, px;
  logic sign;
  logic signed [7:0] c;
  logic signed [8:0] errval;
  logic clk = 0;
  int checks = 0, failures = 0, nclamp = 0, nedge = 0;

  predictor dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int a, b, cc, p, e, lo, hi;
      automatic bit ext = (t % 4 == 0);
      x = 8'($urandom()); ra = 8'($urandom()); rb = 8'($urandom()); rc = 8'($urandom());
      if (ext) begin ra = 8'($urandom_range(1) ? $urandom_range(5) : 250 + $urandom_range(5)); rb = ra; rc = ra; end
      c = 8'($urandom_range(255));
      sign = 1'($urandom_range(1));
      #1;
      a = ra; b = rb; cc = rc;
      lo = a < b ? a : b; hi = a < b ? b : a;
      p = (cc >= hi) ? lo : (cc <= lo) ? hi : a + b - cc;
      if (cc >= hi || cc <= lo) nedge++;
      p = p + (sign ? -int'(c) : int'(c));
      if (p < 0 || p > 255) nclamp++;
      p = p < 0 ? 0 : p > 255 ? 255 : p;
      e = int'(x) - p;
      if (sign) e = -e;
      e = ((e % 256) + 256 + 128) % 256 - 128;
      checks++;
      if (int'(px) != p || int'(errval) != e) begin
        failures++;
        if (failures < 5) $display("FAIL x%0d a%0d b%0d c%0d C%0d s%0d: px %0d err %0d exp %0d %0d", x, ra, rb, rc, c, sign, px, errval, p, e);
      end
    end
    checks++;
    if (nclamp == 0 || nedge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
