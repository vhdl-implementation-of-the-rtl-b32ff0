// tb_golomb_coder: checks the length-limited Golomb code words against a
// bit-by-bit model for random values, every k and both kinds of limit.
module tb_golomb_coder;
  import jls_pkg::*;
  logic [8:0] m;
  logic [3:0] k;
  logic [5:0] glimit;
  code_t      code;
  logic       escape;
  logic       clk = 0;
  int checks = 0, failures = 0, n_esc = 0;

  golomb_coder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      int q, elen;
      bit exp_bits[$];
      bit got_bits[$];
      m = 9'($urandom_range(256));
      k = 4'($urandom_range(12));
      glimit = (t % 2) ? 6'd32 : 6'(32 - $urandom_range(15) - 1);
      if (t % 7 == 0) m = 9'(((int'(glimit) - 9) << k) + $urandom_range(3) - 1);
      if (m > 256) m = 256;
      #1;
      q = int'(m) >> k;
      exp_bits.delete();
      if (q < int'(glimit) - 9) begin
        repeat (q) exp_bits.push_back(0);
        exp_bits.push_back(1);
        for (int i = int'(k) - 1; i >= 0; i--) exp_bits.push_back(1'((int'(m) >> i) & 1));
      end else begin
        repeat (int'(glimit) - 9) exp_bits.push_back(0);
        exp_bits.push_back(1);
        for (int i = 7; i >= 0; i--) exp_bits.push_back(9'(m - 1) >> i & 1);
        n_esc++;
      end
      got_bits.delete();
      for (int i = int'(code.len) - 1; i >= 0; i--) got_bits.push_back(i < 32 ? code.bits[i] : 1'b0);
      checks++;
      if (got_bits != exp_bits) begin
        failures++;
        if (failures < 5) $display("FAIL m=%0d k=%0d lim=%0d len=%0d bits=%h", m, k, glimit, code.len, code.bits);
      end
    end
    checks++;
    if (n_esc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
