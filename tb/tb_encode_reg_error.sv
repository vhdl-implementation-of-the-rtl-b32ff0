// tb_encode_reg_error: random errors and context states. Checks k (smallest k
// with N*2^k >= A), the mapped error in both the normal and the mirrored
// mapping, and the code word length and value.
module tb_encode_reg_error;
  import jls_pkg::*;
  logic signed [8:0] errval;
  logic [15:0] a;
  logic signed [7:0] b;
  logic [6:0] n;
  logic [3:0] k;
  logic [8:0] merrval;
  code_t code;
  logic clk = 0;
  int checks = 0, failures = 0, nmirror = 0;

  encode_reg_error dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int ek, em, q, elen;
      longint ebits;
      n = 7'($urandom_range(64, 1));
      a = 16'((t % 3 == 0) ? $urandom_range(int'(n)) : $urandom_range(8000, 1));
      b = 8'(-$urandom_range(int'(n) - 1));
      errval = 9'($urandom_range(255) - 128);
      #1;
      ek = 0;
      while ((int'(n) * (1 << ek)) < int'(a)) ek++;
      if (ek == 0 && 2 * int'(b) <= -int'(n)) begin
        nmirror++;
        em = (errval >= 0) ? 2 * int'(errval) + 1 : -2 * int'(errval) - 2;
      end else
        em = (errval >= 0) ? 2 * int'(errval) : -2 * int'(errval) - 1;
      q = em >> ek;
      if (q < 23) begin elen = q + 1 + ek; ebits = (1 << ek) | (em & ((1 << ek) - 1)); end
      else begin elen = 32; ebits = 256 | ((em - 1) & 255); end
      checks++;
      if (int'(k) != ek || int'(merrval) != em || int'(code.len) != elen || longint'(code.bits) != ebits) begin
        failures++;
        if (failures < 5) $display("FAIL e%0d A%0d B%0d N%0d: k%0d m%0d len%0d exp k%0d m%0d len%0d", errval, a, b, n, k, merrval, code.len, ek, em, elen);
      end
    end
    checks++;
    if (nmirror == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
