// tb_find_runcnt: offers sample sequences and checks the run count, whether
// the run ended at the row end or at a different sample, and the more/ended
// pulses one clock after each sample.
module tb_find_runcnt;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, sample_valid = 0, last_col = 0, more, ended, eol;
  pixel_t ra, x;
  logic [15:0] runcnt;
  int checks = 0, failures = 0, neol = 0, nint = 0;

  find_runcnt dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = 0; x = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int len = $urandom_range(40);           // equal samples available
      automatic int left = $urandom_range(40, 1);       // samples to the row end, incl. the first
      automatic int n = 0;
      int exp_cnt;
      bit exp_eol;
      ra = 8'($urandom());
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      if (len >= left) begin exp_cnt = left; exp_eol = 1; end
      else begin exp_cnt = len; exp_eol = 0; end
      forever begin
        x = (n < len) ? ra : ra ^ 8'($urandom_range(255, 1));
        last_col = (n == left - 1);
        sample_valid = 1; @(negedge clk); sample_valid = 0;
        n++;
        if (ended) break;
        checks++;
        if (!more) begin failures++; $display("FAIL no more/ended"); break; end
      end
      checks++;
      if (int'(runcnt) != exp_cnt || eol != exp_eol) begin
        failures++; $display("FAIL len %0d left %0d: cnt %0d eol %0d", len, left, runcnt, eol);
      end
      if (exp_eol) neol++; else nint++;
    end
    checks++;
    if (neol == 0 || nint == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
