// tb_image_row_buffer: writes rows of random samples, swapping banks between
// rows, and checks that reads of the current and the previous row return the
// last two rows written, one cycle after the read.
module tb_image_row_buffer;
  import jls_pkg::*;
  localparam int COLS = 64;
  logic clk = 0, rst_n = 0, swap = 0;
  img_req_t req;
  pixel_t rdata;
  int checks = 0, failures = 0;
  byte unsigned rows[4][COLS];

  image_row_buffer #(.MAX_COLS(COLS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      swap = 1; @(negedge clk); swap = 0;
      for (int c = 0; c < COLS; c++) begin
        rows[r][c] = byte'($urandom());
        req = '{en: 1, we: 1, prev: 0, col: 16'(c), wdata: rows[r][c]};
        @(negedge clk);
      end
      req = '0;
      for (int t = 0; t < 40; t++) begin
        automatic int c = $urandom_range(COLS - 1);
        automatic bit p = (r > 0) ? 1'($urandom_range(1)) : 1'b0;
        req = '{en: 1, we: 0, prev: p, col: 16'(c), wdata: 0};
        @(negedge clk);
        req = '0;
        checks++;
        if (rdata != (p ? rows[r-1][c] : rows[r][c])) begin
          failures++;
          $display("FAIL row %0d prev %0d col %0d: %0d", r, p, c, rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
