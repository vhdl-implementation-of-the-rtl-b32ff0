// tb_fill_image_row: loads rows of several lengths from a source that
// withholds data at random, with the memory grant delayed, and checks that
// every sample is written once, to its column of the current row, in order,
// that read_input stays low before the grant, and that done pulses once.
module tb_fill_image_row;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, read_input, in_valid = 0, mem_req, mem_gnt = 0;
  logic [15:0] n_cols;
  pixel_t in_pixel;
  img_req_t mem_acc;
  int checks = 0, failures = 0, src_idx, ndone;
  byte unsigned src[];
  byte unsigned written[$];
  int cols_w[$];

  fill_image_row dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign in_pixel = src[src_idx];
  always @(posedge clk) begin
    if (read_input && in_valid) src_idx <= src_idx + 1;
    if (mem_acc.en) begin
      written.push_back(mem_acc.wdata);
      cols_w.push_back(int'(mem_acc.col));
      if (!mem_acc.we || mem_acc.prev) begin failures++; $display("FAIL bad access kind"); end
    end
    if (done) ndone++;
    if (read_input && !mem_gnt) begin failures++; $display("FAIL read_input without grant"); end
    in_valid <= ($urandom_range(3) != 0);
  end

  task automatic one_row(input int cols);
    src = new[cols + 4];
    foreach (src[i]) src[i] = byte'($urandom());
    src_idx = 0; written.delete(); cols_w.delete(); ndone = 0;
    n_cols = 16'(cols);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    mem_gnt = mem_req;
    while (mem_req) begin @(negedge clk); mem_gnt = mem_req; end
    mem_gnt = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (written.size() != cols || src_idx != cols) begin failures++; $display("FAIL %0d writes, %0d reads for %0d", written.size(), src_idx, cols); end
    for (int i = 0; i < written.size(); i++) begin
      checks++;
      if (written[i] != src[i] || cols_w[i] != i) begin failures++; $display("FAIL sample %0d", i); end
    end
    checks++;
    if (ndone != 1) begin failures++; $display("FAIL done pulses %0d", ndone); end
  endtask

  initial begin
    n_cols = 0; src = new[1];
    repeat (2) @(negedge clk); rst_n = 1;
    one_row(1);
    one_row(7);
    one_row(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
