// tb_get_next_sample: walks every position of small random images of
// several widths (including one column), with the image memory modelled by a
// two-row array answering one cycle after a read. Checks x, Ra, Rb, Rc, Rd
// against the image-boundary rules worked out from the full image, that
// skip_context follows run_mode, and that each fetch takes six clocks after
// the grant.
module tb_get_next_sample;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, run_mode = 0, done, skip_context, mem_req, mem_gnt;
  logic [15:0] row, col, n_cols;
  pixel_t x, ra, rb, rc, rd, mem_rdata;
  img_req_t mem_acc;
  int checks = 0, failures = 0;
  byte unsigned img[];
  int cur_row;

  get_next_sample dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: current row = cur_row, previous = cur_row - 1
  int mr, mc, maddr;
  pixel_t mval;
  assign mr = mem_acc.prev ? cur_row - 1 : cur_row;
  assign mc = int'(mem_acc.col);
  assign maddr = mr * int'(n_cols) + mc;
  always_comb mval = (mr < 0 || mc >= int'(n_cols)) ? 8'd0 : img[maddr];
  always @(posedge clk) begin
    mem_gnt <= mem_req;
    if (mem_acc.en) begin
      if (mem_acc.we) begin failures++; $display("FAIL write"); end
      if (mr < 0 || mc >= int'(n_cols)) begin failures++; $display("FAIL read outside the image r=%0d c=%0d", mr, mem_acc.col); mem_rdata <= 0; end
      else mem_rdata <= mval;
    end
  end

  task automatic image(input int rows, input int cols);
    int prev_ra0 = 0;
    img = new[rows * cols];
    foreach (img[i]) img[i] = byte'($urandom());
    n_cols = 16'(cols);
    for (int r = 0; r < rows; r++) begin
      cur_row = r;
      for (int c = 0; c < cols; c++) begin
        int ex, ea, eb, ec, ed, cyc;
        bit rm = 1'($urandom_range(1));
        ex = img[r*cols + c];
        eb = (r == 0) ? 0 : img[(r-1)*cols + c];
        ea = (c == 0) ? eb : img[r*cols + c - 1];
        ec = (r == 0) ? 0 : (c == 0) ? prev_ra0 : img[(r-1)*cols + c - 1];
        ed = (r == 0) ? 0 : (c == cols - 1) ? eb : img[(r-1)*cols + c + 1];
        if (c == 0) prev_ra0 = ea;
        row = 16'(r); col = 16'(c); run_mode = rm;
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        checks++;
        if (x != ex || ra != ea || rb != eb || rc != ec || rd != ed) begin
          failures++;
          $display("FAIL r%0d c%0d got %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d", r, c, x, ra, rb, rc, rd, ex, ea, eb, ec, ed);
        end
        checks++;
        if (skip_context != rm) begin failures++; $display("FAIL skip_context"); end
        checks++;
        if (cyc != 8) begin failures++; $display("FAIL fetch took %0d clocks", cyc); end
      end
    end
  endtask

  initial begin
    row = 0; col = 0; n_cols = 1; img = new[1]; cur_row = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    image(4, 1);
    image(5, 2);
    image(6, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
