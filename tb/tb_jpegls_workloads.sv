// tb_jpegls_workloads: the encoder at its default parameters on images of the
// sizes of a typical lossless test set.
//
// The real test photographs are not available to a simulation, so the images
// are generated: a smooth ramp with small noise (like a natural photograph),
// and a mixture of noise, ramp and flat blocks (like a compound document).
// Whole images are encoded at 512 x 512, 448 rows of 512, 512 rows of 768,
// 2048 x 2048 and 2048 rows of 2560. From the 2347- and 3500-column sizes
// only a band of 16 full-width rows is encoded, which tests the row length and
// keeps the run time down; the rows below are handled the same way.
//
// For each image the testbench compares every output byte and the reported
// compressed size with the reference model, and checks that exactly
// rows x cols samples were taken from the input. It prints the bits per
// sample and the clocks per sample for each image. The input stream and the
// output reader stall at random on some images. It looks only at the encoder's ports.

module tb_jpegls_workloads;
  import jls_pkg::*;
  import jls_ref_pkg::*;
  import jls_img_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] n_rows, n_cols;
  logic        busy, done;
  logic [31:0] comp_size;
  logic        read_input, in_valid;
  logic [7:0]  in_pixel;
  logic        out_valid, out_ready;
  logic [7:0]  out_byte;

  int checks = 0, failures = 0;

  jpegls_encoder dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (300_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input stream model
  byte unsigned img[];
  int           in_idx;
  int           stall_pct = 0;
  always_ff @(posedge clk) begin
    if (read_input && in_valid) in_idx <= in_idx + 1;
  end
  always_ff @(posedge clk) in_valid <= ($urandom_range(99) >= stall_pct);
  assign in_pixel = (in_idx < img.size()) ? img[in_idx] : 8'd0;

  // output capture
  byte unsigned got[$];
  int           out_stall_pct = 0;
  always_ff @(posedge clk) if (out_valid && out_ready) got.push_back(out_byte);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_ready <= 1'b1;
    else        out_ready <= ($urandom_range(99) >= out_stall_pct);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(input string name, input int rows, input int cols, input int kind,
                           input int seed, input int stall,
                           input int ostall);
    jls_ref ref_m = new();
    byte unsigned exp_bytes[$];
    int cycles;
    bit same;
    make_image(img, rows, cols, kind, seed);
    ref_m.encode(img, rows, cols, exp_bytes);
    stall_pct = stall;
    out_stall_pct = ostall;
    got.delete();
    @(negedge clk);
    in_idx = 0;
    n_rows = 16'(rows);
    n_cols = 16'(cols);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    repeat (2) @(negedge clk);
    check(comp_size == 32'(exp_bytes.size()),
          $sformatf("%s: size %0d, expected %0d", name, comp_size, exp_bytes.size()));
    check(got.size() == exp_bytes.size(),
          $sformatf("%s: %0d bytes out, expected %0d", name, got.size(), exp_bytes.size()));
    same = 1'b1;
    for (int i = 0; i < exp_bytes.size() && i < got.size(); i++) begin
      if (got[i] != exp_bytes[i]) begin
        $display("%s: byte %0d is %02x, expected %02x", name, i, got[i], exp_bytes[i]);
        same = 1'b0;
        break;
      end
    end
    check(same, $sformatf("%s: output bytes differ from the reference", name));
    check(in_idx == rows * cols, $sformatf("%s: consumed %0d samples, expected %0d", name, in_idx, rows * cols));
    $display("%s: %0d x %0d, %0d -> %0d bytes, %0.3f bits/sample, %0.2f clocks/sample",
             name, rows, cols, rows * cols, comp_size,
             8.0 * real'(comp_size) / real'(rows * cols), real'(cycles) / real'(rows * cols));
  endtask

  initial begin
    n_rows = '0; n_cols = '0;
    in_idx = 0;
    img = new[1];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_image("target-size 512x512", 512, 512, 3, 11, 0, 0);
    run_image("us-size 448x512", 448, 512, 1, 12, 10, 30);
    run_image("cmpnd1-size 512x768", 512, 768, 3, 13, 0, 0);
    run_image("aerial2-size 2048x2048", 2048, 2048, 1, 14, 0, 0);
    run_image("chart-size band of 2347", 16, 2347, 3, 15, 5, 5);
    run_image("bike/cafe-size 2048x2560", 2048, 2560, 3, 16, 0, 0);
    run_image("3500-wide band", 16, 3500, 3, 17, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
