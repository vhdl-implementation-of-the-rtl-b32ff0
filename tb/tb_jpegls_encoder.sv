// tb_jpegls_encoder: end-to-end test of the JPEG-LS encoder at its default
// parameters.
//
// Encodes a set of generated images of several sizes (down to a single column
// and up to the full 4096-column row width) and compares every output byte
// and the reported compressed size with the reference model. The input
// stream withholds data at random to exercise the read_input handshake, and
// the output reader withholds out_ready at random on some images. It
// also counts, in the encoder, how often each coding mechanism occurred
// (regular sample, run ended by a different sample, run ended at the row end,
// run segment, escape code, halving of context counts, bias correction up and
// down, mirrored error mapping, input stall, output stall, encoder paused by
// a blocked output) and checks these counts against the model; a
// mechanism that never occurred over all images counts as a failure.

module tb_jpegls_encoder;
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
    repeat (3_000_000) @(posedge clk);
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
  assign in_pixel = img[in_idx];

  // output capture
  byte unsigned got[$];
  int           out_stall_pct = 0;
  always_ff @(posedge clk) if (out_valid && out_ready) got.push_back(out_byte);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_ready <= 1'b1;
    else        out_ready <= ($urandom_range(99) >= out_stall_pct);

  // mechanism counters in the encoder
  int d_regular, d_run_int, d_run_eol, d_run_seg, d_escape, d_halve, d_bias_up, d_bias_dn, d_mirror;
  int t_in_stall, t_out_stall, t_pause;
  always_ff @(posedge clk) begin
    if (read_input && !in_valid) t_in_stall <= t_in_stall + 1;
    if (out_valid && !out_ready) t_out_stall <= t_out_stall + 1;
    if ((dut.state == dut.S_REG || dut.state == dut.S_RI) && !dut.bw_ready) t_pause <= t_pause + 1;
    if (dut.state == dut.S_REG && dut.bw_ready) begin
      d_regular <= d_regular + 1;
      if (dut.u_ere.u_gc.escape) d_escape <= d_escape + 1;
      if (dut.rd_vars.n == 7'd64) d_halve <= d_halve + 1;
      if (dut.reg_nxt.c > dut.rd_vars.c)
        d_bias_up <= d_bias_up + 1;
      if (dut.reg_nxt.c < dut.rd_vars.c) d_bias_dn <= d_bias_dn + 1;
      if (dut.reg_k == 0 && (2 * int'(dut.rd_vars.b)) <= -int'(dut.rd_vars.n)) d_mirror <= d_mirror + 1;
    end
    if (dut.state == dut.S_RI && dut.bw_ready) begin
      d_run_int <= d_run_int + 1;
      if (dut.u_eri.u_gc.escape) d_escape <= d_escape + 1;
      if (dut.rd_vars.n == 7'd64) d_halve <= d_halve + 1;
    end
    if (dut.state == dut.S_RLEN && dut.erl_done && dut.frc_eol) d_run_eol <= d_run_eol + 1;
    if (dut.state == dut.S_RLEN && dut.erl_valid && dut.bw_ready && dut.erl_code.len == 6'd1
        && dut.u_erl.cnt >= dut.u_erl.seg) d_run_seg <= d_run_seg + 1;
  end

  int t_regular, t_run_int, t_run_eol, t_run_seg, t_escape, t_halve, t_bias_up, t_bias_dn, t_mirror;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_image(input int rows, input int cols, input int kind, input int seed, input int stall,
                           input int ostall);
    jls_ref ref_m = new();
    byte unsigned exp_bytes[$];
    int cycles;
    make_image(img, rows, cols, kind, seed);
    ref_m.encode(img, rows, cols, exp_bytes);
    stall_pct = stall;
    out_stall_pct = ostall;
    got.delete();
    d_regular = 0; d_run_int = 0; d_run_eol = 0; d_run_seg = 0; d_escape = 0;
    d_halve = 0; d_bias_up = 0; d_bias_dn = 0; d_mirror = 0;
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
          $sformatf("%0dx%0d kind %0d: size %0d, expected %0d", rows, cols, kind, comp_size, exp_bytes.size()));
    check(got.size() == exp_bytes.size(),
          $sformatf("%0dx%0d kind %0d: %0d bytes out, expected %0d", rows, cols, kind, got.size(), exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < got.size(); i++) begin
      if (got[i] != exp_bytes[i]) begin
        check(1'b0, $sformatf("%0dx%0d kind %0d: byte %0d is %02x, expected %02x", rows, cols, kind, i, got[i], exp_bytes[i]));
        break;
      end
    end
    check(in_idx == rows * cols, $sformatf("consumed %0d samples, expected %0d", in_idx, rows * cols));
    check(d_regular == ref_m.n_regular, $sformatf("regular %0d vs %0d", d_regular, ref_m.n_regular));
    check(d_run_int == ref_m.n_run_int, $sformatf("run interruptions %0d vs %0d", d_run_int, ref_m.n_run_int));
    check(d_run_eol == ref_m.n_run_eol, $sformatf("end-of-row runs %0d vs %0d", d_run_eol, ref_m.n_run_eol));
    check(d_run_seg == ref_m.n_run_seg, $sformatf("run segments %0d vs %0d", d_run_seg, ref_m.n_run_seg));
    check(d_escape == ref_m.n_escape, $sformatf("escapes %0d vs %0d", d_escape, ref_m.n_escape));
    check(d_halve == ref_m.n_halve, $sformatf("halvings %0d vs %0d", d_halve, ref_m.n_halve));
    check(d_mirror == ref_m.n_k0_mirror, $sformatf("mirrored mappings %0d vs %0d", d_mirror, ref_m.n_k0_mirror));
    t_regular += d_regular; t_run_int += d_run_int; t_run_eol += d_run_eol; t_run_seg += d_run_seg;
    t_escape += d_escape; t_halve += d_halve; t_bias_up += d_bias_up; t_bias_dn += d_bias_dn;
    t_mirror += d_mirror;
    $display("image %0dx%0d kind %0d: %0d -> %0d bytes in %0d cycles (reg %0d, runs int %0d eol %0d seg %0d, esc %0d, halve %0d)",
             rows, cols, kind, rows * cols, comp_size, cycles, d_regular, d_run_int, d_run_eol, d_run_seg, d_escape, d_halve);
  endtask

  initial begin
    n_rows = '0; n_cols = '0;
    in_idx = 0;
    img = new[1];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_image(4, 8, 2, 1, 0, 0);
    run_image(6, 1, 1, 2, 0, 0);
    run_image(16, 24, 0, 3, 20, 95);
    run_image(20, 32, 1, 4, 0, 0);
    run_image(20, 40, 2, 5, 30, 50);
    run_image(24, 48, 3, 6, 10, 0);
    run_image(3, 4096, 3, 7, 0, 0);
    check(t_regular > 0, "no regular-mode sample");
    check(t_run_int > 0, "no run interrupted by a sample");
    check(t_run_eol > 0, "no run ended at the end of a row");
    check(t_run_seg > 0, "no full run segment");
    check(t_escape > 0, "no escape code");
    check(t_halve > 0, "no halving at RESET");
    check(t_bias_up > 0, "no upward bias correction");
    check(t_bias_dn > 0, "no downward bias correction");
    check(t_mirror > 0, "no mirrored error mapping");
    check(t_in_stall > 0, "input never stalled");
    check(t_out_stall > 0, "output never stalled");
    check(t_pause > 0, "encoder never paused by a blocked output");
    $display("mechanisms: regular %0d, run interruption %0d, run at row end %0d, run segment %0d, escape %0d, halving %0d, bias up %0d, bias down %0d, mirrored map %0d",
             t_regular, t_run_int, t_run_eol, t_run_seg, t_escape, t_halve, t_bias_up, t_bias_dn, t_mirror);
    $display("stalls: input %0d cycles, output %0d cycles, encoder paused %0d cycles",
             t_in_stall, t_out_stall, t_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
