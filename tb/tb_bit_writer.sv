// tb_bit_writer: feeds random code words (1..40 bits) with random gaps,
// flushes, and compares the bytes and the byte count with the bit sequence
// the code words describe; also checks that a clear starts a fresh stream.
// The reader withholds out_ready at random in some runs; the testbench checks
// that a byte on offer stays unchanged until it is taken and that the writer
// stops accepting code words while its output is blocked.
module tb_bit_writer;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, code_valid = 0, code_ready, flush = 0, flush_done, out_valid;
  logic out_ready = 1;
  int   stall_pct = 0, n_held = 0;
  code_t code;
  logic [7:0] out_byte;
  logic [31:0] byte_count;
  int checks = 0, failures = 0;
  byte unsigned got[$];

  bit_writer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_byte);
  always @(negedge clk) out_ready = ($urandom_range(99) >= stall_pct);

  // a byte on offer must not change or vanish before it is taken
  logic       held_v = 0;
  logic [7:0] held_b;
  always @(posedge clk) begin
    if (held_v && rst_n && !clear) begin
      checks++;
      if (!out_valid || out_byte != held_b) begin
        failures++;
        $display("FAIL byte on offer changed");
      end
      n_held++;
    end
    held_v <= out_valid && !out_ready;
    held_b <= out_byte;
  end

  task automatic run(input int ncodes, input int stall);
    bit bits[$];
    byte unsigned exp_b[$];
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    got.delete();
    stall_pct = stall;
    for (int i = 0; i < ncodes; i++) begin
      int len = $urandom_range(40, 1);
      logic [31:0] v = $urandom();
      code.len = 6'(len);
      code.bits = (len >= 32) ? v : (v & ((32'd1 << len) - 1));
      for (int b = len - 1; b >= 0; b--) bits.push_back(b < 32 ? code.bits[b] : 1'b0);
      code_valid = 1;
      while (!code_ready) @(negedge clk);
      @(negedge clk);
      code_valid = 0;
      if ($urandom_range(3) == 0) repeat ($urandom_range(4)) @(negedge clk);
    end
    flush = 1; @(negedge clk); flush = 0;
    while (!flush_done) @(negedge clk);
    @(negedge clk);
    while (bits.size() % 8) bits.push_back(0);
    for (int i = 0; i < bits.size(); i += 8) begin
      byte unsigned b8 = 0;
      for (int j = 0; j < 8; j++) b8 = {b8[6:0], bits[i+j]};
      exp_b.push_back(b8);
    end
    checks++; if (byte_count != 32'(exp_b.size())) begin failures++; $display("FAIL count %0d vs %0d", byte_count, exp_b.size()); end
    checks++; if (got != exp_b) begin failures++; $display("FAIL bytes differ (%0d vs %0d)", got.size(), exp_b.size()); end
  endtask

  initial begin
    code = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1, 0);
    run(50, 0);
    run(400, 0);
    run(400, 50);
    run(200, 95);
    // the output blocked for good: the writer must stop taking code words
    stall_pct = 100;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    code.len = 6'd32; code.bits = 32'hdeadbeef; code_valid = 1;
    repeat (20) @(negedge clk);
    code_valid = 0;
    checks++; if (code_ready) begin failures++; $display("FAIL code_ready with output blocked"); end
    stall_pct = 0;
    flush = 1; @(negedge clk); flush = 0;
    while (!flush_done) @(negedge clk);
    checks++; if (n_held == 0) begin failures++; $display("FAIL output never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
