// tb_context_memory: after init (checked to take 367 clocks) every context
// must read A=4, B=0, C=0, N=1, Nn=0; then random writes, including Nn of the
// two run-interruption contexts, are checked against a shadow copy; a second
// init must restore the initial values.
module tb_context_memory;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, busy, we = 0;
  ctx_idx_t rd_q, wr_q;
  ctx_vars_t rd_vars, wr_vars;
  logic [6:0] rd_nn, wr_nn;
  int checks = 0, failures = 0;
  ctx_vars_t shadow [367];
  int shadow_nn [2];

  context_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_init();
    int cyc = 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 367) begin failures++; $display("FAIL init took %0d", cyc); end
    for (int i = 0; i < 367; i++) begin
      shadow[i] = '{a: 16'd4, b: 8'sd0, c: 8'sd0, n: 7'd1};
      rd_q = 9'(i); #1;
      checks++;
      if (rd_vars != shadow[i] || rd_nn != 0) begin failures++; $display("FAIL init ctx %0d", i); end
    end
    shadow_nn = '{0, 0};
  endtask

  initial begin
    rd_q = 0; wr_q = 0; wr_vars = '0; wr_nn = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    do_init();
    for (int t = 0; t < 3000; t++) begin
      automatic int q = (t % 4 == 0) ? 365 + $urandom_range(1) : $urandom_range(366);
      wr_q = 9'(q);
      wr_vars = '{a: 16'($urandom()), b: 8'($urandom()), c: 8'($urandom()), n: 7'($urandom())};
      wr_nn = 7'($urandom());
      we = 1; @(negedge clk); we = 0;
      shadow[q] = wr_vars;
      if (q >= 365) shadow_nn[q - 365] = wr_nn;
      rd_q = 9'($urandom_range(366)); #1;
      checks++;
      if (rd_vars != shadow[rd_q] || int'(rd_nn) != (rd_q >= 365 ? shadow_nn[rd_q - 365] : 0)) begin
        failures++; $display("FAIL read ctx %0d", rd_q);
      end
    end
    do_init();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
