// tb_encode_run_length: a sequence of runs of random lengths, some ending at
// the row end and some interrupted (followed by ri_done), with the output
// stream refusing code words at random. The bits sent for each run, the run
// index and J are compared with a model of the adaptive run coding; runs long
// enough to push the index to its top are included.
module tb_encode_run_length;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, start = 0, eol = 0, ri_done = 0, done, code_valid, code_ready;
  logic [15:0] runcnt;
  logic [3:0] j;
  logic [4:0] run_index;
  code_t code;
  int checks = 0, failures = 0, max_idx = 0;
  bit got[$];
  int J[32] = '{0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,4,4,5,5,6,6,7,7,8,9,10,11,12,13,14,15};

  encode_run_length dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (code_valid && code_ready)
      for (int i = int'(code.len) - 1; i >= 0; i--) got.push_back(i < 32 ? code.bits[i] : 1'b0);
    code_ready <= ($urandom_range(3) != 0);
  end

  initial begin
    int idx = 0;
    runcnt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < 400; t++) begin
      bit exp_b[$];
      int cnt;
      automatic bit e = 1'($urandom_range(2) == 0);
      cnt = (t % 50 < 10) ? $urandom_range(60000, 2000) : $urandom_range(e ? 40 : 20, e ? 1 : 0);
      // model
      exp_b.delete();
      begin
        automatic int c = cnt;
        while (c >= (1 << J[idx])) begin
          exp_b.push_back(1); c -= (1 << J[idx]); if (idx < 31) idx++;
        end
        if (e) begin if (c > 0) exp_b.push_back(1); end
        else begin
          exp_b.push_back(0);
          for (int i = J[idx] - 1; i >= 0; i--) exp_b.push_back(c[i]);
        end
      end
      if (idx > max_idx) max_idx = idx;
      got.delete();
      runcnt = 16'(cnt); eol = e;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (got != exp_b) begin failures++; $display("FAIL run %0d eol %0d: %0d bits vs %0d", cnt, e, got.size(), exp_b.size()); end
      checks++;
      if (int'(run_index) != idx || int'(j) != J[idx]) begin failures++; $display("FAIL index %0d vs %0d", run_index, idx); end
      if (!e) begin
        ri_done = 1; @(negedge clk); ri_done = 0;
        if (idx > 0) idx--;
      end
    end
    checks++;
    if (max_idx != 31) begin failures++; $display("FAIL index never reached 31"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
