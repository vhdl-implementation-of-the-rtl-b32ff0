// tb_enc_mem_cntrl: two requesters raise and drop requests at random. Checks
// that at most one is granted, that a granted requester keeps the grant for as
// long as it requests, that a lone requester is granted within one cycle, and
// that the memory port carries exactly the granted requester's access.
module tb_enc_mem_cntrl;
  import jls_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] req, gnt, gnt_q, req_q;
  img_req_t acc [2];
  img_req_t mem_req;
  int checks = 0, failures = 0, grants0 = 0, grants1 = 0, waits = 0;

  enc_mem_cntrl #(.NREQ(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; gnt_q = 0; req_q = 0;
    acc[0] = '0; acc[1] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      // a requester holds its request for a while once granted
      for (int i = 0; i < 2; i++) begin
        if (gnt[i]) req[i] = ($urandom_range(7) != 0);
        else if (!req[i]) req[i] = ($urandom_range(3) == 0);
      end
      acc[0] = '{en: 1, we: 1, prev: 0, col: 16'($urandom()), wdata: 8'($urandom())};
      acc[1] = '{en: 1, we: 0, prev: 1, col: 16'($urandom()), wdata: 8'($urandom())};
      #1;
      checks++;
      if (gnt[0] && gnt[1]) begin failures++; $display("FAIL both granted"); end
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (gnt_q[i] && req_q[i] && req[i] && !gnt[i]) begin failures++; $display("FAIL grant %0d taken away", i); end
      end
      checks++;
      if (gnt[0] && mem_req != acc[0] || gnt[1] && mem_req != acc[1] || gnt == 0 && mem_req.en) begin
        failures++; $display("FAIL port mux");
      end
      if (req == 2'b11 && gnt != 0) waits++;
      if (gnt[0]) grants0++;
      if (gnt[1]) grants1++;
      // a lone request that was pending last cycle with nothing granted must be granted now
      checks++;
      if (req_q == 2'b01 && gnt_q == 0 && req[0] && !gnt[0]) begin failures++; $display("FAIL no grant"); end
      gnt_q = gnt; req_q = req;
      @(negedge clk);
    end
    checks++;
    if (grants0 == 0 || grants1 == 0 || waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
