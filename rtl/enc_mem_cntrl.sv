// enc_mem_cntrl: access control for the shared image memory.
//
// Several components may want the image memory. A component raises req[i]
// and keeps it high for the whole of its operation. When no component owns
// the memory, the lowest-numbered requester becomes the owner at the next
// clock edge and sees gnt[i]; it keeps the memory until it drops req[i], and
// other requesters wait until then. Only the owner's accesses reach the
// memory port; the read data is shared by all.
//
// That one component holds the memory until it has finished, while the others
// queue, follows the design description; the fixed priority is a choice of
// this design.
module enc_mem_cntrl
  import jls_pkg::*;
#(
  parameter int unsigned NREQ = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic     [NREQ-1:0] req,
  input  img_req_t            acc [NREQ],
  output logic     [NREQ-1:0] gnt,
  output img_req_t            mem_req
);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic          owned;
  logic [IW-1:0] owner;
  logic          pick_valid;
  logic [IW-1:0] pick;

  always_comb begin
    pick_valid = 1'b0;
    pick       = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req[i]) begin
        pick_valid = 1'b1;
        pick       = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned <= 1'b0;
      owner <= '0;
    end else if (!owned || !req[owner]) begin
      owned <= pick_valid;
      owner <= pick;
    end
  end

  always_comb begin
    gnt     = '0;
    mem_req = '0;
    if (owned && req[owner]) begin
      gnt[owner] = 1'b1;
      mem_req    = acc[owner];
    end
  end

  // Never more than one grant.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
