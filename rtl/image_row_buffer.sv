// image_row_buffer: the encoder's image memory, holding the current and the
// previous image row.
//
// Two banks of MAX_COLS samples. A bank-select bit names the bank holding the
// current row; `swap` toggles it, so the old current row becomes the previous
// row without copying, and the next row is then written over the row before
// it. Requests address a bank relative to that bit (prev = 0: current row,
// prev = 1: previous row). One access per clock; a read returns its sample on
// rdata in the following cycle (synchronous read, block-RAM style), a write
// takes effect at the clock edge.
//
// The two alternating rows and the toggled bit follow the design
// description; the synchronous read and MAX_COLS = 4096 (enough for the
// 3500-column images the description mentions) are choices of this design.
module image_row_buffer
  import jls_pkg::*;
#(
  parameter int unsigned MAX_COLS = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     swap,     // the current row becomes the previous row
  input  img_req_t req,
  output pixel_t   rdata
);
  localparam int unsigned COLW = $clog2(MAX_COLS);

  pixel_t mem [2*MAX_COLS];
  logic   cur_bank;
  logic   bank;

  assign bank = cur_bank ^ req.prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur_bank <= 1'b0;
    else if (swap) cur_bank <= ~cur_bank;
  end

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[{bank, req.col[COLW-1:0]}] <= req.wdata;
      else        rdata <= mem[{bank, req.col[COLW-1:0]}];
    end
  end
endmodule
