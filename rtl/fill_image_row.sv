// fill_image_row: loads the next image row into the image memory.
//
// On `start` it requests the image memory and, once granted, raises
// read_input to the input stream. A sample is taken in every cycle in which
// read_input and in_valid are both high and is written to column 0, 1, ...,
// n_cols-1 of the current row. After the last sample it releases the memory
// and pulses `done`. With a source that always has data, a row of N samples
// takes N clocks plus two for the grant and `done`.
//
// Reading one sample per read_input request and writing over the older row
// follow the design description; the valid/ready form of the read_input
// handshake is a choice of this design.
module fill_image_row
  import jls_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] n_cols,
  output logic        done,
  // input stream
  output logic        read_input,
  input  logic        in_valid,
  input  pixel_t      in_pixel,
  // image memory, through enc_mem_cntrl
  output logic        mem_req,
  input  logic        mem_gnt,
  output img_req_t    mem_acc
);
  logic        busy;
  logic [15:0] col;
  logic        take;

  assign mem_req    = busy;
  assign read_input = busy && mem_gnt;
  assign take       = read_input && in_valid;

  always_comb begin
    mem_acc       = '0;
    mem_acc.en    = take;
    mem_acc.we    = 1'b1;
    mem_acc.prev  = 1'b0;
    mem_acc.col   = col;
    mem_acc.wdata = in_pixel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      col  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        col  <= '0;
      end else if (take) begin
        if (col == n_cols - 16'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        col <= col + 16'd1;
      end
    end
  end
endmodule
