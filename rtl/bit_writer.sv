// bit_writer: output stream of the encoder.
//
// Accepts variable-length code words (code_t, up to 63 bits, MSB first) and
// packs them into bytes, the first bit of the stream landing in bit 7 of the
// first byte. Up to 96 pending bits are held; a code word is accepted
// (code_ready) while at most 33 bits are pending. A byte is moved to the
// output register whenever 8 or more bits are pending and the register is
// empty or being read, so with `out_ready` held high one byte leaves per
// clock. The byte on out_byte is taken in a clock where out_valid and
// out_ready are both high. While out_ready is low the pending bits pile up and
// code_ready falls, which stops the encoder until the reader catches up. On
// `flush` the last partial byte is padded with '0' bits and sent; `flush_done`
// rises for one cycle in the clock the last byte is taken.
// `byte_count` is the number of bytes sent since reset or `clear`; it is the
// compressed size reported to the host.
//
// The description says code words go to an output stream, that the host
// reads the compressed size, and that processing has to stop while a full
// result memory is read out; the byte packing, the valid/ready output and the
// zero padding are choices of this design (no marker-byte bit stuffing is
// done).
module bit_writer
  import jls_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,       // start a new stream
  input  logic        code_valid,
  output logic        code_ready,
  input  code_t       code,
  input  logic        flush,       // pad and send the last byte
  output logic        flush_done,
  output logic        out_valid,
  input  logic        out_ready,   // reader takes out_byte
  output logic [7:0]  out_byte,
  output logic [31:0] byte_count
);
  localparam int unsigned ACCW = 96;

  logic [ACCW-1:0] acc;
  logic [6:0]      count;        // pending bits, 0..96
  logic            take, emit, flushing, out_free;

  assign code_ready = (count <= 7'd33) && !flushing;
  assign take       = code_valid && code_ready;
  assign out_free   = !out_valid || out_ready;
  assign emit       = (count >= 7'd8) && out_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      count      <= '0;
      out_valid  <= 1'b0;
      out_byte   <= '0;
      byte_count <= '0;
      flushing   <= 1'b0;
      flush_done <= 1'b0;
    end else if (clear) begin
      acc        <= '0;
      count      <= '0;
      out_valid  <= 1'b0;
      byte_count <= '0;
      flushing   <= 1'b0;
      flush_done <= 1'b0;
    end else begin
      flush_done <= 1'b0;
      if (emit) begin
        out_valid  <= 1'b1;
        out_byte   <= 8'(acc >> (count - 7'd8));
        byte_count <= byte_count + 32'd1;
      end else if (out_ready) begin
        out_valid  <= 1'b0;
      end
      if (take) begin
        acc   <= (acc << code.len) | ACCW'(code.bits);
        count <= count - (emit ? 7'd8 : 7'd0) + 7'(code.len);
      end else if (flushing && count < 7'd8 && count != 7'd0) begin
        // pad the final partial byte with zeros
        acc   <= acc << (7'd8 - count);
        count <= 7'd8;
      end else if (emit) begin
        count <= count - 7'd8;
      end
      if (flush && !flushing) flushing <= 1'b1;
      if (flushing && count == 7'd0 && out_free) begin
        flushing   <= 1'b0;
        flush_done <= 1'b1;
      end
    end
  end
endmodule
