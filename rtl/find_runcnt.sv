// find_runcnt: run counting in run mode.
//
// `start` opens a run: the run value becomes Ra and the count 0. For each
// sample then offered (sample_valid) it compares x with the run value. An
// equal sample is counted; if it was the last of the row the run ends there
// (ended with eol = 1), otherwise `more` asks for the next sample. A
// different sample ends the run (ended with eol = 0): it is the run
// interruption sample and is not counted. `more` and `ended` are registered
// and pulse one clock after sample_valid.
//
// Lossless operation: a sample belongs to the run only when it equals Ra
// exactly. This follows the design description; the count width (16 bits,
// a full row) is a choice of this design.
module find_runcnt
  import jls_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pixel_t      ra,
  input  logic        sample_valid,
  input  pixel_t      x,
  input  logic        last_col,
  output logic        more,
  output logic        ended,
  output logic        eol,
  output logic [15:0] runcnt
);
  pixel_t runval;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      runval <= '0;
      runcnt <= '0;
      more   <= 1'b0;
      ended  <= 1'b0;
      eol    <= 1'b0;
    end else begin
      more  <= 1'b0;
      ended <= 1'b0;
      if (start) begin
        runval <= ra;
        runcnt <= '0;
        eol    <= 1'b0;
      end else if (sample_valid) begin
        if (x == runval) begin
          runcnt <= runcnt + 16'd1;
          if (last_col) begin
            ended <= 1'b1;
            eol   <= 1'b1;
          end else begin
            more <= 1'b1;
          end
        end else begin
          ended <= 1'b1;
          eol   <= 1'b0;
        end
      end
    end
  end
endmodule
