// encode_run_length: adaptive coding of a run length.
//
// A run index RUNindex (0..31, cleared by `clear` at the start of an image)
// selects the segment order J[RUNindex] from the table 0,0,0,0,1,1,1,1,2,2,2,2,
// 3,3,3,3,4,4,5,5,6,6,7,7,8,9,...,15. On `start` the run count is consumed in
// segments of 2**J: each full segment is sent as a single '1' bit and moves
// RUNindex up by one (at most 31). What is left is then:
//   run ended at the end of the row: one more '1' if anything is left;
//   run interrupted: a '0' followed by the remainder in J[RUNindex] bits.
// `done` pulses when the last code word has been accepted. `ri_done` (the
// interruption sample has been coded) moves RUNindex down by one. `j` is the
// current J[RUNindex], which sets the code limit of the interruption sample.
//
// Timing: one code word per clock while code_ready is high, so a run of n
// full segments takes about n + 2 clocks.
//
// The table, the '1' per segment, the '0' plus remainder and the adaptation
// of the index follow the design description.
module encode_run_length
  import jls_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        start,
  input  logic [15:0] runcnt,
  input  logic        eol,
  input  logic        ri_done,
  output logic        done,
  output logic [3:0]  j,
  output logic [4:0]  run_index,
  // code words to the output stream
  output logic        code_valid,
  input  logic        code_ready,
  output code_t       code
);
  typedef enum logic {R_IDLE, R_SEG} state_e;

  state_e      state;
  logic [15:0] cnt;
  logic        at_eol;
  logic [15:0] seg;

  assign j   = j_of(run_index);
  assign seg = 16'd1 << j;

  always_comb begin
    code_valid = 1'b0;
    code       = '0;
    unique case (state)
      R_SEG: begin
        code_valid = (cnt >= seg) || (at_eol && cnt != 16'd0) || !at_eol;
        if (cnt >= seg || at_eol) begin
          code.len  = 6'd1;
          code.bits = 32'd1;
        end else begin
          code.len  = 6'(j) + 6'd1;          // '0' then J bits
          code.bits = 32'(cnt);
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      cnt       <= '0;
      at_eol    <= 1'b0;
      run_index <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        run_index <= '0;
        state     <= R_IDLE;
      end else begin
        if (ri_done && run_index != 5'd0) run_index <= run_index - 5'd1;
        unique case (state)
          R_IDLE: if (start) begin
            cnt    <= runcnt;
            at_eol <= eol;
            state  <= R_SEG;
          end
          R_SEG: begin
            if (cnt >= seg) begin
              if (code_ready) begin
                cnt <= cnt - seg;
                if (run_index != 5'd31) run_index <= run_index + 5'd1;
              end
            end else if (at_eol && cnt == 16'd0) begin
              state <= R_IDLE;
              done  <= 1'b1;
            end else if (code_ready) begin
              // the final '1' at end of row, or '0' + remainder
              state <= R_IDLE;
              done  <= 1'b1;
            end
          end
          default: state <= R_IDLE;
        endcase
      end
    end
  end
endmodule
