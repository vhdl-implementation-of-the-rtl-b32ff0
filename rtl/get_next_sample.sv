// get_next_sample: gathers the current sample x and its causal neighbours.
//
//        Rc Rb Rd      (previous row)
//        Ra x          (current row)
//
// On `start` it requests the image memory and reads, one per clock, x, Rb,
// Rc, Rd and Ra in that order, so that Rb is known before Ra and Rd may be
// set from it. Flags from the position decide which values are read and which
// are assigned by the image-boundary rules:
//   row 0:                Rb = Rc = Rd = 0, and Ra = 0 at column 0
//   column 0, row > 0:    Ra = Rb, Rc = the Ra used at column 0 of the row
//                         before (0 for row 1)
//   last column, row > 0: Rd = Rb
// The memory answers a read one clock after it is issued, so from the grant
// the five slots take six clocks; `done` then pulses with all five values
// stable. `skip_context` is a registered copy of `run_mode`, telling the
// context stage to leave a sample that belongs to a run alone.
//
// The read order and the boundary rules follow the design description; the
// fixed six-slot schedule is a choice of this design.
module get_next_sample
  import jls_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] row,
  input  logic [15:0] col,
  input  logic [15:0] n_cols,
  input  logic        run_mode,
  output logic        done,
  output logic        skip_context,
  output pixel_t      x,
  output pixel_t      ra,
  output pixel_t      rb,
  output pixel_t      rc,
  output pixel_t      rd,
  // image memory, through enc_mem_cntrl
  output logic        mem_req,
  input  logic        mem_gnt,
  output img_req_t    mem_acc,
  input  pixel_t      mem_rdata
);
  typedef enum logic [2:0] {SL_X, SL_RB, SL_RC, SL_RD, SL_RA, SL_END} slot_e;

  logic   busy;
  slot_e  slot;         // slot issued this cycle
  slot_e  last_slot;    // slot issued in the previous cycle
  logic   last_read;    // previous slot read the memory
  logic   first_row, first_col, last_col;
  pixel_t rc_col0;      // Ra used at column 0 of the previous row
  logic   need;

  assign first_row = (row == 16'd0);
  assign first_col = (col == 16'd0);
  assign last_col  = (col == n_cols - 16'd1);
  assign mem_req   = busy;

  // does the slot read the memory, or is its value assigned by a rule?
  always_comb begin
    unique case (slot)
      SL_X:    need = 1'b1;
      SL_RB:   need = !first_row;
      SL_RC:   need = !first_row && !first_col;
      SL_RD:   need = !first_row && !last_col;
      SL_RA:   need = !first_col;
      default: need = 1'b0;
    endcase
  end

  always_comb begin
    mem_acc      = '0;
    mem_acc.en   = busy && mem_gnt && need;
    mem_acc.we   = 1'b0;
    unique case (slot)
      SL_X:    begin mem_acc.prev = 1'b0; mem_acc.col = col;          end
      SL_RB:   begin mem_acc.prev = 1'b1; mem_acc.col = col;          end
      SL_RC:   begin mem_acc.prev = 1'b1; mem_acc.col = col - 16'd1;  end
      SL_RD:   begin mem_acc.prev = 1'b1; mem_acc.col = col + 16'd1;  end
      SL_RA:   begin mem_acc.prev = 1'b0; mem_acc.col = col - 16'd1;  end
      default: begin mem_acc.prev = 1'b0; mem_acc.col = col;          end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      slot         <= SL_X;
      last_slot    <= SL_END;
      last_read    <= 1'b0;
      done         <= 1'b0;
      skip_context <= 1'b0;
      x <= '0; ra <= '0; rb <= '0; rc <= '0; rd <= '0;
      rc_col0      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        slot      <= SL_X;
        last_slot <= SL_END;
        last_read <= 1'b0;
      end else if (busy && mem_gnt) begin
        // capture the sample read in the previous cycle
        if (last_read) begin
          unique case (last_slot)
            SL_X:    x  <= mem_rdata;
            SL_RB:   rb <= mem_rdata;
            SL_RC:   rc <= mem_rdata;
            SL_RD:   rd <= mem_rdata;
            SL_RA:   ra <= mem_rdata;
            default: ;
          endcase
        end
        // assign the values the boundary rules give, in slot order
        if (!need) begin
          unique case (slot)
            SL_RB: rb <= '0;
            SL_RC: rc <= first_row ? '0 : rc_col0;
            SL_RD: rd <= first_row ? '0 : rb;   // Rb was captured one slot ago
            SL_RA: begin
              // Rb is final by now: it was read two slots ago at the latest
              ra <= first_row ? '0 : rb;
              rc_col0 <= first_row ? '0 : rb;
            end
            default: ;
          endcase
        end
        last_slot <= slot;
        last_read <= need;
        if (slot == SL_END) begin
          busy         <= 1'b0;
          done         <= 1'b1;
          skip_context <= run_mode;
        end else begin
          slot <= slot_e'(slot + 3'd1);
        end
      end
    end
  end
endmodule
