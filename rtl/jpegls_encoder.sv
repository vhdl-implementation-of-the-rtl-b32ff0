// jpegls_encoder: lossless JPEG-LS (LOCO-I) encoder for 8-bit grey images.
//
// The host stores the image size (n_rows, n_cols) and pulses `start`. The
// encoder clears its context statistics, then works row by row: it loads the
// row from the input stream into a two-row image memory, and for every sample
// fetches the sample and its neighbours, finds the context and either codes
// the sample in regular mode (prediction, bias correction, Golomb coding,
// context update) or, where the neighbourhood is flat, enters run mode, counts
// the run, codes its length and codes the sample that ended it. Code words are
// packed into bytes on out_byte/out_valid. When the image is done `done`
// rises and `comp_size` holds the number of bytes produced, which the host
// needs because the compressed size varies.
//
// Each component has a start/done handshake, and a central sequencer starts
// the next one when the previous one has finished, so components that need a
// variable number of clocks (filling a row, coding a run) simply take longer.
// A regular sample takes about 12 clocks, a run sample about 11 clocks, a row
// load n_cols + 3 clocks.
//
// Interface: host side start/n_rows/n_cols/done/busy/comp_size; input stream
// read_input (ready) with in_valid/in_pixel, one sample taken per cycle in
// which both are high, in raster order; output out_valid/out_ready/out_byte,
// one byte per cycle at most, taken when out_valid and out_ready are both
// high. Holding out_ready low pauses the encoder (after a few bytes of
// buffering), as is needed while a full result memory is emptied. The header of a JPEG-LS file and the
// marker bit stuffing are not produced: the output is the bare coded scan.
//
// The division into components, their order and the host register set follow
// the design description; the sequencer, the handshake details and all
// interface timings are choices of this design.
module jpegls_encoder
  import jls_pkg::*;
#(
  parameter int unsigned MAX_COLS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // host registers
  input  logic        start,
  input  logic [15:0] n_rows,
  input  logic [15:0] n_cols,
  output logic        busy,
  output logic        done,
  output logic [31:0] comp_size,
  // input stream
  output logic        read_input,
  input  logic        in_valid,
  input  pixel_t      in_pixel,
  // compressed output stream
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte
);
  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_ROW, S_FILL, S_GET, S_GETW, S_CTXW, S_RUN1, S_RUNW,
    S_RLEN, S_RI, S_REG, S_NEXT, S_FLUSH, S_FLUSHW
  } state_e;

  state_e      state;
  logic [15:0] rows_r, cols_r, row, col;
  logic        last_col;

  assign last_col = (col == cols_r - 16'd1);
  assign busy     = (state != S_IDLE);

  // ---------------------------------------------------------------- image memory
  img_req_t  acc [2];
  img_req_t  mem_req;
  logic [1:0] req, gnt;
  pixel_t    mem_rdata;
  logic      swap;

  image_row_buffer #(.MAX_COLS(MAX_COLS)) u_img (
    .clk, .rst_n, .swap, .req(mem_req), .rdata(mem_rdata)
  );

  enc_mem_cntrl #(.NREQ(2)) u_memctl (
    .clk, .rst_n, .req, .acc, .gnt, .mem_req
  );

  // ---------------------------------------------------------------- row fill
  logic fill_start, fill_done;

  fill_image_row u_fill (
    .clk, .rst_n, .start(fill_start), .n_cols(cols_r), .done(fill_done),
    .read_input, .in_valid, .in_pixel,
    .mem_req(req[0]), .mem_gnt(gnt[0]), .mem_acc(acc[0])
  );

  // ---------------------------------------------------------------- sample fetch
  logic   gns_start, gns_done, skip_context;
  pixel_t x, ra, rb, rc, rd;
  logic   run_mode;

  get_next_sample u_gns (
    .clk, .rst_n, .start(gns_start), .row, .col, .n_cols(cols_r),
    .run_mode, .done(gns_done), .skip_context,
    .x, .ra, .rb, .rc, .rd,
    .mem_req(req[1]), .mem_gnt(gnt[1]), .mem_acc(acc[1]), .mem_rdata
  );

  // ---------------------------------------------------------------- context
  logic     fc_done, run_exit, ctx_sign;
  ctx_idx_t ctx_q;

  find_context u_fc (
    .clk, .rst_n, .start(gns_done), .skip_context, .run_exit,
    .ra, .rb, .rc, .rd, .done(fc_done), .q(ctx_q), .sign(ctx_sign), .run_mode
  );

  // ---------------------------------------------------------------- statistics
  logic          ctx_init, ctx_busy, ctx_we;
  ctx_idx_t      rd_q, wr_q;
  ctx_vars_t     rd_vars, wr_vars;
  logic [NW-1:0] rd_nn, wr_nn;

  context_memory u_ctx (
    .clk, .rst_n, .init(ctx_init), .busy(ctx_busy),
    .rd_q, .rd_vars, .rd_nn, .we(ctx_we), .wr_q, .wr_vars, .wr_nn
  );

  // ---------------------------------------------------------------- regular mode
  pixel_t            px;
  logic signed [8:0] errval;
  logic [3:0]        reg_k;
  logic [8:0]        merrval;
  code_t             reg_code;
  ctx_vars_t         reg_nxt;

  predictor u_pred (
    .x, .ra, .rb, .rc, .sign(ctx_sign), .c(rd_vars.c), .px, .errval
  );

  encode_reg_error u_ere (
    .errval, .a(rd_vars.a), .b(rd_vars.b), .n(rd_vars.n),
    .k(reg_k), .merrval, .code(reg_code)
  );

  update_reg_var u_urv (.errval, .cur(rd_vars), .nxt(reg_nxt));

  // ---------------------------------------------------------------- run mode
  logic  bw_clear, bw_valid, bw_ready, bw_flush, bw_flush_done;
  code_t bw_code;
  logic        frc_start, frc_valid, frc_more, frc_ended, frc_eol;
  logic [15:0] runcnt;

  find_runcnt u_frc (
    .clk, .rst_n, .start(frc_start), .ra, .sample_valid(frc_valid), .x,
    .last_col, .more(frc_more), .ended(frc_ended), .eol(frc_eol), .runcnt
  );

  logic        erl_clear, erl_start, erl_done, ri_done;
  logic [3:0]  run_j;
  logic [4:0]  run_index;
  logic        erl_valid;
  code_t       erl_code;

  encode_run_length u_erl (
    .clk, .rst_n, .clear(erl_clear), .start(erl_start), .runcnt, .eol(frc_eol),
    .ri_done, .done(erl_done), .j(run_j), .run_index,
    .code_valid(erl_valid), .code_ready(bw_ready), .code(erl_code)
  );

  logic          ritype;
  ctx_idx_t      ri_q;
  code_t         ri_code;
  ctx_vars_t     ri_nxt;
  logic [NW-1:0] ri_nxt_nn;

  encode_run_interruption u_eri (
    .x, .ra, .rb, .j(run_j), .cur(rd_vars), .nn(rd_nn),
    .ritype, .q(ri_q), .code(ri_code), .nxt(ri_nxt), .nxt_nn(ri_nxt_nn)
  );

  // ---------------------------------------------------------------- output

  bit_writer u_bw (
    .clk, .rst_n, .clear(bw_clear), .code_valid(bw_valid), .code_ready(bw_ready),
    .code(bw_code), .flush(bw_flush), .flush_done(bw_flush_done),
    .out_valid, .out_ready, .out_byte, .byte_count(comp_size)
  );

  // ---------------------------------------------------------------- sequencer
  always_comb begin
    swap       = (state == S_ROW);
    fill_start = (state == S_ROW);
    gns_start  = (state == S_GET);
    frc_start  = (state == S_CTXW) && fc_done && run_mode;
    frc_valid  = (state == S_RUN1) || ((state == S_GETW) && gns_done && skip_context);
    erl_start  = (state == S_RUNW) && frc_ended;
    run_exit   = (state == S_RLEN) && erl_done;
    ctx_init   = (state == S_IDLE) && start;
    bw_clear   = (state == S_IDLE) && start;
    erl_clear  = (state == S_IDLE) && start;
    bw_flush   = (state == S_FLUSH);

    rd_q = (state == S_RI) ? ri_q : ctx_q;
    wr_q = rd_q;
    unique case (state)
      S_REG:   begin bw_valid = 1'b1;      bw_code = reg_code; end
      S_RI:    begin bw_valid = 1'b1;      bw_code = ri_code;  end
      S_RLEN:  begin bw_valid = erl_valid; bw_code = erl_code; end
      default: begin bw_valid = 1'b0;      bw_code = '0;       end
    endcase
    ctx_we  = ((state == S_REG) || (state == S_RI)) && bw_ready;
    wr_vars = (state == S_RI) ? ri_nxt : reg_nxt;
    wr_nn   = ri_nxt_nn;
    ri_done = (state == S_RI) && bw_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rows_r <= '0;
      cols_r <= '0;
      row    <= '0;
      col    <= '0;
      done   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          rows_r <= n_rows;
          cols_r <= n_cols;
          row    <= '0;
          col    <= '0;
          done   <= 1'b0;
          state  <= S_INIT;
        end
        S_INIT:  if (!ctx_busy) state <= S_ROW;
        S_ROW:   state <= S_FILL;
        S_FILL:  if (fill_done) state <= S_GET;
        S_GET:   state <= S_GETW;
        S_GETW:  if (gns_done) state <= skip_context ? S_RUNW : S_CTXW;
        S_CTXW:  if (fc_done) state <= run_mode ? S_RUN1 : S_REG;
        S_RUN1:  state <= S_RUNW;
        S_RUNW: begin
          if (frc_more) begin
            col   <= col + 16'd1;
            state <= S_GET;
          end else if (frc_ended) begin
            state <= S_RLEN;
          end
        end
        S_RLEN:  if (erl_done) state <= frc_eol ? S_NEXT : S_RI;
        S_RI:    if (bw_ready) state <= S_NEXT;
        S_REG:   if (bw_ready) state <= S_NEXT;
        S_NEXT: begin
          if (last_col) begin
            col <= '0;
            if (row == rows_r - 16'd1) state <= S_FLUSH;
            else begin
              row   <= row + 16'd1;
              state <= S_ROW;
            end
          end else begin
            col   <= col + 16'd1;
            state <= S_GET;
          end
        end
        S_FLUSH: state <= S_FLUSHW;
        S_FLUSHW: if (bw_flush_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
