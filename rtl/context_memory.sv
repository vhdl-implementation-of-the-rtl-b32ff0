// context_memory: the context statistics of the encoder.
//
// For each of the 367 contexts (0..364 regular, 365 and 366 run
// interruption) it keeps A (sum of error magnitudes), B (bias sum),
// C (bias correction) and N (occurrence count), plus Nn (count of negative
// errors) for the two run-interruption contexts. One read port with
// combinational read, one write port written at the clock edge.
//
// On `init` every context is set to A = 4, B = 0, C = 0, N = 1 and Nn = 0, one
// context per clock (367 clocks); `busy` is high meanwhile and the ports must
// not be used. This sequential clearing suits a block or distributed RAM.
//
// The arrays and their meaning follow the design description; the initial
// values are those of the JPEG-LS standard for 8-bit samples.
module context_memory
  import jls_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  output logic            busy,
  // read port
  input  ctx_idx_t        rd_q,
  output ctx_vars_t       rd_vars,
  output logic [NW-1:0]   rd_nn,      // Nn of context rd_q (0 for regular)
  // write port
  input  logic            we,
  input  ctx_idx_t        wr_q,
  input  ctx_vars_t       wr_vars,
  input  logic [NW-1:0]   wr_nn
);
  ctx_vars_t     vars [N_CTX];
  logic [NW-1:0] nn   [2];
  ctx_idx_t      init_q;

  ctx_vars_t init_vars;
  assign init_vars = '{a: AW'(A_INIT), b: '0, c: '0, n: NW'(1)};

  assign rd_vars = vars[rd_q];
  assign rd_nn   = (rd_q >= ctx_idx_t'(N_REG_CTX)) ? nn[rd_q[0] ? 0 : 1] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      init_q <= '0;
    end else if (init && !busy) begin
      busy   <= 1'b1;
      init_q <= '0;
    end else if (busy) begin
      if (init_q == ctx_idx_t'(N_CTX - 1)) busy <= 1'b0;
      init_q <= init_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      vars[init_q] <= init_vars;
      if (init_q < 2) nn[init_q[0]] <= '0;
    end else if (we) begin
      vars[wr_q] <= wr_vars;
      if (wr_q >= ctx_idx_t'(N_REG_CTX)) nn[wr_q[0] ? 0 : 1] <= wr_nn;
    end
  end
endmodule
