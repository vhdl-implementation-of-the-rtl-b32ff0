// find_context: context determination for one sample.
//
// From the neighbours it forms the local gradients D1 = Rd - Rb,
// D2 = Rb - Rc, D3 = Rc - Ra and quantises each into nine regions -4..4
// with the thresholds T1 = 3, T2 = 7, T3 = 21 (lossless: a gradient of 0 is
// region 0, any negative gradient at least region -1). If the first non-zero
// region is negative all three are negated and sign = 1 (SIGN = -1). The
// context number is Q = 81*Q1 + 9*Q2 + Q3, in 1..364; the multiplications are
// fixed shifts and adds. When all three gradients are 0 the sample starts a
// run and run_mode is raised instead.
//
// Timing: on `start` (sample fetched) the result is registered and `done`
// pulses one clock later. With skip_context set (the sample belongs to a run)
// nothing is recomputed and only `done` pulses. run_mode stays high until
// run_exit.
//
// All of the above follows the design description except the register
// holding run_mode until run_exit, which is how this design ends a run.
module find_context
  import jls_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     skip_context,
  input  logic     run_exit,
  input  pixel_t   ra,
  input  pixel_t   rb,
  input  pixel_t   rc,
  input  pixel_t   rd,
  output logic     done,
  output ctx_idx_t q,
  output logic     sign,       // 1: gradients were negated (SIGN = -1)
  output logic     run_mode
);
  logic signed [9:0] d1, d2, d3;
  logic signed [3:0] q1, q2, q3, f1, f2, f3;
  logic              neg;
  logic signed [8:0]  qsum;    // 0..364 after sign folding

  function automatic logic signed [3:0] quant(input logic signed [9:0] d);
    if      (d <= -10'(T3)) return -4'sd4;
    else if (d <= -10'(T2)) return -4'sd3;
    else if (d <= -10'(T1)) return -4'sd2;
    else if (d <   10'sd0)  return -4'sd1;
    else if (d ==  10'sd0)  return  4'sd0;
    else if (d <   10'(T1)) return  4'sd1;
    else if (d <   10'(T2)) return  4'sd2;
    else if (d <   10'(T3)) return  4'sd3;
    else                    return  4'sd4;
  endfunction

  always_comb begin
    d1 = $signed({2'b00, rd}) - $signed({2'b00, rb});
    d2 = $signed({2'b00, rb}) - $signed({2'b00, rc});
    d3 = $signed({2'b00, rc}) - $signed({2'b00, ra});
    q1 = quant(d1);
    q2 = quant(d2);
    q3 = quant(d3);
    neg = (q1 < 0) || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0);
    f1 = neg ? -q1 : q1;
    f2 = neg ? -q2 : q2;
    f3 = neg ? -q3 : q3;
    // 81*f1 + 9*f2 + f3 as shifts and adds
    qsum = 9'((10'(f1) <<< 6) + (10'(f1) <<< 4) + 10'(f1)
            + (10'(f2) <<< 3) + 10'(f2) + 10'(f3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      q        <= '0;
      sign     <= 1'b0;
      run_mode <= 1'b0;
    end else begin
      done <= start;
      if (run_exit) run_mode <= 1'b0;
      if (start && !skip_context) begin
        q        <= ctx_idx_t'(qsum);
        sign     <= neg;
        run_mode <= (q1 == 0) && (q2 == 0) && (q3 == 0);
      end
    end
  end
endmodule
