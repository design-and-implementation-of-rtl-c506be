// jls_gradq: gradient computation and context quantization.
//
// From the causal samples a, b, c, d it forms the local gradients
// D1 = d - b, D2 = b - c, D3 = c - a, quantizes each into nine regions with
// the JPEG-LS thresholds T1/T2/T3 (3/7/21 for 8-bit samples, lossless), and
// folds the triple so that its first non-zero element is positive. The folded
// triple is numbered 81*Q1 + 9*Q2 + Q3, giving a context index 1..364; `sign`
// tells whether the triple was negated. When all three gradients are zero
// `flat` is set: that is the condition for entering run mode.
//
// Purely combinational; the encoder registers its outputs as its second
// pipeline level.
//
// Computing Q1, Q2, Q3 and Q in one pipeline level follows the original
// design; the thresholds are the JPEG-LS defaults.
module jls_gradq (
  input  jls_pkg::sample_t   a,
  input  jls_pkg::sample_t   b,
  input  jls_pkg::sample_t   c,
  input  jls_pkg::sample_t   d,
  output jls_pkg::ctx_idx_t  q_idx,
  output logic               sign,   // 1: context triple was negated
  output logic               flat    // all gradients zero: run mode
);
  import jls_pkg::*;

  function automatic logic signed [3:0] quant(input logic signed [8:0] g);
    logic signed [3:0] q;
    if      (g <= -9'sd21) q = -4'sd4;
    else if (g <= -9'sd7)  q = -4'sd3;
    else if (g <= -9'sd3)  q = -4'sd2;
    else if (g <  9'sd0)   q = -4'sd1;
    else if (g == 9'sd0)   q = 4'sd0;
    else if (g <  9'sd3)   q = 4'sd1;
    else if (g <  9'sd7)   q = 4'sd2;
    else if (g <  9'sd21)  q = 4'sd3;
    else                   q = 4'sd4;
    return q;
  endfunction

  logic signed [3:0] q1, q2, q3;
  logic signed [9:0] qs;

  always_comb begin
    q1 = quant($signed({1'b0, d}) - $signed({1'b0, b}));
    q2 = quant($signed({1'b0, b}) - $signed({1'b0, c}));
    q3 = quant($signed({1'b0, c}) - $signed({1'b0, a}));
    flat = (q1 == 0) && (q2 == 0) && (q3 == 0);
    sign = (q1 < 0) || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0);
    qs = 10'sd81 * 10'(q1) + 10'sd9 * 10'(q2) + 10'(q3);
    if (sign) qs = -qs;
    q_idx = ctx_idx_t'(qs[8:0]);
  end

endmodule
