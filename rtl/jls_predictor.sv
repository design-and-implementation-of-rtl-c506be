// jls_predictor: edge-detecting prediction with adaptive bias correction.
//
// The fixed predictor is the median edge detector of JPEG-LS: min(a,b) when
// c >= max(a,b) (an edge above or left), max(a,b) when c <= min(a,b), and the
// planar estimate a + b - c otherwise. The adaptive correction then adds the
// context's bias value C (negated when the context triple was folded, `sign`)
// and clamps the result to 0..255. Combinational; used in the encoder's third
// pipeline level and in the decoder's regular-mode step.
//
// Prediction and correction follow JPEG-LS as used by the original design.
module jls_predictor (
  input  jls_pkg::sample_t   a,
  input  jls_pkg::sample_t   b,
  input  jls_pkg::sample_t   c,
  input  logic               sign,
  input  logic signed [7:0]  cval,
  output jls_pkg::sample_t   px_fixed,
  output jls_pkg::sample_t   px
);
  import jls_pkg::*;

  sample_t mx, mn;
  logic signed [10:0] p;

  always_comb begin
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    if (c >= mx)      px_fixed = mn;
    else if (c <= mn) px_fixed = mx;
    else              px_fixed = sample_t'({1'b0, a} + {1'b0, b} - {1'b0, c});
    p = $signed({3'b0, px_fixed}) + (sign ? -11'(cval) : 11'(cval));
    if (p < 0)                    px = '0;
    else if (p > 11'sd255)        px = 8'd255;
    else                          px = p[7:0];
  end

endmodule
