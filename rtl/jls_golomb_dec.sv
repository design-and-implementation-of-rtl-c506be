// jls_golomb_dec: limited-length Golomb codeword decoder.
//
// Looks at the next 32 bits of the code stream (`peek`, first bit in bit 31)
// and decodes one JPEG-LS limited-length Golomb codeword with parameter k and
// length limit LIM (32 in regular mode, 32 - J - 1 after a run). The number of
// leading zeros q gives the unary part; when q is below LIM - QBPP - 1 the
// value is (q << k) | next k bits, otherwise the codeword is an escape and the
// value is the QBPP bits after the one, plus one. `len` is the number of bits
// the codeword occupies, to be consumed by the bit reader. Combinational.
//
// Golomb decoding is named by the original design; the leading-zero parser is
// this design's own.
module jls_golomb_dec (
  input  logic [31:0] peek,
  input  logic [4:0]  k,
  input  logic [5:0]  limit,
  output logic [8:0]  merr,
  output logic [5:0]  len
);
  import jls_pkg::*;

  logic [5:0]  lz;
  logic [63:0] sh;

  always_comb begin
    lz = 6'd32;
    for (int i = 0; i < 32; i++) begin
      if (peek[i]) lz = 6'(31 - i);
    end
    if ({6'b0, lz} < {6'b0, limit} - 12'(QBPP) - 12'd1) begin
      sh   = (64'(peek) << (lz + 6'd1)) & 64'hFFFF_FFFF;
      merr = 9'((64'(lz) << k) | (k == 0 ? 64'd0 : (sh >> (6'd32 - 6'(k)))));
      len  = lz + 6'd1 + 6'(k);
    end else begin
      sh   = (64'(peek) << (limit - 6'(QBPP))) & 64'hFFFF_FFFF;
      merr = 9'((sh >> 24) + 64'd1);
      len  = limit;
    end
  end

endmodule
