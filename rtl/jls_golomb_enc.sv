// jls_golomb_enc: limited-length Golomb code builder.
//
// Encodes a mapped error value M with Golomb parameter k as JPEG-LS does:
// when q = M >> k is below LIM - QBPP - 1 the code is q zeros, a one, and the
// k low bits of M; otherwise it is LIM - QBPP - 1 zeros, a one, and M - 1 in
// QBPP bits (escape), LIM bits in all. LIM is 32 in regular mode and
// 32 - J - 1 for a run-interruption sample. An optional prefix (the run-mode
// bits that precede a sample, up to 16 of them) is placed in front of the
// codeword; with `code_en` low only the prefix is produced.
//
// Output: `code` is right-aligned (the first bit to send is bit len-1) and
// `len` is its length, never above 32 for legal inputs. Combinational; it is
// the encoder's fifth pipeline level.
//
// The limited-length Golomb code is the JPEG-LS one used by the original
// design; merging run bits into one code word is this design's choice.
module jls_golomb_enc (
  input  logic        code_en,
  input  logic [8:0]  merr,
  input  logic [4:0]  k,
  input  logic [5:0]  limit,
  input  logic [15:0] prefix,
  input  logic [4:0]  prefix_len,
  output logic [31:0] code,
  output logic [5:0]  len
);
  import jls_pkg::*;

  logic [8:0]  q;
  logic [63:0] value;
  logic [6:0]  vlen;
  logic [63:0] total;
  logic [6:0]  tlen;

  always_comb begin
    q = merr >> k;
    value = '0;
    vlen  = '0;
    if (code_en) begin
      if ({3'b0, q} < {6'b0, limit} - 12'(QBPP) - 12'd1) begin
        value = (64'd1 << k) | (64'(merr) & ((64'd1 << k) - 64'd1));
        vlen  = 7'(q) + 7'd1 + 7'(k);
      end else begin
        value = (64'd1 << QBPP) | 64'(8'(merr - 9'd1));
        vlen  = 7'(limit);
      end
    end
    total = (64'(prefix) << vlen) | value;
    tlen  = vlen + 7'(prefix_len);
    code  = total[31:0];
    len   = tlen[5:0];
  end

endmodule
