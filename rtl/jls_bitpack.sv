// jls_bitpack: encoding output stage (bit packer).
//
// Concatenates variable-length codes (up to 32 bits each, right-aligned, the
// first bit to send is bit len-1) into a stream of 32-bit words, first bit in
// the word's MSB. One code is accepted per cycle and at most one word leaves
// per cycle, so the packer never stalls its source.
//
// A code marked `in_last` closes the block: in the following cycle the bits
// still held are sent as a final word padded with zeros, and `done` pulses
// with `nwords`, the number of words produced for the block (the coded
// length). The source must leave one idle cycle after a last code; the codec
// starts a new block only after `done`.
//
// The original design ends its encoder pipeline with an output stage giving
// the code stream, a valid flag and the coded length; 32-bit MSB-first words
// with zero padding per block are this design's choice.
module jls_bitpack (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_code,
  input  logic [5:0]  in_len,
  input  logic        in_last,
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic        done,
  output logic [15:0] nwords
);
  logic [63:0] acc;
  logic [6:0]  cnt;         // valid bits in acc (right-aligned)
  logic        flush_pend;
  logic [15:0] words;

  logic [63:0] acc_n;
  logic [6:0]  cnt_n;

  always_comb begin
    acc_n = (acc << in_len) | 64'(in_code);
    cnt_n = cnt + 7'(in_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      cnt        <= '0;
      flush_pend <= 1'b0;
      words      <= '0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      done       <= 1'b0;
      nwords     <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (flush_pend) begin
        flush_pend <= 1'b0;
        done       <= 1'b1;
        cnt        <= '0;
        acc        <= '0;
        words      <= '0;
        if (cnt != 0) begin
          out_valid <= 1'b1;
          out_word  <= 32'(acc << (7'd32 - cnt));
          nwords    <= words + 16'd1;
        end else begin
          nwords    <= words;
        end
      end else if (in_valid) begin
        flush_pend <= in_last;
        if (cnt_n >= 7'd32) begin
          out_valid <= 1'b1;
          out_word  <= 32'(acc_n >> (cnt_n - 7'd32));
          cnt       <= cnt_n - 7'd32;
          words     <= words + 16'd1;
        end else begin
          cnt       <= cnt_n;
        end
        acc <= acc_n;
      end
    end
  end

endmodule
