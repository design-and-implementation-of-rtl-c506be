// jls_bitreader: bit-stream reader in front of the JPEG-LS decoder.
//
// Fetches 32-bit compressed words from a synchronous memory (one cycle read
// latency) starting at word address `base`, and keeps up to 64 bits in a
// left-aligned buffer. `peek` shows the next 32 stream bits (first bit in
// bit 31) and is meaningful while `ready` is high (at least 32 bits held).
// `consume` removes `consume_n` (0..32) bits at the clock edge. One word read
// is in flight at a time; a read is issued whenever 32 bits or fewer are held.
// Words past the end of the stream are read as they are; the decoder never
// consumes the padding that follows the last code.
//
// The original decoder reads the stream continuously; this buffer and its
// look-ahead window are this design's own.
module jls_bitreader #(
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  output logic [AW-1:0] mem_addr,
  output logic          mem_rd,
  input  logic [31:0]   mem_data,
  output logic [31:0]   peek,
  output logic          ready,
  input  logic          consume,
  input  logic [5:0]    consume_n
);
  logic [63:0] buffer;
  logic [6:0]  cnt;
  logic        pending;
  logic        active;

  assign peek  = buffer[63:32];
  assign ready = active && (cnt >= 7'd32);
  assign mem_rd = active && !pending && (cnt <= 7'd32) && !start;

  // next buffer contents: drop consumed bits, append the arriving word
  logic [63:0] b;
  logic [6:0]  c;
  always_comb begin
    b = buffer;
    c = cnt;
    if (consume) begin
      b = b << consume_n;
      c = c - 7'(consume_n);
    end
    if (pending) begin
      b = b | ((64'(mem_data) << 32) >> c);
      c = c + 7'd32;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer   <= '0;
      cnt      <= '0;
      pending  <= 1'b0;
      active   <= 1'b0;
      mem_addr <= '0;
    end else if (start) begin
      buffer   <= '0;
      cnt      <= '0;
      pending  <= 1'b0;
      active   <= 1'b1;
      mem_addr <= base;
    end else begin
      buffer  <= b;
      cnt     <= c;
      pending <= mem_rd;
      if (mem_rd) mem_addr <= mem_addr + 1'b1;
    end
  end

endmodule
