// tb_jls_bitreader: self-checking testbench of the decoder's bit reader.
//
// A word memory with one cycle of read latency holds a random bit stream
// starting at a non-zero base address. The testbench consumes random amounts
// (0..32 bits) whenever `ready` is high and checks that `peek` always shows
// the next 32 stream bits. It also checks that `ready` comes within a few
// cycles of `start`, that the reader keeps up with a consumer taking 32 bits
// every other cycle, and that a new `start` restarts the stream.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_bitreader;
  localparam int AW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, consume = 0;
  logic [AW-1:0] base = 0, mem_addr;
  logic mem_rd;
  logic [31:0] mem_data, peek;
  logic ready;
  logic [5:0] consume_n = 0;
  jls_bitreader #(.AW(AW)) dut (.*);

  logic [31:0] mem [2**AW];
  always @(posedge clk) if (mem_rd) mem_data <= mem[mem_addr];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] stream(int b0, int pos);
    logic [63:0] two;
    two = {mem[AW'(b0 + pos / 32)], mem[AW'(b0 + pos / 32 + 1)]};
    return 32'(two >> (32 - pos % 32));
  endfunction

  task automatic run(int b0, int nbits, bit fast);
    int pos, t0, waits;
    @(negedge clk);
    base = AW'(b0);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (!ready) begin
      @(negedge clk);
      t0++;
    end
    check(t0 <= 4, $sformatf("ready %0d cycles after start", t0));
    pos = 0;
    waits = 0;
    while (pos < nbits) begin
      if (ready) begin
        int n;
        check(peek == stream(b0, pos), $sformatf("bit %0d: peek %08x expected %08x", pos, peek, stream(b0, pos)));
        n = fast ? 32 : $urandom % 33;
        consume = 1;
        consume_n = 6'(n);
        pos += n;
        @(negedge clk);
        consume = 0;
        if (fast) @(negedge clk);
      end else begin
        waits++;
        @(negedge clk);
      end
    end
    if (fast) check(waits == 0, $sformatf("reader fell behind a 32-bit-per-2-cycle consumer %0d times", waits));
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 3000, 0);
    run(17, 2000, 1);
    run(0, 4000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
