// tb_jls_decoder: self-checking testbench of the FSM block decoder.
//
// Code streams are produced by the behavioural reference coder for blocks of
// several kinds and placed in a word memory with one cycle of read latency.
// jls_decoder must reproduce every sample of the original block, in order,
// and pulse `done` once. The stream is placed at a non-zero word address to
// check the `base` input. The test also bounds the decoding time per block.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_decoder;
  import jls_ref_pkg::*;

  localparam int BLK = 8;
  localparam int NS  = 3 * BLK * BLK;
  localparam int AW  = 8;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [AW-1:0] base = 0;
  logic [AW-1:0] mem_addr;
  logic mem_rd;
  logic [31:0] mem_data;
  logic pix_valid, done, busy;
  logic [7:0] pix_data;

  logic [31:0] mem [2**AW];

  int checks = 0, failures = 0;

  jls_decoder #(.BLK(BLK), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_rd) mem_data <= mem[mem_addr];

  byte unsigned got[$];
  always @(posedge clk) if (pix_valid) got.push_back(pix_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_block(int kind, int seed);
    byte unsigned d[];
    word_q w;
    int t0, ndone;
    make_block(d, BLK, kind, seed);
    w = encode_block(d, BLK);
    for (int i = 0; i < 2**AW; i++) mem[i] = $urandom;
    for (int i = 0; i < w.size(); i++) mem[5 + i] = w[i];
    got.delete();
    @(posedge clk);
    base  <= 5;
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = $time / 10;
    ndone = 0;
    while (!done) @(posedge clk);
    check(($time / 10 - t0) < 8 * NS, $sformatf("kind %0d: %0d cycles", kind, $time / 10 - t0));
    @(posedge clk);
    check(got.size() == NS, $sformatf("kind %0d: %0d samples, expected %0d", kind, got.size(), NS));
    for (int i = 0; i < NS && i < got.size(); i++)
      check(got[i] == d[i], $sformatf("kind %0d sample %0d: %0d expected %0d", kind, i, got[i], d[i]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 36; i++) run_block(i % 6, 300 + 11 * i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
