// tb_jls_encoder: self-checking testbench of the pipelined block encoder.
//
// Encodes blocks of several kinds (flat, ramps, noise, stripes with runs,
// mixed) with jls_encoder and compares every output word and the coded
// length with the behavioural reference coder. Samples are fed one per cycle;
// the test also checks that the encoder takes them at that rate and that
// `done` comes a fixed, short time after the last sample.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_encoder;
  import jls_ref_pkg::*;

  localparam int BLK = 8;
  localparam int NS  = 3 * BLK * BLK;

  logic clk = 0, rst_n = 0;
  logic start = 0, s_valid = 0;
  logic [7:0] s_data = 0;
  logic out_valid, done, busy;
  logic [31:0] out_word;
  logic [15:0] nwords;

  int checks = 0, failures = 0;

  jls_encoder #(.BLK(BLK)) dut (.*);

  always #5 clk = ~clk;

  int unsigned got[$];
  always @(posedge clk) if (out_valid) got.push_back(out_word);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_block(int kind, int seed, bit gaps);
    byte unsigned d[];
    word_q exp;
    int t_last, t_done;
    make_block(d, BLK, kind, seed);
    exp = encode_block(d, BLK);
    got.delete();
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; i < NS; i++) begin
      if (gaps && ($urandom % 4 == 0)) begin
        s_valid <= 0;
        @(posedge clk);
      end
      s_valid <= 1;
      s_data  <= d[i];
      @(posedge clk);
    end
    s_valid <= 0;
    t_last = $time / 10;
    while (!done) @(posedge clk);
    t_done = $time / 10;
    @(posedge clk);
    check(nwords == exp.size(), $sformatf("kind %0d: nwords %0d expected %0d", kind, nwords, exp.size()));
    check(got.size() == exp.size(), $sformatf("kind %0d: %0d words out, expected %0d", kind, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("kind %0d word %0d: %08x expected %08x", kind, i, got[i], exp[i]));
    // pipeline latency: done at most 8 cycles after the last sample
    check(t_done - t_last <= 8, $sformatf("kind %0d: done %0d cycles after last sample", kind, t_done - t_last));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kind = 0; kind < 6; kind++) run_block(kind, 17 + kind, 0);
    for (int i = 0; i < 12; i++) run_block(i % 6, 1000 + i, 1);
    for (int i = 0; i < 20; i++) run_block(3 + (i % 3), 5000 + 7 * i, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
