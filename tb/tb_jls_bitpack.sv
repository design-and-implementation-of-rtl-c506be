// tb_jls_bitpack: self-checking testbench of the encoding output stage.
//
// Feeds blocks of random variable-length codes (0..32 bits) into
// jls_bitpack, one per cycle or with idle cycles, and compares the emitted
// 32-bit words with the concatenated bit string (MSB first, last word zero
// padded) and the word count `nwords`. Timing checks: the packer accepts a
// code every cycle (no back-pressure exists) and raises `done` exactly two clock edges after the code
// marked last.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_bitpack;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_last = 0;
  logic [31:0] in_code = 0;
  logic [5:0] in_len = 0;
  logic out_valid, done;
  logic [31:0] out_word;
  logic [15:0] nwords;
  jls_bitpack dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int unsigned got[$];
  always @(posedge clk) if (out_valid) got.push_back(out_word);

  task automatic run_block(int ncodes, bit gaps);
    bit bits[$];
    int unsigned exp[$];
    int t_last, t_done;
    got.delete();
    for (int i = 0; i < ncodes; i++) begin
      int n;
      logic [31:0] v;
      n = ($urandom % 8 == 0) ? 32 : $urandom % 20;
      v = $urandom;
      if (n < 32) v &= (32'd1 << n) - 1;
      @(negedge clk);
      if (gaps && $urandom % 3 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1; in_code = v; in_len = 6'(n); in_last = (i == ncodes - 1);
      for (int b = n - 1; b >= 0; b--) bits.push_back(v[b]);
    end
    @(posedge clk);
    t_last = $time / 10;
    @(negedge clk);
    in_valid = 0; in_last = 0;
    while (!done) @(posedge clk);
    t_done = $time / 10;
    check(t_done - t_last == 2, $sformatf("done %0d cycles after the last code, expected 2", t_done - t_last));
    while (bits.size() % 32 != 0) bits.push_back(0);
    for (int w = 0; w < bits.size() / 32; w++) begin
      logic [31:0] x;
      for (int b = 0; b < 32; b++) x[31 - b] = bits[32 * w + b];
      exp.push_back(x);
    end
    @(negedge clk);
    check(nwords == exp.size(), $sformatf("nwords %0d expected %0d", nwords, exp.size()));
    check(got.size() == exp.size(), $sformatf("%0d words out, expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("word %0d: %08x expected %08x", i, got[i], exp[i]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) run_block(1 + $urandom % 200, i % 2);
    run_block(1, 0);
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
