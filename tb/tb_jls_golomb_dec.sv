// tb_jls_golomb_dec: self-checking testbench of the Golomb code parser.
//
// Builds limited-length Golomb code words (regular and escape form, for all
// parameters k and limits the decoder uses, mapped errors 0..255), places each left-aligned in a
// 32-bit window followed by random bits, and checks that the combinational
// jls_golomb_dec returns the mapped error and the code length. A clock paces
// the stimulus and drives the watchdog.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_golomb_dec;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] peek;
  logic [4:0]  k;
  logic [5:0]  limit;
  logic [8:0]  merr;
  logic [5:0]  len;
  jls_golomb_dec dut (.*);

  int checks = 0, failures = 0, n_escape = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic one(int m, int kk, int lim);
    longint unsigned v;
    int n, q;
    q = m >> kk;
    if (q < lim - 9) begin
      v = (longint'(1) << kk) | (m & ((1 << kk) - 1));
      n = q + 1 + kk;
    end else begin
      n_escape++;
      v = (longint'(1) << 8) | ((m - 1) & 255);
      n = lim;
    end
    peek = 32'((v << (32 - n)) | ($urandom & ((longint'(1) << (32 - n)) - 1)));
    k = 5'(kk);
    limit = 6'(lim);
    @(negedge clk);
    check(len == 6'(n), $sformatf("len %0d expected %0d (m=%0d k=%0d lim=%0d)", len, n, m, kk, lim));
    check(merr == 9'(m), $sformatf("merr %0d expected %0d (k=%0d lim=%0d)", merr, m, kk, lim));
  endtask

  initial begin
    for (int kk = 0; kk < 9; kk++)
      for (int m = 0; m < 256; m++) one(m, kk, 32);
    repeat (20000) one($urandom % 256, $urandom % 8, 16 + $urandom % 17);
    check(n_escape > 0, "escape code never exercised");
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
