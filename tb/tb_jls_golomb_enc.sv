// tb_jls_golomb_enc: self-checking testbench of the Golomb code generator.
//
// Drives mapped errors, Golomb parameters k, code limits and run-mode
// prefixes into the combinational jls_golomb_enc and compares the code word
// and its length with a bit-by-bit model of the limited-length Golomb code:
// q = merr >> k; if q < limit - 9 the code is q zeros, a one and the k low
// bits; otherwise (escape) it is limit - 9 zeros, a one and merr - 1 in 8
// bits. The prefix bits go in front. With code_en low only the prefix is
// sent. Mapped errors are 0..255 (8-bit samples). Only combinations whose total fits in 32 bits are driven, as in the
// encoder. A clock paces the stimulus and drives the watchdog.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_golomb_enc;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        code_en;
  logic [8:0]  merr;
  logic [4:0]  k;
  logic [5:0]  limit;
  logic [15:0] prefix;
  logic [4:0]  prefix_len;
  logic [31:0] code;
  logic [5:0]  len;
  jls_golomb_enc dut (.*);

  int checks = 0, failures = 0, n_escape = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic one(bit en, int m, int kk, int lim, int pre, int plen);
    longint unsigned v;
    int n, q;
    code_en = en; merr = 9'(m); k = 5'(kk); limit = 6'(lim);
    prefix = 16'(pre); prefix_len = 5'(plen);
    @(negedge clk);
    v = pre & ((1 << plen) - 1);
    n = plen;
    if (en) begin
      q = m >> kk;
      if (q < lim - 9) begin
        v = (v << (q + 1)) | 1;
        v = (v << kk) | (m & ((1 << kk) - 1));
        n += q + 1 + kk;
      end else begin
        n_escape++;
        v = (v << (lim - 8)) | 1;
        v = (v << 8) | ((m - 1) & 255);
        n += lim;
      end
    end
    check(len == 6'(n), $sformatf("len %0d expected %0d (m=%0d k=%0d lim=%0d plen=%0d)", len, n, m, kk, lim, plen));
    check((code & ((n >= 32) ? 32'hFFFF_FFFF : ((32'd1 << n) - 1))) == 32'(v),
          $sformatf("code %08x expected %08x (m=%0d k=%0d lim=%0d)", code, 32'(v), m, kk, lim));
  endtask

  initial begin
    // regular samples: limit 32, no prefix
    for (int kk = 0; kk < 9; kk++)
      for (int m = 0; m < 256; m++) one(1, m, kk, 32, 0, 0);
    // run interruption: prefix of run bits, limit 32 - J - 1
    repeat (20000) begin
      int j = $urandom % 16;
      int lim = 31 - j;
      int plen = $urandom % (j + 2);
      int kk = $urandom % 8;
      int m = $urandom % 256;
      if (plen + lim <= 32) one(1, m, kk, lim, $urandom, plen);
    end
    // prefix only (run bits)
    for (int plen = 0; plen <= 16; plen++) one(0, 0, 0, 32, $urandom, plen);
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
