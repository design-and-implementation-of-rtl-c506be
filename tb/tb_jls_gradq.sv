// tb_jls_gradq: self-checking testbench of the gradient quantizer.
//
// Drives random and corner-case neighbour sets (a, b, c, d) into the purely
// combinational jls_gradq and compares the context index, the sign flag and
// the run-mode flag with an integer model built from the reference coder's
// quantizer (thresholds 3/7/21, sign folding so that the first non-zero
// gradient is positive, index 81*Q1 + 9*Q2 + Q3). The block has no clock;
// a clock is kept only to pace the stimulus and for the watchdog.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_gradq;
  import jls_pkg::*;
  import jls_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  sample_t a, b, c, d;
  ctx_idx_t q_idx;
  logic sign, flat;
  jls_gradq dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic one(int ia, int ib, int ic, int id);
    int q1, q2, q3, s, q;
    a = sample_t'(ia); b = sample_t'(ib); c = sample_t'(ic); d = sample_t'(id);
    @(negedge clk);
    q1 = quant(id - ib);
    q2 = quant(ib - ic);
    q3 = quant(ic - ia);
    s = 0;
    if (q1 < 0 || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0)) begin
      s = 1; q1 = -q1; q2 = -q2; q3 = -q3;
    end
    q = 81 * q1 + 9 * q2 + q3;
    check(flat == (q == 0), $sformatf("flat a=%0d b=%0d c=%0d d=%0d", ia, ib, ic, id));
    if (q != 0) begin
      check(q_idx == ctx_idx_t'(q), $sformatf("q_idx %0d expected %0d (a=%0d b=%0d c=%0d d=%0d)", q_idx, q, ia, ib, ic, id));
      check(sign == s[0], $sformatf("sign a=%0d b=%0d c=%0d d=%0d", ia, ib, ic, id));
    end
  endtask

  initial begin
    // every threshold boundary on each gradient
    int del[] = '{-255, -22, -21, -20, -8, -7, -6, -4, -3, -2, -1, 0, 1, 2, 3, 4, 6, 7, 8, 20, 21, 22, 255};
    foreach (del[i]) begin
      int base;
      base = (del[i] < 0) ? 255 : 0;
      one(128, base, 128, base + del[i]);       // D1 = d - b
      one(128, base + del[i], base, 128);       // D2 = b - c
      one(base, 128, base + del[i], 128);       // D3 = c - a
    end
    repeat (20000) one($urandom % 256, $urandom % 256, $urandom % 256, $urandom % 256);
    // near-flat neighbourhoods
    repeat (5000) begin
      int m = 20 + $urandom % 200;
      one(m + $urandom % 9 - 4, m + $urandom % 9 - 4, m + $urandom % 9 - 4, m + $urandom % 9 - 4);
    end
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
