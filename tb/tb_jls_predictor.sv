// tb_jls_predictor: self-checking testbench of the predictor.
//
// Drives random neighbours a, b, c, context sign and bias correction C into
// the combinational jls_predictor and checks the fixed prediction (the median
// edge detector: min(a,b) if c >= max(a,b), max(a,b) if c <= min(a,b), else
// a + b - c) and the corrected prediction (fixed +/- C, clamped to 0..255).
// Corner cases (equal neighbours, extreme C, clamping at both ends) are
// covered explicitly. A clock paces the stimulus and drives the watchdog.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_predictor;
  import jls_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  sample_t a, b, c, px_fixed, px;
  logic sign;
  logic signed [7:0] cval;
  jls_predictor dut (.*);

  int checks = 0, failures = 0;
  int n_clamp = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic one(int ia, int ib, int ic, int s, int cv);
    int mx, mn, pf, p;
    a = sample_t'(ia); b = sample_t'(ib); c = sample_t'(ic);
    sign = s[0]; cval = 8'(cv);
    @(negedge clk);
    mx = (ia > ib) ? ia : ib;
    mn = (ia > ib) ? ib : ia;
    if (ic >= mx) pf = mn;
    else if (ic <= mn) pf = mx;
    else pf = ia + ib - ic;
    p = pf + (s ? -cv : cv);
    if (p > 255 || p < 0) n_clamp++;
    if (p > 255) p = 255;
    if (p < 0) p = 0;
    check(px_fixed == sample_t'(pf), $sformatf("MED a=%0d b=%0d c=%0d: %0d expected %0d", ia, ib, ic, px_fixed, pf));
    check(px == sample_t'(p), $sformatf("px a=%0d b=%0d c=%0d s=%0d C=%0d: %0d expected %0d", ia, ib, ic, s, cv, px, p));
  endtask

  initial begin
    one(0, 0, 0, 0, 0);
    one(255, 255, 255, 0, 127);
    one(0, 0, 0, 0, -128);
    one(255, 0, 0, 1, -128);
    one(10, 200, 100, 0, 5);
    one(200, 10, 255, 1, 3);
    one(200, 10, 0, 0, -3);
    repeat (30000) one($urandom % 256, $urandom % 256, $urandom % 256, $urandom % 2, int'($urandom % 256) - 128);
    check(n_clamp > 0, "clamping never exercised");
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
