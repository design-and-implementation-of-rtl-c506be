// tb_jls_neighbors: self-checking testbench of the data acquisition window.
//
// Pushes several BLK x BLK planes back to back into jls_neighbors, one sample
// per cycle with occasional idle cycles, and before every push compares the
// presented neighbours a, b, c, d and the position outputs (row, col,
// last_col, last_row) with the reference coder's neighbour function, which
// applies the JPEG-LS edge rules. It also checks that `clear` in the middle
// of a plane restarts the window at row 0.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_neighbors;
  import jls_pkg::*;
  import jls_ref_pkg::*;

  localparam int BLK = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, push = 0;
  sample_t x = 0;
  sample_t a, b, c, d;
  logic [$clog2(BLK)-1:0] col, row;
  logic last_col, last_row;
  jls_neighbors #(.BLK(BLK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // push a plane; stop after `upto` samples
  task automatic plane(int kind, int seed, int upto);
    byte unsigned blk[], p[];
    make_block(blk, BLK, kind, seed);
    p = new[BLK * BLK];
    for (int i = 0; i < BLK * BLK; i++) p[i] = blk[i];
    for (int i = 0; i < upto; i++) begin
      int ra, rb, rc, rd, r, cc;
      r = i / BLK;
      cc = i % BLK;
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        push = 0;
        @(negedge clk);
      end
      nbrs(p, BLK, r, cc, ra, rb, rc, rd);
      check(a == sample_t'(ra) && b == sample_t'(rb) && c == sample_t'(rc) && d == sample_t'(rd),
            $sformatf("(%0d,%0d) abcd %0d %0d %0d %0d expected %0d %0d %0d %0d", r, cc, a, b, c, d, ra, rb, rc, rd));
      check(row == r && col == cc && last_col == (cc == BLK - 1) && last_row == (r == BLK - 1),
            $sformatf("position %0d,%0d expected %0d,%0d", row, col, r, cc));
      push = 1;
      x = p[i];
    end
    @(negedge clk);
    push = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) plane(k, 11 * k + 1, BLK * BLK);
    plane(2, 99, 21);                // abandon a plane half way ...
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    plane(5, 123, BLK * BLK);        // ... and start afresh after clear
    plane(3, 7, BLK * BLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
