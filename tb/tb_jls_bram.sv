// tb_jls_bram: self-checking testbench of the block RAM.
//
// Random simple-dual-port traffic on a 32 x 64 jls_bram: writes at the clock
// edge, reads registered with one cycle of latency. Every read is compared
// with a model array; the test checks the one-cycle latency, that the output
// holds when `re` is low, and that a read of an address being written returns
// the old data.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_bram;
  localparam int WIDTH = 32, DEPTH = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0, re = 0;
  logic [$clog2(DEPTH)-1:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  jls_bram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] model [DEPTH];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] expect_q, held;
    bit pend;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = i; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    pend = 0;
    held = rdata;
    repeat (20000) begin
      @(negedge clk);
      if (pend) check(rdata == expect_q, $sformatf("read data %08x expected %08x", rdata, expect_q));
      else      check(rdata == held, "output changed without a read");
      we = $urandom % 2; waddr = $urandom % DEPTH; wdata = $urandom;
      re = $urandom % 2; raddr = ($urandom % 3 == 0) ? waddr : $urandom % DEPTH;
      pend = re;
      if (re) expect_q = model[raddr];
      held = pend ? expect_q : rdata;
      if (we) model[waddr] = wdata;
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
