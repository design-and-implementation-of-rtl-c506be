// tb_jls_ctx_mem: self-checking testbench of the context memory.
//
// Performs random writes and reads on all 367 contexts of jls_ctx_mem and
// compares every read with a model that holds the written values and the
// JPEG-LS initial values (A = 4, B = C = 0, N = 1, Nn = 0) for entries not
// written since the last clear. Checks that a clear resets every entry in a
// single cycle, that a write issued together with clear is dropped, and that
// a read in the same cycle as a write to that entry returns the old value.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_ctx_mem;
  import jls_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, wr_en = 0;
  ctx_idx_t rd_idx = 0, wr_idx = 0;
  ctx_t rd_ctx, wr_ctx;
  jls_ctx_mem dut (.*);

  ctx_t model [NCTX];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic ctx_t rnd();
    ctx_t v;
    v = ctx_t'({$urandom, $urandom});
    return v;
  endfunction

  task automatic do_clear(bit with_write);
    @(negedge clk);
    clear = 1;
    wr_en = with_write;
    wr_idx = ctx_idx_t'($urandom % NCTX);
    wr_ctx = rnd();
    @(negedge clk);
    clear = 0;
    wr_en = 0;
    foreach (model[i]) model[i] = CTX_INIT;
  endtask

  initial begin
    wr_ctx = '0;
    foreach (model[i]) model[i] = CTX_INIT;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NCTX; i++) begin
      @(negedge clk);
      rd_idx = ctx_idx_t'(i);
      #1 check(rd_ctx == CTX_INIT, $sformatf("entry %0d not initial after reset", i));
    end
    for (int round = 0; round < 4; round++) begin
      repeat (3000) begin
        @(negedge clk);
        wr_en  = ($urandom % 2);
        wr_idx = ctx_idx_t'($urandom % NCTX);
        wr_ctx = rnd();
        rd_idx = ($urandom % 4 == 0) ? wr_idx : ctx_idx_t'($urandom % NCTX);
        #1 check(rd_ctx == model[rd_idx], $sformatf("read %0d", rd_idx));
        if (wr_en) model[wr_idx] = wr_ctx;   // visible from the next cycle
      end
      do_clear(round % 2);
      for (int i = 0; i < NCTX; i++) begin
        @(negedge clk);
        rd_idx = ctx_idx_t'(i);
        #1 check(rd_ctx == CTX_INIT, $sformatf("entry %0d not initial after clear", i));
      end
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
