// tb_jls_axi_dma: self-checking testbench of the AXI burst engine.
//
// Connects jls_axi_dma to the behavioural DDR model. Read transfers of
// various lengths and RAM base addresses must land word for word in a
// modelled block RAM, with nothing written beyond the transfer. Write
// transfers from a source with one cycle of read latency must appear in DDR,
// and the bytes after the transfer (inside the last, partly used burst) must
// keep their old contents, which checks the zero write strobes. Every burst
// on the bus must be 16 beats of 4 bytes, INCR. Runs with and without DDR
// wait states; without them the transfer times are checked against the
// engine's design rate (about 1 cycle per read beat, 3 cycles per write beat,
// plus a few cycles per burst).
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_axi_dma;
  import jls_pkg::*;

  localparam int AW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_start = 0, wr_start = 0, rd_done, wr_done, mem_we, src_re;
  logic [31:0] rd_addr = 0, wr_addr = 0, mem_wdata, src_data;
  logic [15:0] rd_words = 0, wr_words = 0, src_idx;
  logic [AW-1:0] rd_base = 0, mem_waddr;
  axi_req_t m_req;
  axi_rsp_t m_rsp;
  logic stall = 0;

  jls_axi_dma #(.AW(AW)) dut (.*);
  axi_mem_model #(.AW(16)) ddr (.clk, .rst_n, .stall, .req(m_req), .rsp(m_rsp));

  logic [31:0] ram [2**AW];
  always @(posedge clk) if (mem_we) ram[mem_waddr] <= mem_wdata;

  logic [31:0] src [256];
  always @(posedge clk) if (src_re) src_data <= src[src_idx];

  int checks = 0, failures = 0, n_bursts = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (m_req.awvalid && m_rsp.awready) begin
      n_bursts++;
      check(m_req.awlen == 15 && m_req.awsize == 2 && m_req.awburst == 1, "write burst shape");
    end
    if (m_req.arvalid && m_rsp.arready) begin
      n_bursts++;
      check(m_req.arlen == 15 && m_req.arsize == 2 && m_req.arburst == 1, "read burst shape");
    end
  end

  task automatic do_read(int addr, int n, int base);
    int t;
    foreach (ram[i]) ram[i] = 32'hDEAD_0000 + i;
    for (int i = 0; i < 4 * (n + 16); i++) ddr.mem[addr + i] = $urandom;
    @(negedge clk);
    rd_start = 1; rd_addr = addr; rd_words = 16'(n); rd_base = AW'(base);
    @(negedge clk);
    rd_start = 0;
    t = 1;
    while (!rd_done) begin
      @(negedge clk);
      t++;
    end
    @(negedge clk);
    for (int i = 0; i < 2**AW; i++) begin
      if (i >= base && i < base + n)
        check(ram[i] == {ddr.mem[addr+4*(i-base)+3], ddr.mem[addr+4*(i-base)+2], ddr.mem[addr+4*(i-base)+1], ddr.mem[addr+4*(i-base)]},
              $sformatf("read %0d words: RAM word %0d", n, i));
      else
        check(ram[i] == 32'hDEAD_0000 + i, $sformatf("read %0d words: RAM word %0d overwritten", n, i));
    end
    if (!stall)
      check(t <= ((n + 15) / 16) * (16 + 4) + 2, $sformatf("read of %0d words took %0d cycles", n, t));
  endtask

  task automatic do_write(int addr, int n);
    int t;
    byte unsigned old [];
    old = new[4 * (n + 16)];
    foreach (src[i]) src[i] = $urandom;
    for (int i = 0; i < 4 * (n + 16); i++) begin
      ddr.mem[addr + i] = $urandom;
      old[i] = ddr.mem[addr + i];
    end
    @(negedge clk);
    wr_start = 1; wr_addr = addr; wr_words = 16'(n);
    @(negedge clk);
    wr_start = 0;
    t = 1;
    while (!wr_done) begin
      @(negedge clk);
      t++;
    end
    for (int i = 0; i < n; i++)
      check({ddr.mem[addr+4*i+3], ddr.mem[addr+4*i+2], ddr.mem[addr+4*i+1], ddr.mem[addr+4*i]} == src[i],
            $sformatf("write %0d words: DDR word %0d", n, i));
    for (int i = 4 * n; i < 4 * (n + 16); i++)
      check(ddr.mem[addr + i] == old[i], $sformatf("write %0d words: byte %0d past the end overwritten", n, i));
    if (!stall)
      check(t <= ((n + 15) / 16) * (16 * 3 + 6) + 2, $sformatf("write of %0d words took %0d cycles", n, t));
  endtask

  initial begin
    int lens[] = '{1, 15, 16, 17, 33, 48, 49, 64, 100};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      stall = s[0];
      foreach (lens[i]) begin
        do_read(256 * i + 64, lens[i], (lens[i] < 100) ? i % 5 : 0);
        do_write(32768 + 1024 * i + 16 * s, lens[i]);
      end
    end
    check(n_bursts > 0, "no bursts seen");
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
