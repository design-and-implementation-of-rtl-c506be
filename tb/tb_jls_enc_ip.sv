// tb_jls_enc_ip: self-checking testbench of the compression IP core.
//
// Places raw blocks of varied content in the DDR model, starts jls_enc_ip
// directly through its control inputs, and checks the written block stream
// against the behavioural reference coder: per block a header word (payload
// bytes, or 192 for a block stored raw) followed by the payload, blocks packed
// one after another. Also checks `out_bytes`, `raw_blocks`, the busy/done
// handshake, a zero-block request, and a bound on the cycles per block
// without DDR wait states (raw block read, one sample per cycle through the
// encoder, burst write).
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_enc_ip;
  import jls_pkg::*;
  import jls_ref_pkg::*;

  localparam int BLK = 8, NS = 3 * BLK * BLK, NBLK = 12;
  localparam int SRC = 32'h0100, DST = 32'h6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, stall = 0;
  logic [31:0] src_addr = SRC, dst_addr = DST, nblk = NBLK, out_bytes, raw_blocks;
  axi_req_t m_req;
  axi_rsp_t m_rsp;
  jls_enc_ip #(.BLK(BLK)) dut (.*);
  axi_mem_model #(.AW(16)) ddr (.clk, .rst_n, .stall, .req(m_req), .rsp(m_rsp));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  byte unsigned img [NBLK][];

  task automatic run(int seed);
    int addr, nraw, t;
    for (int b = 0; b < NBLK; b++) begin
      byte unsigned d[];
      make_block(d, BLK, (b + seed) % 6, seed * 31 + b);
      img[b] = d;
      for (int i = 0; i < NS; i++) ddr.mem[SRC + b * NS + i] = d[i];
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy not raised");
    t = 1;
    while (!done) begin
      @(negedge clk);
      t++;
    end
    if (!stall) check(t <= NBLK * (2 * NS + 16), $sformatf("%0d cycles for %0d blocks", t, NBLK));
    @(negedge clk);
    check(!busy, "busy after done");
    addr = DST;
    nraw = 0;
    for (int b = 0; b < NBLK; b++) begin
      word_q w;
      logic [31:0] hdr, got;
      bit raw;
      byte unsigned d[];
      d = img[b];
      w = encode_block(d, BLK);
      raw = (w.size() >= NS / 4);
      hdr = {ddr.mem[addr+3], ddr.mem[addr+2], ddr.mem[addr+1], ddr.mem[addr]};
      check(hdr == (raw ? NS : 4 * w.size()), $sformatf("block %0d header %0d", b, hdr));
      if (raw) begin
        nraw++;
        for (int i = 0; i < NS; i++)
          check(ddr.mem[addr + 4 + i] == d[i], $sformatf("block %0d raw byte %0d", b, i));
        addr += 4 + NS;
      end else begin
        for (int i = 0; i < w.size(); i++) begin
          got = {ddr.mem[addr+4*i+7], ddr.mem[addr+4*i+6], ddr.mem[addr+4*i+5], ddr.mem[addr+4*i+4]};
          check(got == w[i], $sformatf("block %0d word %0d: %08x expected %08x", b, i, got, w[i]));
        end
        addr += 4 + 4 * w.size();
      end
    end
    check(out_bytes == addr - DST, $sformatf("out_bytes %0d expected %0d", out_bytes, addr - DST));
    check(raw_blocks == nraw, $sformatf("raw_blocks %0d expected %0d", raw_blocks, nraw));
    check(nraw > 0 && nraw < NBLK, "want both raw and compressed blocks");
    $display("run %0d: %0d cycles, %0d bytes, %0d raw blocks", seed, t, out_bytes, nraw);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1);
    stall = 1;
    run(2);
    // zero blocks: done at once, nothing written
    nblk = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(done && !busy, "zero-block request");
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
