// tb_jls_dec_ip: self-checking testbench of the decompression IP core.
//
// Builds a block stream in the DDR model with the behavioural reference
// coder (header word with the payload bytes, then the payload; blocks whose
// code is not shorter than the raw block are stored raw with header 192),
// starts jls_dec_ip through its control inputs, and checks that the restored
// raw blocks equal the originals and that `in_bytes` equals the stream
// length. Runs with and without DDR wait states, covers blocks longer than
// one burst, and bounds the cycles per block without wait states.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_dec_ip;
  import jls_pkg::*;
  import jls_ref_pkg::*;

  localparam int BLK = 8, NS = 3 * BLK * BLK, NBLK = 12;
  localparam int SRC = 32'h2000, DST = 32'h9000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, stall = 0;
  logic [31:0] src_addr = SRC, dst_addr = DST, nblk = NBLK, in_bytes;
  axi_req_t m_req;
  axi_rsp_t m_rsp;
  jls_dec_ip #(.BLK(BLK)) dut (.*);
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

  task automatic put_word(int addr, logic [31:0] w);
    for (int i = 0; i < 4; i++) ddr.mem[addr + i] = w[8*i +: 8];
  endtask

  task automatic run(int seed);
    int addr, nraw, t;
    addr = SRC;
    nraw = 0;
    for (int b = 0; b < NBLK; b++) begin
      byte unsigned d[];
      word_q w;
      make_block(d, BLK, (b + seed) % 6, seed * 17 + b);
      img[b] = d;
      w = encode_block(d, BLK);
      if (w.size() >= NS / 4) begin
        nraw++;
        put_word(addr, NS);
        for (int i = 0; i < NS; i++) ddr.mem[addr + 4 + i] = d[i];
        addr += 4 + NS;
      end else begin
        put_word(addr, 4 * w.size());
        for (int i = 0; i < w.size(); i++) put_word(addr + 4 + 4 * i, w[i]);
        addr += 4 + 4 * w.size();
      end
    end
    for (int i = 0; i < NBLK * NS; i++) ddr.mem[DST + i] = 8'hEE;
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
    if (!stall) check(t <= NBLK * (6 * NS + 48), $sformatf("%0d cycles for %0d blocks", t, NBLK));
    @(negedge clk);
    check(!busy, "busy after done");
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < NS; i++)
        check(ddr.mem[DST + b * NS + i] == img[b][i],
              $sformatf("block %0d byte %0d: %0d expected %0d", b, i, ddr.mem[DST + b * NS + i], img[b][i]));
    check(in_bytes == addr - SRC, $sformatf("in_bytes %0d expected %0d", in_bytes, addr - SRC));
    check(nraw > 0 && nraw < NBLK, "want both raw and compressed blocks");
    $display("run %0d: %0d cycles, %0d stream bytes, %0d raw blocks", seed, t, in_bytes, nraw);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1);
    stall = 1;
    run(2);
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
