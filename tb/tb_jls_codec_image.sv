// tb_jls_codec_image: whole-image workload through the codec at its defaults.
//
// Plays the CPU for one complete image of IMG x IMG 24-bit pixels (200 x 200
// by default, the smallest size of the original evaluation set): a synthetic
// scene (smooth shading, flat areas, edges and sensor-like noise) is cut into
// 8x8 blocks, each stored as its R, G and B planes; the compression core codes
// all blocks in one run, the stream is checked block by block against the
// behavioural reference coder, the decompression core restores it, and the
// reassembled image must equal the original pixel for pixel. Reports the
// compression ratio and the core times at 100 MHz, and checks that each core
// needs no more time than the original design reports for a 200 x 200 image
// (5.82 ms to encode, 45.65 ms to decode). The DDR models add wait states.
//
// The image size and the timing targets come from the original evaluation;
// the image content is synthetic, since the test photographs are not
// available.
module tb_jls_codec_image;
  import jls_pkg::*;
  import jls_ref_pkg::*;

  localparam int BLK  = 8;
  localparam int NS   = 3 * BLK * BLK;
  localparam int IMG  = 200;
  localparam int BPR  = IMG / BLK;          // blocks per row
  localparam int NBLK = BPR * BPR;
  localparam int SRC  = 32'h00000;
  localparam int CMP  = 32'h20000;
  localparam int DST  = 32'h00000;
  localparam real ENC_MS = 5.82, DEC_MS = 45.65;   // reported for 200 x 200

  logic clk = 0, rst_n = 0;
  axil_req_t s_axil_req;
  axil_rsp_t s_axil_rsp;
  axi_req_t  m_axi_enc_req, m_axi_dec_req;
  axi_rsp_t  m_axi_enc_rsp, m_axi_dec_rsp;

  jls_codec_top dut (.*);

  axi_mem_model #(.AW(18)) ddr_enc (.clk, .rst_n, .stall(1'b1), .req(m_axi_enc_req), .rsp(m_axi_enc_rsp));
  axi_mem_model #(.AW(18)) ddr_dec (.clk, .rst_n, .stall(1'b1), .req(m_axi_dec_req), .rsp(m_axi_dec_rsp));

  always #5 clk = ~clk;   // 100 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // driven and sampled at the falling edge
  task automatic reg_write(logic [7:0] addr, logic [31:0] data);
    @(negedge clk);
    s_axil_req.awaddr  = addr;
    s_axil_req.awvalid = 1;
    s_axil_req.wdata   = data;
    s_axil_req.wstrb   = 4'hF;
    s_axil_req.wvalid  = 1;
    s_axil_req.bready  = 1;
    #1;
    while (!s_axil_rsp.awready) @(negedge clk);
    @(negedge clk);
    s_axil_req.awvalid = 0;
    s_axil_req.wvalid  = 0;
    while (!s_axil_rsp.bvalid) @(negedge clk);
    @(negedge clk);
    s_axil_req.bready  = 0;
  endtask

  task automatic reg_read(logic [7:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axil_req.araddr  = addr;
    s_axil_req.arvalid = 1;
    s_axil_req.rready  = 1;
    #1;
    while (!s_axil_rsp.arready) @(negedge clk);
    @(negedge clk);
    s_axil_req.arvalid = 0;
    while (!s_axil_rsp.rvalid) @(negedge clk);
    data = s_axil_rsp.rdata;
    @(negedge clk);
    s_axil_req.rready  = 0;
  endtask

  byte unsigned pix [3][IMG][IMG];

  // synthetic scene: sky gradient, flat road, a bright building edge, noise
  function automatic void make_image();
    int s = 12345;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int base[3], n;
        s = s * 1103515245 + 12345;
        n = ((s >>> 16) & 7) - 3;
        if (y < IMG / 3) begin
          base = '{90 + y / 2, 140 + y / 3, 220 - y / 4};
          n = 0;
        end else if (x > IMG / 2 && x < 3 * IMG / 4 && y < 2 * IMG / 3) begin
          base = '{200, 190 - (x % 16 < 2 ? 80 : 0), 170};
        end else if (y > 3 * IMG / 4) begin
          base = '{60, 60, 64};
          n = (((s >>> 20) & 15) == 0) ? n : 0;
        end else begin
          base = '{100 + x / 4, 120 + (x + y) / 8, 80 + y / 5};
        end
        for (int ch = 0; ch < 3; ch++) begin
          int v = base[ch] + n;
          pix[ch][y][x] = byte'((v < 0) ? 0 : (v > 255) ? 255 : v);
        end
      end
  endfunction

  function automatic void get_block(int b, ref byte unsigned d[]);
    int by = b / BPR, bx = b % BPR;
    d = new[NS];
    for (int ch = 0; ch < 3; ch++)
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++)
          d[ch * BLK * BLK + r * BLK + c] = pix[ch][by * BLK + r][bx * BLK + c];
  endfunction

  initial begin
    logic [31:0] st, v;
    int addr, nraw, t0, t_enc, t_dec;
    real ratio;
    s_axil_req = '0;
    make_image();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      byte unsigned d[];
      get_block(b, d);
      for (int i = 0; i < NS; i++) ddr_enc.mem[SRC + b * NS + i] = d[i];
    end
    // ---------------------------------------------------- compress
    reg_write(REG_ENC_SRC, SRC);
    reg_write(REG_ENC_DST, CMP);
    reg_write(REG_ENC_NBLK, NBLK);
    reg_write(REG_CTRL, 32'h1);
    t0 = $time / 10;
    do reg_read(REG_STATUS, st); while (!st[1]);
    t_enc = $time / 10 - t0;
    addr = CMP;
    nraw = 0;
    for (int b = 0; b < NBLK; b++) begin
      byte unsigned d[];
      word_q w;
      logic [31:0] hdr, got;
      get_block(b, d);
      w = encode_block(d, BLK);
      hdr = {ddr_enc.mem[addr+3], ddr_enc.mem[addr+2], ddr_enc.mem[addr+1], ddr_enc.mem[addr]};
      if (w.size() >= NS / 4) begin
        nraw++;
        check(hdr == NS, $sformatf("block %0d header %0d, expected raw", b, hdr));
        addr += 4 + NS;
      end else begin
        check(hdr == 4 * w.size(), $sformatf("block %0d header %0d expected %0d", b, hdr, 4 * w.size()));
        for (int i = 0; i < w.size(); i++) begin
          got = {ddr_enc.mem[addr+4*i+7], ddr_enc.mem[addr+4*i+6], ddr_enc.mem[addr+4*i+5], ddr_enc.mem[addr+4*i+4]};
          check(got == w[i], $sformatf("block %0d word %0d", b, i));
        end
        addr += 4 + 4 * w.size();
      end
    end
    reg_read(REG_ENC_BYTES, v);
    check(v == addr - CMP, $sformatf("ENC_BYTES %0d expected %0d", v, addr - CMP));
    // ---------------------------------------------------- decompress
    for (int i = 0; i < addr - CMP; i++) ddr_dec.mem[CMP + i] = ddr_enc.mem[CMP + i];
    reg_write(REG_DEC_SRC, CMP);
    reg_write(REG_DEC_DST, DST);
    reg_write(REG_DEC_NBLK, NBLK);
    reg_write(REG_CTRL, 32'h2);
    t0 = $time / 10;
    do reg_read(REG_STATUS, st); while (!st[3]);
    t_dec = $time / 10 - t0;
    reg_read(REG_DEC_BYTES, v);
    check(v == addr - CMP, $sformatf("DEC_BYTES %0d expected %0d", v, addr - CMP));
    for (int b = 0; b < NBLK; b++) begin
      int by, bx;
      by = b / BPR;
      bx = b % BPR;
      for (int ch = 0; ch < 3; ch++)
        for (int r = 0; r < BLK; r++)
          for (int c = 0; c < BLK; c++)
            check(ddr_dec.mem[DST + b * NS + ch * BLK * BLK + r * BLK + c] == pix[ch][by * BLK + r][bx * BLK + c],
                  $sformatf("pixel (%0d,%0d) plane %0d", bx * BLK + c, by * BLK + r, ch));
    end
    ratio = 100.0 * real'(addr - CMP) / real'(NBLK * NS);
    $display("%0dx%0d image: %0d blocks, %0d -> %0d bytes (%0.2f %%), %0d raw blocks",
             IMG, IMG, NBLK, NBLK * NS, addr - CMP, ratio, nraw);
    $display("encode %0d cycles = %0.3f ms, decode %0d cycles = %0.3f ms at 100 MHz (reported: %0.2f / %0.2f ms)",
             t_enc, t_enc / 1.0e5, t_dec, t_dec / 1.0e5, ENC_MS, DEC_MS);
    check(t_enc / 1.0e5 <= ENC_MS, "encoding slower than the reported time");
    check(t_dec / 1.0e5 <= DEC_MS, "decoding slower than the reported time");
    check(ratio < 100.0, "image did not compress");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
