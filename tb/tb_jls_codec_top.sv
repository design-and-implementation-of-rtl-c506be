// tb_jls_codec_top: end-to-end test of the codec at its default parameters.
//
// Plays the CPU: places NBLK raw blocks of varied content in the encoder's
// DDR model, programs the registers over AXI4-Lite, starts the compression
// core and polls STATUS until done. The compressed stream is checked word by
// word against the behavioural reference coder (header and payload, raw
// fallback included). The stream is then handed to the decoder's DDR model,
// the decompression core is run the same way, and the restored blocks must
// equal the originals. The DDR models insert random wait states.
// Each mechanism of the design is counted and must occur at least once:
// regular, run and run-interruption samples, escape codewords, context
// forwarding in the encoder pipeline, blocks stored raw and compressed,
// multi-burst reads of a long block, and AXI back-pressure.
//
// Runs at the default parameters (8x8 blocks as in the original evaluation);
// the block stream format checked is this design's own.
module tb_jls_codec_top;
  import jls_pkg::*;
  import jls_ref_pkg::*;

  localparam int BLK  = 8;
  localparam int NS   = 3 * BLK * BLK;
  localparam int NBLK = 24;
  localparam int SRC  = 32'h0000;
  localparam int CMP  = 32'h8000;
  localparam int DST  = 32'h4000;

  logic clk = 0, rst_n = 0;
  axil_req_t s_axil_req;
  axil_rsp_t s_axil_rsp;
  axi_req_t  m_axi_enc_req, m_axi_dec_req;
  axi_rsp_t  m_axi_enc_rsp, m_axi_dec_rsp;

  jls_codec_top dut (.*);

  axi_mem_model #(.AW(16)) ddr_enc (.clk, .rst_n, .stall(1'b1), .req(m_axi_enc_req), .rsp(m_axi_enc_rsp));
  axi_mem_model #(.AW(16)) ddr_dec (.clk, .rst_n, .stall(1'b1), .req(m_axi_dec_req), .rsp(m_axi_dec_rsp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_regular = 0, n_run = 0, n_runint = 0, n_escape = 0, n_forward = 0;
  int n_rawblk = 0, n_compblk = 0, n_multiburst = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_enc_ip.u_enc.v3) begin
      if (dut.u_enc_ip.u_enc.cls3 == CLS_REGULAR) n_regular++;
      if (dut.u_enc_ip.u_enc.cls3 == CLS_RUN)     n_run++;
      if (dut.u_enc_ip.u_enc.cls3 == CLS_RUN_INT) n_runint++;
    end
    if (dut.u_enc_ip.u_enc.v4r && dut.u_enc_ip.u_enc.code_en4 &&
        (dut.u_enc_ip.u_enc.merr4 >> dut.u_enc_ip.u_enc.k4) >= 9'(dut.u_enc_ip.u_enc.lim4 - 6'd9))
      n_escape++;
    if (dut.u_enc_ip.u_enc.v2 && dut.u_enc_ip.u_enc.wr4 && !dut.u_enc_ip.u_enc.pf2 &&
        dut.u_enc_ip.u_enc.q4 == dut.u_enc_ip.u_enc.q2)
      n_forward++;
    if (dut.u_dec_ip.u_dma.rd_done && dut.u_dec_ip.rd_base != 0) n_multiburst++;
    if ((m_axi_enc_req.wvalid && !m_axi_enc_rsp.wready) || (m_axi_dec_req.arvalid && !m_axi_dec_rsp.arready))
      n_stall++;
  end

  // ------------------------------------------------ AXI4-Lite CPU tasks
  // Signals are driven and sampled at the falling edge; a handshake seen
  // there completes at the following rising edge.
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

  byte unsigned img [NBLK][];

  initial begin
    logic [31:0] st, v;
    int addr, exp_bytes, exp_raw;
    s_axil_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ------------------------------------------------ image in DDR
    for (int b = 0; b < NBLK; b++) begin
      byte unsigned d[];
      make_block(d, BLK, b % 6, 77 + 13 * b);
      img[b] = d;
      for (int i = 0; i < NS; i++) ddr_enc.mem[SRC + b * NS + i] = img[b][i];
    end
    // ------------------------------------------------ compress
    reg_write(REG_ENC_SRC, SRC);
    reg_write(REG_ENC_DST, CMP);
    reg_write(REG_ENC_NBLK, NBLK);
    reg_read(REG_ENC_NBLK, v);
    check(v == NBLK, "ENC_NBLK read back");
    reg_write(REG_CTRL, 32'h1);
    do reg_read(REG_STATUS, st); while (!st[1]);
    // ------------------------------------------------ check stream
    addr = CMP;
    exp_bytes = 0;
    exp_raw = 0;
    for (int b = 0; b < NBLK; b++) begin
      word_q w;
      logic [31:0] hdr, got;
      bit raw;
      byte unsigned d[];
      d = img[b];
      w = encode_block(d, BLK);
      raw = (w.size() >= NS / 4);
      hdr = {ddr_enc.mem[addr+3], ddr_enc.mem[addr+2], ddr_enc.mem[addr+1], ddr_enc.mem[addr]};
      check(hdr == (raw ? NS : 4 * w.size()), $sformatf("block %0d header %0d", b, hdr));
      if (raw) begin
        n_rawblk++;
        exp_raw++;
        for (int i = 0; i < NS; i++)
          check(ddr_enc.mem[addr + 4 + i] == img[b][i], $sformatf("block %0d raw byte %0d", b, i));
        addr += 4 + NS;
      end else begin
        n_compblk++;
        for (int i = 0; i < w.size(); i++) begin
          got = {ddr_enc.mem[addr+4+4*i+3], ddr_enc.mem[addr+4+4*i+2], ddr_enc.mem[addr+4+4*i+1], ddr_enc.mem[addr+4+4*i]};
          check(got == w[i], $sformatf("block %0d word %0d: %08x expected %08x", b, i, got, w[i]));
        end
        addr += 4 + 4 * w.size();
      end
    end
    exp_bytes = addr - CMP;
    reg_read(REG_ENC_BYTES, v);
    check(v == exp_bytes, $sformatf("ENC_BYTES %0d expected %0d", v, exp_bytes));
    reg_read(REG_ENC_RAW, v);
    check(v == exp_raw, $sformatf("ENC_RAW %0d expected %0d", v, exp_raw));
    $display("compressed %0d raw bytes into %0d bytes (%0d blocks stored raw)", NBLK * NS, exp_bytes, exp_raw);
    // ------------------------------------------------ decompress
    for (int i = 0; i < exp_bytes; i++) ddr_dec.mem[CMP + i] = ddr_enc.mem[CMP + i];
    reg_write(REG_DEC_SRC, CMP);
    reg_write(REG_DEC_DST, DST);
    reg_write(REG_DEC_NBLK, NBLK);
    reg_write(REG_CTRL, 32'h2);
    do reg_read(REG_STATUS, st); while (!st[3]);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < NS; i++)
        check(ddr_dec.mem[DST + b * NS + i] == img[b][i],
              $sformatf("restored block %0d byte %0d: %0d expected %0d", b, i, ddr_dec.mem[DST + b * NS + i], img[b][i]));
    reg_read(REG_DEC_BYTES, v);
    check(v == exp_bytes, $sformatf("DEC_BYTES %0d expected %0d", v, exp_bytes));
    // ------------------------------------------------ mechanisms
    $display("regular=%0d run=%0d run_interruption=%0d escape=%0d forward=%0d raw_blocks=%0d compressed_blocks=%0d multiburst=%0d axi_stalls=%0d",
             n_regular, n_run, n_runint, n_escape, n_forward, n_rawblk, n_compblk, n_multiburst, n_stall);
    check(n_regular > 0, "regular mode never used");
    check(n_run > 0, "run mode never used");
    check(n_runint > 0, "run interruption never used");
    check(n_escape > 0, "escape codeword never used");
    check(n_forward > 0, "context forwarding never used");
    check(n_rawblk > 0, "raw fallback never used");
    check(n_compblk > 0, "no block compressed");
    check(n_multiburst > 0, "multi-burst block read never used");
    check(n_stall > 0, "no AXI back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
