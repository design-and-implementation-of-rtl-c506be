// tb_jls_regs: self-checking testbench of the register module.
//
// Acts as the CPU on the AXI4-Lite port of jls_regs: writes and reads back
// every address/count register (with partial byte strobes), checks that the
// read-only registers show the core inputs and ignore writes, that a CTRL
// write gives a one-cycle start pulse to the selected core only, and that the
// STATUS done bits are set by a core's done pulse and cleared by the next
// start. Also checks the bus timing: the write response comes one cycle after
// the write is taken and read data one cycle after the read is taken.
//
// The checked behaviour is that of the design under test; cycle bounds follow
// this design's own timing, as the original gives no cycle-level figures for
// the block.
module tb_jls_regs;
  import jls_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t s_req;
  axil_rsp_t s_rsp;
  logic enc_start, dec_start;
  logic [31:0] enc_src, enc_dst, enc_nblk, dec_src, dec_dst, dec_nblk;
  logic enc_busy = 0, enc_done = 0, dec_busy = 0, dec_done = 0;
  logic [31:0] enc_bytes = 32'h1234_5678, enc_raw = 32'd9, dec_bytes = 32'hCAFE_0001;
  jls_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int n_enc_start = 0, n_dec_start = 0;
  always @(negedge clk) begin
    if (enc_start) n_enc_start++;
    if (dec_start) n_dec_start++;
  end

  // driven and sampled at the falling edge
  task automatic reg_write(logic [7:0] addr, logic [31:0] data, logic [3:0] strb = 4'hF);
    int lat;
    @(negedge clk);
    s_req.awaddr = addr; s_req.awvalid = 1;
    s_req.wdata = data; s_req.wstrb = strb; s_req.wvalid = 1;
    s_req.bready = 1;
    #1;
    while (!s_rsp.awready) @(negedge clk);
    @(negedge clk);
    s_req.awvalid = 0;
    s_req.wvalid = 0;
    lat = 1;
    while (!s_rsp.bvalid) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 1, $sformatf("write response after %0d cycles", lat));
    @(negedge clk);
    s_req.bready = 0;
  endtask

  task automatic reg_read(logic [7:0] addr, output logic [31:0] data);
    int lat;
    @(negedge clk);
    s_req.araddr = addr; s_req.arvalid = 1; s_req.rready = 1;
    #1;
    while (!s_rsp.arready) @(negedge clk);
    @(negedge clk);
    s_req.arvalid = 0;
    lat = 1;
    while (!s_rsp.rvalid) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 1, $sformatf("read data after %0d cycles", lat));
    data = s_rsp.rdata;
    @(negedge clk);
    s_req.rready = 0;
  endtask

  initial begin
    logic [31:0] v;
    logic [7:0] rw_regs[] = '{REG_ENC_SRC, REG_ENC_DST, REG_ENC_NBLK, REG_DEC_SRC, REG_DEC_DST, REG_DEC_NBLK};
    s_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rw_regs[i]) begin
      logic [31:0] w;
      w = $urandom;
      reg_write(rw_regs[i], w);
      reg_read(rw_regs[i], v);
      check(v == w, $sformatf("reg %02x read %08x wrote %08x", rw_regs[i], v, w));
      reg_write(rw_regs[i], 32'hAABB_CCDD, 4'b0101);
      reg_read(rw_regs[i], v);
      check(v == {w[31:24], 8'hBB, w[15:8], 8'hDD}, $sformatf("reg %02x byte strobes: %08x", rw_regs[i], v));
    end
    check(enc_src != 0 && dec_nblk != 0, "register outputs not driven");
    reg_write(REG_ENC_BYTES, 0);
    reg_read(REG_ENC_BYTES, v);  check(v == enc_bytes, "ENC_BYTES");
    reg_read(REG_ENC_RAW, v);    check(v == enc_raw, "ENC_RAW");
    reg_read(REG_DEC_BYTES, v);  check(v == dec_bytes, "DEC_BYTES");
    reg_read(8'h3C, v);          check(v == 0, "unmapped register not zero");
    // start pulses and status
    reg_write(REG_CTRL, 32'h1);
    @(negedge clk);
    check(n_enc_start == 1 && n_dec_start == 0, "CTRL bit0 start pulse");
    enc_busy = 1;
    reg_read(REG_STATUS, v);     check(v == 32'h1, $sformatf("STATUS busy %h", v));
    @(negedge clk);
    enc_busy = 0; enc_done = 1;
    @(negedge clk);
    enc_done = 0;
    reg_read(REG_STATUS, v);     check(v == 32'h2, $sformatf("STATUS enc done %h", v));
    reg_write(REG_CTRL, 32'h2);
    check(n_enc_start == 1 && n_dec_start == 1, "CTRL bit1 start pulse");
    dec_busy = 1;
    reg_read(REG_STATUS, v);     check(v == 32'h6, $sformatf("STATUS dec busy %h", v));
    dec_busy = 0; dec_done = 1;
    @(negedge clk);
    dec_done = 0;
    reg_read(REG_STATUS, v);     check(v == 32'hA, $sformatf("STATUS both done %h", v));
    reg_write(REG_CTRL, 32'h3);
    reg_read(REG_STATUS, v);     check(v == 32'h0, $sformatf("STATUS after restart %h", v));
    check(n_enc_start == 2 && n_dec_start == 2, "start pulse count");
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
