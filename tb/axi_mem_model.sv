// axi_mem_model: behavioural model of the DDR memory behind an AXI4 port.
//
// Not synthesizable. Serves INCR bursts of 32-bit beats from a byte array of
// 2**AW bytes, one burst at a time per direction, honouring write strobes.
// `stall` inserts pseudo-random wait states on every channel, so that the
// masters' handshakes see back-pressure. The array is reached by the
// testbench through hierarchical references (mem[]).
//
// Stands in for the DDR of the original system; its timing is arbitrary.
module axi_mem_model #(
  parameter int unsigned AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall,
  input  jls_pkg::axi_req_t req,
  output jls_pkg::axi_rsp_t rsp
);
  byte unsigned mem [2**AW];

  logic        wbusy, bpend, rbusy;
  logic [31:0] waddr, raddr;
  logic [7:0]  rleft;
  logic        go_aw, go_w, go_ar, go_r;

  always_ff @(posedge clk) begin
    go_aw <= stall ? ($urandom % 3 != 0) : 1'b1;
    go_w  <= stall ? ($urandom % 3 != 0) : 1'b1;
    go_ar <= stall ? ($urandom % 3 != 0) : 1'b1;
    go_r  <= stall ? ($urandom % 3 != 0) : 1'b1;
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = !wbusy && !bpend && go_aw;
    rsp.wready  = wbusy && go_w;
    rsp.bvalid  = bpend;
    rsp.arready = !rbusy && go_ar;
    rsp.rvalid  = rbusy && go_r;
    rsp.rdata   = {mem[(raddr + 3) % (2**AW)], mem[(raddr + 2) % (2**AW)],
                   mem[(raddr + 1) % (2**AW)], mem[raddr % (2**AW)]};
    rsp.rlast   = (rleft == 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbusy <= 1'b0; bpend <= 1'b0; rbusy <= 1'b0;
      waddr <= '0; raddr <= '0; rleft <= '0;
    end else begin
      if (rsp.awready && req.awvalid) begin
        wbusy <= 1'b1;
        waddr <= req.awaddr;
      end
      if (rsp.wready && req.wvalid) begin
        for (int i = 0; i < 4; i++)
          if (req.wstrb[i]) mem[(waddr + i) % (2**AW)] <= req.wdata[8*i +: 8];
        waddr <= waddr + 4;
        if (req.wlast) begin
          wbusy <= 1'b0;
          bpend <= 1'b1;
        end
      end
      if (bpend && req.bready) bpend <= 1'b0;
      if (rsp.arready && req.arvalid) begin
        rbusy <= 1'b1;
        raddr <= req.araddr;
        rleft <= req.arlen;
      end
      if (rsp.rvalid && req.rready) begin
        raddr <= raddr + 4;
        rleft <= rleft - 8'd1;
        if (rleft == 0) rbusy <= 1'b0;
      end
    end
  end
endmodule
