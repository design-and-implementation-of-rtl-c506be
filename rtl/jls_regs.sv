// jls_regs: register module of the codec, an AXI4-Lite slave for the CPU.
//
// The CPU programs the source and destination DDR addresses and the block
// count of each core, starts a core by writing its bit in CTRL, and polls
// STATUS. Register map (byte offsets, see jls_pkg): CTRL (write: bit0 starts
// the encoder, bit1 the decoder; the start outputs pulse for one cycle),
// STATUS (bit0 encoder busy, bit1 encoder done, bit2 decoder busy, bit3
// decoder done; a done bit is set by the core's done pulse and cleared by the
// next start), ENC_SRC, ENC_DST, ENC_NBLK, ENC_BYTES (read only), ENC_RAW
// (read only), DEC_SRC, DEC_DST, DEC_NBLK, DEC_BYTES (read only).
//
// Bus timing: a write is taken when address and data are both valid and no
// response is pending; the response follows one cycle later. A read is taken
// when no read data is pending; the data follows one cycle later. Byte
// strobes are honoured. Unmapped offsets read zero and ignore writes; every
// response is OKAY.
//
// The original design has a register block through which the CPU controls the
// cores; the register map and AXI4-Lite timing are this design's own.
module jls_regs (
  input  logic               clk,
  input  logic               rst_n,
  input  jls_pkg::axil_req_t s_req,
  output jls_pkg::axil_rsp_t s_rsp,
  // encoder core
  output logic               enc_start,
  output logic [31:0]        enc_src,
  output logic [31:0]        enc_dst,
  output logic [31:0]        enc_nblk,
  input  logic               enc_busy,
  input  logic               enc_done,
  input  logic [31:0]        enc_bytes,
  input  logic [31:0]        enc_raw,
  // decoder core
  output logic               dec_start,
  output logic [31:0]        dec_src,
  output logic [31:0]        dec_dst,
  output logic [31:0]        dec_nblk,
  input  logic               dec_busy,
  input  logic               dec_done,
  input  logic [31:0]        dec_bytes
);
  import jls_pkg::*;

  logic enc_done_r, dec_done_r;
  logic bvalid, rvalid;
  logic [31:0] rdata;
  logic wr_fire, rd_fire;

  assign wr_fire = s_req.awvalid && s_req.wvalid && !bvalid;
  assign rd_fire = s_req.arvalid && !rvalid;

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = wr_fire;
    s_rsp.wready  = wr_fire;
    s_rsp.bvalid  = bvalid;
    s_rsp.bresp   = 2'b00;
    s_rsp.arready = rd_fire;
    s_rsp.rvalid  = rvalid;
    s_rsp.rdata   = rdata;
    s_rsp.rresp   = 2'b00;
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = strb[i] ? nw[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_start  <= 1'b0;
      dec_start  <= 1'b0;
      enc_src    <= '0;
      enc_dst    <= '0;
      enc_nblk   <= '0;
      dec_src    <= '0;
      dec_dst    <= '0;
      dec_nblk   <= '0;
      enc_done_r <= 1'b0;
      dec_done_r <= 1'b0;
      bvalid     <= 1'b0;
      rvalid     <= 1'b0;
      rdata      <= '0;
    end else begin
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      if (enc_done) enc_done_r <= 1'b1;
      if (dec_done) dec_done_r <= 1'b1;
      if (bvalid && s_req.bready) bvalid <= 1'b0;
      if (rvalid && s_req.rready) rvalid <= 1'b0;
      if (wr_fire) begin
        bvalid <= 1'b1;
        unique case (s_req.awaddr)
          REG_CTRL: begin
            if (s_req.wstrb[0] && s_req.wdata[0]) begin
              enc_start  <= 1'b1;
              enc_done_r <= 1'b0;
            end
            if (s_req.wstrb[0] && s_req.wdata[1]) begin
              dec_start  <= 1'b1;
              dec_done_r <= 1'b0;
            end
          end
          REG_ENC_SRC:  enc_src  <= merge(enc_src,  s_req.wdata, s_req.wstrb);
          REG_ENC_DST:  enc_dst  <= merge(enc_dst,  s_req.wdata, s_req.wstrb);
          REG_ENC_NBLK: enc_nblk <= merge(enc_nblk, s_req.wdata, s_req.wstrb);
          REG_DEC_SRC:  dec_src  <= merge(dec_src,  s_req.wdata, s_req.wstrb);
          REG_DEC_DST:  dec_dst  <= merge(dec_dst,  s_req.wdata, s_req.wstrb);
          REG_DEC_NBLK: dec_nblk <= merge(dec_nblk, s_req.wdata, s_req.wstrb);
          default: ;
        endcase
      end
      if (rd_fire) begin
        rvalid <= 1'b1;
        unique case (s_req.araddr)
          REG_STATUS:    rdata <= {28'd0, dec_done_r, dec_busy, enc_done_r, enc_busy};
          REG_ENC_SRC:   rdata <= enc_src;
          REG_ENC_DST:   rdata <= enc_dst;
          REG_ENC_NBLK:  rdata <= enc_nblk;
          REG_ENC_BYTES: rdata <= enc_bytes;
          REG_ENC_RAW:   rdata <= enc_raw;
          REG_DEC_SRC:   rdata <= dec_src;
          REG_DEC_DST:   rdata <= dec_dst;
          REG_DEC_NBLK:  rdata <= dec_nblk;
          REG_DEC_BYTES: rdata <= dec_bytes;
          default:       rdata <= '0;
        endcase
      end
    end
  end

endmodule
