// jls_enc_ip: compression IP core (AXI master) around the block encoder.
//
// For each of `nblk` blocks the core
//   1. reads the raw block (3*BLK*BLK bytes, plane after plane, four samples
//      per 32-bit word, first sample in the low byte) from DDR at
//      src_addr + n*RAW_BYTES into the raw-data block RAM;
//   2. streams it through jls_encoder, one sample per cycle, storing the
//      code words in the compressed-data block RAM;
//   3. writes a one-word block header followed by the payload to DDR, packed
//      right after the previous block. The header is the payload length in
//      bytes. When the code stream is not shorter than the raw block (the
//      encoder produced RAW_WORDS words or more) the raw block is written
//      instead and the header holds RAW_BYTES, which tells the decoder to copy
//      it.
// DDR traffic uses jls_axi_dma (bursts of 16 beats of 4 bytes). `done`
// pulses when all blocks are written; `out_bytes` is the total written
// (headers included) and `raw_blocks` the number of blocks stored raw.
//
// Falling back to the raw block when coding does not shrink it, recording the
// size in a block header, and burst-based DDR access follow the original
// design; the header format, the equal-length rule and the sequential
// read-encode-write order are this design's choices.
module jls_enc_ip #(
  parameter int unsigned BLK = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        src_addr,
  input  logic [31:0]        dst_addr,
  input  logic [31:0]        nblk,
  output logic               busy,
  output logic               done,
  output logic [31:0]        out_bytes,
  output logic [31:0]        raw_blocks,
  output jls_pkg::axi_req_t  m_req,
  input  jls_pkg::axi_rsp_t  m_rsp
);
  import jls_pkg::*;

  localparam int unsigned NS        = CHANNELS * BLK * BLK;
  localparam int unsigned RAW_WORDS = NS / 4;
  localparam int unsigned RAW_BYTES = NS;
  localparam int unsigned RAW_AW    = $clog2(RAW_WORDS);
  localparam int unsigned CDEPTH    = 2 ** $clog2(RAW_WORDS + 1);
  localparam int unsigned CAW       = $clog2(CDEPTH);

  typedef enum logic [2:0] {E_IDLE, E_RD, E_RD_WAIT, E_ENC, E_ENC_WAIT, E_WR, E_WR_WAIT, E_NEXT} state_e;
  state_e state;

  logic [31:0] blk_cnt, src, dst;
  logic [15:0] payload_words;
  logic        use_raw;

  // ------------------------------------------------------------- RAMs
  logic              raw_we, raw_re;
  logic [RAW_AW-1:0] raw_waddr, raw_raddr;
  logic [31:0]       raw_wdata, raw_rdata;

  jls_bram #(.WIDTH(32), .DEPTH(2 ** RAW_AW)) u_raw_ram (
    .clk, .we(raw_we), .waddr(raw_waddr), .wdata(raw_wdata),
    .re(raw_re), .raddr(raw_raddr), .rdata(raw_rdata)
  );

  logic           comp_we, comp_re;
  logic [CAW-1:0] comp_waddr, comp_raddr;
  logic [31:0]    comp_wdata, comp_rdata;

  jls_bram #(.WIDTH(32), .DEPTH(CDEPTH)) u_comp_ram (
    .clk, .we(comp_we), .waddr(comp_waddr), .wdata(comp_wdata),
    .re(comp_re), .raddr(comp_raddr), .rdata(comp_rdata)
  );

  // -------------------------------------------------------------- DMA
  logic        rd_start, rd_done, wr_start, wr_done, src_re;
  logic [15:0] src_idx;
  logic [31:0] src_data;
  logic        dma_we;
  logic [RAW_AW-1:0] dma_waddr;
  logic [31:0] dma_wdata;

  jls_axi_dma #(.AW(RAW_AW)) u_dma (
    .clk, .rst_n,
    .rd_start, .rd_addr(src), .rd_words(16'(RAW_WORDS)), .rd_base('0), .rd_done,
    .mem_we(dma_we), .mem_waddr(dma_waddr), .mem_wdata(dma_wdata),
    .wr_start, .wr_addr(dst), .wr_words(payload_words + 16'd1), .wr_done,
    .src_re, .src_idx, .src_data,
    .m_req, .m_rsp
  );

  assign raw_we    = dma_we;
  assign raw_waddr = dma_waddr;
  assign raw_wdata = dma_wdata;

  // ----------------------------------------------------------- encoder
  logic        enc_start, s_valid, enc_ow_valid, enc_done;
  logic [31:0] enc_word;
  logic [15:0] enc_nwords;
  sample_t     s_data;
  logic [15:0] feed_idx;
  logic        feed_act, feed_v;
  logic [1:0]  feed_byte;
  logic [15:0] comp_cnt;

  jls_encoder #(.BLK(BLK)) u_enc (
    .clk, .rst_n, .start(enc_start), .s_valid, .s_data,
    .out_valid(enc_ow_valid), .out_word(enc_word), .done(enc_done),
    .nwords(enc_nwords), .busy()
  );

  assign s_valid = feed_v;
  assign s_data  = sample_t'(raw_rdata >> (8 * feed_byte));

  // code words go to RAM addresses 1.. (address 0 stands for the header);
  // words past RAW_WORDS are dropped: the block will be stored raw
  assign comp_we    = enc_ow_valid && (comp_cnt < 16'(RAW_WORDS));
  assign comp_waddr = CAW'(comp_cnt + 16'd1);
  assign comp_wdata = enc_word;

  // ---------------------------------------------- read-port multiplexing
  logic        hdr_sel;
  logic [31:0] header;

  always_comb begin
    raw_re     = 1'b0;
    raw_raddr  = '0;
    comp_re    = 1'b0;
    comp_raddr = '0;
    if (state == E_ENC) begin
      raw_re    = feed_act;
      raw_raddr = RAW_AW'(feed_idx >> 2);
    end else begin
      raw_re     = src_re && use_raw && (src_idx != 0);
      raw_raddr  = RAW_AW'(src_idx - 16'd1);
      comp_re    = src_re && !use_raw;
      comp_raddr = CAW'(src_idx);
    end
    src_data = hdr_sel ? header : (use_raw ? raw_rdata : comp_rdata);
  end

  assign header = use_raw ? 32'(RAW_BYTES) : {14'd0, payload_words, 2'b00};

  // ---------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= E_IDLE;
      blk_cnt       <= '0;
      src           <= '0;
      dst           <= '0;
      payload_words <= '0;
      use_raw       <= 1'b0;
      busy          <= 1'b0;
      done          <= 1'b0;
      out_bytes     <= '0;
      raw_blocks    <= '0;
      rd_start      <= 1'b0;
      wr_start      <= 1'b0;
      enc_start     <= 1'b0;
      feed_idx      <= '0;
      feed_act      <= 1'b0;
      feed_v        <= 1'b0;
      feed_byte     <= '0;
      comp_cnt      <= '0;
      hdr_sel       <= 1'b0;
    end else begin
      done      <= 1'b0;
      rd_start  <= 1'b0;
      wr_start  <= 1'b0;
      enc_start <= 1'b0;
      hdr_sel   <= src_re && (src_idx == 0);
      feed_v    <= feed_act;
      feed_byte <= feed_idx[1:0];
      if (enc_ow_valid) comp_cnt <= comp_cnt + 16'd1;
      unique case (state)
        E_IDLE: if (start) begin
          blk_cnt    <= '0;
          src        <= src_addr;
          dst        <= dst_addr;
          out_bytes  <= '0;
          raw_blocks <= '0;
          if (nblk == 0) begin
            done <= 1'b1;
          end else begin
            busy     <= 1'b1;
            rd_start <= 1'b1;
            state    <= E_RD_WAIT;
          end
        end
        E_RD: begin
          rd_start <= 1'b1;
          state    <= E_RD_WAIT;
        end
        E_RD_WAIT: if (rd_done) begin
          enc_start <= 1'b1;
          comp_cnt  <= '0;
          feed_idx  <= '0;
          feed_act  <= 1'b1;
          state     <= E_ENC;
        end
        E_ENC: begin
          feed_idx <= feed_idx + 16'd1;
          if (feed_idx == 16'(NS - 1)) begin
            feed_act <= 1'b0;
            state    <= E_ENC_WAIT;
          end
        end
        E_ENC_WAIT: if (enc_done) begin
          if (enc_nwords >= 16'(RAW_WORDS)) begin
            use_raw       <= 1'b1;
            payload_words <= 16'(RAW_WORDS);
            raw_blocks    <= raw_blocks + 32'd1;
          end else begin
            use_raw       <= 1'b0;
            payload_words <= enc_nwords;
          end
          state <= E_WR;
        end
        E_WR: begin
          wr_start <= 1'b1;
          state    <= E_WR_WAIT;
        end
        E_WR_WAIT: if (wr_done) state <= E_NEXT;
        E_NEXT: begin
          dst       <= dst + {14'd0, payload_words + 16'd1, 2'b00};
          out_bytes <= out_bytes + {14'd0, payload_words + 16'd1, 2'b00};
          src       <= src + 32'(RAW_BYTES);
          blk_cnt   <= blk_cnt + 32'd1;
          if (blk_cnt + 32'd1 == nblk) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= E_IDLE;
          end else begin
            state <= E_RD;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
