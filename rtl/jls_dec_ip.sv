// jls_dec_ip: decompression IP core (AXI master) around the block decoder.
//
// Reads the block stream written by jls_enc_ip: for each of `nblk` blocks it
//   1. reads the first 16-word burst at the current source address into the
//      compressed-data block RAM; word 0 is the block header (payload bytes);
//   2. if the block is longer than one burst, reads the rest;
//   3. if the header is RAW_BYTES or more the payload is the raw block and is
//      not decoded; otherwise jls_decoder decodes it, and the samples are
//      packed four per word (first sample in the low byte) into the raw-data
//      block RAM;
//   4. writes the raw block to DDR at dst_addr + n*RAW_BYTES.
// The next block starts right after this block's payload. `done` pulses at
// the end; `in_bytes` counts the compressed bytes consumed (headers included).
//
// Copying a block whose header shows it was stored raw, and burst-based DDR
// access, follow the original design; the header format and the read order
// are this design's choices.
module jls_dec_ip #(
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
  output logic [31:0]        in_bytes,
  output jls_pkg::axi_req_t  m_req,
  input  jls_pkg::axi_rsp_t  m_rsp
);
  import jls_pkg::*;

  localparam int unsigned NS        = CHANNELS * BLK * BLK;
  localparam int unsigned RAW_WORDS = NS / 4;
  localparam int unsigned RAW_BYTES = NS;
  localparam int unsigned RAW_AW    = $clog2(RAW_WORDS);
  localparam int unsigned CDEPTH    = 2 ** $clog2((RAW_WORDS + 1 > AXI_BURST) ? RAW_WORDS + 1 : AXI_BURST);
  localparam int unsigned CAW       = $clog2(CDEPTH);

  typedef enum logic [3:0] {
    D_IDLE, D_HDR, D_HDR_WAIT, D_HDR_RD, D_HDR_CAP, D_REST_WAIT,
    D_DEC, D_DEC_WAIT, D_WR, D_WR_WAIT, D_NEXT
  } state_e;
  state_e state;

  logic [31:0] blk_cnt, src, dst;
  logic [15:0] total_words;     // header + payload
  logic        use_raw;

  // ------------------------------------------------------------- RAMs
  logic           comp_we, comp_re;
  logic [CAW-1:0] comp_waddr, comp_raddr;
  logic [31:0]    comp_wdata, comp_rdata;

  jls_bram #(.WIDTH(32), .DEPTH(CDEPTH)) u_comp_ram (
    .clk, .we(comp_we), .waddr(comp_waddr), .wdata(comp_wdata),
    .re(comp_re), .raddr(comp_raddr), .rdata(comp_rdata)
  );

  logic              raw_we, raw_re;
  logic [RAW_AW-1:0] raw_waddr, raw_raddr;
  logic [31:0]       raw_wdata, raw_rdata;

  jls_bram #(.WIDTH(32), .DEPTH(2 ** RAW_AW)) u_raw_ram (
    .clk, .we(raw_we), .waddr(raw_waddr), .wdata(raw_wdata),
    .re(raw_re), .raddr(raw_raddr), .rdata(raw_rdata)
  );

  // -------------------------------------------------------------- DMA
  logic           rd_start, rd_done, wr_start, wr_done, src_re;
  logic [31:0]    rd_addr;
  logic [15:0]    rd_words;
  logic [CAW-1:0] rd_base;
  logic [15:0]    src_idx;
  logic [31:0]    src_data;

  jls_axi_dma #(.AW(CAW)) u_dma (
    .clk, .rst_n,
    .rd_start, .rd_addr, .rd_words, .rd_base, .rd_done,
    .mem_we(comp_we), .mem_waddr(comp_waddr), .mem_wdata(comp_wdata),
    .wr_start, .wr_addr(dst), .wr_words(16'(RAW_WORDS)), .wr_done,
    .src_re, .src_idx, .src_data,
    .m_req, .m_rsp
  );

  // ----------------------------------------------------------- decoder
  logic           dec_start, dec_rd, pix_valid, dec_done;
  logic [CAW-1:0] dec_addr;
  sample_t        pix_data;
  logic [1:0]     pack_byte;
  logic [RAW_AW-1:0] pack_word;
  logic [23:0]    pack_acc;

  jls_decoder #(.BLK(BLK), .AW(CAW)) u_dec (
    .clk, .rst_n, .start(dec_start), .base(CAW'(1)),
    .mem_addr(dec_addr), .mem_rd(dec_rd), .mem_data(comp_rdata),
    .pix_valid, .pix_data, .done(dec_done), .busy()
  );

  assign raw_we    = pix_valid && (pack_byte == 2'd3);
  assign raw_waddr = pack_word;
  assign raw_wdata = {pix_data, pack_acc};

  // ---------------------------------------------- read-port multiplexing
  always_comb begin
    comp_re    = 1'b0;
    comp_raddr = '0;
    raw_re     = 1'b0;
    raw_raddr  = RAW_AW'(src_idx);
    unique case (state)
      D_HDR_RD: begin
        comp_re    = 1'b1;
        comp_raddr = '0;
      end
      D_DEC, D_DEC_WAIT: begin
        comp_re    = dec_rd;
        comp_raddr = dec_addr;
      end
      default: begin
        comp_re    = src_re && use_raw;
        comp_raddr = CAW'(src_idx + 16'd1);
        raw_re     = src_re && !use_raw;
      end
    endcase
    src_data = use_raw ? comp_rdata : raw_rdata;
  end

  // block length in words (header + payload) from the header word
  logic [15:0] tw;
  assign tw = (comp_rdata >= 32'(RAW_BYTES)) ? 16'(RAW_WORDS) + 16'd1
                                             : 16'((comp_rdata + 32'd3) >> 2) + 16'd1;

  // ---------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= D_IDLE;
      blk_cnt     <= '0;
      src         <= '0;
      dst         <= '0;
      total_words <= '0;
      use_raw     <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
      in_bytes    <= '0;
      rd_start    <= 1'b0;
      rd_addr     <= '0;
      rd_words    <= '0;
      rd_base     <= '0;
      wr_start    <= 1'b0;
      dec_start   <= 1'b0;
      pack_byte   <= '0;
      pack_word   <= '0;
      pack_acc    <= '0;
    end else begin
      done      <= 1'b0;
      rd_start  <= 1'b0;
      wr_start  <= 1'b0;
      dec_start <= 1'b0;
      if (pix_valid) begin
        pack_byte <= pack_byte + 2'd1;
        if (pack_byte == 2'd3) pack_word <= pack_word + 1'b1;
        pack_acc  <= {pix_data, pack_acc[23:8]};
      end
      unique case (state)
        D_IDLE: if (start) begin
          blk_cnt  <= '0;
          src      <= src_addr;
          dst      <= dst_addr;
          in_bytes <= '0;
          if (nblk == 0) begin
            done <= 1'b1;
          end else begin
            busy  <= 1'b1;
            state <= D_HDR;
          end
        end
        D_HDR: begin
          rd_start <= 1'b1;
          rd_addr  <= src;
          rd_words <= 16'(AXI_BURST);
          rd_base  <= '0;
          state    <= D_HDR_WAIT;
        end
        D_HDR_WAIT: if (rd_done) state <= D_HDR_RD;
        D_HDR_RD:   state <= D_HDR_CAP;
        D_HDR_CAP: begin
          use_raw     <= (comp_rdata >= 32'(RAW_BYTES));
          total_words <= tw;
          if (tw > 16'(AXI_BURST)) begin
            rd_start <= 1'b1;
            rd_addr  <= src + 32'(AXI_BURST * AXI_BYTES);
            rd_words <= tw - 16'(AXI_BURST);
            rd_base  <= CAW'(AXI_BURST);
            state    <= D_REST_WAIT;
          end else begin
            state    <= D_DEC;
          end
        end
        D_REST_WAIT: if (rd_done) state <= D_DEC;
        D_DEC: begin
          pack_byte <= '0;
          pack_word <= '0;
          if (use_raw) begin
            state <= D_WR;
          end else begin
            dec_start <= 1'b1;
            state     <= D_DEC_WAIT;
          end
        end
        D_DEC_WAIT: if (dec_done) state <= D_WR;
        D_WR: begin
          wr_start <= 1'b1;
          state    <= D_WR_WAIT;
        end
        D_WR_WAIT: if (wr_done) state <= D_NEXT;
        D_NEXT: begin
          src      <= src + {14'd0, total_words, 2'b00};
          in_bytes <= in_bytes + {14'd0, total_words, 2'b00};
          dst      <= dst + 32'(RAW_BYTES);
          blk_cnt  <= blk_cnt + 32'd1;
          if (blk_cnt + 32'd1 == nblk) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= D_IDLE;
          end else begin
            state <= D_HDR;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
