// jls_axi_dma: AXI4 burst engine between DDR and a codec IP's block RAMs.
//
// Every transfer uses bursts of 16 beats of 4 bytes (AxLEN = 15, AxSIZE = 2,
// INCR), and the number of bursts follows the transfer size:
// ceil(words / 16). On writes, beats past the last word go out with a zero
// byte strobe, so a burst never overwrites memory beyond the transfer; on
// reads they are dropped. One burst is outstanding at a time.
//
// Read engine: `rd_start` with DDR byte address `rd_addr` and `rd_words`
// copies that many words into the block RAM write port (`mem_*`) starting at
// RAM address `rd_base`; `rd_done` pulses at the end.
// Write engine: `wr_start` with `wr_addr` and `wr_words` sends words
// 0..wr_words-1 of a source that is read through `src_re`/`src_idx` with one
// cycle of latency (`src_data`); `wr_done` pulses after the last write
// response. Each write beat takes three cycles (fetch, load, handshake).
// The two engines are independent.
//
// Burst length 16 and beat size 4 bytes, with the burst count following the
// transfer size, are those of the original design; the zero-strobe padding,
// one burst in flight and the three-cycle write beat are this design's
// choices.
module jls_axi_dma #(
  parameter int unsigned AW = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  // read: DDR -> RAM
  input  logic                rd_start,
  input  logic [31:0]         rd_addr,
  input  logic [15:0]         rd_words,
  input  logic [AW-1:0]       rd_base,
  output logic                rd_done,
  output logic                mem_we,
  output logic [AW-1:0]       mem_waddr,
  output logic [31:0]         mem_wdata,
  // write: source -> DDR
  input  logic                wr_start,
  input  logic [31:0]         wr_addr,
  input  logic [15:0]         wr_words,
  output logic                wr_done,
  output logic                src_re,
  output logic [15:0]         src_idx,
  input  logic [31:0]         src_data,
  // AXI4 master
  output jls_pkg::axi_req_t   m_req,
  input  jls_pkg::axi_rsp_t   m_rsp
);
  import jls_pkg::*;

  localparam logic [7:0] BEATS_M1 = 8'(AXI_BURST - 1);

  // ------------------------------------------------------------- read
  typedef enum logic [1:0] {R_IDLE, R_AR, R_DATA} rstate_e;
  rstate_e     rs;
  logic [31:0] r_addr;
  logic [15:0] r_words, r_idx;
  logic [AW-1:0] r_base;

  // ------------------------------------------------------------- write
  typedef enum logic [2:0] {W_IDLE, W_AW, W_FETCH, W_LOAD, W_DATA, W_RESP} wstate_e;
  wstate_e     ws;
  logic [31:0] w_addr;
  logic [15:0] w_words, w_idx;
  logic [3:0]  w_beat;
  logic [31:0] w_data;

  always_comb begin
    m_req         = '0;
    m_req.awaddr  = w_addr;
    m_req.awlen   = BEATS_M1;
    m_req.awsize  = 3'd2;
    m_req.awburst = 2'b01;
    m_req.awvalid = (ws == W_AW);
    m_req.wdata   = w_data;
    m_req.wstrb   = (w_idx < w_words) ? 4'hF : 4'h0;
    m_req.wlast   = (w_beat == 4'(AXI_BURST - 1));
    m_req.wvalid  = (ws == W_DATA);
    m_req.bready  = (ws == W_RESP);
    m_req.araddr  = r_addr;
    m_req.arlen   = BEATS_M1;
    m_req.arsize  = 3'd2;
    m_req.arburst = 2'b01;
    m_req.arvalid = (rs == R_AR);
    m_req.rready  = (rs == R_DATA);
  end

  assign mem_we    = (rs == R_DATA) && m_rsp.rvalid && (r_idx < r_words);
  assign mem_waddr = r_base + AW'(r_idx);
  assign mem_wdata = m_rsp.rdata;

  assign src_re  = (ws == W_FETCH);
  assign src_idx = w_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs      <= R_IDLE;
      r_addr  <= '0;
      r_words <= '0;
      r_idx   <= '0;
      r_base  <= '0;
      rd_done <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      unique case (rs)
        R_IDLE: if (rd_start) begin
          r_addr  <= rd_addr;
          r_words <= rd_words;
          r_base  <= rd_base;
          r_idx   <= '0;
          rs      <= (rd_words == 0) ? R_IDLE : R_AR;
          rd_done <= (rd_words == 0);
        end
        R_AR: if (m_rsp.arready) rs <= R_DATA;
        R_DATA: if (m_rsp.rvalid) begin
          r_idx <= r_idx + 16'd1;
          if (m_rsp.rlast) begin
            r_addr <= r_addr + 32'(AXI_BURST * AXI_BYTES);
            if (r_idx + 16'd1 >= r_words) begin
              rs      <= R_IDLE;
              rd_done <= 1'b1;
            end else begin
              rs <= R_AR;
            end
          end
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws      <= W_IDLE;
      w_addr  <= '0;
      w_words <= '0;
      w_idx   <= '0;
      w_beat  <= '0;
      w_data  <= '0;
      wr_done <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      unique case (ws)
        W_IDLE: if (wr_start) begin
          w_addr  <= wr_addr;
          w_words <= wr_words;
          w_idx   <= '0;
          w_beat  <= '0;
          ws      <= (wr_words == 0) ? W_IDLE : W_AW;
          wr_done <= (wr_words == 0);
        end
        W_AW:    if (m_rsp.awready) ws <= W_FETCH;
        W_FETCH: ws <= W_LOAD;
        W_LOAD: begin
          w_data <= (w_idx < w_words) ? src_data : 32'd0;
          ws     <= W_DATA;
        end
        W_DATA: if (m_rsp.wready) begin
          w_idx  <= w_idx + 16'd1;
          w_beat <= w_beat + 4'd1;
          ws     <= (w_beat == 4'(AXI_BURST - 1)) ? W_RESP : W_FETCH;
        end
        W_RESP: if (m_rsp.bvalid) begin
          w_addr <= w_addr + 32'(AXI_BURST * AXI_BYTES);
          if (w_idx >= w_words) begin
            ws      <= W_IDLE;
            wr_done <= 1'b1;
          end else begin
            ws <= W_AW;
          end
        end
        default: ws <= W_IDLE;
      endcase
    end
  end

  // AXI handshake rules: a raised valid stays up, with stable payload,
  // until it is accepted.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.awvalid && !m_rsp.awready |=> m_req.awvalid && $stable(m_req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.wvalid && !m_rsp.wready |=> m_req.wvalid && $stable(m_req.wdata) && $stable(m_req.wlast));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.arvalid && !m_rsp.arready |=> m_req.arvalid && $stable(m_req.araddr));

endmodule
