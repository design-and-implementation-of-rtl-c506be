// jls_codec_top: top level of the JPEG-LS block codec.
//
// Three parts side by side, as on the SoC: the register module on the CPU's
// AXI4-Lite bus, the compression IP and the decompression IP. Each IP is an
// AXI4 master with its own port to the DDR memory controller, and each works
// through a list of pixel blocks that the CPU has placed in DDR (see
// jls_enc_ip and jls_dec_ip for the memory formats). BLK is the block side:
// 8 (default) or 16.
//
// The partition (register module, compression IP, decompression IP, each IP
// with its own DDR master) follows the original system diagram; the port set
// is this design's.
module jls_codec_top #(
  parameter int unsigned BLK = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  jls_pkg::axil_req_t s_axil_req,
  output jls_pkg::axil_rsp_t s_axil_rsp,
  output jls_pkg::axi_req_t  m_axi_enc_req,
  input  jls_pkg::axi_rsp_t  m_axi_enc_rsp,
  output jls_pkg::axi_req_t  m_axi_dec_req,
  input  jls_pkg::axi_rsp_t  m_axi_dec_rsp
);
  import jls_pkg::*;

  logic        enc_start, enc_busy, enc_done, dec_start, dec_busy, dec_done;
  logic [31:0] enc_src, enc_dst, enc_nblk, enc_bytes, enc_raw;
  logic [31:0] dec_src, dec_dst, dec_nblk, dec_bytes;

  jls_regs u_regs (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .enc_start, .enc_src, .enc_dst, .enc_nblk, .enc_busy, .enc_done,
    .enc_bytes, .enc_raw,
    .dec_start, .dec_src, .dec_dst, .dec_nblk, .dec_busy, .dec_done,
    .dec_bytes
  );

  jls_enc_ip #(.BLK(BLK)) u_enc_ip (
    .clk, .rst_n, .start(enc_start), .src_addr(enc_src), .dst_addr(enc_dst),
    .nblk(enc_nblk), .busy(enc_busy), .done(enc_done), .out_bytes(enc_bytes),
    .raw_blocks(enc_raw), .m_req(m_axi_enc_req), .m_rsp(m_axi_enc_rsp)
  );

  jls_dec_ip #(.BLK(BLK)) u_dec_ip (
    .clk, .rst_n, .start(dec_start), .src_addr(dec_src), .dst_addr(dec_dst),
    .nblk(dec_nblk), .busy(dec_busy), .done(dec_done), .in_bytes(dec_bytes),
    .m_req(m_axi_dec_req), .m_rsp(m_axi_dec_rsp)
  );

endmodule
