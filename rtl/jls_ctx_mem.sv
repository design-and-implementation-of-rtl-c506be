// jls_ctx_mem: context statistics store of the JPEG-LS context modeler.
//
// Holds A, B, C, N and Nn for the 365 regular contexts and the two
// run-interruption contexts (367 entries). Each entry has a valid bit; an
// entry whose bit is clear reads as the JPEG-LS initial values (A = 4,
// B = C = 0, N = 1, Nn = 0). `clear` drops all valid bits in one cycle, which
// is how the contexts are re-initialised at the start of every plane without
// a 367-cycle sweep.
//
// Interface: one combinational read port (rd_idx -> rd_ctx) and one write
// port (wr_en, wr_idx, wr_ctx) taking effect at the clock edge. A write in the
// same cycle as `clear` is dropped. Read-during-write returns the old value;
// callers that need the new value forward it themselves.
//
// The statistics A, B, C, N, Nn are those of the original design's fourth
// pipeline level; the valid-bit clear is this design's choice.
module jls_ctx_mem (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  jls_pkg::ctx_idx_t  rd_idx,
  output jls_pkg::ctx_t      rd_ctx,
  input  logic               wr_en,
  input  jls_pkg::ctx_idx_t  wr_idx,
  input  jls_pkg::ctx_t      wr_ctx
);
  import jls_pkg::*;

  ctx_t mem   [NCTX];
  logic valid [NCTX];

  always_comb begin
    if (rd_idx < ctx_idx_t'(NCTX) && valid[rd_idx]) rd_ctx = mem[rd_idx];
    else rd_ctx = CTX_INIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTX; i++) valid[i] <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < NCTX; i++) valid[i] <= 1'b0;
    end else if (wr_en && wr_idx < ctx_idx_t'(NCTX)) begin
      valid[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !clear && wr_idx < ctx_idx_t'(NCTX)) mem[wr_idx] <= wr_ctx;
  end

endmodule
