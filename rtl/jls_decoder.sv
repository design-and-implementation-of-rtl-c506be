// jls_decoder: JPEG-LS lossless decoder for one block, built as a
// finite-state machine.
//
// The decoder reverses jls_encoder. Because a sample's neighbours are only
// known once the previous sample has been decoded, it works sample by sample
// instead of as a pipeline. For each sample it forms the context from the
// reconstructed window; if the gradients are all zero it enters run mode and
// reads run bits: a one stands for a full run segment of 2^J[run index]
// samples (or the rest of the line) equal to the run value, a zero is followed
// by J bits giving the remaining run length and then by the run-interruption
// sample. Otherwise it decodes a regular sample: prediction, bias correction,
// Golomb decoding of the mapped error, reconstruction, context update.
// Contexts and run index restart at the first sample of every plane.
//
// Timing: a regular or run-interruption sample takes 2 cycles (context, then
// decode) when the bit reader has 32 bits ready; run samples are written one
// per cycle; each run bit costs one extra cycle.
//
// Interface: pulse `start` with `base`, the word address of the block's code
// stream in the compressed-data memory read through `mem_*` (one cycle read
// latency). Decoded samples appear on `pix_valid`/`pix_data` in plane-major
// raster order; `done` pulses after the 3*BLK*BLK-th sample.
//
// A pixel-by-pixel state machine is what the original design uses, since
// decoding cannot be pipelined; the states and the cycle count per sample are
// this design's own.
module jls_decoder #(
  parameter int unsigned BLK = 8,
  parameter int unsigned AW  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW-1:0]     base,
  output logic [AW-1:0]     mem_addr,
  output logic              mem_rd,
  input  logic [31:0]       mem_data,
  output logic              pix_valid,
  output jls_pkg::sample_t  pix_data,
  output logic              done,
  output logic              busy
);
  import jls_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_CTX, S_REG, S_RUN, S_FILL, S_RI, S_DONE
  } state_e;

  state_e state, ret_state;

  // ---------------------------------------------------------- bit reader
  logic [31:0] peek;
  logic        br_ready, consume;
  logic [5:0]  consume_n;

  jls_bitreader #(.AW(AW)) u_br (
    .clk, .rst_n, .start, .base, .mem_addr, .mem_rd, .mem_data,
    .peek, .ready(br_ready), .consume, .consume_n
  );

  // -------------------------------------------------------------- window
  sample_t na, nb, nc, nd;
  logic [$clog2(BLK)-1:0] col, row;
  logic last_col, last_row;
  logic [1:0] plane;
  logic block_last;

  jls_neighbors #(.BLK(BLK)) u_win (
    .clk, .rst_n, .clear(start), .push(pix_valid), .x(pix_data),
    .a(na), .b(nb), .c(nc), .d(nd), .col, .row, .last_col, .last_row
  );

  assign block_last = last_col && last_row && (plane == 2'(CHANNELS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) plane <= '0;
    else if (start) plane <= '0;
    else if (pix_valid && last_col && last_row) plane <= (plane == 2'(CHANNELS-1)) ? '0 : plane + 2'd1;
  end

  // ----------------------------------------------------- context model
  ctx_idx_t gq;
  logic     gsign, gflat;

  jls_gradq u_gq (.a(na), .b(nb), .c(nc), .d(nd), .q_idx(gq), .sign(gsign), .flat(gflat));

  ctx_idx_t q_r;
  logic     sign_r;
  ctx_t     ctx_rd, ctx_wr;
  logic     ctx_we, ctx_clr;
  ctx_idx_t rd_idx;

  jls_ctx_mem u_ctx (
    .clk, .rst_n, .clear(ctx_clr), .rd_idx, .rd_ctx(ctx_rd),
    .wr_en(ctx_we), .wr_idx(rd_idx), .wr_ctx(ctx_wr)
  );

  sample_t px_reg;
  jls_predictor u_pred (
    .a(na), .b(nb), .c(nc), .sign(sign_r), .cval(ctx_rd.c),
    .px_fixed(), .px(px_reg)
  );

  // -------------------------------------------------------- run state
  logic [4:0]  run_idx;
  sample_t     run_val;
  logic [15:0] fill_cnt;
  logic [3:0]  jcur;
  logic [15:0] rm;
  logic [15:0] remaining;

  assign jcur      = j_table(run_idx);
  assign rm        = 16'd1 << jcur;
  assign remaining = 16'(BLK) - 16'(col);

  // remaining run length sent after a 0 run bit: the next J stream bits
  logic [15:0] ri_cnt;
  assign ri_cnt = (jcur == 0) ? 16'd0 : 16'({1'b0, peek[30:0]} >> (6'd31 - 6'(jcur)));

  // ------------------------------------------------------ golomb decode
  logic        rit;
  logic [4:0]  k;
  logic [5:0]  lim;
  logic [8:0]  merr;
  logic [5:0]  glen;

  assign rit = (na == nb);

  jls_golomb_dec u_gd (.peek, .k, .limit(lim), .merr, .len(glen));

  // ------------------------------------------------------ combinational step
  always_comb begin
    rd_idx = q_r;
    if (state == S_RI) rd_idx = rit ? ctx_idx_t'(CTX_RI1) : ctx_idx_t'(CTX_RI0);
  end

  always_comb begin
    if (state == S_RI) begin
      k   = golomb_k(ctx_rd.a + (rit ? 16'(ctx_rd.n >> 1) : 16'd0), ctx_rd.n);
      lim = 6'(LIMIT) - 6'(jcur) - 6'd1;
    end else begin
      k   = golomb_k(ctx_rd.a, ctx_rd.n);
      lim = 6'(LIMIT);
    end
  end

  always_comb begin
    logic signed [9:0] e;
    logic signed [9:0] ef;
    logic [9:0]        t;
    logic [8:0]        mag;
    logic signed [10:0] xr;
    consume   = 1'b0;
    consume_n = '0;
    ctx_we    = 1'b0;
    ctx_wr    = ctx_rd;
    ctx_clr   = 1'b0;
    pix_valid = 1'b0;
    pix_data  = '0;
    e         = '0;
    ef        = '0;
    t         = '0;
    mag       = '0;
    xr        = '0;
    unique case (state)
      S_CTX: begin
        ctx_clr = (row == 0) && (col == 0);
      end
      S_REG: begin
        if (br_ready) begin
          consume   = 1'b1;
          consume_n = glen;
          if (k == 0 && ($signed({ctx_rd.b, 1'b0}) <= -$signed({4'b0, ctx_rd.n})))
            e = merr[0] ? 10'((merr - 9'd1) >> 1) : -10'(merr >> 1) - 10'sd1;
          else
            e = merr[0] ? -10'((10'(merr) + 10'd1) >> 1) : 10'(merr >> 1);
          ctx_we    = 1'b1;
          ctx_wr    = ctx_update_regular(ctx_rd, e);
          xr        = $signed({3'b0, px_reg}) + (sign_r ? -11'(e) : 11'(e));
          if (xr < 0) xr = xr + 11'sd256;
          if (xr > 11'sd255) xr = xr - 11'sd256;
          pix_valid = 1'b1;
          pix_data  = xr[7:0];
        end
      end
      S_RUN: begin
        if (br_ready) begin
          consume   = 1'b1;
          consume_n = peek[31] ? 6'd1 : 6'd1 + 6'(jcur);
        end
      end
      S_FILL: begin
        pix_valid = 1'b1;
        pix_data  = run_val;
      end
      S_RI: begin
        if (br_ready) begin
          consume   = 1'b1;
          consume_n = glen;
          t   = 10'(merr) + 10'(rit);
          mag = 9'((t + 10'd1) >> 1);
          if (k == 0 && ({ctx_rd.nn, 1'b0} < {1'b0, ctx_rd.n}))
            e = t[0] ? 10'(mag) : -10'(mag);
          else
            e = t[0] ? -10'(mag) : 10'(mag);
          ctx_we = 1'b1;
          ctx_wr = ctx_update_ri(ctx_rd, e, merr, rit);
          ef     = (!rit && na > nb) ? -e : e;
          xr     = $signed({3'b0, (rit ? na : nb)}) + 11'(ef);
          if (xr < 0) xr = xr + 11'sd256;
          if (xr > 11'sd255) xr = xr - 11'sd256;
          pix_valid = 1'b1;
          pix_data  = xr[7:0];
        end
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ret_state <= S_CTX;
      q_r       <= '0;
      sign_r    <= 1'b0;
      run_idx   <= '0;
      run_val   <= '0;
      fill_cnt  <= '0;
      done      <= 1'b0;
      busy      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state <= S_CTX;
        busy  <= 1'b1;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_CTX: begin
            if (row == 0 && col == 0) run_idx <= '0;
            q_r    <= gq;
            sign_r <= gsign;
            if (gflat) begin
              run_val <= na;
              state   <= S_RUN;
            end else begin
              state   <= S_REG;
            end
          end
          S_REG: begin
            if (br_ready) state <= block_last ? S_DONE : S_CTX;
          end
          S_RUN: begin
            if (br_ready) begin
              if (peek[31]) begin
                if (rm <= remaining) begin
                  fill_cnt <= rm;
                  if (run_idx < 5'd31) run_idx <= run_idx + 5'd1;
                end else begin
                  fill_cnt <= remaining;
                end
                ret_state <= (rm >= remaining) ? S_CTX : S_RUN;
                state     <= S_FILL;
              end else begin
                fill_cnt  <= ri_cnt;
                ret_state <= S_RI;
                state     <= (ri_cnt == 0) ? S_RI : S_FILL;
              end
            end
          end
          S_FILL: begin
            fill_cnt <= fill_cnt - 16'd1;
            if (fill_cnt == 16'd1) state <= (block_last && ret_state == S_CTX) ? S_DONE : ret_state;
          end
          S_RI: begin
            if (br_ready) begin
              if (run_idx > 0) run_idx <= run_idx - 5'd1;
              state <= block_last ? S_DONE : S_CTX;
            end
          end
          S_DONE: begin
            done  <= 1'b1;
            busy  <= 1'b0;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
