// jls_encoder: six-level pipelined JPEG-LS lossless encoder for one block.
//
// A block is 3 planes (R, G, B) of BLK x BLK 8-bit samples, sent plane after
// plane in raster order, one sample per cycle at most. Each plane is coded as
// an independent JPEG-LS image: its contexts and run state restart at its first
// sample. The code stream of the whole block is packed MSB-first into 32-bit
// words and padded with zeros after the last code.
//
// Pipeline levels (the split follows the design description):
//   1  data acquisition: the sample x and its context a, b, c, d
//   2  gradients, quantized context Q and mode selection (regular, run,
//      run interruption); run state is tracked here
//   3  context read with forwarding from level 4, Golomb parameter k and the
//      corrected prediction (edge-detecting predictor + bias C)
//   4  prediction error, error mapping, update of A, B, C, N, Nn, run-length
//      counting (run index, J table) and the run-mode bits
//   5  limited-length Golomb code and its length
//   6  bit packer: 32-bit output words, `done` and the coded length
// A context used by two consecutive samples is forwarded from level 4 to
// level 3, so the pipeline never stalls: throughput is one sample per cycle
// and the last word of a block leaves 7 cycles after its last sample.
//
// Interface: pulse `start` before each block, while the encoder is idle
// (`busy` low); then present the 3*BLK*BLK samples on `s_data` with
// `s_valid`. `out_valid`/`out_word` carry the packed words; `done` pulses
// once after the last word with `nwords`, the block's coded length in words.
//
// The six pipeline levels follow the original design's description;
// sample-by-sample run counting, the stage 4 to stage 3 forwarding and the
// per-plane reset are this design's choices.
module jls_encoder #(
  parameter int unsigned BLK = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              s_valid,
  input  jls_pkg::sample_t  s_data,
  output logic              out_valid,
  output logic [31:0]       out_word,
  output logic              done,
  output logic [15:0]       nwords,
  output logic              busy
);
  import jls_pkg::*;

  localparam int unsigned CW = $clog2(BLK);

  // ------------------------------------------------------------ level 1
  sample_t na, nb, nc, nd;
  logic [CW-1:0] col, row;
  logic last_col, last_row;
  logic [1:0] plane;

  jls_neighbors #(.BLK(BLK)) u_win (
    .clk, .rst_n, .clear(start), .push(s_valid), .x(s_data),
    .a(na), .b(nb), .c(nc), .d(nd), .col, .row, .last_col, .last_row
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) plane <= '0;
    else if (start) plane <= '0;
    else if (s_valid && last_col && last_row) plane <= (plane == 2'(CHANNELS-1)) ? '0 : plane + 2'd1;
  end

  logic    v1, eol1, pf1, last1;
  sample_t x1, a1, b1, c1, d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; eol1 <= 1'b0; pf1 <= 1'b0; last1 <= 1'b0;
      x1 <= '0; a1 <= '0; b1 <= '0; c1 <= '0; d1 <= '0;
    end else begin
      v1    <= s_valid;
      x1    <= s_data;
      a1    <= na; b1 <= nb; c1 <= nc; d1 <= nd;
      eol1  <= last_col;
      pf1   <= (row == 0) && (col == 0);
      last1 <= last_col && last_row && (plane == 2'(CHANNELS-1));
    end
  end

  // ------------------------------------------------------------ level 2
  ctx_idx_t   gq;
  logic       gsign, gflat;
  logic       in_run;
  pix_class_e cls_n;
  logic       in_run_n;

  jls_gradq u_gq (.a(a1), .b(b1), .c(c1), .d(d1), .q_idx(gq), .sign(gsign), .flat(gflat));

  always_comb begin
    logic run_now;
    run_now  = (in_run && !pf1) || gflat;
    in_run_n = 1'b0;
    if (run_now) begin
      if (x1 == a1) begin
        cls_n    = CLS_RUN;
        in_run_n = !eol1;
      end else begin
        cls_n    = CLS_RUN_INT;
      end
    end else begin
      cls_n = CLS_REGULAR;
    end
  end

  logic       v2, eol2, pf2, last2, sign2, rit2;
  pix_class_e cls2;
  ctx_idx_t   q2;
  sample_t    x2, a2, b2, c2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_run <= 1'b0;
      v2 <= 1'b0; eol2 <= 1'b0; pf2 <= 1'b0; last2 <= 1'b0; sign2 <= 1'b0; rit2 <= 1'b0;
      cls2 <= CLS_REGULAR; q2 <= '0; x2 <= '0; a2 <= '0; b2 <= '0; c2 <= '0;
    end else begin
      if (v1) in_run <= in_run_n;
      v2    <= v1;
      eol2  <= eol1;
      pf2   <= pf1;
      last2 <= last1;
      cls2  <= cls_n;
      sign2 <= gsign;
      rit2  <= (a1 == b1);
      q2    <= (cls_n == CLS_REGULAR) ? gq : ((a1 == b1) ? ctx_idx_t'(CTX_RI1) : ctx_idx_t'(CTX_RI0));
      x2 <= x1; a2 <= a1; b2 <= b1; c2 <= c1;
    end
  end

  // ------------------------------------------------------------ level 3
  ctx_t       mem_rd, ctx3_n;
  logic       wr4;
  ctx_idx_t   q4;
  ctx_t       ctx4_new;
  sample_t    px_reg;
  logic [4:0] k3_n;

  jls_ctx_mem u_ctx (
    .clk, .rst_n, .clear(v2 && pf2),
    .rd_idx(q2), .rd_ctx(mem_rd),
    .wr_en(wr4), .wr_idx(q4), .wr_ctx(ctx4_new)
  );

  always_comb begin
    if (pf2)                      ctx3_n = CTX_INIT;
    else if (wr4 && q4 == q2)     ctx3_n = ctx4_new;
    else                          ctx3_n = mem_rd;
    if (cls2 == CLS_RUN_INT)
      k3_n = golomb_k(ctx3_n.a + (rit2 ? 16'(ctx3_n.n >> 1) : 16'd0), ctx3_n.n);
    else
      k3_n = golomb_k(ctx3_n.a, ctx3_n.n);
  end

  jls_predictor u_pred (
    .a(a2), .b(b2), .c(c2), .sign(sign2), .cval(ctx3_n.c),
    .px_fixed(), .px(px_reg)
  );

  logic       v3, eol3, pf3, last3, sign3, rit3;
  pix_class_e cls3;
  ctx_idx_t   q3;
  ctx_t       ctx3;
  sample_t    x3, a3, b3, px3;
  logic [4:0] k3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; eol3 <= 1'b0; pf3 <= 1'b0; last3 <= 1'b0; sign3 <= 1'b0; rit3 <= 1'b0;
      cls3 <= CLS_REGULAR; q3 <= '0; ctx3 <= CTX_INIT; x3 <= '0; a3 <= '0; b3 <= '0;
      px3 <= '0; k3 <= '0;
    end else begin
      v3 <= v2; eol3 <= eol2; pf3 <= pf2; last3 <= last2; sign3 <= sign2; rit3 <= rit2;
      cls3 <= cls2; q3 <= q2; ctx3 <= ctx3_n; x3 <= x2; a3 <= a2; b3 <= b2; k3 <= k3_n;
      px3 <= (cls2 == CLS_RUN_INT) ? (rit2 ? a2 : b2) : px_reg;
    end
  end

  // ------------------------------------------------------------ level 4
  logic [15:0] run_cnt;
  logic [4:0]  run_idx;

  logic signed [9:0] err;
  logic [8:0]        merr;
  logic [15:0]       pre;
  logic [4:0]        pre_len;
  logic [5:0]        lim;
  logic              code_en;
  logic [15:0]       run_cnt_n;
  logic [4:0]        run_idx_n;

  always_comb begin
    logic [15:0] cnt_e;
    logic [4:0]  idx_e;
    logic [3:0]  j;
    logic        mp;
    cnt_e     = pf3 ? '0 : run_cnt;
    idx_e     = pf3 ? '0 : run_idx;
    j         = j_table(idx_e);
    run_cnt_n = cnt_e;
    run_idx_n = idx_e;
    err       = mod_reduce($signed({2'b0, x3}) - $signed({2'b0, px3}));
    merr      = '0;
    pre       = '0;
    pre_len   = '0;
    lim       = 6'(LIMIT);
    code_en   = 1'b0;
    ctx4_new  = ctx3;
    wr4       = 1'b0;
    mp        = 1'b0;
    unique case (cls3)
      CLS_REGULAR: begin
        if (sign3) err = mod_reduce(-($signed({2'b0, x3}) - $signed({2'b0, px3})));
        if (k3 == 0 && ($signed({ctx3.b, 1'b0}) <= -$signed({4'b0, ctx3.n})))
          merr = (err >= 0) ? 9'(10'sd2 * err + 10'sd1) : 9'(-(10'sd2 * (err + 10'sd1)));
        else
          merr = (err >= 0) ? 9'(2 * err) : 9'(-2 * err - 1);
        code_en  = 1'b1;
        ctx4_new = ctx_update_regular(ctx3, err);
        wr4      = v3;
      end
      CLS_RUN: begin
        if (cnt_e + 16'd1 == (16'd1 << j)) begin
          pre       = 16'd1;
          pre_len   = 5'd1;
          run_cnt_n = '0;
          run_idx_n = (idx_e < 5'd31) ? idx_e + 5'd1 : idx_e;
        end else if (eol3) begin
          pre       = 16'd1;
          pre_len   = 5'd1;
          run_cnt_n = '0;
        end else begin
          run_cnt_n = cnt_e + 16'd1;
        end
      end
      default: begin // CLS_RUN_INT
        if (!rit3 && a3 > b3) err = mod_reduce(-($signed({2'b0, x3}) - $signed({2'b0, px3})));
        mp        = ri_map(err, k3, ctx3.n, ctx3.nn);
        merr      = 9'(10'sd2 * (err < 0 ? -err : err) - 10'(rit3) - 10'(mp));
        pre       = cnt_e & ((16'd1 << j) - 16'd1);    // leading 0 bit is implicit
        pre_len   = 5'd1 + 5'(j);
        lim       = 6'(LIMIT) - 6'(j) - 6'd1;
        code_en   = 1'b1;
        ctx4_new  = ctx_update_ri(ctx3, err, merr, rit3);
        wr4       = v3;
        run_cnt_n = '0;
        run_idx_n = (idx_e > 0) ? idx_e - 5'd1 : idx_e;
      end
    endcase
  end

  logic        v4r, last4, code_en4;
  logic [8:0]  merr4;
  logic [4:0]  k4;
  logic [5:0]  lim4;
  logic [15:0] pre4;
  logic [4:0]  pre_len4;

  assign q4 = q3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cnt <= '0; run_idx <= '0;
      v4r <= 1'b0; last4 <= 1'b0; code_en4 <= 1'b0; merr4 <= '0; k4 <= '0;
      lim4 <= '0; pre4 <= '0; pre_len4 <= '0;
    end else begin
      if (v3) begin
        run_cnt <= run_cnt_n;
        run_idx <= run_idx_n;
      end
      v4r      <= v3;
      last4    <= last3;
      code_en4 <= code_en;
      merr4    <= merr;
      k4       <= k3;
      lim4     <= lim;
      pre4     <= pre;
      pre_len4 <= pre_len;
    end
  end

  // ------------------------------------------------------------ level 5
  logic [31:0] gcode;
  logic [5:0]  glen;

  jls_golomb_enc u_golomb (
    .code_en(code_en4), .merr(merr4), .k(k4), .limit(lim4),
    .prefix(pre4), .prefix_len(pre_len4), .code(gcode), .len(glen)
  );

  logic        v5, last5;
  logic [31:0] code5;
  logic [5:0]  len5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v5 <= 1'b0; last5 <= 1'b0; code5 <= '0; len5 <= '0;
    end else begin
      v5    <= v4r;
      last5 <= last4;
      code5 <= gcode;
      len5  <= glen;
    end
  end

  // ------------------------------------------------------------ level 6
  jls_bitpack u_pack (
    .clk, .rst_n, .in_valid(v5), .in_code(code5), .in_len(len5), .in_last(last5),
    .out_valid, .out_word, .done, .nwords
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     busy <= 1'b0;
    else if (start) busy <= 1'b1;
    else if (done)  busy <= 1'b0;
  end

endmodule
