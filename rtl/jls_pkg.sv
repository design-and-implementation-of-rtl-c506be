// jls_pkg: constants, types and small arithmetic helpers shared by the
// JPEG-LS lossless block codec.
//
// The codec compresses 24-bit RGB images cut into square pixel blocks. Each
// block is coded as three 8-bit planes (all R samples, then G, then B), and
// each plane is coded as a small independent JPEG-LS image in lossless mode
// (NEAR = 0). The block side (8 by default, 16 also supported), the AXI burst
// of 16 beats of 4 bytes and the 24-bit pixel depth follow the design
// description; the JPEG-LS coding constants (thresholds T1..T3, RESET, LIMIT,
// the run-length table J) are the standard's defaults for 8-bit samples.
//
// The helpers below hold the arithmetic that the encoder and the decoder
// share, so that both sides model the contexts identically.
//
// The coding constants are the JPEG-LS defaults for 8-bit lossless coding;
// the register map and bus structs are this design's own.
package jls_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned BPP      = 8;     // bits per colour sample
  localparam int unsigned MAXVAL   = 255;
  localparam int unsigned RANGE    = 256;   // NEAR = 0
  localparam int unsigned QBPP     = 8;
  localparam int unsigned LIMIT    = 32;    // 2*(bpp + max(8,bpp))
  localparam int unsigned T1       = 3;
  localparam int unsigned T2       = 7;
  localparam int unsigned T3       = 21;
  localparam int unsigned RESET    = 64;
  localparam int unsigned NCTX     = 367;   // 365 regular + 2 run-interruption
  localparam int unsigned CTX_RI0  = 365;   // run interruption, Ra != Rb
  localparam int unsigned CTX_RI1  = 366;   // run interruption, Ra == Rb
  localparam int unsigned A_INIT   = 4;     // max(2, (RANGE+32)>>6)
  localparam int unsigned CHANNELS = 3;     // R, G, B planes per block

  // AXI side
  localparam int unsigned AXI_BURST = 16;   // beats per burst
  localparam int unsigned AXI_BYTES = 4;    // bytes per beat (AxSIZE = 2)

  typedef logic [BPP-1:0] sample_t;
  typedef logic [8:0]     ctx_idx_t;        // 0..366

  // Context statistics of one context.
  typedef struct packed {
    logic [15:0]       a;    // sum of |errval|
    logic signed [9:0] b;    // bias accumulator
    logic signed [7:0] c;    // bias correction
    logic [6:0]        n;    // occurrence count (1..64)
    logic [6:0]        nn;   // negative-error count (run interruption only)
  } ctx_t;

  localparam ctx_t CTX_INIT = '{a: 16'(A_INIT), b: '0, c: '0, n: 7'd1, nn: '0};

  // Pixel class decided by mode selection.
  typedef enum logic [1:0] {
    CLS_REGULAR = 2'd0,   // normal (regular) mode sample
    CLS_RUN     = 2'd1,   // sample absorbed by a run (x == run value)
    CLS_RUN_INT = 2'd2    // run-interruption sample
  } pix_class_e;

  // ------------------------------------------------------------- helpers

  // Run-length order table J[0..31].
  function automatic logic [3:0] j_table(input logic [4:0] idx);
    logic [3:0] j;
    if      (idx < 5'd4)  j = 4'd0;
    else if (idx < 5'd8)  j = 4'd1;
    else if (idx < 5'd12) j = 4'd2;
    else if (idx < 5'd16) j = 4'd3;
    else if (idx < 5'd18) j = 4'd4;
    else if (idx < 5'd20) j = 4'd5;
    else if (idx < 5'd22) j = 4'd6;
    else if (idx < 5'd24) j = 4'd7;
    else j = 4'(idx - 5'd16);          // 24..31 -> 8..15
    return j;
  endfunction

  // Smallest k with (n << k) >= a.
  function automatic logic [4:0] golomb_k(input logic [15:0] a, input logic [6:0] n);
    logic [4:0] k;
    k = 5'd16;
    for (int i = 16; i >= 0; i--) begin
      if (({16'd0, n} << i) >= {7'd0, a}) k = 5'(i);
    end
    return k;
  endfunction

  // Modulo reduction of a prediction error into [-RANGE/2, RANGE/2-1].
  function automatic logic signed [9:0] mod_reduce(input logic signed [9:0] e);
    logic signed [9:0] r;
    r = e;
    if (r < 0) r = r + 10'sd256;
    if (r >= 10'sd128) r = r - 10'sd256;
    return r;
  endfunction

  // Regular-mode context update, including bias correction.
  function automatic ctx_t ctx_update_regular(input ctx_t cur, input logic signed [9:0] err);
    ctx_t nx;
    logic signed [11:0] b;
    logic [16:0] a;
    logic [6:0]  n;
    logic signed [8:0] c;
    nx = cur;
    b = 12'(cur.b) + 12'(err);
    a = 17'(cur.a) + 17'(10'(err < 0 ? -err : err));
    n = cur.n;
    c = 9'(cur.c);
    if (n == 7'(RESET)) begin
      a = a >> 1;
      b = b >>> 1;
      n = n >> 1;
    end
    n = n + 7'd1;
    if (b <= -$signed({5'd0, n})) begin
      b = b + $signed({5'd0, n});
      if (c > -9'sd128) c = c - 9'sd1;
      if (b <= -$signed({5'd0, n})) b = -$signed({5'd0, n}) + 12'sd1;
    end else if (b > 0) begin
      b = b - $signed({5'd0, n});
      if (c < 9'sd127) c = c + 9'sd1;
      if (b > 0) b = '0;
    end
    nx.a = a[15:0];
    nx.b = 10'(b);
    nx.c = 8'(c);
    nx.n = n;
    return nx;
  endfunction

  // Run-interruption context update.
  function automatic ctx_t ctx_update_ri(input ctx_t cur, input logic signed [9:0] err,
                                         input logic [8:0] emerr, input logic ritype);
    ctx_t nx;
    logic [16:0] a;
    logic [6:0]  n, nn;
    nx = cur;
    nn = cur.nn + ((err < 0) ? 7'd1 : 7'd0);
    a  = 17'(cur.a) + {8'd0, 9'((10'(emerr) + 10'd1 - 10'(ritype)) >> 1)};
    n  = cur.n;
    if (n == 7'(RESET)) begin
      a  = a >> 1;
      n  = n >> 1;
      nn = nn >> 1;
    end
    n = n + 7'd1;
    nx.a  = a[15:0];
    nx.n  = n;
    nx.nn = nn;
    return nx;
  endfunction

  // Map bit of a run-interruption error (decides how the sign is folded).
  function automatic logic ri_map(input logic signed [9:0] err, input logic [4:0] k,
                                  input logic [6:0] n, input logic [6:0] nn);
    logic m;
    if (k == 0 && err > 0 && ({nn, 1'b0} < {1'b0, n})) m = 1'b1;
    else if (err < 0 && ({nn, 1'b0} >= {1'b0, n})) m = 1'b1;
    else if (err < 0 && k != 0) m = 1'b1;
    else m = 1'b0;
    return m;
  endfunction

  // AXI4 master request / slave response bundles (32-bit address and data;
  // only the signals the codec uses).
  typedef struct packed {
    logic [31:0] awaddr;
    logic [7:0]  awlen;
    logic [2:0]  awsize;
    logic [1:0]  awburst;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wlast;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic [7:0]  arlen;
    logic [2:0]  arsize;
    logic [1:0]  arburst;
    logic        arvalid;
    logic        rready;
  } axi_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rlast;
    logic        rvalid;
  } axi_rsp_t;

  // AXI4-Lite register bus bundles.
  typedef struct packed {
    logic [7:0]  awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [7:0]  araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // Register map of the codec (byte offsets).
  localparam logic [7:0] REG_CTRL      = 8'h00; // W: bit0 start encoder, bit1 start decoder
  localparam logic [7:0] REG_STATUS    = 8'h04; // R: bit0 enc busy, bit1 enc done, bit2 dec busy, bit3 dec done
  localparam logic [7:0] REG_ENC_SRC   = 8'h08; // raw blocks in DDR
  localparam logic [7:0] REG_ENC_DST   = 8'h0C; // compressed stream in DDR
  localparam logic [7:0] REG_ENC_NBLK  = 8'h10; // number of blocks
  localparam logic [7:0] REG_ENC_BYTES = 8'h14; // R: bytes written by the encoder
  localparam logic [7:0] REG_ENC_RAW   = 8'h18; // R: blocks stored uncompressed
  localparam logic [7:0] REG_DEC_SRC   = 8'h1C;
  localparam logic [7:0] REG_DEC_DST   = 8'h20;
  localparam logic [7:0] REG_DEC_NBLK  = 8'h24;
  localparam logic [7:0] REG_DEC_BYTES = 8'h28; // R: compressed bytes read by the decoder

endpackage
