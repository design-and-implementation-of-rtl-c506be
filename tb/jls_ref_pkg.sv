// jls_ref_pkg: behavioural reference coder for the testbenches.
//
// A straightforward software-style model of the block codec, written with
// plain integers and without any of the RTL's helpers: it encodes one block
// (3 planes of BLK x BLK samples, each plane an independent lossless JPEG-LS
// image with T1/T2/T3 = 3/7/21, RESET = 64, LIMIT = 32) into 32-bit words,
// MSB first, zero padded; it scans each run to its end before coding it, as
// the JPEG-LS procedure is usually written. It also provides image generators
// that exercise runs, edges and noise.
//
// Its coding rules are the JPEG-LS ones used by the original design, with
// this design's block, plane and stream conventions.
package jls_ref_pkg;

  typedef int unsigned word_q[$];

  int A[367], B[367], C[367], N[367], Nn[367];
  int run_index;
  longint unsigned acc;
  int acc_bits;
  word_q out_words;

  function automatic int jtab(int i);
    int J[32] = '{0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,4,4,5,5,6,6,7,7,8,9,10,11,12,13,14,15};
    return J[i];
  endfunction

  function automatic void put_bits(int unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) begin
      acc = (acc << 1) | ((v >> i) & 1);
      acc_bits++;
      if (acc_bits == 32) begin
        out_words.push_back(int'(acc[31:0]));
        acc = 0;
        acc_bits = 0;
      end
    end
  endfunction

  function automatic void golomb(int m, int k, int lim);
    int q;
    q = m >> k;
    if (q < lim - 8 - 1) begin
      put_bits(0, q);
      put_bits(1, 1);
      if (k > 0) put_bits(m & ((1 << k) - 1), k);
    end else begin
      put_bits(0, lim - 8 - 1);
      put_bits(1, 1);
      put_bits((m - 1) & 255, 8);
    end
  endfunction

  function automatic int quant(int d);
    if (d <= -21) return -4;
    if (d <= -7)  return -3;
    if (d <= -3)  return -2;
    if (d < 0)    return -1;
    if (d == 0)   return 0;
    if (d < 3)    return 1;
    if (d < 7)    return 2;
    if (d < 21)   return 3;
    return 4;
  endfunction

  function automatic int modr(int e);
    if (e < 0) e += 256;
    if (e >= 128) e -= 256;
    return e;
  endfunction

  // sample (r,c) of a plane with JPEG-LS edge rules; p is row-major
  function automatic void nbrs(ref byte unsigned p[], input int blk, int r, int c,
                               output int ra, output int rb, output int rc, output int rd);
    rb = (r == 0) ? 0 : p[(r-1)*blk + c];
    if (c == 0) begin
      ra = rb;
      rc = (r <= 1) ? 0 : p[(r-2)*blk];
    end else begin
      ra = p[r*blk + c - 1];
      rc = (r == 0) ? 0 : p[(r-1)*blk + c - 1];
    end
    if (r == 0) rd = 0;
    else if (c == blk - 1) rd = rb;
    else rd = p[(r-1)*blk + c + 1];
  endfunction

  function automatic void encode_plane(ref byte unsigned p[], input int blk);
    int r, c;
    for (int i = 0; i < 367; i++) begin
      A[i] = 4; B[i] = 0; C[i] = 0; N[i] = 1; Nn[i] = 0;
    end
    run_index = 0;
    r = 0;
    c = 0;
    while (r < blk) begin
      int ra, rb, rc, rd, q1, q2, q3, x;
      nbrs(p, blk, r, c, ra, rb, rc, rd);
      x = p[r*blk + c];
      q1 = quant(rd - rb);
      q2 = quant(rb - rc);
      q3 = quant(rc - ra);
      if (q1 == 0 && q2 == 0 && q3 == 0) begin
        // run mode: scan the run
        int cnt, runval, rm, rit, px, e, k, temp, q, map, em, glim;
        runval = ra;
        cnt = 0;
        while (c < blk && p[r*blk + c] == runval) begin
          cnt++;
          c++;
        end
        while (cnt >= (1 << jtab(run_index))) begin
          put_bits(1, 1);
          cnt -= (1 << jtab(run_index));
          if (run_index < 31) run_index++;
        end
        if (c == blk) begin
          if (cnt > 0) put_bits(1, 1);
          c = 0;
          r++;
        end else begin
        put_bits(0, 1);
        if (jtab(run_index) > 0) put_bits(cnt, jtab(run_index));
        // run interruption sample at (r,c)
        nbrs(p, blk, r, c, ra, rb, rc, rd);
        x   = p[r*blk + c];
        rit = (ra == rb);
        px  = rit ? ra : rb;
        e   = x - px;
        if (!rit && ra > rb) e = -e;
        e = modr(e);
        q = rit ? 366 : 365;
        temp = rit ? A[q] + (N[q] >> 1) : A[q];
        k = 0;
        while ((N[q] << k) < temp) k++;
        if (k == 0 && e > 0 && 2 * Nn[q] < N[q]) map = 1;
        else if (e < 0 && 2 * Nn[q] >= N[q]) map = 1;
        else if (e < 0 && k != 0) map = 1;
        else map = 0;
        em = 2 * ((e < 0) ? -e : e) - rit - map;
        glim = 32 - jtab(run_index) - 1;
        golomb(em, k, glim);
        if (e < 0) Nn[q]++;
        A[q] += (em + 1 - rit) >> 1;
        if (N[q] == 64) begin
          A[q] >>= 1; N[q] >>= 1; Nn[q] >>= 1;
        end
        N[q]++;
        if (run_index > 0) run_index--;
        c++;
        if (c == blk) begin
          c = 0;
          r++;
        end
        end
      end else begin
        int sgn, q, px, mx, mn, e, k, m;
        sgn = 1;
        if (q1 < 0 || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0)) begin
          sgn = -1; q1 = -q1; q2 = -q2; q3 = -q3;
        end
        q = 81 * q1 + 9 * q2 + q3;
        mx = (ra > rb) ? ra : rb;
        mn = (ra > rb) ? rb : ra;
        if (rc >= mx) px = mn;
        else if (rc <= mn) px = mx;
        else px = ra + rb - rc;
        px = px + sgn * C[q];
        if (px > 255) px = 255;
        if (px < 0) px = 0;
        e = x - px;
        if (sgn < 0) e = -e;
        e = modr(e);
        k = 0;
        while ((N[q] << k) < A[q]) k++;
        if (k == 0 && 2 * B[q] <= -N[q]) m = (e >= 0) ? 2 * e + 1 : -2 * (e + 1);
        else m = (e >= 0) ? 2 * e : -2 * e - 1;
        golomb(m, k, 32);
        B[q] += e;
        A[q] += (e < 0) ? -e : e;
        if (N[q] == 64) begin
          A[q] >>= 1;
          B[q] = (B[q] >= 0) ? (B[q] >> 1) : -((-B[q] + 1) >> 1);
          N[q] >>= 1;
        end
        N[q]++;
        if (B[q] <= -N[q]) begin
          B[q] += N[q];
          if (C[q] > -128) C[q]--;
          if (B[q] <= -N[q]) B[q] = -N[q] + 1;
        end else if (B[q] > 0) begin
          B[q] -= N[q];
          if (C[q] < 127) C[q]++;
          if (B[q] > 0) B[q] = 0;
        end
        c++;
        if (c == blk) begin
          c = 0;
          r++;
        end
      end
    end
  endfunction

  // Encode one block: blkdata holds 3*blk*blk samples, plane after plane.
  function automatic word_q encode_block(ref byte unsigned blkdata[], input int blk);
    byte unsigned p[];
    out_words.delete();
    acc = 0;
    acc_bits = 0;
    p = new[blk*blk];
    for (int ch = 0; ch < 3; ch++) begin
      for (int i = 0; i < blk*blk; i++) p[i] = blkdata[ch*blk*blk + i];
      encode_plane(p, blk);
    end
    if (acc_bits > 0) put_bits(0, 32 - acc_bits);
    return out_words;
  endfunction

  // Test image generator. kind: 0 flat, 1 smooth ramp, 2 noise,
  // 3 ramp + small noise, 4 stripes with long runs, 5 mixed.
  function automatic void make_block(ref byte unsigned d[], input int blk, int kind, int seed);
    int s;
    s = seed;
    d = new[3*blk*blk];
    for (int ch = 0; ch < 3; ch++)
      for (int r = 0; r < blk; r++)
        for (int c = 0; c < blk; c++) begin
          int v;
          s = s * 1103515245 + 12345;
          case (kind)
            0: v = 40 + ch * 50;
            1: v = 10 * r + 7 * c + 30 * ch;
            2: v = (s >>> 16) & 255;
            3: v = 100 + 3 * r - 2 * c + ch + ((s >>> 16) & 3);
            4: v = ((r / 2) % 2 == 0) ? 200 : ((c < blk/2) ? 17 : 90);
            default: v = ((s >>> 20) & 7) == 0 ? ((s >>> 8) & 255) : 120 + (r > c ? 40 : 0);
          endcase
          d[ch*blk*blk + r*blk + c] = byte'(v & 255);
        end
  endfunction

endpackage
