// Reference model and stimulus generator for the deblocking testbenches.
//
// Holds a 48x48 4:2:0 picture with its per-block parameters and filters it
// the way the H.264 standard orders it: macroblock by macroblock, within a
// macroblock first all vertical luma edges left to right, then all
// horizontal luma edges top to bottom, then the same for Cb and Cr. The
// design under test uses a different (2-D) order that must give the same
// picture. bS per 4x4 luma edge: intra and macroblock edge 4, intra 3,
// coded coefficients 2, motion difference >= 4 quarter samples 1, else 0;
// picture borders are not filtered. QP per macroblock is used for all
// edges of that macroblock, chroma included, with no index offsets.
// The tables below are the standard's alpha, beta and tc0 values.
package dbf_ref_pkg;

  localparam int W = 48, H = 48, BW = 12;

  typedef struct {
    int y  [H][W];
    int cb [H/2][W/2];
    int cr [H/2][W/2];
    int mvx [BW][BW];
    int mvy [BW][BW];
    bit intra [BW][BW];
    int coef [H][W];
    int qp [3][3];
  } pic_t;

  // statistics of the reference run
  int st_bs [5];
  int st_strong, st_lines;

  function automatic int alpha_of(int q);
    int t[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,
                  25,28,32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
    return t[q];
  endfunction

  function automatic int beta_of(int q);
    int t[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,
                  8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
    return t[q];
  endfunction

  function automatic int tc0_of(int q, int bs);
    int t1[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,
                   1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
    int t2[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,
                   1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
    int t3[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,
                   2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};
    if (bs == 1) return t1[q];
    if (bs == 2) return t2[q];
    return t3[q];
  endfunction

  function automatic int clip(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic bit coded(pic_t p, int by, int bx);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (p.coef[4*by+i][4*bx+j] != 0) return 1'b1;
    return 1'b0;
  endfunction

  // bS between luma blocks (py,px) and (qy,qx); mbe: macroblock edge
  function automatic int bs_of(pic_t p, int py, int px, int qy, int qx, bit mbe);
    if (p.intra[py][px] || p.intra[qy][qx]) return mbe ? 4 : 3;
    if (coded(p, py, px) || coded(p, qy, qx)) return 2;
    if (iabs(p.mvx[py][px] - p.mvx[qy][qx]) >= 4 ||
        iabs(p.mvy[py][px] - p.mvy[qy][qx]) >= 4) return 1;
    return 0;
  endfunction

  // filter one line; s[0..3] = p0..p3, s[4..7] = q0..q3
  function automatic void fline(ref int s[8], input int bs, input int q, input bit chroma);
    int p0 = s[0], p1 = s[1], p2 = s[2], p3 = s[3];
    int q0 = s[4], q1 = s[5], q2 = s[6], q3 = s[7];
    int a = alpha_of(q), b = beta_of(q);
    bit ap, aq;
    if (bs == 0) return;
    if (!(iabs(p0 - q0) < a && iabs(p1 - p0) < b && iabs(q1 - q0) < b)) return;
    st_lines++;
    ap = iabs(p2 - p0) < b;
    aq = iabs(q2 - q0) < b;
    if (bs < 4) begin
      int t0 = tc0_of(q, bs);
      int tc = chroma ? t0 + 1 : t0 + int'(ap) + int'(aq);
      int dl = clip(-tc, tc, (((q0 - p0) << 2) + (p1 - q1) + 4) >>> 3);
      s[0] = clip(0, 255, p0 + dl);
      s[4] = clip(0, 255, q0 - dl);
      if (!chroma) begin
        if (ap) s[1] = p1 + clip(-t0, t0, (p2 + ((p0 + q0 + 1) >>> 1) - (p1 << 1)) >>> 1);
        if (aq) s[5] = q1 + clip(-t0, t0, (q2 + ((p0 + q0 + 1) >>> 1) - (q1 << 1)) >>> 1);
      end
    end else begin
      bit sm = iabs(p0 - q0) < ((a >> 2) + 2);
      if (!chroma && ap && sm) begin
        st_strong++;
        s[0] = (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >> 3;
        s[1] = (p2 + p1 + p0 + q0 + 2) >> 2;
        s[2] = (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >> 3;
      end else s[0] = (2*p1 + p0 + q1 + 2) >> 2;
      if (!chroma && aq && sm) begin
        st_strong++;
        s[4] = (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >> 3;
        s[5] = (p0 + q0 + q1 + q2 + 2) >> 2;
        s[6] = (2*q3 + 3*q2 + q1 + q0 + p0 + 4) >> 3;
      end else s[4] = (2*q1 + q0 + p1 + 2) >> 2;
    end
  endfunction

  // plane 0 luma, 1 Cb, 2 Cr; vertical edge at column x, line at row y
  function automatic void fedge(ref pic_t p, input int pl, input bit horiz,
                                input int y, input int x, input int bs, input int q);
    int s[8];
    for (int i = 0; i < 4; i++) begin
      int py = horiz ? y - 1 - i : y, px = horiz ? x : x - 1 - i;
      int qy = horiz ? y + i : y,     qx = horiz ? x : x + i;
      s[i]   = (pl == 0) ? p.y[py][px] : (pl == 1) ? p.cb[py][px] : p.cr[py][px];
      s[4+i] = (pl == 0) ? p.y[qy][qx] : (pl == 1) ? p.cb[qy][qx] : p.cr[qy][qx];
    end
    fline(s, bs, q, pl != 0);
    for (int i = 0; i < 4; i++) begin
      int py = horiz ? y - 1 - i : y, px = horiz ? x : x - 1 - i;
      int qy = horiz ? y + i : y,     qx = horiz ? x : x + i;
      if (pl == 0) begin p.y[py][px] = s[i]; p.y[qy][qx] = s[4+i]; end
      else if (pl == 1) begin p.cb[py][px] = s[i]; p.cb[qy][qx] = s[4+i]; end
      else begin p.cr[py][px] = s[i]; p.cr[qy][qx] = s[4+i]; end
    end
  endfunction

  function automatic void deblock(ref pic_t p);
    for (int i = 0; i < 5; i++) st_bs[i] = 0;
    st_strong = 0;
    st_lines = 0;
    for (int my = 0; my < 3; my++)
      for (int mx = 0; mx < 3; mx++) begin
        int q = p.qp[my][mx];
        // luma vertical, then horizontal
        for (int dir = 0; dir < 2; dir++)
          for (int ei = 0; ei < 4; ei++) begin
            for (int bi = 0; bi < 4; bi++) begin
              int qy = 4*my + (dir ? ei : bi), qx = 4*mx + (dir ? bi : ei);
              int bs;
              if ((dir == 0 && qx == 0) || (dir == 1 && qy == 0)) continue;
              bs = dir ? bs_of(p, qy-1, qx, qy, qx, ei == 0) : bs_of(p, qy, qx-1, qy, qx, ei == 0);
              st_bs[bs]++;
              for (int l = 0; l < 4; l++)
                if (dir == 0) fedge(p, 0, 1'b0, 4*qy + l, 4*qx, bs, q);
                else          fedge(p, 0, 1'b1, 4*qy, 4*qx + l, bs, q);
            end
          end
        // chroma
        for (int pl = 1; pl < 3; pl++)
          for (int dir = 0; dir < 2; dir++)
            for (int ei = 0; ei < 2; ei++)
              for (int l = 0; l < 8; l++) begin
                int cy, cx, ly, lx, bs;
                if (dir == 0) begin cy = 8*my + l; cx = 8*mx + 4*ei; end
                else          begin cy = 8*my + 4*ei; cx = 8*mx + l; end
                if ((dir == 0 && cx == 0) || (dir == 1 && cy == 0)) continue;
                ly = (2*cy) / 4;  // luma block row/col of the matching luma edge
                lx = (2*cx) / 4;
                bs = dir ? bs_of(p, ly-1, lx, ly, lx, ei == 0) : bs_of(p, ly, lx-1, ly, lx, ei == 0);
                fedge(p, pl, dir == 1, cy, cx, bs, q);
              end
      end
  endfunction

  // random picture: blocky smooth content so that edges get filtered
  function automatic pic_t gen_pic(int kind);
    pic_t p;
    for (int my = 0; my < 3; my++)
      for (int mx = 0; mx < 3; mx++)
        p.qp[my][mx] = (kind == 3) ? 51 : int'($urandom_range(28, 51));
    for (int by = 0; by < BW; by++)
      for (int bx = 0; bx < BW; bx++) begin
        int lvl = int'($urandom_range(60, 190));
        bit mb_intra = (kind == 1) ? 1'b1 : (kind == 2) ? 1'b0
                       : ((((by / 4) * 3 + bx / 4) % 3) == 0);
        p.intra[by][bx] = mb_intra;
        p.mvx[by][bx] = (kind == 3) ? 0 : int'($urandom_range(0, 12)) - 6;
        p.mvy[by][bx] = (kind == 3) ? 0 : int'($urandom_range(0, 12)) - 6;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            p.y[4*by+i][4*bx+j] = clip(0, 255, lvl + i + j + int'($urandom_range(0, 4)) - 2);
            p.coef[4*by+i][4*bx+j] = 0;
          end
        if (kind != 2 && kind != 3 && $urandom_range(0, 2) == 0)
          p.coef[4*by + int'($urandom_range(0, 3))][4*bx + int'($urandom_range(0, 3))]
            = int'($urandom_range(1, 255));
      end
    // intra flags are per macroblock; make MVs equal inside some MBs
    for (int cy = 0; cy < H/8; cy++)
      for (int cx = 0; cx < W/8; cx++) begin
        int l1 = int'($urandom_range(70, 180)), l2 = int'($urandom_range(70, 180));
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            p.cb[4*cy+i][4*cx+j] = clip(0, 255, l1 + int'($urandom_range(0, 2)));
            p.cr[4*cy+i][4*cx+j] = clip(0, 255, l2 + int'($urandom_range(0, 2)));
          end
      end
    return p;
  endfunction

  // frame memory word of the design's block-major layout
  function automatic logic [31:0] fm_word(pic_t p, int a);
    logic [31:0] w;
    int blk = a / 4, row = a % 4;
    for (int j = 0; j < 4; j++) begin
      int v;
      if (a < 576)      v = p.y[4*(blk/12)+row][4*(blk%12)+j];
      else if (a < 720) v = p.cb[4*((blk-144)/6)+row][4*((blk-144)%6)+j];
      else              v = p.cr[4*((blk-180)/6)+row][4*((blk-180)%6)+j];
      w[8*j +: 8] = 8'(v);
    end
    return w;
  endfunction

  // parameter memory word (byte map of the design)
  function automatic logic [31:0] pm_word(pic_t p, int a);
    logic [31:0] w = '0;
    for (int k = 0; k < 4; k++) begin
      int byt = 4*a + k;
      int v = 0;
      if (byt < 144)                          v = p.mvx[byt/12][byt%12];
      else if (byt >= 'h100 && byt < 'h190)   v = p.mvy[(byt-'h100)/12][(byt-'h100)%12];
      else if (byt >= 'h200 && byt < 'h290)   v = int'(p.intra[(byt-'h200)/12][(byt-'h200)%12]);
      else if (byt >= 'h2000 && byt < 'h2900) v = p.coef[(byt-'h2000)/48][(byt-'h2000)%48];
      w[8*k +: 8] = 8'(v);
    end
    if (a >= 'hC0 && a < 'hC9) w = 32'(p.qp[(a-'hC0)/3][(a-'hC0)%3]);
    return w;
  endfunction

endpackage
