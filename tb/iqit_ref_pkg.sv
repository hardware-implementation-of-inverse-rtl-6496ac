// Reference model and stimulus generator for the inverse transform &
// quantization testbenches.
//
// The model follows the H.264 decoding equations directly, in 32-bit
// integers and without any of the hardware's scheduling:
//   luma DC (intra16x16): W = H*Z*H, scaled by V(0,0)*2^(QP/6)/4
//   chroma DC:            W = H2*Z*H2, scaled by V(0,0)*2^(QP/6)/2
//   other coefficients:   Z(i,j) * V(QP%6, class(i,j)) * 2^(QP/6)
//   core inverse transform with halving by arithmetic shift,
//   division by 64 rounding halves away from zero, 9-bit result.
// Stimuli are random but bounded so that every intermediate value fits the
// 10-bit DC and 16-bit transform widths of the hardware.
package iqit_ref_pkg;

  typedef struct {
    int qp;
    bit intra16;
    int z[16][16];     // luma blocks, transmission order, raster inside
    int ldc[16];       // luma DC matrix, raster
    int cdc[8];        // Cb 2x2 then Cr 2x2
    int cz[8][16];     // chroma blocks Cb0..3, Cr0..3
  } mb_t;

  typedef logic [31:0] mem_t [128];
  typedef int res_t [24][16];

  function automatic int vbase(int qm, int i, int j);
    int t10[6] = '{10, 11, 13, 14, 16, 18};
    int t16[6] = '{16, 18, 20, 23, 25, 29};
    int t13[6] = '{13, 14, 16, 18, 20, 23};
    if (i % 2 == 0 && j % 2 == 0) return t10[qm];
    if (i % 2 == 1 && j % 2 == 1) return t16[qm];
    return t13[qm];
  endfunction

  function automatic int vq(int qp, int i, int j);
    return vbase(qp % 6, i, j) << (qp / 6);
  endfunction

  function automatic int rnd(int lim);
    if (lim <= 0) return 0;
    return int'($urandom_range(0, 2 * lim)) - lim;
  endfunction

  // random macroblock; sparse coefficients sized so that |Y| <= 1300
  function automatic mb_t gen_mb(int qp, bit intra16);
    mb_t m;
    int lim, dlim;
    m.qp = qp;
    m.intra16 = intra16;
    lim  = 1300 / vq(qp, 1, 1);
    dlim = 1300 * 4 / (16 * vq(qp, 0, 0));
    if (dlim > 31) dlim = 31;
    for (int b = 0; b < 16; b++)
      for (int e = 0; e < 16; e++)
        m.z[b][e] = ($urandom_range(0, 2) == 0) ? rnd(lim) : 0;
    for (int b = 0; b < 8; b++)
      for (int e = 0; e < 16; e++)
        m.cz[b][e] = ($urandom_range(0, 2) == 0) ? rnd(lim) : 0;
    for (int e = 0; e < 16; e++) m.ldc[e] = rnd(dlim);
    for (int e = 0; e < 8; e++)  m.cdc[e] = rnd(dlim);
    return m;
  endfunction

  function automatic mem_t pack_in(mb_t m);
    mem_t w;
    for (int a = 0; a < 128; a++) w[a] = '0;
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          w[4*b+i][8*j +: 8] = 8'(m.z[b][4*i+j]);
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          w[64+4*b+i][8*j +: 8] = 8'(m.cz[b][4*i+j]);
    for (int e = 0; e < 16; e++) w[96 + e/2][16*(e%2) +: 16] = 16'(m.ldc[e]);
    for (int e = 0; e < 8; e++)  w[104 + e/2][16*(e%2) +: 16] = 16'(m.cdc[e]);
    w[108] = 32'(m.qp);
    w[112] = m.intra16 ? 32'd1 : 32'd0;
    return w;
  endfunction

  function automatic int hsign(int r, int c);   // 4x4 H entry
    int h[4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    return h[r][c];
  endfunction

  // inverse core transform, X = Ci^T Y Ci, then rounding per the design
  function automatic void itrans(input int y[16], output int r[16]);
    int t[16], x[16];
    for (int k = 0; k < 4; k++) begin
      int a0 = y[k], a1 = y[4+k], a2 = y[8+k], a3 = y[12+k];
      t[k]    = a0 + a1 + a2 + (a3 >>> 1);
      t[4+k]  = a0 + (a1 >>> 1) - a2 - a3;
      t[8+k]  = a0 - (a1 >>> 1) - a2 + a3;
      t[12+k] = a0 - a1 + a2 - (a3 >>> 1);
    end
    for (int i = 0; i < 4; i++) begin
      int a0 = t[4*i], a1 = t[4*i+1], a2 = t[4*i+2], a3 = t[4*i+3];
      x[4*i]   = a0 + a1 + a2 + (a3 >>> 1);
      x[4*i+1] = a0 + (a1 >>> 1) - a2 - a3;
      x[4*i+2] = a0 - (a1 >>> 1) - a2 + a3;
      x[4*i+3] = a0 - a1 + a2 - (a3 >>> 1);
    end
    for (int e = 0; e < 16; e++) begin
      int q, mag;
      mag = (x[e] < 0) ? -x[e] : x[e];
      q = (mag + 32) / 64;          // halves away from zero
      if (mag % 64 == 32 && x[e] < 0) q = mag / 64 + 1;
      r[e] = (x[e] < 0) ? -q : q;
      r[e] = int'($signed(9'(r[e])));
    end
  endfunction

  function automatic res_t ref_mb(mb_t m);
    res_t res;
    int wdc[16], cw[8];
    int y[16], r[16];
    // luma DC
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int s = 0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++)
            s += hsign(i, a) * m.ldc[4*a+b] * hsign(j, b);
        wdc[4*i+j] = (s * vq(m.qp, 0, 0)) / 4;
      end
    // chroma DC
    for (int c = 0; c < 2; c++) begin
      int z0 = m.cdc[4*c], z1 = m.cdc[4*c+1], z2 = m.cdc[4*c+2], z3 = m.cdc[4*c+3];
      int f[4];
      f[0] = z0 + z1 + z2 + z3;
      f[1] = z0 - z1 + z2 - z3;
      f[2] = z0 + z1 - z2 - z3;
      f[3] = z0 - z1 - z2 + z3;
      for (int e = 0; e < 4; e++) cw[4*c+e] = (f[e] * vq(m.qp, 0, 0)) / 2;
    end
    for (int b = 0; b < 24; b++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          y[4*i+j] = ((b < 16) ? m.z[b][4*i+j] : m.cz[b-16][4*i+j]) * vq(m.qp, i, j);
      if (b < 16 && m.intra16) begin
        int bx = ((b >> 2) & 1) * 2 + (b & 1);
        int by = ((b >> 3) & 1) * 2 + ((b >> 1) & 1);
        y[0] = wdc[4*by+bx];
      end
      if (b >= 16) y[0] = cw[b-16];
      itrans(y, r);
      for (int e = 0; e < 16; e++) res[b][e] = r[e];
    end
    return res;
  endfunction

  // residual sample e of block b read back from the output memory image
  function automatic int out_sample(mem_t w, int b, int e);
    int i = e / 4, j = e % 4;
    int val, s, bit_i;
    if (b < 16) begin
      val   = int'(w[4*b+i][8*j +: 8]);
      bit_i = 16*b + e;
      s     = int'(w[96 + bit_i/32][bit_i%32]);
    end else begin
      val   = int'(w[64+4*(b-16)+i][8*j +: 8]);
      bit_i = 16*(b-16) + e;
      s     = int'(w[104 + bit_i/32][bit_i%32]);
    end
    return s ? val - 256 : val;
  endfunction

endpackage
