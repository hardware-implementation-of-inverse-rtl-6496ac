// Filtering unit of the deblocking filter: four filter blocks side by side
// filter all four lines of one 4x4 block edge in one clock.
//
// Combinational. Inputs are the two 4x4 pixel blocks on either side of the
// edge (element 4*row+col, 8 bits each): blk_p left/top, blk_q right/bottom.
// For a vertical edge line k is row k of both blocks; for a horizontal edge
// (transpose = 1) line k is column k, i.e. the blocks are read and written
// transposed, as the transpose command of the described unit does. Each
// line has its own bS (chroma lines take the bS of the luma edge they lie
// on) and its own threshold LUT; alpha and beta depend only on QP.
module dbf_filter_unit (
  input  h264_pkg::pblk_t   blk_p,
  input  h264_pkg::pblk_t   blk_q,
  input  logic              transpose,
  input  logic              chroma,
  input  logic [5:0]        qp,
  input  logic [3:0][2:0]   bs,
  output h264_pkg::pblk_t   out_p,
  output h264_pkg::pblk_t   out_q,
  output logic [3:0]        line_filtered
);
  import h264_pkg::*;

  logic [3:0][3:0][7:0] lp, lq, fp, fq;
  logic [3:0][7:0]      alpha;
  logic [3:0][4:0]      beta, tc0;

  // gather lines: p side counts away from the edge
  always_comb begin
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 4; i++) begin
        lp[k][i] = transpose ? blk_p[4*(3-i)+k] : blk_p[4*k+(3-i)];
        lq[k][i] = transpose ? blk_q[4*i+k]     : blk_q[4*k+i];
      end
  end

  for (genvar k = 0; k < 4; k++) begin : g_line
    dbf_thresh_lut u_lut (
      .qp, .bs(bs[k]), .alpha(alpha[k]), .beta(beta[k]), .tc0(tc0[k])
    );
    dbf_filter_block u_fb (
      .p(lp[k]), .q(lq[k]), .bs(bs[k]), .alpha(alpha[k]), .beta(beta[k]),
      .tc0(tc0[k]), .chroma, .pf(fp[k]), .qf(fq[k]), .filtered(line_filtered[k])
    );
  end

  // scatter lines back (both orientations, then select)
  pblk_t vp, vq, tp, tq;
  always_comb begin
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 4; i++) begin
        vp[4*k+(3-i)] = fp[k][i];
        vq[4*k+i]     = fq[k][i];
        tp[4*(3-i)+k] = fp[k][i];
        tq[4*i+k]     = fq[k][i];
      end
  end
  assign out_p = transpose ? tp : vp;
  assign out_q = transpose ? tq : vq;

endmodule
