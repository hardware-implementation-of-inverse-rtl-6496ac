// Inverse quantization unit.
//
// Scales a 4x4 coefficient block by W'(i,j) = Z(i,j) * V'(i,j), where
// V' = [V1 V3 V1 V3; V3 V2 V3 V2; V1 V3 V1 V3; V3 V2 V3 V2] comes from the
// scalar look-up table for the current QP. Four multipliers work on one
// 2x2 quadrant per clock (one V1, one V2 and two V3 products), so a block
// takes four cycles. When the DC slot holds an already inverse-Hadamard
// transformed DC coefficient, its product is divided by 4 (luma,
// intra16x16) or by 2 (chroma) with an arithmetic shift; for QP > 21 these
// divisions are exact.
//
// Control (two state machines in the described design, merged here into a
// quadrant counter and a result register): a block is taken when
// in_valid && in_ready; in_ready is high when idle or in the last
// multiply cycle if the result register is free by then, so blocks can
// follow each other every four cycles. The completed block is presented on
// out_res with out_valid until out_ready. Products are cut to RW bits
// (16 by default, the width of the inverse transform).
module iqit_iquant #(
  parameter int RW = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [5:0]              qp,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  h264_pkg::coef_blk_t     in_blk,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [15:0][RW-1:0]     out_res,
  output logic [4:0]              out_blk
);
  import h264_pkg::*;

  typedef logic signed [RW-1:0] r_t;

  logic [17:0] v1, v2, v3;
  iqit_scalar_lut u_lut (.qp(qp), .v1(v1), .v2(v2), .v3(v3));

  logic        busy;
  logic [1:0]  quad;
  coef_blk_t   cur;
  r_t [15:0]   prod;      // partial results of the block being scaled
  logic        res_free;
  logic        last;

  assign last     = busy && (quad == 2'd3);
  assign res_free = !out_valid || out_ready;
  assign in_ready = !busy || (last && res_free);

  // positions handled this cycle: (r0,c0) V1, (r0+1,c0+1) V2, the others V3
  logic [3:0] pos [4];
  logic signed [17:0] mop [4];
  logic signed [18:0] vop [4];
  logic signed [36:0] mres [4];
  r_t  pr [4];

  always_comb begin
    int r0, c0;
    r0 = 2 * int'(quad[1]);
    c0 = 2 * int'(quad[0]);
    pos[0] = 4'(4*r0 + c0);
    pos[1] = 4'(4*(r0+1) + c0 + 1);
    pos[2] = 4'(4*r0 + c0 + 1);
    pos[3] = 4'(4*(r0+1) + c0);
    vop[0] = $signed({1'b0, v1});
    vop[1] = $signed({1'b0, v2});
    vop[2] = $signed({1'b0, v3});
    vop[3] = $signed({1'b0, v3});
    for (int m = 0; m < 4; m++) begin
      mop[m]  = 18'($signed(cur.c[pos[m]]));
      mres[m] = mop[m] * vop[m];
      pr[m]   = r_t'(mres[m]);
    end
    // DC slot of a Hadamard-transformed block (quadrant 0, multiplier 0)
    if (quad == 2'd0 && cur.dc_mode == DC_LUMA)   pr[0] = r_t'(mres[0] >>> 2);
    if (quad == 2'd0 && cur.dc_mode == DC_CHROMA) pr[0] = r_t'(mres[0] >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      quad      <= 2'd0;
      cur       <= '0;
      prod      <= '0;
      out_valid <= 1'b0;
      out_res   <= '0;
      out_blk   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (busy && !last) begin
        for (int m = 0; m < 4; m++) prod[pos[m]] <= pr[m];
        quad <= quad + 2'd1;
      end else if (last && res_free) begin
        // finish: hand the whole block to the result register
        for (int e = 0; e < 16; e++) out_res[e] <= prod[e];
        for (int m = 0; m < 4; m++) out_res[pos[m]] <= pr[m];
        out_blk   <= cur.blk;
        out_valid <= 1'b1;
        busy      <= 1'b0;
        quad      <= 2'd0;
      end

      if (in_valid && in_ready) begin
        cur  <= in_blk;
        busy <= 1'b1;
        quad <= 2'd0;
      end
    end
  end

endmodule
