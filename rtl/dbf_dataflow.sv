// Dataflow control of the deblocking filter.
//
// Filters the macroblocks of the 48x48 picture in raster order. For each
// macroblock it reads the QP word from the parameter memory and the eight
// bS words of its four block rows (vertical and horizontal edges) from the
// bS memory into a bS buffer, then walks the 48 edges of the 2-D
// processing order (32 luma, 8 Cb, 8 Cr; see h264_pkg::edge_desc). Per edge:
//   SETUP  take the blocks that are held on chip (the "direct" register
//          with the previous edge's result, or one of five 128-bit
//          registers) and note which ones must be read from the frame memory
//   LOAD   read the missing blocks through the read-port controller
//   FILT   one clock: the filtering unit filters the four lines of the edge
//          (transposed for horizontal edges) with per-line bS and QP; the
//          two results go to on-chip registers or to a store buffer
//          that the write-port controller empties in the background.
// FILT waits until the store buffers of the previous edge are empty.
// Blocks outside the picture (left/top neighbours of border macroblocks)
// are neither read nor written and their edge has bS 0.
// done pulses after the last macroblock once all stores have been written.
// The chroma edges use the bS of the luma edge they lie on and the
// macroblock's QP; the bS buffer is loaded per macroblock rather than per
// block row (design choices).
module dbf_dataflow (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        done,
  output logic                        busy,
  // parameter memory (QP)
  output logic                        pm_en,
  output logic [h264_pkg::PM_AW-1:0]  pm_addr,
  input  logic [31:0]                 pm_rdata,
  // bS memory
  output logic                        bs_en,
  output logic [h264_pkg::BS_AW-1:0]  bs_addr,
  input  logic [11:0]                 bs_rdata,
  // memory controllers
  output logic                        rd_start,
  output logic [h264_pkg::FM_AW-1:0]  rd_addr,
  output logic                        rd_tag,
  input  logic                        rd_ready,
  input  logic                        rd_valid,
  input  logic                        rd_tag_out,
  input  h264_pkg::pblk_t             rd_blk,
  output logic                        wr_start,
  output logic [h264_pkg::FM_AW-1:0]  wr_addr,
  output h264_pkg::pblk_t             wr_blk,
  input  logic                        wr_ready,
  input  logic                        mc_idle,
  // filtering unit
  output h264_pkg::pblk_t             f_p,
  output h264_pkg::pblk_t             f_q,
  output logic                        f_transpose,
  output logic                        f_chroma,
  output logic [5:0]                  f_qp,
  output logic [3:0][2:0]             f_bs,
  input  h264_pkg::pblk_t             f_out_p,
  input  h264_pkg::pblk_t             f_out_q
);
  import h264_pkg::*;

  typedef enum logic [2:0] {F_IDLE, F_PARAM, F_SETUP, F_LOAD, F_FILT, F_FLUSH} fstate_e;
  fstate_e state;

  logic [1:0]        mbx, mby;
  logic [5:0]        e;
  logic [3:0]        pcnt;
  logic              pret_v;
  logic [3:0]        pret_i;
  logic [5:0]        qp;
  logic [3:0][1:0][11:0] bsw;      // bS buffer [row][0: vertical, 1: horizontal]
  pblk_t             regs [6];     // 0: direct, 1..5: registers 1..5
  pblk_t             pblk, qblk;
  edge_desc_t        d, dr;
  logic              p_in, p_in_r;
  logic              need_p, need_q;
  logic [1:0]        outst;
  logic              st_p_pend, st_q_pend;
  logic [FM_AW-1:0]  st_p_addr, st_q_addr;
  pblk_t             st_p_data, st_q_data;

  function automatic logic [FM_AW-1:0] blk_addr(plane_e pl, logic [1:0] mx, logic [1:0] my,
                                                logic signed [2:0] r, logic signed [2:0] c);
    int y, x, a;
    if (pl == PL_Y) begin
      y = int'(my) * 4 + int'(r);
      x = int'(mx) * 4 + int'(c);
      a = (y * DB_BW + x) * 4;
    end else begin
      y = int'(my) * 2 + int'(r);
      x = int'(mx) * 2 + int'(c);
      a = ((pl == PL_CB) ? FM_CB : FM_CR) + (y * (DB_BW / 2) + x) * 4;
    end
    return FM_AW'(a);
  endfunction

  assign d    = edge_desc(e);
  assign p_in = !((d.r1 == -3'sd1 && mby == 2'd0) || (d.c1 == -3'sd1 && mbx == 2'd0));

  // parameter and bS reads
  assign pm_en   = (state == F_PARAM) && (pcnt == 4'd0);
  assign pm_addr = PM_QP_W + PM_AW'(mby * 2'd3 + {2'b0, mbx});
  assign bs_en   = (state == F_PARAM) && (pcnt >= 4'd1) && (pcnt <= 4'd8);
  always_comb begin
    logic [3:0] j;
    j = pcnt - 4'd1;
    // group = block row * 3 + macroblock column; word = 2*group + direction
    bs_addr = BS_AW'(((int'(mby) * 4 + int'(j[2:1])) * DB_MBW + int'(mbx)) * 2 + int'(j[0]));
  end

  // read commands
  always_comb begin
    rd_start = 1'b0;
    rd_tag   = 1'b0;
    rd_addr  = '0;
    if (state == F_LOAD && rd_ready) begin
      if (need_p) begin
        rd_start = 1'b1;
        rd_addr  = blk_addr(dr.plane, mbx, mby, dr.r1, dr.c1);
      end else if (need_q) begin
        rd_start = 1'b1;
        rd_tag   = 1'b1;
        rd_addr  = blk_addr(dr.plane, mbx, mby, dr.r2, dr.c2);
      end
    end
  end

  // store commands
  always_comb begin
    wr_start = 1'b0;
    wr_addr  = st_p_addr;
    wr_blk   = st_p_data;
    if (st_p_pend) wr_start = 1'b1;
    else if (st_q_pend) begin
      wr_start = 1'b1;
      wr_addr  = st_q_addr;
      wr_blk   = st_q_data;
    end
  end

  // filtering unit inputs
  always_comb begin
    f_p         = pblk;
    f_q         = qblk;
    f_transpose = dr.horiz;
    f_chroma    = (dr.plane != PL_Y);
    f_qp        = qp;
    for (int k = 0; k < 4; k++) begin
      logic [1:0] rr, cc;
      rr = 2'(dr.r2);
      cc = 2'(dr.c2);
      if (dr.plane == PL_Y) begin
        f_bs[k] = bsw[rr][dr.horiz][3*cc +: 3];
      end else if (!dr.horiz) begin
        f_bs[k] = bsw[{rr[0], 1'b0} + 2'(k / 2)][0][3*{cc[0], 1'b0} +: 3];
      end else begin
        f_bs[k] = bsw[{rr[0], 1'b0}][1][3*({cc[0], 1'b0} + 2'(k / 2)) +: 3];
      end
      if (!p_in_r) f_bs[k] = 3'd0;
    end
  end

  logic load_done, filt_go;
  assign load_done = !need_p && !need_q && !rd_start &&
                     (outst == 2'd0 || (outst == 2'd1 && rd_valid));
  assign filt_go   = !st_p_pend && !st_q_pend;
  assign busy      = (state != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= F_IDLE;
      mbx       <= '0;
      mby       <= '0;
      e         <= '0;
      pcnt      <= '0;
      pret_v    <= 1'b0;
      pret_i    <= '0;
      qp        <= '0;
      bsw       <= '0;
      for (int i = 0; i < 6; i++) regs[i] <= '0;
      pblk      <= '0;
      qblk      <= '0;
      dr        <= '0;
      p_in_r    <= 1'b0;
      need_p    <= 1'b0;
      need_q    <= 1'b0;
      outst     <= '0;
      st_p_pend <= 1'b0;
      st_q_pend <= 1'b0;
      st_p_addr <= '0;
      st_q_addr <= '0;
      st_p_data <= '0;
      st_q_data <= '0;
      done      <= 1'b0;
    end else begin
      done   <= 1'b0;
      pret_v <= pm_en || bs_en;
      pret_i <= pcnt;
      if (pret_v) begin
        if (pret_i == 4'd0) qp <= pm_rdata[5:0];
        else begin
          logic [3:0] j;
          j = pret_i - 4'd1;
          bsw[j[2:1]][j[0]] <= bs_rdata;
        end
      end

      // block returns from the read-port controller
      if (rd_valid) begin
        if (rd_tag_out) qblk <= rd_blk;
        else            pblk <= rd_blk;
      end
      if (rd_start) begin
        if (need_p) need_p <= 1'b0;
        else        need_q <= 1'b0;
      end
      outst <= outst + {1'b0, rd_start} - {1'b0, rd_valid};

      // background stores
      if (wr_ready) begin
        if (st_p_pend)      st_p_pend <= 1'b0;
        else if (st_q_pend) st_q_pend <= 1'b0;
      end

      unique case (state)
        F_IDLE: if (start) begin
          mbx   <= '0;
          mby   <= '0;
          pcnt  <= '0;
          state <= F_PARAM;
        end
        F_PARAM: begin
          pcnt <= pcnt + 4'd1;
          if (pcnt == 4'd9) begin
            e     <= '0;
            state <= F_SETUP;
          end
        end
        F_SETUP: begin
          dr     <= d;
          p_in_r <= p_in;
          if (d.ld1 != LOC_EXT) pblk <= regs[int'(d.ld1) - 1];
          if (d.ld2 != LOC_EXT) qblk <= regs[int'(d.ld2) - 1];
          need_p <= (d.ld1 == LOC_EXT) && p_in;
          need_q <= (d.ld2 == LOC_EXT);
          state  <= F_LOAD;
        end
        F_LOAD: if (load_done) state <= F_FILT;
        F_FILT: if (filt_go) begin
          if (dr.st1 == LOC_EXT) begin
            if (p_in_r) begin
              st_p_pend <= 1'b1;
              st_p_addr <= blk_addr(dr.plane, mbx, mby, dr.r1, dr.c1);
              st_p_data <= f_out_p;
            end
          end else begin
            regs[int'(dr.st1) - 1] <= f_out_p;
          end
          if (dr.st2 == LOC_EXT) begin
            st_q_pend <= 1'b1;
            st_q_addr <= blk_addr(dr.plane, mbx, mby, dr.r2, dr.c2);
            st_q_data <= f_out_q;
          end else begin
            regs[int'(dr.st2) - 1] <= f_out_q;
          end
          e <= e + 6'd1;
          state <= F_SETUP;
          if (e == 6'd47) begin
            pcnt <= '0;
            if (mbx == 2'(DB_MBW - 1)) begin
              mbx <= '0;
              if (mby == 2'(DB_MBH - 1)) state <= F_FLUSH;
              else begin mby <= mby + 2'd1; state <= F_PARAM; end
            end else begin
              mbx   <= mbx + 2'd1;
              state <= F_PARAM;
            end
          end
        end
        F_FLUSH: if (!st_p_pend && !st_q_pend && mc_idle && !wr_start) begin
          state <= F_IDLE;
          done  <= 1'b1;
        end
        default: state <= F_IDLE;
      endcase
    end
  end

endmodule
