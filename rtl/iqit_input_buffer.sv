// Input data buffering unit of the inverse transform & quantization core.
//
// Reads one macroblock of quantized coefficients from the 32-bit input
// memory in the transmission order of H.264 and hands 4x4 blocks to the
// inverse quantizer:
//   QP word, prediction-mode word,
//   [intra16x16 only] 16 luma DC coefficients (8 words, two 16-bit values
//                     per word, raster order of the 4x4 DC matrix),
//   16 luma blocks (4 words each, 8-bit coefficients, row i in word i),
//   8 chroma DC coefficients (4 words: Cb 2x2 then Cr 2x2),
//   8 chroma blocks (Cb blocks 0..3 then Cr blocks 0..3).
// Two state machines, as described: a reader that generates the addresses
// (one read per clock when allowed), and a loader that places each returned
// word in the 160-bit input_buffer (16 x 10-bit DC entries, or 16 x 8-bit
// block coefficients in its low 128 bits), starts the inverse Hadamard unit
// (dc_ready) when all DC coefficients of a kind are in, and, when a block
// is complete, replaces its DC coefficient by the transformed one from
// hadamard_buffer (intra16x16 luma and all chroma blocks) and moves it to
// the output register. DC coefficients are cut to 10 bits, valid for
// QP > 21.
//
// Flow control: the output register holds a block until blk_ready. The
// reader starts a new block only when input_buffer is empty or is emptied
// in that same cycle, so a block can leave every four cycles.
// Memory reads have one cycle of latency. QP and the intra16x16 flag (mode
// byte non-zero) are kept in registers for the rest of the macroblock.
module iqit_input_buffer (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  // input memory read port
  output logic                         mem_en,
  output logic [h264_pkg::IQ_AW-1:0]   mem_addr,
  input  logic [31:0]                  mem_rdata,
  // inverse Hadamard unit
  output logic                         dc_ready,
  output logic                         dc_chroma,
  output logic [15:0][h264_pkg::DCW-1:0] dc_din,
  input  logic [15:0][h264_pkg::DCW-1:0] hbuf,
  input  logic                         hadamard_done,
  // blocks to inverse quantization
  output logic                         blk_valid,
  input  logic                         blk_ready,
  output h264_pkg::coef_blk_t          blk,
  output logic [5:0]                   qp,
  output logic                         intra16
);
  import h264_pkg::*;

  typedef enum logic [2:0] {K_QP, K_MODE, K_LDC, K_AC, K_CDC} kind_e;
  typedef enum logic [2:0] {R_IDLE, R_QP, R_MODE, R_DECIDE, R_LDC, R_LUMA, R_CDC, R_CHROMA} rstate_e;

  rstate_e      rstate;
  logic [5:0]   ridx;          // word index within the current segment
  // read tag, one cycle behind the address
  logic         arr_valid;
  kind_e        arr_kind;
  logic [5:0]   arr_idx;
  logic         rd_chroma;     // AC words belong to chroma blocks

  logic [159:0] ibuf;          // input_buffer
  logic [2:0]   ib_cnt;        // AC words present in input_buffer
  logic [3:0]   dc_cnt;        // DC words present in input_buffer
  logic         dc_pend;       // DC set complete, waiting for dc_ready
  logic         ldc_ok, cdc_ok;// transformed DC available in hadamard_buffer
  logic [4:0]   nxt_blk;       // index of the block being assembled

  // ---------------------------------------------------------------------
  // loader side, combinational view of this cycle
  // ---------------------------------------------------------------------
  logic         arr_ac, arr_dc;
  logic [2:0]   ac_after;
  logic         complete, dc_needed, dc_avail, q_free, move_now;
  logic [127:0] ac_view;
  coef_blk_t    nblk;

  assign arr_ac    = arr_valid && (arr_kind == K_AC);
  assign arr_dc    = arr_valid && (arr_kind == K_LDC || arr_kind == K_CDC);
  assign ac_after  = ib_cnt + {2'b0, arr_ac};
  assign complete  = (ac_after == 3'd4);
  assign dc_needed = nxt_blk[4] || intra16;
  assign dc_avail  = nxt_blk[4] ? cdc_ok : ldc_ok;
  assign q_free    = !blk_valid || blk_ready;
  assign move_now  = complete && q_free && (!dc_needed || dc_avail);

  logic [3:0] di;              // hadamard_buffer entry of the block's DC
  always_comb begin
    di = nxt_blk[4] ? {1'b0, nxt_blk[2:0]}
                    : {blk_y(nxt_blk[3:0]), blk_x(nxt_blk[3:0])};
    ac_view = ibuf[127:0];
    if (arr_ac) ac_view[32*ib_cnt[1:0] +: 32] = mem_rdata;
    for (int e = 0; e < 16; e++) nblk.c[e] = 16'($signed(ac_view[8*e +: 8]));
    if (dc_needed) nblk.c[0] = 16'($signed(hbuf[di]));
    nblk.dc_mode = !dc_needed ? DC_NONE : (nxt_blk[4] ? DC_CHROMA : DC_LUMA);
    nblk.chroma  = nxt_blk[4];
    nblk.blk     = nxt_blk;
  end

  // DC view of input_buffer for the Hadamard unit
  always_comb begin
    for (int e = 0; e < 16; e++) dc_din[e] = ibuf[DCW*e +: DCW];
  end

  // ---------------------------------------------------------------------
  // reader: may a new 4-word group (block or chroma DC set) start now?
  // ---------------------------------------------------------------------
  logic buf_free;
  assign buf_free = ((ib_cnt == 3'd0 && !arr_ac) || move_now)
                    && dc_cnt == 4'd0 && !arr_dc && !dc_pend;

  logic       issue;
  logic [IQ_AW-1:0] iaddr;
  kind_e      ikind;
  always_comb begin
    issue = 1'b0;
    iaddr = '0;
    ikind = K_QP;
    unique case (rstate)
      R_QP:   begin issue = 1'b1; iaddr = IQ_QP_W;   ikind = K_QP;   end
      R_MODE: begin issue = 1'b1; iaddr = IQ_MODE_W; ikind = K_MODE; end
      R_DECIDE: begin
        // mode word arrives in this cycle
        if (mem_rdata[7:0] != 8'd0) begin
          issue = 1'b1; iaddr = IQ_LDC_W; ikind = K_LDC;
        end else if (buf_free) begin
          issue = 1'b1; iaddr = IQ_LUMA_W; ikind = K_AC;
        end
      end
      R_LDC: begin issue = 1'b1; iaddr = IQ_LDC_W + IQ_AW'(ridx); ikind = K_LDC; end
      R_LUMA, R_CHROMA: begin
        issue = (ridx[1:0] != 2'd0) || buf_free;
        iaddr = (rstate == R_LUMA) ? IQ_AW'(ridx) : IQ_CHROMA_W + IQ_AW'(ridx);
        ikind = K_AC;
      end
      R_CDC: begin
        issue = (ridx[1:0] != 2'd0) || buf_free;
        iaddr = IQ_CDC_W + IQ_AW'(ridx);
        ikind = K_CDC;
      end
      default: ;
    endcase
  end

  assign mem_en   = issue;
  assign mem_addr = iaddr;
  assign busy     = (rstate != R_IDLE) || arr_valid || ib_cnt != 0 || blk_valid || dc_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate    <= R_IDLE;
      ridx      <= '0;
      arr_valid <= 1'b0;
      arr_kind  <= K_QP;
      arr_idx   <= '0;
      rd_chroma <= 1'b0;
    end else begin
      arr_valid <= issue;
      arr_kind  <= ikind;
      arr_idx   <= ridx;
      unique case (rstate)
        R_IDLE:   if (start) rstate <= R_QP;
        R_QP:     rstate <= R_MODE;
        R_MODE:   rstate <= R_DECIDE;
        R_DECIDE: if (issue) begin
          rd_chroma <= 1'b0;
          ridx      <= 6'd1;
          rstate    <= (ikind == K_LDC) ? R_LDC : R_LUMA;
          arr_idx   <= 6'd0;
        end
        R_LDC: begin
          ridx <= ridx + 6'd1;
          if (ridx == 6'd7) begin ridx <= '0; rstate <= R_LUMA; end
        end
        R_LUMA: if (issue) begin
          ridx <= ridx + 6'd1;
          if (ridx == 6'd63) begin ridx <= '0; rstate <= R_CDC; end
        end
        R_CDC: if (issue) begin
          ridx <= ridx + 6'd1;
          if (ridx == 6'd3) begin ridx <= '0; rstate <= R_CHROMA; rd_chroma <= 1'b1; end
        end
        R_CHROMA: if (issue) begin
          ridx <= ridx + 6'd1;
          if (ridx == 6'd31) begin ridx <= '0; rstate <= R_IDLE; end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // loader
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ibuf      <= '0;
      ib_cnt    <= '0;
      dc_cnt    <= '0;
      dc_pend   <= 1'b0;
      dc_ready  <= 1'b0;
      dc_chroma <= 1'b0;
      ldc_ok    <= 1'b0;
      cdc_ok    <= 1'b0;
      nxt_blk   <= '0;
      blk_valid <= 1'b0;
      blk       <= '0;
      qp        <= '0;
      intra16   <= 1'b0;
    end else begin
      dc_ready <= 1'b0;
      if (start && rstate == R_IDLE) begin
        ldc_ok  <= 1'b0;
        cdc_ok  <= 1'b0;
        nxt_blk <= '0;
      end
      if (blk_valid && blk_ready) blk_valid <= 1'b0;

      if (arr_valid) begin
        unique case (arr_kind)
          K_QP:   qp      <= mem_rdata[5:0];
          K_MODE: intra16 <= (mem_rdata[7:0] != 8'd0);
          K_LDC, K_CDC: begin
            ibuf[2*DCW*arr_idx[2:0] +: DCW]       <= mem_rdata[DCW-1:0];
            ibuf[2*DCW*arr_idx[2:0] + DCW +: DCW] <= mem_rdata[16 +: DCW];
            if ((arr_kind == K_LDC && arr_idx[2:0] == 3'd7) ||
                (arr_kind == K_CDC && arr_idx[1:0] == 2'd3)) begin
              dc_pend   <= 1'b1;
              dc_cnt    <= '0;
              dc_chroma <= (arr_kind == K_CDC);
            end else begin
              dc_cnt <= dc_cnt + 4'd1;
            end
          end
          default: begin   // K_AC
            ibuf[32*ib_cnt[1:0] +: 32] <= mem_rdata;
            ib_cnt <= ac_after;
          end
        endcase
      end

      // start the Hadamard unit once a DC set is complete
      if (dc_pend) begin
        dc_pend  <= 1'b0;
        dc_ready <= 1'b1;
      end
      if (hadamard_done) begin
        if (dc_chroma) cdc_ok <= 1'b1;
        else           ldc_ok <= 1'b1;
      end

      // complete block -> output register
      if (move_now) begin
        blk       <= nblk;
        blk_valid <= 1'b1;
        ib_cnt    <= '0;
        nxt_blk   <= nxt_blk + 5'd1;
      end
    end
  end

endmodule
