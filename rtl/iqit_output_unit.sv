// Output memory access unit of the inverse transform & quantization core.
//
// Takes the inverse-transformed 4x4 block X (16 x 16-bit, the 256-bit
// register), removes the factor 64 of the pre-scaling by an arithmetic
// right shift of 6 and rounds: a non-negative sample is incremented when
// its 6 dropped bits are >= 32, a negative one when they are > 32 (round
// half away from zero). The 9-bit two's complement residual is split into
// an 8-bit value (bits 7:0) and a sign bit (bit 8).
//
// Writes, one 32-bit word per clock, four samples per word (row i of the
// block, column j in bits 8j+7:8j):
//  - luma block b (0..15, transmission order) to words 4b..4b+3,
//  - chroma block b (16..23: Cb then Cr) to words 0x40+4(b-16)..,
//  - after luma block 15: the 256 luma sign bits to words 0x60..0x67
//    (bit 16b+4i+j of the sign register), then after block 23 the 128
//    chroma sign bits to words 0x68..0x6B, and pulses done.
// A block is accepted (in_valid && in_ready) in the cycle before its first
// write; in_ready is also high during the last write of a block, so blocks
// stream at one per four cycles. in_ready is low while sign words are
// written. The word map is that of the 512-byte memory of the design; the
// placement of the sign bits in the two DC windows is this design's choice.
module iqit_output_unit #(
  parameter int XW = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [15:0][XW-1:0]     in_x,
  input  logic [4:0]              in_blk,
  // output memory write port
  output logic                    mem_en,
  output logic                    mem_we,
  output logic [h264_pkg::IQ_AW-1:0] mem_addr,
  output logic [31:0]             mem_wdata,
  output logic                    done
);
  import h264_pkg::*;

  typedef enum logic [1:0] {O_IDLE, O_WRITE, O_LSIGN, O_CSIGN} ostate_e;
  ostate_e state;

  logic [15:0][8:0] yreg;      // post-scaled, rounded samples
  logic [4:0]       blk;
  logic [1:0]       row;
  logic [2:0]       scnt;
  logic [255:0]     lsign;
  logic [127:0]     csign;
  logic [15:0][8:0] y_n;

  // post-scaling and rounding
  always_comb begin
    for (int e = 0; e < 16; e++) begin
      logic signed [XW-1:0] xv;
      logic signed [XW-1:0] q;
      xv = $signed(in_x[e]);
      q  = xv >>> 6;
      if (!xv[XW-1]) begin
        if (xv[5:0] >= 6'd32) q = q + 1'b1;
      end else begin
        if (xv[5:0] > 6'd32)  q = q + 1'b1;
      end
      y_n[e] = q[8:0];
    end
  end

  logic last_write;
  assign last_write = (state == O_WRITE) && (row == 2'd3)
                      && (blk != 5'd15) && (blk != 5'd23);
  assign in_ready   = (state == O_IDLE) || last_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= O_IDLE;
      yreg      <= '0;
      blk       <= '0;
      row       <= '0;
      scnt      <= '0;
      lsign     <= '0;
      csign     <= '0;
      mem_en    <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      done      <= 1'b0;
    end else begin
      mem_en <= 1'b0;
      mem_we <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        O_IDLE: ;
        O_WRITE: begin
          mem_en    <= 1'b1;
          mem_we    <= 1'b1;
          mem_addr  <= (blk < 5'd16) ? IQ_AW'({blk[3:0], row})
                                     : IQ_AW'(IQ_CHROMA_W + IQ_AW'({blk[2:0], row}));
          mem_wdata <= {yreg[4*row+3][7:0], yreg[4*row+2][7:0],
                        yreg[4*row+1][7:0], yreg[4*row][7:0]};
          for (int j = 0; j < 4; j++) begin
            if (blk < 5'd16) lsign[16*blk[3:0] + 4*row + j] <= yreg[4*row+j][8];
            else             csign[16*blk[2:0] + 4*row + j] <= yreg[4*row+j][8];
          end
          row <= row + 2'd1;
          if (row == 2'd3) begin
            scnt  <= '0;
            state <= (blk == 5'd15) ? O_LSIGN : (blk == 5'd23) ? O_CSIGN : O_IDLE;
          end
        end
        O_LSIGN: begin
          mem_en    <= 1'b1;
          mem_we    <= 1'b1;
          mem_addr  <= IQ_LDC_W + IQ_AW'(scnt);
          mem_wdata <= lsign[32*scnt +: 32];
          scnt      <= scnt + 3'd1;
          if (scnt == 3'd7) state <= O_IDLE;
        end
        O_CSIGN: begin
          mem_en    <= 1'b1;
          mem_we    <= 1'b1;
          mem_addr  <= IQ_CDC_W + IQ_AW'(scnt[1:0]);
          mem_wdata <= csign[32*scnt[1:0] +: 32];
          scnt      <= scnt + 3'd1;
          if (scnt == 3'd3) begin
            state <= O_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= O_IDLE;
      endcase

      if (in_valid && in_ready) begin
        yreg  <= y_n;
        blk   <= in_blk;
        row   <= '0;
        state <= O_WRITE;
      end
    end
  end

endmodule
