// Deblocking filter subsystem for a 48x48 picture (3x3 macroblocks, 4:2:0).
//
// Holds the parameter memory (16 KB), the bS memory and the frame memory
// (on-chip here, 1024 x 32-bit words; 864 are used by the picture) with the
// boundary strength generator, the dataflow control, the memory
// controllers and the filtering unit.
// Operation: the host fills the parameter memory (port hp_*) and the frame
// memory (port hf_*, only while busy is low) and pulses start. The bS
// generator first determines every bS of the picture (go command); when it
// is done the dataflow control filters all macroblocks in place; done
// pulses when the last filtered block is in the frame memory.
// Frame memory layout: luma 4x4 block (by,bx) of the 12x12 block grid at
// words 4*(12*by+bx)+row; Cb block (cy,cx) of 6x6 at 576+4*(6*cy+cx)+row,
// Cr at 720+...; pixel j of a row in bits 8j+7:8j. The parameter memory
// map follows the design's table (see h264_pkg), with the per-macroblock
// QP added at byte 0x300.
module dbf_system (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        done,
  output logic                        busy,
  // host port of the parameter memory
  input  logic                        hp_en,
  input  logic                        hp_we,
  input  logic [h264_pkg::PM_AW-1:0]  hp_addr,
  input  logic [31:0]                 hp_wdata,
  output logic [31:0]                 hp_rdata,
  // host port of the frame memory (only while busy is low)
  input  logic                        hf_en,
  input  logic                        hf_we,
  input  logic [h264_pkg::FM_AW-1:0]  hf_addr,
  input  logic [31:0]                 hf_wdata,
  output logic [31:0]                 hf_rdata
);
  import h264_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_BS, S_FILTER} sstate_e;
  sstate_e state;

  // bS generator
  logic              bs_go, bs_done, bs_busy;
  logic              g_pm_en, g_bs_we;
  logic [PM_AW-1:0]  g_pm_addr;
  logic [BS_AW-1:0]  g_bs_addr;
  logic [11:0]       g_bs_wdata;
  // dataflow
  logic              df_start, df_done, df_busy;
  logic              d_pm_en, d_bs_en;
  logic [PM_AW-1:0]  d_pm_addr;
  logic [BS_AW-1:0]  d_bs_addr;
  logic [11:0]       d_bs_rdata, bs_a_unused;
  logic [31:0]       pm_rdata;
  // memory controllers
  logic              rd_start, rd_tag, rd_ready, rd_valid, rd_tag_out;
  logic              wr_start, wr_ready, mc_idle;
  logic [FM_AW-1:0]  rd_addr, wr_addr;
  pblk_t             rd_blk, wr_blk;
  logic              mr_en, mw_en;
  logic [FM_AW-1:0]  mr_addr, mw_addr;
  logic [31:0]       mr_rdata, mw_wdata, fm_b_unused;
  // filtering unit
  pblk_t             f_p, f_q, f_out_p, f_out_q;
  logic              f_transpose, f_chroma;
  logic [5:0]        f_qp;
  logic [3:0][2:0]   f_bs;
  logic [3:0]        f_lines;

  dp_ram #(.DW(32), .DEPTH(4096)) u_param_mem (
    .clk,
    .a_en(hp_en), .a_we(hp_we), .a_addr(hp_addr), .a_wdata(hp_wdata), .a_rdata(hp_rdata),
    .b_en(g_pm_en || d_pm_en), .b_we(1'b0), .b_addr(bs_busy ? g_pm_addr : d_pm_addr),
    .b_wdata(32'd0), .b_rdata(pm_rdata)
  );

  dp_ram #(.DW(12), .DEPTH(128)) u_bs_mem (
    .clk,
    .a_en(g_bs_we), .a_we(g_bs_we), .a_addr(g_bs_addr), .a_wdata(g_bs_wdata), .a_rdata(bs_a_unused),
    .b_en(d_bs_en), .b_we(1'b0), .b_addr(d_bs_addr), .b_wdata(12'd0), .b_rdata(d_bs_rdata)
  );

  // frame memory: port A read controller (host when idle), port B write controller
  dp_ram #(.DW(32), .DEPTH(1024)) u_frame_mem (
    .clk,
    .a_en(busy ? mr_en : hf_en), .a_we(busy ? 1'b0 : hf_we),
    .a_addr(busy ? mr_addr : hf_addr), .a_wdata(hf_wdata), .a_rdata(mr_rdata),
    .b_en(mw_en), .b_we(mw_en), .b_addr(mw_addr), .b_wdata(mw_wdata), .b_rdata(fm_b_unused)
  );
  assign hf_rdata = mr_rdata;

  dbf_bs_gen u_bs_gen (
    .clk, .rst_n, .go(bs_go), .done(bs_done), .busy(bs_busy),
    .pm_en(g_pm_en), .pm_addr(g_pm_addr), .pm_rdata,
    .bs_we(g_bs_we), .bs_addr(g_bs_addr), .bs_wdata(g_bs_wdata)
  );

  dbf_dataflow u_dataflow (
    .clk, .rst_n, .start(df_start), .done(df_done), .busy(df_busy),
    .pm_en(d_pm_en), .pm_addr(d_pm_addr), .pm_rdata,
    .bs_en(d_bs_en), .bs_addr(d_bs_addr), .bs_rdata(d_bs_rdata),
    .rd_start, .rd_addr, .rd_tag, .rd_ready, .rd_valid, .rd_tag_out, .rd_blk,
    .wr_start, .wr_addr, .wr_blk, .wr_ready, .mc_idle,
    .f_p, .f_q, .f_transpose, .f_chroma, .f_qp, .f_bs, .f_out_p, .f_out_q
  );

  dbf_mem_ctrl u_mem_ctrl (
    .clk, .rst_n,
    .rd_start, .rd_addr, .rd_tag, .rd_ready, .rd_valid, .rd_tag_out, .rd_blk,
    .wr_start, .wr_addr, .wr_blk, .wr_ready, .idle(mc_idle),
    .mr_en, .mr_addr, .mr_rdata, .mw_en, .mw_addr, .mw_wdata
  );

  dbf_filter_unit u_filter (
    .blk_p(f_p), .blk_q(f_q), .transpose(f_transpose), .chroma(f_chroma),
    .qp(f_qp), .bs(f_bs), .out_p(f_out_p), .out_q(f_out_q), .line_filtered(f_lines)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      bs_go    <= 1'b0;
      df_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      bs_go    <= 1'b0;
      df_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE:   if (start)   begin bs_go <= 1'b1; state <= S_BS; end
        S_BS:     if (bs_done) begin df_start <= 1'b1; state <= S_FILTER; end
        S_FILTER: if (df_done) begin done <= 1'b1; state <= S_IDLE; end
        default:  state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state != S_IDLE);

endmodule
