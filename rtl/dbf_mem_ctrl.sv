// Memory controllers of the deblocking filter: a read-port controller and a
// write-port controller that move 4x4 pixel blocks (128 bits) between the
// filter and the 32-bit frame memory.
//
// A block is four consecutive words (one row of four pixels each, pixel j
// of a row in bits 8j+7:8j), starting at a word address given by the
// dataflow control.
// Read: rd_start with rd_addr/rd_tag is taken when rd_ready; the first word
//   address goes out in the same clock, the other three in the next three
//   clocks, and the whole block appears on rd_blk with rd_valid (and the tag)
//   in the fourth clock after the first address. rd_ready is also high in
//   the clock of the last address; a command taken then sends its first
//   address in the next clock, so back-to-back blocks cost four clocks each.
// Write: wr_start with wr_addr/wr_blk is taken when wr_ready; the four words
//   are written in the four following clocks without making the dataflow
//   control wait; wr_ready is high when idle and in the last write clock.
// The frame memory has one synchronous read port (one clock latency) and
// one write port, as the dual-port memory of the described design.
module dbf_mem_ctrl (
  input  logic                        clk,
  input  logic                        rst_n,
  // read-port controller
  input  logic                        rd_start,
  input  logic [h264_pkg::FM_AW-1:0]  rd_addr,
  input  logic                        rd_tag,
  output logic                        rd_ready,
  output logic                        rd_valid,
  output logic                        rd_tag_out,
  output h264_pkg::pblk_t             rd_blk,
  // write-port controller
  input  logic                        wr_start,
  input  logic [h264_pkg::FM_AW-1:0]  wr_addr,
  input  h264_pkg::pblk_t             wr_blk,
  output logic                        wr_ready,
  output logic                        idle,
  // frame memory read port
  output logic                        mr_en,
  output logic [h264_pkg::FM_AW-1:0]  mr_addr,
  input  logic [31:0]                 mr_rdata,
  // frame memory write port
  output logic                        mw_en,
  output logic [h264_pkg::FM_AW-1:0]  mw_addr,
  output logic [31:0]                 mw_wdata
);
  import h264_pkg::*;

  // ---------------- read-port controller ----------------
  logic             r_act;
  logic [FM_AW-1:0] r_base;
  logic [1:0]       r_cnt;
  logic             r_tag;
  logic             ret_v, ret_tag;
  logic [1:0]       ret_row;
  logic [95:0]      r_buf;
  logic             r_take;

  assign rd_ready = !r_act || (r_cnt == 2'd3);
  assign r_take   = rd_start && rd_ready;

  always_comb begin
    mr_en   = 1'b0;
    mr_addr = '0;
    if (r_act) begin
      mr_en   = 1'b1;
      mr_addr = r_base + FM_AW'(r_cnt);
    end else if (r_take) begin
      mr_en   = 1'b1;
      mr_addr = rd_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act   <= 1'b0;
      r_base  <= '0;
      r_cnt   <= '0;
      r_tag   <= 1'b0;
      ret_v   <= 1'b0;
      ret_tag <= 1'b0;
      ret_row <= '0;
      r_buf   <= '0;
    end else begin
      ret_v   <= mr_en;
      ret_row <= r_act ? r_cnt : 2'd0;
      ret_tag <= r_act ? r_tag : rd_tag;
      if (ret_v && ret_row != 2'd3) r_buf[32*ret_row +: 32] <= mr_rdata;
      if (r_act) begin
        r_cnt <= r_cnt + 2'd1;
        if (r_cnt == 2'd3) r_act <= 1'b0;
      end
      if (r_take) begin
        if (r_act) begin
          // command taken in the last-address clock: starts next clock
          r_act  <= 1'b1;
          r_cnt  <= 2'd0;
        end else begin
          r_act  <= 1'b1;
          r_cnt  <= 2'd1;
        end
        r_base <= rd_addr;
        r_tag  <= rd_tag;
      end
    end
  end

  assign rd_valid   = ret_v && (ret_row == 2'd3);
  assign rd_tag_out = ret_tag;
  assign rd_blk     = {mr_rdata, r_buf};

  // ---------------- write-port controller ----------------
  logic             w_act;
  logic [FM_AW-1:0] w_base;
  logic [1:0]       w_cnt;
  pblk_t            w_blk;

  assign wr_ready = !w_act || (w_cnt == 2'd3);
  assign mw_en    = w_act;
  assign mw_addr  = w_base + FM_AW'(w_cnt);
  assign mw_wdata = w_blk[4*w_cnt +: 4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_act  <= 1'b0;
      w_base <= '0;
      w_cnt  <= '0;
      w_blk  <= '0;
    end else begin
      if (w_act) begin
        w_cnt <= w_cnt + 2'd1;
        if (w_cnt == 2'd3) w_act <= 1'b0;
      end
      if (wr_start && wr_ready) begin
        w_act  <= 1'b1;
        w_cnt  <= 2'd0;
        w_base <= wr_addr;
        w_blk  <= wr_blk;
      end
    end
  end

  assign idle = !r_act && !w_act && !ret_v;

endmodule
