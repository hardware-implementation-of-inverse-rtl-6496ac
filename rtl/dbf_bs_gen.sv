// Boundary strength (bS) generator of the deblocking filter.
//
// After go, computes the bS of every vertical (left) and horizontal (top)
// edge of every 4x4 luma block of the 48x48 picture from the parameter
// memory and stores them in the bS memory; done pulses when all are stored.
// Per block the parameter memory holds one byte each of motion vector x,
// motion vector y (quarter samples, signed), intra flag (non-zero: intra
// macroblock) and the 16 coefficient bytes at the block's pixel positions.
// bS rules (the table of the design): P or Q intra and a macroblock edge 4,
// P or Q intra 3, P or Q with coded coefficients 2, motion vectors differing
// by one luma sample (4 quarter samples) or more in x or y 1, else 0; edges
// on the picture border get 0 (they are not filtered). A single reference
// picture is assumed, so reference indices are not compared.
//
// Two state machines, as described: the reader works on one group of four
// horizontally adjacent blocks per step (19 reads of 32-bit words: MV x,
// MV y, intra flags, then 4 rows x 4 coefficient words) and determines
// their 4 vertical and 4 horizontal edges; the writer stores the two 12-bit
// bS words of a group (4 x 3 bits, block w in bits 3w+2:3w) at bS memory
// address 2*group (vertical) and 2*group+1 (horizontal) while the reader
// already reads the next group. group = block_row*3 + block_col/4.
// The previous block row's parameters are kept in a 12-entry line buffer,
// so every parameter word is read once.
module dbf_bs_gen (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        go,
  output logic                        done,
  output logic                        busy,
  // parameter memory read port (1 clock latency)
  output logic                        pm_en,
  output logic [h264_pkg::PM_AW-1:0]  pm_addr,
  input  logic [31:0]                 pm_rdata,
  // bS memory write port
  output logic                        bs_we,
  output logic [h264_pkg::BS_AW-1:0]  bs_addr,
  output logic [11:0]                 bs_wdata
);
  import h264_pkg::*;

  typedef struct packed {
    logic signed [7:0] mvx;
    logic signed [7:0] mvy;
    logic              intra;
    logic              coded;
  } bpar_t;

  typedef enum logic [1:0] {B_IDLE, B_READ, B_CALC, B_FLUSH} bstate_e;
  bstate_e state;

  logic [3:0]       by;         // block row 0..11
  logic [1:0]       g;          // group in the row 0..2
  logic [4:0]       cnt;        // read counter 0..19
  logic             ret_v;
  logic [4:0]       ret_i;
  bpar_t [3:0]      cur;
  bpar_t [DB_BW-1:0] above;
  bpar_t            left;

  // writer
  logic             w_busy, w_second;
  logic [5:0]       w_group;
  logic [11:0]      w_v, w_h;

  function automatic logic [2:0] bs_calc(bpar_t p, bpar_t q, logic mb_edge);
    logic [8:0] dx, dy;
    dx = (p.mvx > q.mvx) ? 9'(p.mvx - q.mvx) : 9'(q.mvx - p.mvx);
    dy = (p.mvy > q.mvy) ? 9'(p.mvy - q.mvy) : 9'(q.mvy - p.mvy);
    if (p.intra || q.intra)   return mb_edge ? 3'd4 : 3'd3;
    if (p.coded || q.coded)   return 3'd2;
    if (dx >= 9'd4 || dy >= 9'd4) return 3'd1;
    return 3'd0;
  endfunction

  // read addresses
  logic [PM_AW-1:0] grp_w;
  assign grp_w = PM_AW'(by) * PM_AW'(3) + PM_AW'(g);
  always_comb begin
    logic [4:0] c;
    c       = cnt - 5'd3;
    pm_en   = (state == B_READ) && (cnt < 5'd19);
    unique case (cnt)
      5'd0:    pm_addr = PM_MVX_W + grp_w;
      5'd1:    pm_addr = PM_MVY_W + grp_w;
      5'd2:    pm_addr = PM_INTRA_W + grp_w;
      default: pm_addr = PM_COEF_W + (PM_AW'({by, c[3:2]}) * PM_AW'(12))
                         + PM_AW'({g, 2'b00}) + PM_AW'(c[1:0]);
    endcase
  end

  // bS of the current group
  logic [11:0] v_n, h_n;
  always_comb begin
    for (int w = 0; w < 4; w++) begin
      bpar_t pv;
      pv = (w == 0) ? left : cur[w-1];
      v_n[3*w +: 3] = (w == 0 && g == 2'd0) ? 3'd0 : bs_calc(pv, cur[w], w == 0);
      h_n[3*w +: 3] = (by == 4'd0) ? 3'd0
                      : bs_calc(above[4*g + w], cur[w], by[1:0] == 2'd0);
    end
  end

  assign busy = (state != B_IDLE) || w_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= B_IDLE;
      by       <= '0;
      g        <= '0;
      cnt      <= '0;
      ret_v    <= 1'b0;
      ret_i    <= '0;
      cur      <= '0;
      above    <= '0;
      left     <= '0;
      w_busy   <= 1'b0;
      w_second <= 1'b0;
      w_group  <= '0;
      w_v      <= '0;
      w_h      <= '0;
      done     <= 1'b0;
    end else begin
      done  <= 1'b0;
      ret_v <= pm_en;
      ret_i <= cnt;
      // loader
      if (ret_v) begin
        unique case (ret_i)
          5'd0: for (int w = 0; w < 4; w++) cur[w].mvx   <= pm_rdata[8*w +: 8];
          5'd1: for (int w = 0; w < 4; w++) cur[w].mvy   <= pm_rdata[8*w +: 8];
          5'd2: for (int w = 0; w < 4; w++) cur[w].intra <= (pm_rdata[8*w +: 8] != 8'd0);
          default: begin
            logic [4:0] c;
            c = ret_i - 5'd3;
            if (pm_rdata != 32'd0) cur[c[1:0]].coded <= 1'b1;
          end
        endcase
      end
      // reader
      unique case (state)
        B_IDLE: if (go) begin
          state <= B_READ;
          by    <= '0;
          g     <= '0;
          cnt   <= '0;
          for (int w = 0; w < 4; w++) cur[w].coded <= 1'b0;
        end
        B_READ: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd19) state <= B_CALC;
        end
        B_CALC: if (!w_busy) begin
          w_busy   <= 1'b1;
          w_second <= 1'b0;
          w_group  <= 6'(by * 4'd3) + 6'(g);
          w_v      <= v_n;
          w_h      <= h_n;
          for (int w = 0; w < 4; w++) begin
            above[4*g + w] <= cur[w];
            cur[w].coded   <= 1'b0;
          end
          left <= cur[3];
          cnt  <= '0;
          if (g == 2'd2) begin
            g <= '0;
            if (by == 4'(DB_BH - 1)) state <= B_FLUSH;
            else begin by <= by + 4'd1; state <= B_READ; end
          end else begin
            g <= g + 2'd1;
            state <= B_READ;
          end
        end
        B_FLUSH: if (!w_busy) begin
          state <= B_IDLE;
          done  <= 1'b1;
        end
        default: state <= B_IDLE;
      endcase
      // writer
      if (w_busy) begin
        w_second <= 1'b1;
        if (w_second) w_busy <= 1'b0;
      end
    end
  end

  assign bs_we    = w_busy;
  assign bs_addr  = BS_AW'({w_group, w_second});
  assign bs_wdata = w_second ? w_h : w_v;

endmodule
