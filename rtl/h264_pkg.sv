// Shared types, constants and standard tables of the low-power H.264 decoder
// building blocks: the inverse transform & quantization (IQIT) subsystem and
// the deblocking filter (DBF) subsystem.
//
// Holds:
//  - the word map of the 512-byte IQIT input/output memories (32-bit words),
//  - the inverse-quantization base scalars V of H.264 for QP%6 and the three
//    coefficient position classes,
//  - the deblocking threshold tables alpha, beta (indexed by QP) and tc0
//    (indexed by QP and bS),
//  - the per-edge access descriptor of the 2-D deblocking processing order,
//    with the 48-edge table (32 luma edges, 8 Cb edges, 8 Cr edges).
// Tables are taken from the H.264 standard values reproduced in the design
// description; the memory maps follow its tables, the sub-word packing is a
// choice of this design (see the modules that use them).
package h264_pkg;

  // ---------------------------------------------------------------------
  // IQIT memories: 128 words of 32 bits (512 bytes)
  // ---------------------------------------------------------------------
  localparam int IQ_AW = 7;
  localparam logic [IQ_AW-1:0] IQ_LUMA_W   = 7'h00;  // byte 0x000, 64 words
  localparam logic [IQ_AW-1:0] IQ_CHROMA_W = 7'h40;  // byte 0x100, 32 words
  localparam logic [IQ_AW-1:0] IQ_LDC_W    = 7'h60;  // byte 0x180, 8 words
  localparam logic [IQ_AW-1:0] IQ_CDC_W    = 7'h68;  // byte 0x1A0, 4 words
  localparam logic [IQ_AW-1:0] IQ_QP_W     = 7'h6C;  // byte 0x1B0
  localparam logic [IQ_AW-1:0] IQ_MODE_W   = 7'h70;  // byte 0x1C0

  // Width of DC coefficients inside the buffers (10 bit, valid for QP > 21)
  localparam int DCW = 10;

  // DC handling of a 4x4 block passed to inverse quantization
  typedef enum logic [1:0] {
    DC_NONE   = 2'd0,   // DC slot is an ordinary coefficient
    DC_LUMA   = 2'd1,   // DC slot holds a Hadamard output: scale by V1/4
    DC_CHROMA = 2'd2    // DC slot holds a Hadamard output: scale by V1/2
  } dc_mode_e;

  // One 4x4 coefficient block travelling from input buffering to
  // inverse quantization. c[4*i+j] is coefficient (row i, column j).
  typedef struct packed {
    logic signed [15:0][15:0] c;
    dc_mode_e                 dc_mode;
    logic                     chroma;   // 0: luma block, 1: chroma block
    logic [4:0]               blk;      // 0..15 luma, 16..23 chroma (Cb, Cr)
  } coef_blk_t;

  // V base values of H.264 (QP < 6) for position classes
  // 0: (0,0),(0,2),(2,0),(2,2)   1: (1,1),(1,3),(3,1),(3,3)   2: others
  function automatic logic [4:0] v_base(input logic [2:0] qm, input logic [1:0] cls);
    logic [4:0] v;
    unique case (qm)
      3'd0: v = (cls == 2'd0) ? 5'd10 : (cls == 2'd1) ? 5'd16 : 5'd13;
      3'd1: v = (cls == 2'd0) ? 5'd11 : (cls == 2'd1) ? 5'd18 : 5'd14;
      3'd2: v = (cls == 2'd0) ? 5'd13 : (cls == 2'd1) ? 5'd20 : 5'd16;
      3'd3: v = (cls == 2'd0) ? 5'd14 : (cls == 2'd1) ? 5'd23 : 5'd18;
      3'd4: v = (cls == 2'd0) ? 5'd16 : (cls == 2'd1) ? 5'd25 : 5'd20;
      default: v = (cls == 2'd0) ? 5'd18 : (cls == 2'd1) ? 5'd29 : 5'd23;
    endcase
    return v;
  endfunction

  // Luma 4x4 block index in transmission order -> raster position in the MB
  function automatic logic [1:0] blk_x(input logic [3:0] b);
    return {b[2], b[0]};
  endfunction
  function automatic logic [1:0] blk_y(input logic [3:0] b);
    return {b[3], b[1]};
  endfunction

  // ---------------------------------------------------------------------
  // Deblocking threshold tables (standard values, index = QP, offsets 0)
  // ---------------------------------------------------------------------
  function automatic logic [7:0] alpha_tab(input logic [5:0] idx);
    logic [7:0] a;
    unique case (idx)
      6'd16: a = 4;   6'd17: a = 4;   6'd18: a = 5;   6'd19: a = 6;
      6'd20: a = 7;   6'd21: a = 8;   6'd22: a = 9;   6'd23: a = 10;
      6'd24: a = 12;  6'd25: a = 13;  6'd26: a = 15;  6'd27: a = 17;
      6'd28: a = 20;  6'd29: a = 22;  6'd30: a = 25;  6'd31: a = 28;
      6'd32: a = 32;  6'd33: a = 36;  6'd34: a = 40;  6'd35: a = 45;
      6'd36: a = 50;  6'd37: a = 56;  6'd38: a = 63;  6'd39: a = 71;
      6'd40: a = 80;  6'd41: a = 90;  6'd42: a = 101; 6'd43: a = 113;
      6'd44: a = 127; 6'd45: a = 144; 6'd46: a = 162; 6'd47: a = 182;
      6'd48: a = 203; 6'd49: a = 226; 6'd50: a = 255; 6'd51: a = 255;
      default: a = 0;
    endcase
    return a;
  endfunction

  function automatic logic [4:0] beta_tab(input logic [5:0] idx);
    logic [4:0] b;
    unique case (idx)
      6'd16, 6'd17, 6'd18:          b = 2;
      6'd19, 6'd20, 6'd21, 6'd22:   b = 3;
      6'd23, 6'd24, 6'd25:          b = 4;
      6'd26, 6'd27:                 b = 6;
      6'd28, 6'd29:                 b = 7;
      6'd30, 6'd31:                 b = 8;
      6'd32, 6'd33:                 b = 9;
      6'd34, 6'd35:                 b = 10;
      6'd36, 6'd37:                 b = 11;
      6'd38, 6'd39:                 b = 12;
      6'd40, 6'd41:                 b = 13;
      6'd42, 6'd43:                 b = 14;
      6'd44, 6'd45:                 b = 15;
      6'd46, 6'd47:                 b = 16;
      6'd48, 6'd49:                 b = 17;
      6'd50, 6'd51:                 b = 18;
      default:                      b = 0;
    endcase
    return b;
  endfunction

  // tc0 for bS = 1, 2, 3 (0 for bS = 0 and unused for bS = 4)
  function automatic logic [4:0] tc0_tab(input logic [5:0] idx, input logic [2:0] bs);
    logic [4:0] t1, t2, t3;
    t1 = 0; t2 = 0; t3 = 0;
    unique case (idx)
      6'd17, 6'd18, 6'd19, 6'd20: begin t1 = 0; t2 = 0; t3 = 1; end
      6'd21, 6'd22:               begin t1 = 0; t2 = 1; t3 = 1; end
      6'd23, 6'd24, 6'd25, 6'd26: begin t1 = 1; t2 = 1; t3 = 1; end
      6'd27, 6'd28, 6'd29, 6'd30: begin t1 = 1; t2 = 1; t3 = 2; end
      6'd31, 6'd32:               begin t1 = 1; t2 = 2; t3 = 3; end
      6'd33:                      begin t1 = 2; t2 = 2; t3 = 3; end
      6'd34:                      begin t1 = 2; t2 = 2; t3 = 4; end
      6'd35:                      begin t1 = 2; t2 = 3; t3 = 4; end
      6'd36:                      begin t1 = 2; t2 = 3; t3 = 4; end
      6'd37:                      begin t1 = 3; t2 = 3; t3 = 5; end
      6'd38:                      begin t1 = 3; t2 = 4; t3 = 6; end
      6'd39:                      begin t1 = 3; t2 = 4; t3 = 6; end
      6'd40:                      begin t1 = 4; t2 = 5; t3 = 7; end
      6'd41:                      begin t1 = 4; t2 = 5; t3 = 8; end
      6'd42:                      begin t1 = 4; t2 = 6; t3 = 9; end
      6'd43:                      begin t1 = 5; t2 = 7; t3 = 10; end
      6'd44:                      begin t1 = 6; t2 = 8; t3 = 11; end
      6'd45:                      begin t1 = 6; t2 = 8; t3 = 13; end
      6'd46:                      begin t1 = 7; t2 = 10; t3 = 14; end
      6'd47:                      begin t1 = 8; t2 = 11; t3 = 16; end
      6'd48:                      begin t1 = 9; t2 = 12; t3 = 18; end
      6'd49:                      begin t1 = 10; t2 = 13; t3 = 20; end
      6'd50:                      begin t1 = 11; t2 = 15; t3 = 23; end
      6'd51:                      begin t1 = 13; t2 = 17; t3 = 25; end
      default:                    begin t1 = 0; t2 = 0; t3 = 0; end
    endcase
    unique case (bs)
      3'd1:    return t1;
      3'd2:    return t2;
      3'd3:    return t3;
      default: return 5'd0;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Deblocking 2-D processing order
  // ---------------------------------------------------------------------
  // Where a block comes from / goes to for one edge
  typedef enum logic [2:0] {
    LOC_EXT    = 3'd0,   // external (frame) memory
    LOC_DIRECT = 3'd1,   // filter result of the previous edge
    LOC_REG1   = 3'd2,
    LOC_REG2   = 3'd3,
    LOC_REG3   = 3'd4,
    LOC_REG4   = 3'd5,
    LOC_REG5   = 3'd6
  } loc_e;

  typedef enum logic [1:0] {PL_Y = 2'd0, PL_CB = 2'd1, PL_CR = 2'd2} plane_e;

  // Block positions are relative to the macroblock in 4x4-block units:
  // row/col -1 is the top/left neighbouring macroblock.
  typedef struct packed {
    plane_e            plane;
    logic              horiz;     // 0: vertical edge (left|right), 1: horizontal (top|bottom)
    logic signed [2:0] r1, c1;    // block 1 (p side: left or top)
    logic signed [2:0] r2, c2;    // block 2 (q side: right or bottom)
    loc_e              ld1, ld2;
    loc_e              st1, st2;
  } edge_desc_t;

  function automatic edge_desc_t mk_edge(plane_e pl, logic h,
                                         int r1, int c1, int r2, int c2,
                                         loc_e ld1, loc_e ld2, loc_e st1, loc_e st2);
    edge_desc_t d;
    d.plane = pl; d.horiz = h;
    d.r1 = 3'(r1); d.c1 = 3'(c1); d.r2 = 3'(r2); d.c2 = 3'(c2);
    d.ld1 = ld1; d.ld2 = ld2; d.st1 = st1; d.st2 = st2;
    return d;
  endfunction

  // Edge e = 0..47 of the processing order (edge numbers 1..48 of the
  // order's table). Luma block rows repeat an 8-edge pattern; the first row
  // loads its top neighbours from memory, the last row stores its blocks.
  function automatic edge_desc_t edge_desc(input logic [5:0] e);
    edge_desc_t d;
    int r, k;
    plane_e pl;
    if (e < 6'd32) begin
      r = int'(e[4:3]);
      k = int'(e[2:0]);
      unique case (k)
        0: d = mk_edge(PL_Y, 1'b0, r, -1, r, 0, LOC_EXT, LOC_EXT, LOC_EXT, LOC_DIRECT);
        1: d = mk_edge(PL_Y, 1'b0, r, 0, r, 1, LOC_DIRECT, LOC_EXT, LOC_DIRECT, LOC_REG1);
        2: d = mk_edge(PL_Y, 1'b1, r-1, 0, r, 0, (r == 0) ? LOC_EXT : LOC_REG2, LOC_DIRECT,
                       LOC_EXT, (r == 3) ? LOC_EXT : LOC_REG2);
        3: d = mk_edge(PL_Y, 1'b0, r, 1, r, 2, LOC_REG1, LOC_EXT, LOC_DIRECT, LOC_REG1);
        4: d = mk_edge(PL_Y, 1'b1, r-1, 1, r, 1, (r == 0) ? LOC_EXT : LOC_REG3, LOC_DIRECT,
                       LOC_EXT, (r == 3) ? LOC_EXT : LOC_REG3);
        5: d = mk_edge(PL_Y, 1'b0, r, 2, r, 3, LOC_REG1, LOC_EXT, LOC_DIRECT, LOC_REG1);
        6: d = mk_edge(PL_Y, 1'b1, r-1, 2, r, 2, (r == 0) ? LOC_EXT : LOC_REG4, LOC_DIRECT,
                       LOC_EXT, (r == 3) ? LOC_EXT : LOC_REG4);
        default: d = mk_edge(PL_Y, 1'b1, r-1, 3, r, 3, (r == 0) ? LOC_EXT : LOC_REG5, LOC_REG1,
                       LOC_EXT, (r == 3) ? LOC_EXT : LOC_REG5);
      endcase
    end else begin
      pl = (e < 6'd40) ? PL_CB : PL_CR;
      k  = int'(e[2:0]);
      unique case (k)
        0: d = mk_edge(pl, 1'b0, 0, -1, 0, 0, LOC_EXT, LOC_EXT, LOC_EXT, LOC_DIRECT);
        1: d = mk_edge(pl, 1'b0, 0, 0, 0, 1, LOC_DIRECT, LOC_EXT, LOC_DIRECT, LOC_REG1);
        2: d = mk_edge(pl, 1'b1, -1, 0, 0, 0, LOC_EXT, LOC_DIRECT, LOC_EXT, LOC_REG2);
        3: d = mk_edge(pl, 1'b1, -1, 1, 0, 1, LOC_EXT, LOC_REG1, LOC_EXT, LOC_REG1);
        4: d = mk_edge(pl, 1'b0, 1, -1, 1, 0, LOC_EXT, LOC_EXT, LOC_EXT, LOC_DIRECT);
        5: d = mk_edge(pl, 1'b0, 1, 0, 1, 1, LOC_DIRECT, LOC_EXT, LOC_DIRECT, LOC_REG3);
        6: d = mk_edge(pl, 1'b1, 0, 0, 1, 0, LOC_REG2, LOC_DIRECT, LOC_EXT, LOC_EXT);
        default: d = mk_edge(pl, 1'b1, 0, 1, 1, 1, LOC_REG1, LOC_REG3, LOC_EXT, LOC_EXT);
      endcase
    end
    return d;
  endfunction

  // ---------------------------------------------------------------------
  // Deblocking memories (48x48 picture = 3x3 macroblocks = 12x12 blocks)
  // ---------------------------------------------------------------------
  localparam int DB_MBW  = 3;              // macroblocks per row
  localparam int DB_MBH  = 3;              // macroblock rows
  localparam int DB_BW   = 4 * DB_MBW;     // luma 4x4 blocks per row
  localparam int DB_BH   = 4 * DB_MBH;
  // frame memory: one 32-bit word = one row of 4 pixels of a 4x4 block,
  // block-major; luma blocks in raster order, then Cb, then Cr
  localparam int FM_AW   = 10;
  localparam int FM_CB   = 4 * DB_BW * DB_BH;                   // 576
  localparam int FM_CR   = FM_CB + 4 * (DB_BW / 2) * (DB_BH / 2); // 720
  // parameter memory: 16 KB, 4096 words of 32 bits; word addresses of the
  // byte map (one byte per 4x4 block, raster order of the 12x12 blocks)
  localparam int PM_AW   = 12;
  localparam logic [PM_AW-1:0] PM_MVX_W   = 12'h000;  // byte 0x0000 MV x (quarter samples)
  localparam logic [PM_AW-1:0] PM_MVY_W   = 12'h040;  // byte 0x0100 MV y
  localparam logic [PM_AW-1:0] PM_INTRA_W = 12'h080;  // byte 0x0200 intra flag
  localparam logic [PM_AW-1:0] PM_QP_W    = 12'h0C0;  // byte 0x0300 QP, one word per MB
  localparam logic [PM_AW-1:0] PM_COEF_W  = 12'h800;  // byte 0x2000 coefficients, 48x48 bytes
  // bS memory: one 12-bit word (4 x 3-bit bS) per 4-block group and direction
  localparam int BS_AW   = 7;

  typedef logic [15:0][7:0] pblk_t;        // 4x4 pixels, element 4*row+col

endpackage
