// Inverse Hadamard transform unit.
//
// Transforms the quantized DC coefficients of a macroblock:
//  - luma (intra16x16 mode): W = H * Z * H, H the 4x4 matrix
//    [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1],
//  - chroma: W = [1 1; 1 -1] * Z * [1 1; 1 -1] on the 2x2 Cb block and
//    the 2x2 Cr block, both at once.
// The product is split in two matrix products done in two clock cycles with
// parallel adder structures: the first (H*Z) is stored in 16 registers, the
// second (.*H) is stored in the 160-bit hadamard_buffer (16 entries).
// All registers are DCW bits wide (10 bits by default), which is enough for
// the coefficient range of QP > 21; wider values wrap.
//
// Interface: din entry 4*i+j is Z(i,j). In chroma mode entries 0..3 are
// Cb Z(0,0), Z(0,1), Z(1,0), Z(1,1) and entries 4..7 the same for Cr.
// dc_ready starts a transform, the chroma flag selecting the 2x2 mode.
// hadamard_done pulses for one cycle two clocks after dc_ready, when hbuf
// holds the result (chroma: entries 0..7; entries 8..15 are cleared).
// dc_ready is ignored while busy.
module iqit_hadamard #(
  parameter int W = h264_pkg::DCW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        dc_ready,
  input  logic                        chroma,
  input  logic [15:0][W-1:0]          din,
  output logic [15:0][W-1:0]          hbuf,
  output logic                        hadamard_done,
  output logic                        busy
);

  typedef enum logic {H_IDLE, H_COLS} hstate_e;
  hstate_e state;
  logic    is_chroma;
  logic signed [15:0][W-1:0] st1;     // first product
  logic signed [15:0][W-1:0] st1_n;
  logic signed [15:0][W-1:0] st2_n;

  assign busy = (state != H_IDLE);

  // The four row vectors of H (+1/-1 pattern)
  function automatic logic signed [W-1:0] hvec(input int row,
                                               input logic signed [W-1:0] a,
                                               input logic signed [W-1:0] b,
                                               input logic signed [W-1:0] c,
                                               input logic signed [W-1:0] d);
    unique case (row)
      0:       return a + b + c + d;
      1:       return a + b - c - d;
      2:       return a - b - c + d;
      default: return a - b + c - d;
    endcase
  endfunction

  // (3.50): st1(i,k) = sum_j H(i,j) Z(j,k)
  always_comb begin
    st1_n = '0;
    if (!chroma) begin
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 4; k++)
          st1_n[4*i+k] = hvec(i, din[k], din[4+k], din[8+k], din[12+k]);
    end else begin
      for (int c = 0; c < 2; c++) begin
        st1_n[4*c+0] = din[4*c+0] + din[4*c+2];
        st1_n[4*c+1] = din[4*c+1] + din[4*c+3];
        st1_n[4*c+2] = din[4*c+0] - din[4*c+2];
        st1_n[4*c+3] = din[4*c+1] - din[4*c+3];
      end
    end
  end

  // (3.51): W(i,k) = sum_j st1(i,j) H(k,j)
  always_comb begin
    st2_n = '0;
    if (!is_chroma) begin
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 4; k++)
          st2_n[4*i+k] = hvec(k, st1[4*i], st1[4*i+1], st1[4*i+2], st1[4*i+3]);
    end else begin
      for (int c = 0; c < 2; c++) begin
        st2_n[4*c+0] = st1[4*c+0] + st1[4*c+1];
        st2_n[4*c+1] = st1[4*c+0] - st1[4*c+1];
        st2_n[4*c+2] = st1[4*c+2] + st1[4*c+3];
        st2_n[4*c+3] = st1[4*c+2] - st1[4*c+3];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= H_IDLE;
      is_chroma     <= 1'b0;
      st1           <= '0;
      hbuf          <= '0;
      hadamard_done <= 1'b0;
    end else begin
      hadamard_done <= 1'b0;
      unique case (state)
        H_IDLE: if (dc_ready) begin
          is_chroma <= chroma;
          st1       <= st1_n;
          state     <= H_COLS;
        end
        H_COLS: begin
          hbuf          <= st2_n;
          hadamard_done <= 1'b1;
          state         <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
