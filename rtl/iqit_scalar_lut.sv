// Scalar look-up table unit of the inverse quantizer.
//
// Gives the three combined scaling factors V1, V2, V3 for a QP in 0..51:
//   Vk = V(QP mod 6, class k) * 2^floor(QP/6)
// where V is the standard inverse-quantization scalar for the position
// classes (0,0)-type (V1), (1,1)-type (V2) and the other positions (V3).
// As in the described design the shift by floor(QP/6) is not done at run
// time: three 52-entry tables of 18-bit words are built at elaboration and
// indexed by the 6-bit QP. Purely combinational, no latency. A QP above 51
// reads zero.
module iqit_scalar_lut (
  input  logic [5:0]  qp,
  output logic [17:0] v1,
  output logic [17:0] v2,
  output logic [17:0] v3
);
  import h264_pkg::*;

  typedef logic [17:0] lut_t [64];

  function automatic lut_t build(input logic [1:0] cls);
    lut_t t;
    for (int q = 0; q < 64; q++) begin
      if (q < 52) t[q] = 18'(v_base(3'(q % 6), cls)) << (q / 6);
      else        t[q] = '0;
    end
    return t;
  endfunction

  localparam lut_t V1_LUT = build(2'd0);
  localparam lut_t V2_LUT = build(2'd1);
  localparam lut_t V3_LUT = build(2'd2);

  assign v1 = V1_LUT[qp];
  assign v2 = V2_LUT[qp];
  assign v3 = V3_LUT[qp];

endmodule
