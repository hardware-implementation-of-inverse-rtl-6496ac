// Threshold look-up table of the deblocking filter.
//
// Combinational: from the quantization parameter (used directly as the
// table index, no filter offsets) and the boundary strength it gives the
// edge thresholds alpha and beta and the clipping value tc0 of the H.264
// tables reproduced in the design description (alpha/beta by index,
// tc0 by index and bS 1..3; tc0 is 0 for bS 0 and not used for bS 4).
module dbf_thresh_lut (
  input  logic [5:0] qp,
  input  logic [2:0] bs,
  output logic [7:0] alpha,
  output logic [4:0] beta,
  output logic [4:0] tc0
);
  import h264_pkg::*;

  always_comb begin
    alpha = alpha_tab(qp);
    beta  = beta_tab(qp);
    tc0   = tc0_tab(qp, bs);
  end

endmodule
