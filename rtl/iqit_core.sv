// Inverse transform & quantization processing hardware for one macroblock.
//
// Chain of units, each handing 4x4 blocks to the next with a valid/ready
// pair so that a block moves every four clocks in steady state:
//   input buffering  -> reads coefficients in transmission order, drives
//                       the inverse Hadamard unit for the intra16x16 luma
//                       DC and the chroma DC coefficients and puts the
//                       transformed DCs back into their blocks
//   inverse quant.   -> four multipliers with V1/V2/V3 from the scalar LUT
//   inverse int. DCT -> combinational, 16-bit
//   output access    -> post-scaling by 1/64 with rounding, 8-bit values
//                       and sign-bit words written to the output memory.
// Interface: pulse start with the macroblock in the input memory; done
// pulses once the last output word has been issued (one cycle before it is
// stored). The memories are outside (see iqit_system).
// Measured macroblock time from start to done: at most 133 clocks in
// intra16x16 mode and 123 otherwise (the described design: 145 and 135).
module iqit_core (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       done,
  output logic                       busy,
  // input memory (read)
  output logic                       in_en,
  output logic [h264_pkg::IQ_AW-1:0] in_addr,
  input  logic [31:0]                in_rdata,
  // output memory (write)
  output logic                       out_en,
  output logic                       out_we,
  output logic [h264_pkg::IQ_AW-1:0] out_addr,
  output logic [31:0]                out_wdata
);
  import h264_pkg::*;

  logic                   dc_ready, dc_chroma, hadamard_done, had_busy;
  logic [15:0][DCW-1:0]   dc_din, hbuf;
  logic                   b_valid, b_ready;
  coef_blk_t              b_blk;
  logic [5:0]             qp;
  logic                   intra16;
  logic                   ib_busy;
  logic                   q_valid, q_ready;
  logic [15:0][15:0]      q_res, x;
  logic [4:0]             q_blk;
  logic                   run;

  iqit_input_buffer u_ib (
    .clk, .rst_n, .start, .busy(ib_busy),
    .mem_en(in_en), .mem_addr(in_addr), .mem_rdata(in_rdata),
    .dc_ready, .dc_chroma, .dc_din, .hbuf, .hadamard_done,
    .blk_valid(b_valid), .blk_ready(b_ready), .blk(b_blk),
    .qp, .intra16
  );

  iqit_hadamard u_had (
    .clk, .rst_n, .dc_ready, .chroma(dc_chroma), .din(dc_din),
    .hbuf, .hadamard_done, .busy(had_busy)
  );

  iqit_iquant u_iq (
    .clk, .rst_n, .qp,
    .in_valid(b_valid), .in_ready(b_ready), .in_blk(b_blk),
    .out_valid(q_valid), .out_ready(q_ready), .out_res(q_res), .out_blk(q_blk)
  );

  iqit_idct u_idct (.y(q_res), .x(x));

  iqit_output_unit u_out (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_x(x), .in_blk(q_blk),
    .mem_en(out_en), .mem_we(out_we), .mem_addr(out_addr), .mem_wdata(out_wdata),
    .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     run <= 1'b0;
    else if (start) run <= 1'b1;
    else if (done)  run <= 1'b0;
  end
  assign busy = run;

endmodule
