// Inverse transform & quantization subsystem: processing core plus its two
// 512-byte dual-port memories.
//
// The host (an embedded processor in the described prototype) writes one
// macroblock of quantized coefficients, QP and prediction mode into the
// input memory through port A, pulses start, waits for done and reads the
// residual samples from the output memory through its port A. The core uses
// port B of both memories. Word map of the input memory (32-bit words):
//   0x00-0x3F luma blocks 0..15 (4 words each, one 8-bit coefficient per byte)
//   0x40-0x5F chroma blocks (Cb 0..3, Cr 0..3)
//   0x60-0x67 luma DC coefficients (16-bit, two per word)
//   0x68-0x6B chroma DC coefficients (16-bit, two per word, Cb then Cr)
//   0x6C      QP (bits 5:0)            0x70 prediction mode (non-zero: intra16x16)
// The output memory has 8-bit residual values in the block windows and the
// sign bits in the two DC windows (see iqit_output_unit).
module iqit_system (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       done,
  output logic                       busy,
  // host port of the input memory
  input  logic                       hin_en,
  input  logic                       hin_we,
  input  logic [h264_pkg::IQ_AW-1:0] hin_addr,
  input  logic [31:0]                hin_wdata,
  output logic [31:0]                hin_rdata,
  // host port of the output memory
  input  logic                       hout_en,
  input  logic [h264_pkg::IQ_AW-1:0] hout_addr,
  output logic [31:0]                hout_rdata
);
  import h264_pkg::*;

  logic             in_en, out_en, out_we;
  logic [IQ_AW-1:0] in_addr, out_addr;
  logic [31:0]      in_rdata, out_wdata, out_rdata_unused;

  dp_ram #(.DW(32), .DEPTH(128)) u_in_mem (
    .clk,
    .a_en(hin_en), .a_we(hin_we), .a_addr(hin_addr), .a_wdata(hin_wdata), .a_rdata(hin_rdata),
    .b_en(in_en), .b_we(1'b0), .b_addr(in_addr), .b_wdata(32'd0), .b_rdata(in_rdata)
  );

  dp_ram #(.DW(32), .DEPTH(128)) u_out_mem (
    .clk,
    .a_en(hout_en), .a_we(1'b0), .a_addr(hout_addr), .a_wdata(32'd0), .a_rdata(hout_rdata),
    .b_en(out_en), .b_we(out_we), .b_addr(out_addr), .b_wdata(out_wdata), .b_rdata(out_rdata_unused)
  );

  iqit_core u_core (
    .clk, .rst_n, .start, .done, .busy,
    .in_en, .in_addr, .in_rdata,
    .out_en, .out_we, .out_addr, .out_wdata
  );

endmodule
