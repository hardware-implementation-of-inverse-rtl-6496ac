// Top level: the two hardware accelerators of the low-power H.264 decoder
// side by side, the inverse transform & quantization subsystem (IQIT) and
// the deblocking filter subsystem (DBF).
//
// In the described prototype both sit on the bus of an embedded processor
// that runs the rest of the decoder and exchanges data with a PC over a
// serial link; that processor, the link and the external picture SRAM are
// not part of this design, so their connections appear here as plain
// ports: each accelerator's start/done/busy and the host ports of its
// memories, in the processor's place.
//   iq_*  : one macroblock per start (see iqit_system for the word map)
//   db_*  : one 48x48 picture per start (see dbf_system for the maps)
// The two subsystems are independent and may run at the same time.
module h264_lp_top (
  input  logic                       clk,
  input  logic                       rst_n,
  // IQIT control and host memory ports
  input  logic                       iq_start,
  output logic                       iq_done,
  output logic                       iq_busy,
  input  logic                       iq_in_en,
  input  logic                       iq_in_we,
  input  logic [h264_pkg::IQ_AW-1:0] iq_in_addr,
  input  logic [31:0]                iq_in_wdata,
  output logic [31:0]                iq_in_rdata,
  input  logic                       iq_out_en,
  input  logic [h264_pkg::IQ_AW-1:0] iq_out_addr,
  output logic [31:0]                iq_out_rdata,
  // DBF control and host memory ports
  input  logic                       db_start,
  output logic                       db_done,
  output logic                       db_busy,
  input  logic                       db_pm_en,
  input  logic                       db_pm_we,
  input  logic [h264_pkg::PM_AW-1:0] db_pm_addr,
  input  logic [31:0]                db_pm_wdata,
  output logic [31:0]                db_pm_rdata,
  input  logic                       db_fm_en,
  input  logic                       db_fm_we,
  input  logic [h264_pkg::FM_AW-1:0] db_fm_addr,
  input  logic [31:0]                db_fm_wdata,
  output logic [31:0]                db_fm_rdata
);

  iqit_system u_iqit (
    .clk, .rst_n, .start(iq_start), .done(iq_done), .busy(iq_busy),
    .hin_en(iq_in_en), .hin_we(iq_in_we), .hin_addr(iq_in_addr),
    .hin_wdata(iq_in_wdata), .hin_rdata(iq_in_rdata),
    .hout_en(iq_out_en), .hout_addr(iq_out_addr), .hout_rdata(iq_out_rdata)
  );

  dbf_system u_dbf (
    .clk, .rst_n, .start(db_start), .done(db_done), .busy(db_busy),
    .hp_en(db_pm_en), .hp_we(db_pm_we), .hp_addr(db_pm_addr),
    .hp_wdata(db_pm_wdata), .hp_rdata(db_pm_rdata),
    .hf_en(db_fm_en), .hf_we(db_fm_we), .hf_addr(db_fm_addr),
    .hf_wdata(db_fm_wdata), .hf_rdata(db_fm_rdata)
  );

endmodule
