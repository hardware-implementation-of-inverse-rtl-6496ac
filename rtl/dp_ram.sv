// Dual-port on-chip RAM.
//
// The block-RAM style memory used for every on-chip store of the design:
// the IQIT input and output memories (one port for the host, one for the
// processing hardware), the deblocking parameter memory, the bS memory and
// the deblocking frame memory (one read port, one write port).
//
// Both ports are synchronous: a read returns the word one clock after the
// address is presented with en=1; a write stores on the clock edge where
// en=1 and we=1 (the read data of that port then shows the old word).
// When both ports write the same address in the same cycle, port B wins.
// Contents start at zero. Width and depth are parameters; the defaults are
// those of the 512-byte IQIT memories with 32-bit access described for the
// design.
module dp_ram #(
  parameter int DW    = 32,
  parameter int DEPTH = 128,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
