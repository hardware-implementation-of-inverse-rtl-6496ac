// Testbench of the dual-port RAM: random reads and writes on both ports
// against an array model; reads return the stored word one clock later,
// a write on port B wins over a write on port A to the same address.
module tb_dp_ram;
  logic        clk = 1'b0;
  logic        a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [6:0]  a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [31:0] model [128];
  int checks = 0, failures = 0;

  dp_ram #(.DW(32), .DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb;
    bit ra, rb;
    for (int i = 0; i < 128; i++) model[i] = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a_en = 1'($urandom_range(0, 1)); a_we = 1'($urandom_range(0, 1));
      b_en = 1'($urandom_range(0, 1)); b_we = 1'($urandom_range(0, 1));
      a_addr = 7'($urandom_range(0, 15)); b_addr = 7'($urandom_range(0, 15));
      a_wdata = $urandom; b_wdata = $urandom;
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      if (ra) begin checks++; if (a_rdata !== ea) failures++; end
      if (rb) begin checks++; if (b_rdata !== eb) failures++; end
      a_en = 1'b0; b_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
