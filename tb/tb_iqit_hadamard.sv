// Testbench of the inverse Hadamard unit: random 10-bit DC matrices in
// luma (4x4) and chroma (two 2x2) mode; hbuf must hold H*Z*H (or the 2x2
// form per chroma component) when hadamard_done pulses, which must be
// exactly two clocks after dc_ready.
module tb_iqit_hadamard;
  import iqit_ref_pkg::*;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              dc_ready = 1'b0, chroma = 1'b0;
  logic [15:0][9:0]  din = '0, hbuf;
  logic              hadamard_done, busy;
  int checks = 0, failures = 0;

  iqit_hadamard dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z[16], w[16], lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      bit c = n[0];
      for (int e = 0; e < 16; e++) begin
        z[e] = (c && e >= 8) ? 0 : int'($urandom_range(0, 62)) - 31;
        din[e] = 10'(z[e]);
      end
      if (!c) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            w[4*i+j] = 0;
            for (int a = 0; a < 4; a++)
              for (int b = 0; b < 4; b++) w[4*i+j] += hsign(i, a) * z[4*a+b] * hsign(j, b);
          end
      end else begin
        for (int k = 0; k < 2; k++) begin
          w[4*k]   = z[4*k] + z[4*k+1] + z[4*k+2] + z[4*k+3];
          w[4*k+1] = z[4*k] - z[4*k+1] + z[4*k+2] - z[4*k+3];
          w[4*k+2] = z[4*k] + z[4*k+1] - z[4*k+2] - z[4*k+3];
          w[4*k+3] = z[4*k] - z[4*k+1] - z[4*k+2] + z[4*k+3];
        end
      end
      chroma = c; dc_ready = 1'b1;
      @(negedge clk); dc_ready = 1'b0; din = '0;
      lat = 1;
      while (!hadamard_done && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      @(negedge clk);
      for (int e = 0; e < (c ? 8 : 16); e++) begin
        checks++;
        if ($signed(hbuf[e]) != w[e]) begin
          failures++;
          if (failures < 6) $display("FAIL case %0d chroma %0d entry %0d got %0d expected %0d",
                                     n, c, e, $signed(hbuf[e]), w[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
