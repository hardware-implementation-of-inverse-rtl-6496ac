// Testbench of the combinational inverse integer DCT: random 4x4 inputs in
// the 16-bit range the design uses, compared with the column-then-row
// butterfly reference of iqit_ref_pkg (before post-scaling), plus the
// all-zero and single-DC cases.
module tb_iqit_idct;
  logic [15:0][15:0] y, x;
  int checks = 0, failures = 0;

  iqit_idct dut (.y, .x);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_x(input int yi[16], output int xo[16]);
    int t[16];
    for (int k = 0; k < 4; k++) begin
      t[k]    = yi[k] + yi[4+k] + yi[8+k] + (yi[12+k] >>> 1);
      t[4+k]  = yi[k] + (yi[4+k] >>> 1) - yi[8+k] - yi[12+k];
      t[8+k]  = yi[k] - (yi[4+k] >>> 1) - yi[8+k] + yi[12+k];
      t[12+k] = yi[k] - yi[4+k] + yi[8+k] - (yi[12+k] >>> 1);
    end
    for (int i = 0; i < 4; i++) begin
      xo[4*i]   = t[4*i] + t[4*i+1] + t[4*i+2] + (t[4*i+3] >>> 1);
      xo[4*i+1] = t[4*i] + (t[4*i+1] >>> 1) - t[4*i+2] - t[4*i+3];
      xo[4*i+2] = t[4*i] - (t[4*i+1] >>> 1) - t[4*i+2] + t[4*i+3];
      xo[4*i+3] = t[4*i] - t[4*i+1] + t[4*i+2] - (t[4*i+3] >>> 1);
    end
  endfunction

  initial begin
    int yi[16], xo[16];
    for (int n = 0; n < 2000; n++) begin
      for (int e = 0; e < 16; e++) begin
        yi[e] = (n == 0) ? 0 : (n == 1) ? ((e == 0) ? 1300 : 0) : int'($urandom_range(0, 2600)) - 1300;
        y[e] = 16'(yi[e]);
      end
      #1;
      ref_x(yi, xo);
      for (int e = 0; e < 16; e++) begin
        checks++;
        if ($signed(x[e]) != xo[e]) begin
          failures++;
          if (failures < 5) $display("FAIL case %0d pos %0d got %0d expected %0d", n, e, $signed(x[e]), xo[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
