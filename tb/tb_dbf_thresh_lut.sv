// Testbench of the deblocking threshold LUT: every QP 0..51 and bS 0..4
// against the alpha, beta and tc0 tables of dbf_ref_pkg.
module tb_dbf_thresh_lut;
  import dbf_ref_pkg::*;
  logic [5:0] qp;
  logic [2:0] bs;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  int checks = 0, failures = 0;

  dbf_thresh_lut dut (.qp, .bs, .alpha, .beta, .tc0);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 52; q++)
      for (int b = 0; b < 5; b++) begin
        int et;
        qp = 6'(q); bs = 3'(b);
        #1;
        et = (b == 0 || b == 4) ? 0 : tc0_of(q, b);
        checks++;
        if (int'(alpha) != alpha_of(q) || int'(beta) != beta_of(q) || (b != 4 && int'(tc0) != et)) begin
          failures++;
          $display("FAIL qp %0d bS %0d: %0d %0d %0d", q, b, alpha, beta, tc0);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
