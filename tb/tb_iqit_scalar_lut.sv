// Testbench of the scalar LUT: for every QP 0..51 the three outputs must be
// V(QP%6, class) * 2^(QP/6) for the (0,0), (1,1) and other position classes.
module tb_iqit_scalar_lut;
  import iqit_ref_pkg::*;
  logic [5:0]  qp;
  logic [17:0] v1, v2, v3;
  int checks = 0, failures = 0;

  iqit_scalar_lut dut (.qp, .v1, .v2, .v3);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 52; q++) begin
      qp = 6'(q);
      #1;
      checks += 3;
      if (int'(v1) != vq(q, 0, 0) || int'(v2) != vq(q, 1, 1) || int'(v3) != vq(q, 0, 1)) begin
        failures++;
        $display("FAIL qp %0d: %0d %0d %0d", q, v1, v2, v3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
