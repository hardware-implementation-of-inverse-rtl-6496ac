// Self-checking testbench of the inverse transform & quantization
// subsystem (core + input and output memories).
//
// For random macroblocks (QP 22..51, intra16x16 and other modes) it writes
// the coefficients, QP and mode through the host port of the input memory,
// pulses start, measures the clocks until done, reads the whole output
// memory back and compares all 384 residual samples (8-bit value plus sign
// bit) with iqit_ref_pkg. The design description gives 145 clocks per
// macroblock in intra16x16 mode and 135 otherwise; the measured time must
// not exceed these. Also checks back-to-back macroblocks with the host
// reloading between them, and that busy is high from start to done.
module tb_iqit_system;
  import iqit_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        done, busy;
  logic        hin_en = 1'b0, hin_we = 1'b0;
  logic [6:0]  hin_addr = '0;
  logic [31:0] hin_wdata = '0, hin_rdata;
  logic        hout_en = 1'b0;
  logic [6:0]  hout_addr = '0;
  logic [31:0] hout_rdata;

  int checks = 0, failures = 0;
  int n_intra16 = 0, n_other = 0, max_i16 = 0, max_oth = 0;

  iqit_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_mb(input mem_t w);
    for (int a = 0; a < 113; a++) begin
      @(negedge clk);
      hin_en = 1'b1; hin_we = 1'b1; hin_addr = 7'(a); hin_wdata = w[a];
    end
    @(negedge clk);
    hin_en = 1'b0; hin_we = 1'b0;
  endtask

  task automatic read_out(output mem_t w);
    for (int a = 0; a < 128; a++) w[a] = '0;
    for (int a = 0; a < 108; a++) begin
      @(negedge clk);
      hout_en = 1'b1; hout_addr = 7'(a);
      @(negedge clk);
      hout_en = 1'b0;
      w[a] = hout_rdata;
    end
  endtask

  task automatic run_mb(input int qp, input bit i16);
    mb_t  m;
    mem_t w, o;
    res_t r;
    int   cyc, lim, bad;
    m = gen_mb(qp, i16);
    load_mb(pack_in(m));
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin
      if (!busy) begin failures++; $display("FAIL busy low before done"); end
      @(negedge clk); cyc++;
    end
    lim = i16 ? 145 : 135;
    checks++;
    if (cyc > lim) begin
      failures++;
      $display("FAIL qp=%0d intra16=%0d took %0d clocks > %0d", qp, i16, cyc, lim);
    end
    if (i16) begin n_intra16++; if (cyc > max_i16) max_i16 = cyc; end
    else     begin n_other++;   if (cyc > max_oth) max_oth = cyc; end
    @(negedge clk);
    read_out(o);
    r = ref_mb(m);
    bad = 0;
    for (int b = 0; b < 24; b++)
      for (int e = 0; e < 16; e++) begin
        checks++;
        if (out_sample(o, b, e) != r[b][e]) begin
          failures++;
          if (bad++ < 5)
            $display("FAIL qp=%0d i16=%0d blk %0d pos %0d: got %0d expected %0d",
                     qp, i16, b, e, out_sample(o, b, e), r[b][e]);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_mb(22, 1'b1);
    run_mb(22, 1'b0);
    run_mb(51, 1'b1);
    run_mb(51, 1'b0);
    for (int i = 0; i < 40; i++)
      run_mb(int'($urandom_range(22, 51)), 1'($urandom_range(0, 1)));
    $display("intra16 MBs %0d (max %0d clocks), other MBs %0d (max %0d clocks)",
             n_intra16, max_i16, n_other, max_oth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
