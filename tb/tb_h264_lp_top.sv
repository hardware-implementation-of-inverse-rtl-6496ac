// End-to-end testbench of the top level with both accelerators running at
// the same time, top at its default configuration.
//
// While the deblocking filter processes 48x48 pictures, the inverse
// transform & quantization subsystem decodes a stream of macroblocks; both
// are driven through the top's host ports only and checked against
// iqit_ref_pkg and dbf_ref_pkg. Cycle limits: 145 / 135 clocks per
// macroblock (intra16x16 / other) for the IQIT and 336 clocks per
// macroblock for the deblocking phase (from start to done of a 9-macroblock
// picture, minus the bS generation). Every mechanism is counted and must
// have happened at least once: intra16x16 and other macroblocks, luma and
// chroma inverse Hadamard runs, pipeline stalls at the output unit, negative
// half-way rounding, frame-memory block reads, blocks taken from the direct
// register and from registers 1..5, stores waiting for the write port,
// picture-border edges, and strong filtering.
module tb_h264_lp_top;
  import iqit_ref_pkg::*;
  import dbf_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        iq_start = 1'b0, iq_done, iq_busy;
  logic        iq_in_en = 1'b0, iq_in_we = 1'b0;
  logic [6:0]  iq_in_addr = '0;
  logic [31:0] iq_in_wdata = '0, iq_in_rdata;
  logic        iq_out_en = 1'b0;
  logic [6:0]  iq_out_addr = '0;
  logic [31:0] iq_out_rdata;
  logic        db_start = 1'b0, db_done, db_busy;
  logic        db_pm_en = 1'b0, db_pm_we = 1'b0;
  logic [11:0] db_pm_addr = '0;
  logic [31:0] db_pm_wdata = '0, db_pm_rdata;
  logic        db_fm_en = 1'b0, db_fm_we = 1'b0;
  logic [9:0]  db_fm_addr = '0;
  logic [31:0] db_fm_wdata = '0, db_fm_rdata;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_i16 = 0, m_oth = 0, m_hl = 0, m_hc = 0, m_stall = 0, m_neghalf = 0;
  int m_rd = 0, m_direct = 0, m_reg = 0, m_wait = 0, m_border = 0, m_strong = 0;

  h264_lp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_iqit.u_core.u_had.dc_ready)
      if (dut.u_iqit.u_core.u_had.chroma) m_hc++; else m_hl++;
    if (dut.u_iqit.u_core.u_iq.out_valid && !dut.u_iqit.u_core.u_iq.out_ready) m_stall++;
    if (dut.u_iqit.u_core.u_out.in_valid && dut.u_iqit.u_core.u_out.in_ready)
      for (int e = 0; e < 16; e++)
        if (dut.u_iqit.u_core.u_out.in_x[e][15] && dut.u_iqit.u_core.u_out.in_x[e][5:0] == 6'd32)
          m_neghalf++;
    if (dut.u_dbf.rd_start && dut.u_dbf.rd_ready) m_rd++;
    if (dut.u_dbf.u_dataflow.state == dut.u_dbf.u_dataflow.F_SETUP) begin
      if (dut.u_dbf.u_dataflow.d.ld1 == h264_pkg::LOC_DIRECT ||
          dut.u_dbf.u_dataflow.d.ld2 == h264_pkg::LOC_DIRECT) m_direct++;
      if (dut.u_dbf.u_dataflow.d.ld1 >= h264_pkg::LOC_REG1 ||
          dut.u_dbf.u_dataflow.d.ld2 >= h264_pkg::LOC_REG1) m_reg++;
      if (!dut.u_dbf.u_dataflow.p_in) m_border++;
    end
    if (dut.u_dbf.u_dataflow.state == dut.u_dbf.u_dataflow.F_FILT &&
        !dut.u_dbf.u_dataflow.filt_go) m_wait++;
  end

  // ---------------- IQIT stream ----------------
  task automatic iq_mb(input int qp, input bit i16);
    iqit_ref_pkg::mb_t  m;
    iqit_ref_pkg::mem_t w, o;
    iqit_ref_pkg::res_t r;
    int cyc, bad;
    m = gen_mb(qp, i16);
    w = pack_in(m);
    for (int a = 0; a < 113; a++) begin
      @(negedge clk);
      iq_in_en = 1'b1; iq_in_we = 1'b1; iq_in_addr = 7'(a); iq_in_wdata = w[a];
    end
    @(negedge clk); iq_in_en = 1'b0; iq_in_we = 1'b0; iq_start = 1'b1;
    @(negedge clk); iq_start = 1'b0;
    cyc = 1;
    while (!iq_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > (i16 ? 145 : 135)) begin
      failures++;
      $display("FAIL IQIT macroblock took %0d clocks", cyc);
    end
    if (i16) m_i16++; else m_oth++;
    @(negedge clk);
    for (int a = 0; a < 108; a++) begin
      iq_out_en = 1'b1; iq_out_addr = 7'(a);
      @(negedge clk);
      iq_out_en = 1'b0;
      o[a] = iq_out_rdata;
    end
    r = ref_mb(m);
    bad = 0;
    for (int b = 0; b < 24; b++)
      for (int e = 0; e < 16; e++) begin
        checks++;
        if (out_sample(o, b, e) != r[b][e]) begin
          failures++;
          if (bad++ < 4) $display("FAIL IQIT blk %0d pos %0d got %0d expected %0d",
                                  b, e, out_sample(o, b, e), r[b][e]);
        end
      end
  endtask

  // ---------------- DBF pictures ----------------
  bit db_seen = 1'b0;
  int db_cyc = 0, db_bs_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (db_busy) db_cyc++;
    if (dut.u_dbf.u_bs_gen.busy) db_bs_cyc++;
    if (db_done) db_seen = 1'b1;
  end

  pic_t dp, dr;

  // load a picture and start the filter; returns at once
  task automatic db_begin(input int kind);
    dp = gen_pic(kind);
    dr = dp;
    deblock(dr);
    m_strong += st_strong;
    for (int a = 0; a < 'hA40; a++) begin
      if (!((a < 'hD0) || (a >= 'h800))) continue;
      @(negedge clk);
      db_pm_en = 1'b1; db_pm_we = 1'b1; db_pm_addr = 12'(a); db_pm_wdata = pm_word(dp, a);
    end
    for (int a = 0; a < 864; a++) begin
      @(negedge clk);
      db_pm_en = 1'b0; db_pm_we = 1'b0;
      db_fm_en = 1'b1; db_fm_we = 1'b1; db_fm_addr = 10'(a); db_fm_wdata = fm_word(dp, a);
    end
    @(negedge clk); db_fm_en = 1'b0; db_fm_we = 1'b0; db_start = 1'b1;
    db_seen = 1'b0; db_cyc = 0; db_bs_cyc = 0;
    @(negedge clk); db_start = 1'b0;
  endtask

  // wait for done and compare the frame memory
  task automatic db_end();
    int bad;
    while (!db_seen) @(negedge clk);
    checks++;
    if (db_cyc - db_bs_cyc > 9 * 336) begin
      failures++;
      $display("FAIL deblocking took %0d clocks for 9 macroblocks", db_cyc - db_bs_cyc);
    end
    $display("picture: bS generation %0d clocks, filtering %0d clocks", db_bs_cyc, db_cyc - db_bs_cyc);
    @(negedge clk);
    bad = 0;
    for (int a = 0; a < 864; a++) begin
      db_fm_en = 1'b1; db_fm_addr = 10'(a);
      @(negedge clk);
      db_fm_en = 1'b0;
      checks++;
      if (db_fm_rdata !== fm_word(dr, a)) begin
        failures++;
        if (bad++ < 4) $display("FAIL DBF word %0d got %h expected %h", a, db_fm_rdata, fm_word(dr, a));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    iq_mb(22, 1'b1);
    iq_mb(51, 1'b0);
    for (int k = 0; k < 4; k++) begin
      db_begin((k == 3) ? 0 : k);
      // IQIT macroblocks while the deblocking filter is busy
      while (!db_seen) iq_mb(int'($urandom_range(22, 51)), 1'($urandom_range(0, 1)));
      db_end();
    end
    $display("IQIT: intra16 %0d, other %0d, luma/chroma Hadamard %0d/%0d, stall clocks %0d, negative halves %0d",
             m_i16, m_oth, m_hl, m_hc, m_stall, m_neghalf);
    $display("DBF: block reads %0d, direct %0d, registers %0d, store waits %0d, border %0d, strong %0d",
             m_rd, m_direct, m_reg, m_wait, m_border, m_strong);
    checks++;
    if (m_i16 == 0 || m_oth == 0 || m_hl == 0 || m_hc == 0 || m_stall == 0 || m_neghalf == 0 ||
        m_rd == 0 || m_direct == 0 || m_reg == 0 || m_wait == 0 || m_border == 0 || m_strong == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
