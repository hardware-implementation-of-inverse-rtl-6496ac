// Self-checking testbench of the deblocking filter subsystem.
//
// For several random 48x48 pictures (mixed intra/inter macroblocks, all
// intra, all inter without coefficients, and a strong-filter case) it loads
// the parameter memory and the frame memory through the host ports, pulses
// start, waits for done, reads the frame memory back and compares every
// luma and chroma sample with dbf_ref_pkg (standard edge order). It also
// measures the clocks the dataflow control spends on each macroblock and
// checks them against the 336 clocks per macroblock of the described
// design, and counts the mechanisms that were exercised: frame memory
// block reads, stores that had to wait for the write port, edges at the
// picture border, bS values 0..4 and strong filtering.
module tb_dbf_system;
  import dbf_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        done, busy;
  logic        hp_en = 1'b0, hp_we = 1'b0;
  logic [11:0] hp_addr = '0;
  logic [31:0] hp_wdata = '0, hp_rdata;
  logic        hf_en = 1'b0, hf_we = 1'b0;
  logic [9:0]  hf_addr = '0;
  logic [31:0] hf_wdata = '0, hf_rdata;

  int checks = 0, failures = 0;
  int n_reads = 0, n_store_wait = 0, n_border = 0, max_mb = 0;
  int tot_bs [5];
  int tot_strong = 0, tot_lines = 0;

  dbf_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters from inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.rd_start && dut.rd_ready) n_reads++;
    if (dut.u_dataflow.state == dut.u_dataflow.F_FILT && !dut.u_dataflow.filt_go) n_store_wait++;
    if (dut.u_dataflow.state == dut.u_dataflow.F_SETUP && !dut.u_dataflow.p_in) n_border++;
  end

  // clocks per macroblock of the filtering phase
  int mb_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dataflow.state == dut.u_dataflow.F_PARAM && dut.u_dataflow.pcnt == 4'd0) begin
      mb_cyc = 1;
    end else if (dut.u_dataflow.state != dut.u_dataflow.F_IDLE) begin
      mb_cyc++;
      if (dut.u_dataflow.state == dut.u_dataflow.F_FILT && dut.u_dataflow.filt_go
          && dut.u_dataflow.e == 6'd47) begin
        checks++;
        if (mb_cyc > max_mb) max_mb = mb_cyc;
        if (mb_cyc > 336) begin
          failures++;
          $display("FAIL macroblock took %0d clocks > 336", mb_cyc);
        end
      end
    end
  end

  task automatic run_pic(input int kind);
    pic_t p, r;
    int cyc, bad;
    bad = 0;
    p = gen_pic(kind);
    r = p;
    deblock(r);
    for (int i = 0; i < 5; i++) tot_bs[i] += st_bs[i];
    tot_strong += st_strong;
    tot_lines  += st_lines;
    // parameter memory
    for (int a = 0; a < 4096; a++) begin
      if (!((a < 'hD0) || (a >= 'h800 && a < 'hA40))) continue;
      @(negedge clk);
      hp_en = 1'b1; hp_we = 1'b1; hp_addr = 12'(a); hp_wdata = pm_word(p, a);
    end
    @(negedge clk); hp_en = 1'b0; hp_we = 1'b0;
    // frame memory
    for (int a = 0; a < 864; a++) begin
      @(negedge clk);
      hf_en = 1'b1; hf_we = 1'b1; hf_addr = 10'(a); hf_wdata = fm_word(p, a);
    end
    @(negedge clk); hf_en = 1'b0; hf_we = 1'b0;
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("picture kind %0d: %0d clocks from start to done", kind, cyc);
    // bS memory against the reference bS of every block edge
    for (int by = 0; by < 12; by++)
      for (int bx = 0; bx < 12; bx++) begin
        int ev, eh, gv, gh, gi;
        gi = (by * 3 + bx / 4) * 2;
        ev = (bx == 0) ? 0 : bs_of(p, by, bx-1, by, bx, bx % 4 == 0);
        eh = (by == 0) ? 0 : bs_of(p, by-1, bx, by, bx, by % 4 == 0);
        gv = int'(dut.u_bs_mem.mem[gi][3*(bx%4) +: 3]);
        gh = int'(dut.u_bs_mem.mem[gi+1][3*(bx%4) +: 3]);
        checks++;
        if (gv != ev || gh != eh) begin
          failures++;
          if (bad++ < 8) $display("FAIL kind %0d block (%0d,%0d) bS V/H %0d/%0d expected %0d/%0d",
                                  kind, by, bx, gv, gh, ev, eh);
        end
      end
    @(negedge clk);
    for (int a = 0; a < 864; a++) begin
      logic [31:0] exp_w;
      hf_en = 1'b1; hf_we = 1'b0; hf_addr = 10'(a);
      @(negedge clk);
      hf_en = 1'b0;
      exp_w = fm_word(r, a);
      checks++;
      if (hf_rdata !== exp_w) begin
        failures++;
        if (bad++ < 8) $display("FAIL kind %0d word %0d: got %h expected %h (before %h)",
                                kind, a, hf_rdata, exp_w, fm_word(p, a));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) tot_bs[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_pic(0);
    run_pic(1);
    run_pic(2);
    run_pic(3);
    run_pic(0);
    $display("edges bS0..4: %0d %0d %0d %0d %0d, filtered lines %0d, strong %0d",
             tot_bs[0], tot_bs[1], tot_bs[2], tot_bs[3], tot_bs[4], tot_lines, tot_strong);
    $display("block reads %0d, store waits %0d, border edges %0d, max clocks per MB %0d",
             n_reads, n_store_wait, n_border, max_mb);
    checks++;
    if (tot_bs[1] == 0 || tot_bs[2] == 0 || tot_bs[3] == 0 || tot_bs[4] == 0 ||
        tot_strong == 0 || n_border == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
