// Testbench of one deblocking filter block (with its threshold LUT): random
// lines with small steps across the edge, every bS 0..4, luma and chroma,
// QP 16..51, compared with the line filter of dbf_ref_pkg. Counts lines
// that were filtered, strong-filtered and left alone.
module tb_dbf_filter_block;
  import dbf_ref_pkg::*;
  logic [3:0][7:0] p, q, pf, qf;
  logic [2:0]      bs;
  logic [5:0]      qp;
  logic [7:0]      alpha;
  logic [4:0]      beta, tc0;
  logic            chroma, filtered;
  int checks = 0, failures = 0, n_filt = 0, n_skip = 0;

  dbf_thresh_lut u_lut (.qp, .bs, .alpha, .beta, .tc0);
  dbf_filter_block dut (.p, .q, .bs, .alpha, .beta, .tc0, .chroma, .pf, .qf, .filtered);

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[8];
    st_strong = 0;
    for (int n = 0; n < 20000; n++) begin
      int base = int'($urandom_range(0, 255));
      int step = int'($urandom_range(0, 40)) - 20;
      for (int i = 0; i < 4; i++) begin
        s[i]   = clip(0, 255, base + int'($urandom_range(0, 6)) - 3);
        s[4+i] = clip(0, 255, base + step + int'($urandom_range(0, 6)) - 3);
        p[i] = 8'(s[i]);
        q[i] = 8'(s[4+i]);
      end
      bs = 3'(n % 5);
      chroma = 1'($urandom_range(0, 1));
      qp = 6'($urandom_range(16, 51));
      #1;
      fline(s, int'(bs), int'(qp), chroma);
      if (filtered) n_filt++; else n_skip++;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(pf[i]) != s[i] || int'(qf[i]) != s[4+i]) begin
          failures++;
          if (failures < 6) $display("FAIL case %0d bS %0d chroma %0d qp %0d pos %0d: %0d/%0d expected %0d/%0d",
                                     n, bs, chroma, qp, i, pf[i], qf[i], s[i], s[4+i]);
        end
      end
    end
    $display("filtered %0d, unchanged %0d, strong sides %0d", n_filt, n_skip, st_strong);
    checks++;
    if (n_filt == 0 || n_skip == 0 || st_strong == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
