// One filter block of the deblocking filtering unit: filters one line of
// eight samples p3 p2 p1 p0 | q0 q1 q2 q3 across a 4x4 block edge.
//
// Combinational. The line is filtered when bS > 0, |p0-q0| < alpha,
// |p1-p0| < beta and |q1-q0| < beta.
//  bS < 4: delta = clip(-tc, tc, ((q0-p0)*4 + (p1-q1) + 4) >> 3) moves p0 and
//          q0; for luma p1 (q1) also moves by
//          clip(-tc0, tc0, (p2 + ((p0+q0+1)>>1) - 2*p1) >> 1) when
//          ap = |p2-p0| < beta (aq = |q2-q0| < beta); tc = tc0 + ap + aq for
//          luma, tc0 + 1 for chroma.
//  bS = 4: luma p side uses the strong 3-tap/4-tap/5-tap filters for
//          p0, p1, p2 when ap and |p0-q0| < (alpha>>2)+2, else p0 =
//          (2p1+p0+q1+2)>>2 (the same on the q side); chroma only changes
//          p0 and q0 with the last form.
// Results are clipped to 0..255. p3 and q3 never change. The equations are
// those of H.264 as given in the design description; where its text uses
// |p1-p0| for the p1 / strong-filter side condition, the standard's
// |p2-p0| (and |q2-q0|) is used here.
module dbf_filter_block (
  input  logic [3:0][7:0] p,       // p[i] = pi, p[0] next to the edge
  input  logic [3:0][7:0] q,
  input  logic [2:0]      bs,
  input  logic [7:0]      alpha,
  input  logic [4:0]      beta,
  input  logic [4:0]      tc0,
  input  logic            chroma,
  output logic [3:0][7:0] pf,
  output logic [3:0][7:0] qf,
  output logic            filtered  // this line was changed by the filter
);

  function automatic logic [7:0] clip255(input int v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  function automatic int clip3(input int lo, input int hi, input int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_comb begin
    int p0, p1, p2, p3, q0, q1, q2, q3;
    int a, b, t0, tc, delta;
    logic ap, aq, en;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    a  = int'(alpha);
    b  = int'(beta);
    t0 = int'(tc0);
    pf = p;
    qf = q;
    tc    = 0;
    delta = 0;
    ap = absd(p2, p0) < b;
    aq = absd(q2, q0) < b;
    en = (bs != 3'd0) && absd(p0, q0) < a && absd(p1, p0) < b && absd(q1, q0) < b;
    filtered = en;
    if (en) begin
      if (bs < 3'd4) begin
        tc    = chroma ? t0 + 1 : t0 + int'(ap) + int'(aq);
        delta = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        pf[0] = clip255(p0 + delta);
        qf[0] = clip255(q0 - delta);
        if (!chroma && ap)
          pf[1] = 8'(p1 + clip3(-t0, t0, (p2 + ((p0 + q0 + 1) >>> 1) - 2 * p1) >>> 1));
        if (!chroma && aq)
          qf[1] = 8'(q1 + clip3(-t0, t0, (q2 + ((p0 + q0 + 1) >>> 1) - 2 * q1) >>> 1));
      end else begin
        if (!chroma && ap && absd(p0, q0) < ((a >>> 2) + 2)) begin
          pf[0] = 8'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3);
          pf[1] = 8'((p2 + p1 + p0 + q0 + 2) >>> 2);
          pf[2] = 8'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3);
        end else begin
          pf[0] = 8'((2 * p1 + p0 + q1 + 2) >>> 2);
        end
        if (!chroma && aq && absd(p0, q0) < ((a >>> 2) + 2)) begin
          qf[0] = 8'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3);
          qf[1] = 8'((p0 + q0 + q1 + q2 + 2) >>> 2);
          qf[2] = 8'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >>> 3);
        end else begin
          qf[0] = 8'((2 * q1 + q0 + p1 + 2) >>> 2);
        end
      end
    end
  end

endmodule
