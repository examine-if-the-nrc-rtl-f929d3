// p10ifft: parallel radix-10 inverse FFT with slice selection.
//
// Computes, once per frame, all ten outputs
//     Y[k] = sum_m x[m] * exp(+j*2*pi*m*k/10),   k = 0..9
// as a radix-2 step over two 5-point inverse transforms:
//     E = IDFT5(x[0], x[2], .., x[8]),  O = IDFT5(x[1], x[3], .., x[9])
//     Y[k]   = E[k] + W^k O[k],  Y[k+5] = E[k] - W^k O[k],  W = exp(j*2*pi/10).
// Each 5-point transform uses the Winograd arrangement with five real-constant
// multiplications per component: with a1 = x1+x4, a2 = x2+x3, b1 = x1-x4,
// b2 = x2-x3,
//     Y0      = x0 + a1 + a2
//     R1, R2  = x0 + K1 (a1+a2) +/- K2 (a1-a2)
//     P       = s1 (b1+b2) + (s2-s1) b2,   Q = (s1+s2) b1 - s1 (b1+b2)
//     Y1, Y4  = R1 +/- jP,   Y2, Y3 = R2 +/- jQ
// with K1 = (cos(2pi/5)+cos(4pi/5))/2, K2 = (cos(2pi/5)-cos(4pi/5))/2,
// s1 = sin(2pi/5), s2 = sin(4pi/5).  Constants are Q2.16, every product is
// rounded back to the Q.13 grid.
//
// Eight contiguous outputs become the slices (register 0, bits 3-4):
//   sel 00 -> Y[1..8]   sel 01 -> Y[2..9]   sel 10 -> Y[0..7]   sel 11 -> Y[1..8]
//
// Interface: in_ctl/in_x (Q5.13) from the rotation, out_ctl/out_fs (Q9.13,
// saturating) to the half-band array.  Timing: two register stages.
// The two 5-point Winograd transforms with twiddle multiplication and the
// selection codes 00/01/10 follow the design description; the meaning of code
// 11 and the word widths are this design's choices.
module p10ifft
  import ospfb_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic [1:0] sel,
  input  ctl_t    in_ctl,
  input  cx_fir_t in_x  [NCH],
  output ctl_t    out_ctl,
  output cx_fft_t out_fs [NS]
);

  typedef logic signed [31:0] w_t;
  typedef struct packed { w_t re; w_t im; } cw_t;

  localparam twid_t K1   = q16((($cos(2.0*PI/5.0) + $cos(4.0*PI/5.0)) / 2.0));
  localparam twid_t K2   = q16((($cos(2.0*PI/5.0) - $cos(4.0*PI/5.0)) / 2.0));
  localparam twid_t S1   = q16($sin(2.0*PI/5.0));
  localparam twid_t S21  = q16($sin(4.0*PI/5.0) - $sin(2.0*PI/5.0));
  localparam twid_t S12  = q16($sin(4.0*PI/5.0) + $sin(2.0*PI/5.0));

  // twiddles W10^-k = cos + j sin(2 pi k / 10), k = 0..4
  typedef twid_t tw5_t [5];
  function automatic tw5_t tw_cos();
    for (int k = 0; k < 5; k++) tw_cos[k] = q16($cos(2.0 * PI * k / 10.0));
  endfunction
  function automatic tw5_t tw_sin();
    for (int k = 0; k < 5; k++) tw_sin[k] = q16($sin(2.0 * PI * k / 10.0));
  endfunction
  localparam tw5_t TWR = tw_cos();
  localparam tw5_t TWI = tw_sin();

  function automatic w_t cmul(input w_t v, input twid_t k);
    return w_t'(rshr(64'(v) * 64'(k), T_W - 2));
  endfunction

  function automatic cw_t cadd(input cw_t a, input cw_t b);
    return '{re: a.re + b.re, im: a.im + b.im};
  endfunction

  function automatic cw_t csub(input cw_t a, input cw_t b);
    return '{re: a.re - b.re, im: a.im - b.im};
  endfunction

  function automatic cw_t cscale(input cw_t a, input twid_t k);
    return '{re: cmul(a.re, k), im: cmul(a.im, k)};
  endfunction

  // 5-point inverse DFT, Winograd form
  typedef cw_t v5_t [5];
  function automatic v5_t idft5(input v5_t x);
    v5_t y;
    cw_t a1, a2, b1, b2, t1, t2, m1, m2, m3, m4, m5, r1, r2, p, q;
    a1 = cadd(x[1], x[4]);  a2 = cadd(x[2], x[3]);
    b1 = csub(x[1], x[4]);  b2 = csub(x[2], x[3]);
    t1 = cadd(a1, a2);      t2 = csub(a1, a2);
    m1 = cscale(t1, K1);    m2 = cscale(t2, K2);
    m3 = cscale(cadd(b1, b2), S1);
    m4 = cscale(b2, S21);
    m5 = cscale(b1, S12);
    r1 = cadd(cadd(x[0], m1), m2);
    r2 = csub(cadd(x[0], m1), m2);
    p  = cadd(m3, m4);
    q  = csub(m5, m3);
    y[0] = cadd(x[0], t1);
    y[1] = '{re: r1.re - p.im, im: r1.im + p.re};   // r1 + jp
    y[4] = '{re: r1.re + p.im, im: r1.im - p.re};   // r1 - jp
    y[2] = '{re: r2.re - q.im, im: r2.im + q.re};   // r2 + jq
    y[3] = '{re: r2.re + q.im, im: r2.im - q.re};   // r2 - jq
    return y;
  endfunction

  function automatic fft_t sat(input w_t v);
    localparam w_t MAXV = (32'sd1 <<< (FFT_W - 1)) - 1;
    if (v >  MAXV) return fft_t'(MAXV);
    if (v < -MAXV) return fft_t'(-MAXV);
    return fft_t'(v);
  endfunction

  // ---- stage 1: two 5-point transforms
  v5_t  ev, od, ev_q, od_q;
  ctl_t ctl_q;

  always_comb begin
    v5_t xe, xo;
    for (int i = 0; i < 5; i++) begin
      xe[i] = '{re: w_t'(in_x[2*i].re),   im: w_t'(in_x[2*i].im)};
      xo[i] = '{re: w_t'(in_x[2*i+1].re), im: w_t'(in_x[2*i+1].im)};
    end
    ev = idft5(xe);
    od = idft5(xo);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctl_q <= '0;
      for (int i = 0; i < 5; i++) begin ev_q[i] <= '0; od_q[i] <= '0; end
    end else begin
      ctl_q <= in_ctl;
      if (in_ctl.v) begin
        ev_q <= ev;
        od_q <= od;
      end
    end
  end

  // ---- stage 2: twiddles, radix-2 combination, selection
  cw_t y [NCH];
  always_comb begin
    cw_t t;
    twid_t wr, wi;
    for (int k = 0; k < 5; k++) begin
      wr = TWR[k];
      wi = TWI[k];
      t.re = cmul(od_q[k].re, wr) - cmul(od_q[k].im, wi);
      t.im = cmul(od_q[k].im, wr) + cmul(od_q[k].re, wi);
      y[k]     = cadd(ev_q[k], t);
      y[k + 5] = csub(ev_q[k], t);
    end
  end

  logic [3:0] base;
  always_comb begin
    case (sel)
      2'b01:   base = 4'd2;
      2'b10:   base = 4'd0;
      default: base = 4'd1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_ctl <= '0;
      for (int i = 0; i < NS; i++) out_fs[i] <= '0;
    end else begin
      out_ctl <= ctl_q;
      if (ctl_q.v)
        for (int i = 0; i < NS; i++) begin
          out_fs[i].re <= sat(y[32'(base) + i].re);
          out_fs[i].im <= sat(y[32'(base) + i].im);
        end
    end
  end

endmodule
