// tb_hbfa: half-band filter array against a direct 47-tap convolution.
//
// Drives random full-range complex samples into all eight slices, with idle
// cycles, and compares each output word with
//     y(n) = round( sum_{i=0..46} h(i) x(2n - i) )
// where h(2k) = h(46 - 2k) are the package coefficients, h(23) = 1/2 and all
// other odd taps are zero; exact match expected (same rounding).  Checks the
// real/imaginary interleave (real part on pol = 0 frames), the one-clock
// latency, the re-alignment of the phase by a marker frame arriving on an odd
// phase, and that the coefficients are the Hamming-windowed half-band within
// one LSB and have unit DC gain within 2e-3.
module tb_hbfa;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  ctl_t    in_ctl = '0, out_ctl;
  cx_fft_t in_x  [NS];
  hb_t     out_w [NS];
  int checks = 0, failures = 0;

  hbfa dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T = 3000;
  longint xr [NS][T];
  longint xi [NS][T];
  hb_coef_t HC = hb_coefs();

  function automatic longint xat(input int s, input int t, input int tb, input bit im);
    if (t < tb) return 0;
    return im ? xi[s][t] : xr[s][t];
  endfunction

  function automatic longint href(input int i);
    if (i == 23) return 65536;
    if (i % 2 == 1) return 0;
    if (i <= 22) return HC[i / 2];
    return HC[(46 - i) / 2];
  endfunction

  initial begin
    int t = 0, tb = 0;
    int skip_until = 0;
    real dc = 0.0;
    for (int s = 0; s < NS; s++) in_x[s] = '0;
    // coefficient checks
    for (int k = 0; k < HB_MULT; k++) begin
      automatic real f = 0.5 * sinc(0.5 * (2 * k - 23)) * hamming(2 * k, NHB) * 131072.0;
      checks++;
      if (real'(HC[k]) - f > 1.0 || f - real'(HC[k]) > 1.0) failures++;
    end
    for (int i = 0; i < NHB; i++) dc += real'(href(i)) / 131072.0;
    checks++;
    if (dc > 1.002 || dc < 0.998) begin
      failures++;
      $display("FAIL dc gain %f", dc);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 3500 && t < T; c++) begin
      automatic bit odd_pps;
      @(negedge clk);
      in_ctl = '0;
      in_ctl.v = ($urandom_range(0, 5) != 0);
      // a marker on an odd phase at t = 1501 (forces a re-alignment), and
      // markers on even phases elsewhere
      odd_pps = (t == 1501);
      in_ctl.pps = in_ctl.v && (odd_pps || ((t - tb) % 200 == 100));
      in_ctl.flg = 1'($urandom);
      for (int s = 0; s < NS; s++) begin
        in_x[s].re = fft_t'($signed($urandom_range(0, 2 * 2097151)) - 2097151);
        in_x[s].im = fft_t'($signed($urandom_range(0, 2 * 2097151)) - 2097151);
        if (in_ctl.v) begin
          xr[s][t] = in_x[s].re;
          xi[s][t] = in_x[s].im;
        end
      end
      if (in_ctl.v && odd_pps) begin
        tb = t;
        skip_until = t + 48;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_ctl.v != in_ctl.v || out_ctl.pps != in_ctl.pps || out_ctl.flg != in_ctl.flg) begin
        failures++;
        $display("FAIL ctl at t=%0d", t);
      end
      if (in_ctl.v) begin
        automatic int  r  = t - tb;
        automatic bit  ph = r[0];
        checks++;
        if (out_ctl.pol != ph) begin
          failures++;
          $display("FAIL pol at t=%0d", t);
        end
        if (t >= skip_until)
          for (int s = 0; s < NS; s++) begin
            automatic int     n2  = ph ? r - 1 : r;
            automatic longint acc = 0;
            automatic longint y;
            for (int i = 0; i < NHB; i++)
              acc += href(i) * xat(s, tb + n2 - i, tb, ph);
            y = (acc + 65536) >>> 17;
            checks++;
            if (longint'(out_w[s]) != y) begin
              failures++;
              if (failures < 10)
                $display("FAIL t=%0d s=%0d got %0d exp %0d", t, s, out_w[s], y);
            end
          end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
