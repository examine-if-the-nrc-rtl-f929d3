// tb_p10ifft: random inputs over the full Q5.13 range and sparse inputs; the
// eight selected outputs are compared with a direct 10-point inverse DFT in
// floating point (tolerance 12 LSB of Q.13 for the constant rounding inside
// the Winograd transform) for all three selection codes; checks the
// two-clock latency of the control word.
module tb_p10ifft;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] sel = 2'b00;
  ctl_t in_ctl = '0, out_ctl;
  cx_fir_t in_x [NCH];
  cx_fft_t out_fs [NS];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  p10ifft dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real re; real im; } c_t;
  real  exp_re [1300][NS];
  real  exp_im [1300][NS];
  ctl_t ctlq [1300];
  int   n_in = 0, n_out = 0;

  initial begin
    c_t e [NS];
    int base;
    for (int k = 0; k < NCH; k++) in_x[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 1200; c++) begin
      @(negedge clk);
      if (c == 400 || c == 800) begin   // quasi-static: change with the pipe empty
        in_ctl = '0;
        repeat (4) @(negedge clk);
      end
      sel = (c < 400) ? 2'b00 : (c < 800) ? 2'b01 : 2'b10;
      base = (sel == 2'b01) ? 2 : (sel == 2'b10) ? 0 : 1;
      in_ctl = '0;
      in_ctl.v = 1'b1;
      in_ctl.flg = 1'($urandom);
      for (int k = 0; k < NCH; k++) begin
        in_x[k].re = fir_t'($signed($urandom_range(0, 2 * 131071)) - 131071);
        in_x[k].im = fir_t'($signed($urandom_range(0, 2 * 131071)) - 131071);
        if (c % 3 == 1 && k % 2 == 1) in_x[k] = '0;   // the shape the filter bank produces
      end
      for (int i = 0; i < NS; i++) begin
        automatic real sr = 0.0, si = 0.0;
        automatic int kk = base + i;
        for (int m = 0; m < NCH; m++) begin
          automatic real a = 2.0 * PI * m * kk / NCH;
          sr += real'(in_x[m].re) * $cos(a) - real'(in_x[m].im) * $sin(a);
          si += real'(in_x[m].re) * $sin(a) + real'(in_x[m].im) * $cos(a);
        end
        e[i].re = sr; e[i].im = si;
      end
      for (int i = 0; i < NS; i++) begin exp_re[n_in][i] = e[i].re; exp_im[n_in][i] = e[i].im; end
      ctlq[n_in] = in_ctl;
      n_in++;
    end
    @(negedge clk); in_ctl = '0;
    repeat (5) @(posedge clk);
    $display("max error %f LSB", maxerr);
    checks++;
    if (n_out != n_in) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outputs come two clocks after the inputs
  int lat = 0;
  always @(posedge clk) if (!rst) begin
    #1;
    if (out_ctl.v) begin
      c_t e [NS];
      ctl_t cc;
      for (int i = 0; i < NS; i++) begin e[i].re = exp_re[n_out][i]; e[i].im = exp_im[n_out][i]; end
      cc = ctlq[n_out];
      n_out++;
      checks++;
      if (out_ctl != cc) failures++;
      for (int i = 0; i < NS; i++) begin
        real dr, di, lim;
        fft_t gre, gim;
        gre = out_fs[i].re;
        gim = out_fs[i].im;
        lim = 2.0 ** (FFT_W - 1) - 1.0;
        if (e[i].re > lim) e[i].re = lim;
        if (e[i].re < -lim) e[i].re = -lim;
        if (e[i].im > lim) e[i].im = lim;
        if (e[i].im < -lim) e[i].im = -lim;
        dr = real'(gre) - e[i].re;
        di = real'(gim) - e[i].im;
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > 12.0 || di > 12.0) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d out %0d: %0d,%0d exp %f,%f", n_out, i, gre, gim, e[i].re, e[i].im);
        end
      end
    end
  end
endmodule
