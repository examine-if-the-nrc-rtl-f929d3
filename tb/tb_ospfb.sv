// tb_ospfb: end-to-end test of one two-stage OSPFB against a floating-point
// model of the filter bank.
//
// Stimulus: 2000 input frames of random complex 6-bit samples, valid on
// about 400 of 450 clocks (one idle clock after every nine plus random idle
// clocks); epoch markers every FRAMES = 240 valid frames starting at frame 9,
// each with its own time code; one input frame carries the flag.
// Register set-up through the control bus: slice 6 at shift 3 / scale 1/2,
// slice 7 at shift 6 (x16, to force saturation), the others at the reset
// values; the slice selection is switched 00 -> 01 -> 10 during the run.
//
// Reference, for output word n of slice s (word n belongs to stage-1 frame
// n; even words carry the real part, odd words the imaginary part):
//   ch_k(n) = sum_j h(j) u(9n - j) exp(+j 2 pi k (j - 9n) / 20)
//   z(q)    = sum_i hb(i) ch_{b+s}(2q - i),  q = floor(n / 2)
//   o       = 128 * 2^(shift-2) * scale/65536 * {Re|Im} z(q)
// with u the zero-stuffed input (sample m at up-sampled time 2m - 8), h and
// hb the quantised coefficients, b the first selected channel.  The 8-bit
// output must be within 1 + g/32 LSB of o limited to +/-127 (g the slice
// gain: the internal roundings, 2^-13 of full scale each, grow with g).  Also checked: pol,
// the flag (until and for 54 words after the first marker, for 54 words
// from the stage-1 frame that takes the flagged samples, on saturation),
// o_pps 26 words after each third input marker's stage-1 frame, o_eof on the
// two words before, o_tms, the number of output words (10 per 9 input
// frames), and the status register.
module tb_ospfb;
  import ospfb_pkg::*;
  localparam int F  = 240;
  localparam int NQ = 2000;
  localparam int NF = (10 * NQ) / 9 + 2;
  localparam int FLAG_Q = 1000;

  logic clk = 0, rst = 1, dclk = 0, drst = 1;
  in_strm_t i_strm [NP];
  fs_strm_t o_fs   [NS];
  ctl_req_t req = '0;
  ctl_rsp_t rsp;
  int checks = 0, failures = 0;

  ospfb #(.FRAMES(F)) dut (
    .i_clk(clk), .i_clk_reset(rst), .i_detri_clk(dclk), .i_detri_clk_reset(drst),
    .i_strm, .o_fs, .i_fm_endpoint(req), .o_to_endpoint(rsp)
  );
  always #5 clk = ~clk;
  always #7 dclk = ~dclk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  int  xr [NP * NQ];
  int  xi [NP * NQ];
  real chr [NF][NCH];
  real chi [NF][NCH];
  bit  load [NF];
  localparam proto_t   HP = proto_coefs();
  localparam hb_coef_t HH = hb_coefs();

  function automatic real hbr(input int i);
    if (i == 23) return 0.5;
    if (i % 2 == 1) return 0.0;
    if (i <= 22) return real'(HH[i / 2]) / 131072.0;
    return real'(HH[(46 - i) / 2]) / 131072.0;
  endfunction

  function automatic int first_sample(input int n);
    return 9 * (n / 2) + ((n % 2) ? 5 : 0);
  endfunction

  task automatic build_ref();
    for (int n = 0; n < NF; n++) begin
      int s0;
      for (int k = 0; k < NCH; k++) begin chr[n][k] = 0.0; chi[n][k] = 0.0; end
      for (int j = 0; j < NH; j++) begin
        int t = 9 * n - j;
        if ((t + 8) % 2 == 0 && t + 8 >= 0 && (t + 8) / 2 < NP * NQ) begin
          real ur = real'(xr[(t + 8) / 2]) / 32.0;
          real ui = real'(xi[(t + 8) / 2]) / 32.0;
          real hj = real'(HP[j]) / 131072.0;
          for (int k = 0; k < NCH; k++) begin
            real a = 2.0 * PI * k * (j - 9 * n) / 20.0;
            chr[n][k] += hj * (ur * $cos(a) - ui * $sin(a));
            chi[n][k] += hj * (ur * $sin(a) + ui * $cos(a));
          end
        end
      end
      s0 = first_sample(n);
      load[n] = (s0 <= NP * FLAG_Q + NP - 1) && (s0 + ((n % 2) ? 4 : 5) - 1 >= NP * FLAG_Q);
    end
  endtask

  // ------------------------------------------------------------ register bus
  task automatic reg_wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge dclk);
    req = '0; req.wr = 1'b1; req.addr = a; req.be = 4'hF; req.wdata = d;
    @(negedge dclk);
    req = '0;
  endtask

  task automatic reg_rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge dclk);
    req = '0; req.rd = 1'b1; req.addr = a;
    @(negedge dclk);
    req = '0;
    d = rsp.rdata;
  endtask

  // ------------------------------------------------------------ stimulus
  int  q = 0;
  int  n_out = 0;
  int  sel_w [3] = '{0, 1 << 30, 1 << 30};   // word index at each selection write
  bit  done_in = 0;

  initial begin
    logic [31:0] d;
    for (int m = 0; m < NP * NQ; m++) begin
      xr[m] = $urandom_range(0, 62) - 31;
      xi[m] = $urandom_range(0, 62) - 31;
    end
    build_ref();
    for (int p = 0; p < NP; p++) i_strm[p] = '0;
    repeat (4) @(posedge dclk);
    drst = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    reg_wr(4'd7, {12'd0, 4'd3, 16'h8000});
    reg_wr(4'd8, {12'd0, 4'd6, 16'hFFFF});
    repeat (4) @(posedge dclk);
    reg_rd(4'd0, d);
    checks++;
    if (d[2:0] != 3'b001) begin failures++; $display("FAIL status before marker %b", d[2:0]); end
    fork
      begin
        int c = 0;
        while (q < NQ) begin
          @(negedge clk);
          for (int p = 0; p < NP; p++) i_strm[p] = '0;
          if ((c % 10 != 9) && ($urandom_range(0, 71) != 0)) begin
            for (int p = 0; p < NP; p++) begin
              i_strm[p].re = x_t'(xr[NP * q + p]);
              i_strm[p].im = x_t'(xi[NP * q + p]);
            end
            i_strm[0].vld = 1'b1;
            i_strm[0].pps = (q >= 9) && ((q - 9) % F == 0);
            i_strm[0].tms = 64'(1000 + q);
            i_strm[0].flg = (q == FLAG_Q);
            q++;
          end
          c++;
        end
        @(negedge clk);
        for (int p = 0; p < NP; p++) i_strm[p] = '0;
        done_in = 1;
      end
      begin
        wait (q >= 700);
        sel_w[1] = n_out;
        reg_wr(4'd0, 32'h08);      // 01: channels 2..9
        wait (q >= 1400);
        sel_w[2] = n_out;
        reg_wr(4'd0, 32'h10);      // 10: channels 0..7
      end
    join
    repeat (200) @(posedge clk);
    reg_rd(4'd0, d);
    checks++;
    if (d[2:0] != 3'b000) begin failures++; $display("FAIL status at end %b", d[2:0]); end
    checks++;
    if (n_out < (10 * NQ) / 9 - 2 || n_out > (10 * NQ) / 9) begin
      failures++;
      $display("FAIL output words %0d for %0d input frames", n_out, NQ);
    end
    $display("output words %0d for %0d input frames", n_out, NQ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ checker
  int nsat = 0, npps = 0, nflg = 0;
  always @(posedge clk) if (!rst) begin
    #1;
    if (o_fs[0].vld) begin
      automatic int  n  = n_out;
      automatic int  qq = n / 2;
      automatic int  base;
      automatic bit  skip = 0;
      automatic int  first_pps_n = 10;
      automatic bit  pps_e = (n >= 36) && ((n - 36) % (10 * F * 3 / 9) == 0);
      automatic bit  eof_e = (n >= 34) && (((n + 1 - 36) % (10 * F * 3 / 9) == 0) ||
                                          ((n + 2 - 36) % (10 * F * 3 / 9) == 0));
      automatic bit  flg_base = (n < first_pps_n + 54);
      for (int k = 0; k <= 53 && k <= n; k++) if (load[n - k]) flg_base = 1;
      if (flg_base) nflg++;
      if (n >= sel_w[2] + 80)      base = 0;
      else if (n >= sel_w[1] + 80) base = 2;
      else                         base = 1;
      if ((n >= sel_w[1] && n < sel_w[1] + 80) || (n >= sel_w[2] && n < sel_w[2] + 80)) skip = 1;
      for (int s = 0; s < NS; s++) begin
        automatic real zr = 0.0, zi = 0.0, g, o, oc;
        automatic int  sh = (s == 6) ? 3 : (s == 7) ? 6 : 2;
        automatic int  sc = (s == 6) ? 32768 : 65535;
        for (int i = 0; i < NHB; i++)
          if (2 * qq - i >= 0) begin
            zr += hbr(i) * chr[2 * qq - i][base + s];
            zi += hbr(i) * chi[2 * qq - i][base + s];
          end
        g  = (2.0 ** (sh - 2)) * real'(sc) / 65536.0;
        o  = 128.0 * g * ((n % 2) ? zi : zr);
        oc = (o > 127.0) ? 127.0 : (o < -127.0) ? -127.0 : o;
        checks++;
        if (o_fs[s].pol != n[0] || o_fs[s].pps != pps_e || o_fs[s].eof != eof_e) begin
          failures++;
          if (failures < 10)
            $display("FAIL n=%0d s=%0d pol %b pps %b eof %b", n, s, o_fs[s].pol, o_fs[s].pps, o_fs[s].eof);
        end
        if (pps_e && s == 0) begin
          automatic int mq = 9 + ((n - 36) / (10 * F * 3 / 9)) * 3 * F;
          npps++;
          checks++;
          if (o_fs[s].tms != 64'(1000 + mq)) begin
            failures++;
            $display("FAIL tms %0d exp %0d", o_fs[s].tms, 1000 + mq);
          end
        end
        if (!skip) begin
          checks++;
          if (real'(o_fs[s].smp) - oc > 1.0 + g / 32.0 || oc - real'(o_fs[s].smp) > 1.0 + g / 32.0) begin
            failures++;
            if (failures < 10) begin
              automatic int got = int'(o_fs[s].smp);
              $display("FAIL n=%0d s=%0d got %0d exp %f flg %b", n, s, got, o, o_fs[s].flg);
            end
          end
          if (o > 129.0 || o < -129.0) begin
            nsat++;
            checks++;
            if (!o_fs[s].flg) begin failures++; $display("FAIL n=%0d s=%0d saturation not flagged", n, s); end
          end else if (o < 126.0 && o > -126.0) begin
            checks++;
            if (o_fs[s].flg != flg_base) begin
              failures++;
              if (failures < 10) $display("FAIL n=%0d s=%0d flg %b exp %b", n, s, o_fs[s].flg, flg_base);
            end
          end
        end
      end
      n_out++;
    end
  end

  final $display("saturated words %0d, output markers %0d, flagged words %0d", nsat, npps, nflg);
endmodule
