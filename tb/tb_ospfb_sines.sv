// tb_ospfb_sines: one OSPFB driven by the sum of eight complex sinusoids, one
// per frequency slice, with a different shift and scale for each slice.
//
// Tone i (i = 0..7) has frequency f_i (in cycles per input sample, i.e. in
// units of the 2 Gs/s sample rate) and magnitude A_i; slice i is set to
// shift code c_i and scale s_i through the register bus.  The sum is
// quantised to 6-bit levels (-31..31)/32 and fed at the nominal rate with
// markers every 240 frames.  After the pipeline has filled, the root mean
// square of the real and of the imaginary words of slice i must be within
// 10 % of 128 * 2^(c_i - 2) * s_i * A_i / sqrt(2), the level of tone i alone
// at unit pass-band gain; this shows that each tone lands in its own slice
// with the slice's gain applied.  No word may be flagged after the start-up
// window (nothing saturates at these levels).
module tb_ospfb_sines;
  import ospfb_pkg::*;
  localparam int NQ = 3000;

  logic clk = 0, rst = 1, dclk = 0, drst = 1;
  in_strm_t i_strm [NP];
  fs_strm_t o_fs   [NS];
  ctl_req_t req = '0;
  ctl_rsp_t rsp;
  int checks = 0, failures = 0;

  ospfb #(.FRAMES(240)) dut (
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

  real fr [NS] = '{0.082111621353251, 0.237655026213343, 0.297961560819441, 0.371235319422669,
                   0.481733387551645, 0.629636952628889, 0.710631159361382, 0.814723958736016};
  real am [NS] = '{0.124382648120286, 0.099048965283659, 0.139384578661599, 0.196146024474188,
                   0.156195908852844, 0.088388347648318, 0.110995371955572, 0.175034872412951};
  int  sh [NS] = '{2, 3, 2, 2, 2, 3, 2, 2};
  real sc [NS] = '{0.951583862304688, 0.801895141601563, 0.815170288085938, 0.803344726562500,
                   0.827102661132813, 0.962005615234375, 0.906890869140625, 0.829406738281250};

  function automatic x_t quant(input real v);
    int k;
    k = int'($floor(v * 32.0 + 0.5));
    if (k > 31) k = 31;
    if (k < -31) k = -31;
    return x_t'(k);
  endfunction

  task automatic reg_wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge dclk);
    req = '0; req.wr = 1'b1; req.addr = a; req.be = 4'hF; req.wdata = d;
    @(negedge dclk);
    req = '0;
  endtask

  real sre [NS], sim [NS];
  int  nre = 0, nim = 0, n_out = 0, nflg = 0;

  always @(posedge clk) if (!rst) begin
    #1;
    if (o_fs[0].vld) begin
      if (n_out >= 300)
        for (int s = 0; s < NS; s++) begin
          if (o_fs[s].pol) sim[s] += real'(o_fs[s].smp) ** 2;
          else             sre[s] += real'(o_fs[s].smp) ** 2;
          if (o_fs[s].flg) nflg++;
        end
      if (n_out >= 300) begin
        if (o_fs[0].pol) nim++; else nre++;
      end
      n_out++;
    end
  end

  initial begin
    int q = 0, c = 0;
    for (int s = 0; s < NS; s++) begin sre[s] = 0.0; sim[s] = 0.0; end
    for (int p = 0; p < NP; p++) i_strm[p] = '0;
    repeat (4) @(posedge dclk);
    drst = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < NS; s++)
      reg_wr(4'(s + 1), {12'd0, 4'(sh[s]), 16'($rtoi(sc[s] * 65536.0))});
    while (q < NQ) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) i_strm[p] = '0;
      if ((c % 10 != 9) && ($urandom_range(0, 71) != 0)) begin
        for (int p = 0; p < NP; p++) begin
          automatic int  m  = NP * q + p;
          automatic real vr = 0.0, vi = 0.0;
          for (int i = 0; i < NS; i++) begin
            vr += am[i] * $cos(2.0 * PI * fr[i] * m);
            vi += am[i] * $sin(2.0 * PI * fr[i] * m);
          end
          i_strm[p].re = quant(vr);
          i_strm[p].im = quant(vi);
        end
        i_strm[0].vld = 1'b1;
        i_strm[0].pps = (q >= 9) && ((q - 9) % 240 == 0);
        i_strm[0].tms = 64'(q);
        q++;
      end
      c++;
    end
    @(negedge clk);
    for (int p = 0; p < NP; p++) i_strm[p] = '0;
    repeat (100) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      automatic real e  = 128.0 * (2.0 ** (sh[s] - 2)) * sc[s] * am[s] / $sqrt(2.0);
      automatic real rr = $sqrt(sre[s] / nre);
      automatic real ri = $sqrt(sim[s] / nim);
      $display("slice %0d: rms re %6.2f im %6.2f, tone alone %6.2f", s, rr, ri, e);
      checks += 2;
      if (rr < 0.9 * e || rr > 1.1 * e) failures++;
      if (ri < 0.9 * e || ri > 1.1 * e) failures++;
    end
    checks++;
    if (nflg != 0) begin failures++; $display("FAIL %0d flagged words", nflg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
