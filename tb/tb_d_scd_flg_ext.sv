// tb_d_scd_flg_ext: feeds frames at the nominal rate (one idle cycle after
// every nine frames plus random idle cycles) and checks, against a sample
// queue model, that output frames alternately carry the next 5 and 4 samples
// newest first, that pol toggles, that only every third marker is passed,
// that the flag covers everything before the first marker and 54 frames
// (27 slice samples) after it and after every flagged input, and that the
// output keeps up with the input (10 frames per 9).  A second phase drives a
// frame on every clock and checks that the FIFO overflow sets the sticky
// fatal bit.
module tb_d_scd_flg_ext;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  ctl_t in_ctl = '0, out_ctl;
  cx_x_t in_d [NP], out_d [NP];
  logic ovf;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_pps_in = 0, n_pps_out = 0, n_flag_in = 0, n_five = 0, n_four = 0;

  d_scd_flg_ext #(.FIFO_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { cx_x_t d; bit pps; bit flg; } s_t;
  s_t q [$];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  bit   seen = 0, st = 0;
  int   pps_cnt = 0, w = 0, last_load = -1000;
  bit   check_data = 1;
  always @(posedge clk) if (!rst && out_ctl.v && check_data) begin
    int n; bit ap, af, load, exp_flg;
    s_t sm [5];
    n = st ? 4 : 5;
    chk(out_ctl.pol == st, "pol toggles");
    if (n == 5) n_five++; else n_four++;
    ap = 0; af = 0;
    chk(q.size() >= n, "enough samples");
    for (int i = 0; i < n; i++) begin sm[i] = q.pop_front(); ap |= sm[i].pps; af |= sm[i].flg; end
    for (int i = 0; i < n; i++) chk(out_d[i] == sm[n-1-i].d, "samples newest first");
    if (n == 4) chk(out_d[4] == '0, "unused slot zero");
    chk(out_ctl.pps == (ap && (pps_cnt % PPS_DIV == 0)), "every third marker");
    if (ap) pps_cnt++;
    load = af || (ap && !seen);
    if (load) last_load = w;
    if (ap) seen = 1;
    exp_flg = !seen || (w - last_load < 2 * FLAG_EXT);
    chk(out_ctl.flg == exp_flg, "flag extension");
    if (out_ctl.pps) n_pps_out++;
    st = !st; w++; n_out++;
  end

  initial begin
    for (int i = 0; i < NP; i++) in_d[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_ctl = '0;
      in_ctl.v = (c % 10 != 9) && ($urandom_range(0, 71) != 0);
      if (in_ctl.v) begin
        in_ctl.pps = (n_in % 60 == 7);
        in_ctl.flg = (n_in == 400) || (n_in == 1000);
        for (int i = 0; i < NP; i++) in_d[i] = cx_x_t'($urandom);
        for (int i = NP - 1; i >= 0; i--) q.push_back('{d: in_d[i], pps: in_ctl.pps && (i == NP-1), flg: in_ctl.flg});
        if (in_ctl.pps) n_pps_in++;
        if (in_ctl.flg) n_flag_in++;
        n_in++;
      end
    end
    @(negedge clk); in_ctl = '0;
    repeat (40) @(posedge clk);
    chk(q.size() < 5, "all samples scheduled");
    chk(n_out * 9 >= n_in * 10 - 18, "10 output frames per 9 input frames");
    chk(!ovf, "no overflow at nominal rate");
    chk(n_pps_out > 1 && n_pps_in >= 3 * n_pps_out - 2, "markers divided by three");
    $display("in=%0d out=%0d five=%0d four=%0d pps_in=%0d pps_out=%0d", n_in, n_out, n_five, n_four, n_pps_in, n_pps_out);
    // ---- overflow phase
    rst <= 1; repeat (2) @(posedge clk); rst <= 0;
    check_data = 0;
    q.delete(); seen = 0; st = 0; pps_cnt = 0; w = 0; last_load = -1000;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      in_ctl = '0; in_ctl.v = 1;
      for (int i = 0; i < NP; i++) in_d[i] = cx_x_t'($urandom);
      if (!ovf) for (int i = NP - 1; i >= 0; i--) q.push_back('{d: in_d[i], pps: 0, flg: 0});
    end
    @(negedge clk); in_ctl = '0;
    chk(ovf, "overflow detected");
    repeat (50) @(posedge clk);
    chk(ovf, "overflow is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
