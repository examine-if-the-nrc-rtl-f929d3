// tb_up_poly_fir_fb: feeds frames of 5 and 4 new random samples alternately
// (with idle cycles) and compares every branch output with the polyphase
// sum y[k] = sum TDL(j) h(j) over the positions j with floor(j/2) = k mod 10
// (only every other TDL position holds a sample, so this groups the real
// samples by ten), evaluated on an explicitly zero-stuffed sample history,
// with the same final rounding.
module tb_up_poly_fir_fb;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  ctl_t in_ctl = '0, out_ctl;
  cx_x_t in_d [NP];
  cx_fir_t out_y [NCH];
  int checks = 0, failures = 0;
  localparam proto_t H = proto_coefs();

  up_poly_fir_fb dut (.*);
  always #5 clk = ~clk;

  cx_x_t xs [$];   // all samples in time order

  function automatic cx_x_t u_at(input int t);   // zero-stuffed stream, x(m) at t = 2m - 8
    if ((t + 8) % 2 != 0 || t + 8 < 0) return '0;
    if ((t + 8) / 2 >= xs.size()) return '0;
    return xs[(t + 8) / 2];
  endfunction

  function automatic int rs(input longint v);
    longint r = (v + 256) >>> 9;
    if (r > 131071) r = 131071;
    if (r < -131071) r = -131071;
    return int'(r);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0; bit st = 0;
    for (int i = 0; i < NP; i++) in_d[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      in_ctl = '0;
      in_ctl.v = ($urandom_range(0, 9) != 0);
      in_ctl.pol = st;
      in_ctl.flg = 1'($urandom);
      for (int i = 0; i < NP; i++) in_d[i] = cx_x_t'($urandom);
      if (c < 40) for (int i = 0; i < NP; i++) in_d[i] = (c == 3 && i == 0) ? '{re: 6'sd31, im: -6'sd31} : '0;
      if (st) in_d[4] = '0;
      if (in_ctl.v) for (int i = (st ? 3 : 4); i >= 0; i--) xs.push_back(in_d[i]);
      @(posedge clk);
      #1;
      checks++;
      if (out_ctl != in_ctl) begin failures++; $display("FAIL ctl"); end
      if (in_ctl.v) begin
        for (int k = 0; k < NCH; k++) begin
          automatic longint are = 0, aim = 0;
          for (int j = 0; j < NH; j++) if ((j / 2) % NCH == k) begin
            automatic cx_x_t s = u_at(9 * n - j);
            are += longint'(s.re) * longint'(H[j]);
            aim += longint'(s.im) * longint'(H[j]);
          end
          checks++;
          if (int'(out_y[k].re) != rs(are) || int'(out_y[k].im) != rs(aim)) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d branch %0d: %0d,%0d exp %0d,%0d", n, k,
                                        out_y[k].re, out_y[k].im, rs(are), rs(aim));
          end
        end
        n++; st = !st;
      end
    end
    $display("frames=%0d", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
