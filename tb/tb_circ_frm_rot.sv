// tb_circ_frm_rot: random branch frames with idle cycles; checks that frame n
// leaves rotated by r(n) = (pol - 9n)/2 mod 10, pol = n mod 2 (out[m] =
// in[(m - r) mod 10]), computed here in closed form rather than by the
// module's +6/+5 recursion, and that the control word follows with one clock
// of latency.
module tb_circ_frm_rot;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  ctl_t in_ctl = '0, out_ctl;
  cx_fir_t in_y [NCH], out_y [NCH];
  int checks = 0, failures = 0;

  circ_frm_rot dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    cx_fir_t sent [NCH];
    for (int k = 0; k < NCH; k++) in_y[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      in_ctl = '0;
      in_ctl.v = ($urandom_range(0, 4) != 0);
      in_ctl.pol = n[0];
      in_ctl.pps = 1'($urandom);
      for (int k = 0; k < NCH; k++) in_y[k] = cx_fir_t'({$urandom, $urandom});
      sent = in_y;
      @(posedge clk);
      #1;
      checks++;
      if (out_ctl != in_ctl) failures++;
      if (in_ctl.v) begin
        for (int m = 0; m < NCH; m++) begin
          automatic int r = (((n % 2) - 9 * n) / 2 % NCH + NCH) % NCH;
          checks++;
          if (out_y[m] != sent[(m - r + NCH) % NCH]) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d pos %0d", n, m);
          end
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
