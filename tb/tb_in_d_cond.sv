// tb_in_d_cond: drives frames with random idle cycles and a marker schedule
// that is first on time, then early (slip), on time again, then missing and
// late.  Checks the newest-first re-ordering, the time-code latch, the
// first-marker status and the slip/miss status against a frame-count model.
module tb_in_d_cond;
  import ospfb_pkg::*;
  localparam int FR = 12;
  logic clk = 0, rst = 1;
  logic in_v = 0, in_pps = 0, in_flg = 0;
  logic [TC_W-1:0] in_tc = '0;
  cx_x_t in_d [NP];
  ctl_t out_ctl;
  cx_x_t out_d [NP];
  logic [TC_W-1:0] out_tc;
  logic pps_seen, pps_sm;
  int checks = 0, failures = 0, n_slip = 0, n_miss = 0, n_clear = 0;

  in_d_cond #(.FRAMES(FR)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // valid-frame indices that carry a marker
  int pps_at [$] = '{5, 17, 27, 39, 60, 72, 84};

  initial begin
    int k = 0, last = -1000;
    bit seen = 0, sm = 0, was_sm;
    logic [TC_W-1:0] tc_exp = '0;
    cx_x_t sent [NP];
    for (int i = 0; i < NP; i++) in_d[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (k < 100) begin
      @(negedge clk);
      in_v   = ($urandom_range(0, 9) != 0);
      in_pps = in_v && (k inside {pps_at});
      in_flg = 1'($urandom);
      in_tc  = {$urandom, $urandom};
      for (int i = 0; i < NP; i++) in_d[i] = cx_x_t'($urandom);
      sent = in_d;
      @(posedge clk);
      #1;
      chk(out_ctl.v == in_v, "valid");
      chk(out_ctl.pps == in_pps, "pps");
      if (in_v) begin
        chk(out_ctl.flg == in_flg, "flag");
        for (int i = 0; i < NP; i++) chk(out_d[i] == sent[NP-1-i], "reorder");
        was_sm = sm;
        if (in_pps) begin
          if (seen) sm = (k - last != FR);
          seen = 1; last = k; tc_exp = in_tc;
          if (sm && !was_sm) n_slip++;
        end else if (seen && (k - last >= FR)) begin
          if (!sm) n_miss++;
          sm = 1;
        end
        if (was_sm && !sm) n_clear++;
        k++;
      end
      chk(pps_seen == seen, "first marker status");
      chk(pps_sm == sm, "slip/miss status");
      chk(out_tc == tc_exp, "time code");
    end
    chk(n_slip > 0 && n_miss > 0 && n_clear > 0, "slip, miss and recovery exercised");
    $display("slip=%0d miss=%0d clear=%0d", n_slip, n_miss, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
