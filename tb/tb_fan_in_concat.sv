// tb_fan_in_concat: bit mapping, read throttle and marker handling of the
// link-to-filter-bank glue.
//
// Random buffer words and random empty flags.  A model of the ten-clock slot
// counter predicts rd_en (all buffers non-empty and not the tenth slot); on
// each read the 1200-bit bus and every one of the 100 sample records are
// compared with the expected slices of the six buffer words.  Marker requests
// are issued at random; the marker (with the time code of the request) must
// appear on record 0 of the first frame read after the request, and only
// there.
module tb_fan_in_concat;
  import ospfb_pkg::*;
  logic            clk = 0, rst = 1;
  logic [511:0]    rd_data [6];
  logic            empty   [6];
  logic            rd_en   [6];
  logic            i_pps_req = 1'b0;
  logic [TC_W-1:0] i_tc = '0;
  logic [1199:0]   o_bus;
  in_strm_t        o_strm [20][NP];
  int checks = 0, failures = 0;
  int nidle = 0, nempty = 0, npps = 0;

  fan_in_concat dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int              slot = 0;
    bit              pend = 0;
    logic [TC_W-1:0] tcp = '0;
    for (int f = 0; f < 6; f++) begin rd_data[f] = '0; empty[f] = 1'b1; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < 20000; c++) begin
      automatic bit           go_e, all_ne = 1, pps_e;
      automatic logic [1199:0] exp_bus;
      for (int f = 0; f < 6; f++) begin
        rd_data[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                      $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        empty[f] = ($urandom_range(0, 30) == 0);
        all_ne &= ~empty[f];
      end
      i_pps_req = ($urandom_range(0, 200) == 0);
      i_tc = {$urandom, $urandom};
      go_e = all_ne && (slot != 9);
      if (slot == 9) nidle++;
      else if (!all_ne) nempty++;
      #1;
      for (int f = 0; f < 6; f++) begin
        checks++;
        if (rd_en[f] != go_e) failures++;
      end
      for (int f = 0; f < 4; f++) exp_bus[180*f +: 180] = rd_data[f][179:0];
      for (int f = 0; f < 2; f++) exp_bus[720 + 240*f +: 240] = rd_data[4+f][239:0];
      pps_e = go_e && pend;
      @(posedge clk);
      #1;
      if (pend && go_e) pend = 0;
      if (i_pps_req) begin pend = 1; tcp = i_tc; end
      if (pps_e) npps++;
      for (int s = 0; s < 20; s++)
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (o_strm[s][p].vld != go_e || o_strm[s][p].pps != (pps_e && p == 0)) begin
            failures++;
            if (failures < 10) $display("FAIL ctl c=%0d s=%0d p=%0d", c, s, p);
          end
          if (go_e) begin
            checks++;
            if (o_strm[s][p].re != x_t'(exp_bus[60*s + 12*p + 6 +: 6]) ||
                o_strm[s][p].im != x_t'(exp_bus[60*s + 12*p +: 6])) begin
              failures++;
              if (failures < 10) $display("FAIL data c=%0d s=%0d p=%0d", c, s, p);
            end
            if (pps_e && p == 0) begin
              checks++;
              if (o_strm[s][p].tms != tcp) failures++;
            end
          end
        end
      if (go_e) begin
        checks++;
        if (o_bus != exp_bus) failures++;
      end
      slot = (slot == 9) ? 0 : slot + 1;
      @(negedge clk);
    end
    checks++;
    if (nidle == 0 || nempty == 0 || npps < 20) failures++;
    $display("idle slots %0d, empty stalls %0d, markers %0d", nidle, nempty, npps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
