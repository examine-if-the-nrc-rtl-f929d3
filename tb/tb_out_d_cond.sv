// tb_out_d_cond: marker delay, end-of-frame, time code and flag combination
// of the OSPFB output condition block.
//
// Random slice words with idle cycles; markers are placed at random valid
// words at least 40 words apart.  A reference model counts valid words: the
// output marker must appear on the 26th valid word after the marked one, the
// end-of-frame on the two valid words just before it, and o_tms must switch
// to the time code present when the marker entered exactly on the marker
// word.  Data, pol and valid are checked with one clock of latency, and the
// flag must be valid & (slice flag | slip/miss | overflow).
module tb_out_d_cond;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  ctl_t            in_ctl = '0;
  o_t              in_o   [NS];
  logic            in_flg [NS];
  logic [TC_W-1:0] in_tc = '0;
  logic            pps_sm = 1'b0, ovf = 1'b0;
  fs_strm_t        o_fs   [NS];
  int checks = 0, failures = 0;
  int npps = 0, neof = 0;

  out_d_cond dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int              w = 0;          // valid word counter
    int              mark_w = -1000; // word index of the last marker
    logic [TC_W-1:0] tc_mark = '0, tc_exp = '0;
    o_t              last_o [NS];
    for (int s = 0; s < NS; s++) begin in_o[s] = '0; in_flg[s] = 1'b0; last_o[s] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 30000; c++) begin
      automatic bit pps_e, eof_e;
      @(negedge clk);
      in_ctl = '0;
      in_ctl.v   = ($urandom_range(0, 4) != 0);
      in_ctl.pol = 1'($urandom);
      in_ctl.pps = in_ctl.v && (w - mark_w >= 40) && ($urandom_range(0, 30) == 0);
      in_tc  = {$urandom, $urandom};
      pps_sm = ($urandom_range(0, 50) == 0);
      ovf    = ($urandom_range(0, 50) == 0);
      for (int s = 0; s < NS; s++) begin
        in_o[s]   = o_t'($urandom);
        in_flg[s] = ($urandom_range(0, 5) == 0);
      end
      pps_e = 1'b0;
      eof_e = 1'b0;
      if (in_ctl.v) begin
        if (in_ctl.pps) begin
          mark_w  = w;
          tc_mark = in_tc;
        end else begin
          pps_e = (w - mark_w == 26);
          eof_e = (w - mark_w == 24) || (w - mark_w == 25);
        end
      end
      if (pps_e) begin tc_exp = tc_mark; npps++; end
      if (eof_e) neof++;
      @(posedge clk);
      #1;
      for (int s = 0; s < NS; s++) begin
        automatic logic fe = in_ctl.v & (in_flg[s] | pps_sm | ovf);
        automatic o_t   de = in_ctl.v ? in_o[s] : last_o[s];
        checks++;
        if (o_fs[s].vld != in_ctl.v || o_fs[s].pol != in_ctl.pol || o_fs[s].pps != pps_e ||
            o_fs[s].eof != eof_e || o_fs[s].tms != tc_exp || o_fs[s].flg != fe ||
            o_fs[s].smp != de) begin
          failures++;
          if (failures < 10)
            $display("FAIL c=%0d s=%0d got v%b p%b e%b f%b exp v%b p%b e%b f%b", c, s,
                     o_fs[s].vld, o_fs[s].pps, o_fs[s].eof, o_fs[s].flg,
                     in_ctl.v, pps_e, eof_e, fe);
        end
        last_o[s] = de;
      end
      if (in_ctl.v) w++;
    end
    checks++;
    if (npps < 10 || neof < 20) failures++;
    $display("markers out %0d, eof words %0d", npps, neof);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
