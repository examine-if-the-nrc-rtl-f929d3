// tb_avcc_top: end-to-end test of the strawman AVCC channelizer with small
// buffers (32 words) and a short marker period (60 frames).
//
// Filter banks 0, 1 and 2 receive the same random sample stream; the other
// 17 receive independent random streams.  Bank 1 is switched to slice
// selection 10 and bank 2 to shift 6 (x16) through their register buses.
// The test then checks and counts every mechanism of the design:
//   - buffer-empty stalls and the one-in-ten read throttle (counted)
//   - the 5/4 scheduler: stage-1 frames of both kinds in a 1:1 ratio and
//     10 stage-1 frames per 9 input frames
//   - flags on every word until the first output marker window has passed,
//     and none afterwards on a bank that does not saturate
//   - output markers every 3 x 60 x 10/9 = 200 words on every lane
//   - slice selection: slice s+1 of bank 1 equals slice s of bank 0 exactly
//   - saturation: bank 2 produces +/-127 words, (nearly) all flagged
//   - a marker requested too early: slip/miss status read back from the
//     register bus, and all words flagged afterwards
//   - link buffer overflow during a write burst (counted, link_ovf)
//   - switch re-route: output lane 0 of switch 0 copies input lane 26
//     (bank 3, slice 2) after the route register write
//   - lanes of switch 1 carry banks 10..19
module tb_avcc_top;
  import ospfb_pkg::*;
  localparam int F = 60;

  logic            clk = 0, rst = 1, detri_clk = 0, detri_rst = 1;
  logic            link_wr   [6];
  logic [511:0]    link_data [6];
  logic            link_full [6];
  logic            link_ovf  [6];
  logic            i_pps_req = 1'b0;
  logic [TC_W-1:0] i_tc = '0;
  ctl_req_t        ctl_req [20];
  ctl_rsp_t        ctl_rsp [20];
  logic            sw_cfg_we  [2];
  logic [6:0]      sw_cfg_out [2];
  logic [6:0]      sw_cfg_in  [2];
  lane_t           o_lane [2][80];
  logic [TC_W-1:0] o_tms  [20];
  logic            o_eof  [20];
  logic [1199:0]   o_bus;
  int checks = 0, failures = 0;

  avcc_top #(.FIFO_DEPTH(32), .FRAMES(F)) dut (.*);
  always #5 clk = ~clk;
  always #8 detri_clk = ~detri_clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  task automatic reg_wr(input int b, input logic [3:0] a, input logic [31:0] d);
    @(negedge detri_clk);
    ctl_req[b] = '0; ctl_req[b].wr = 1'b1; ctl_req[b].addr = a; ctl_req[b].be = 4'hF;
    ctl_req[b].wdata = d;
    @(negedge detri_clk);
    ctl_req[b] = '0;
  endtask

  task automatic reg_rd(input int b, input logic [3:0] a, output logic [31:0] d);
    @(negedge detri_clk);
    ctl_req[b] = '0; ctl_req[b].rd = 1'b1; ctl_req[b].addr = a;
    @(negedge detri_clk);
    ctl_req[b] = '0;
    d = ctl_rsp[b].rdata;
  endtask

  function automatic void fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", what, $time);
  endfunction

  function automatic logic [59:0] rnd60();
    return {$urandom, $urandom};
  endfunction

  // ------------------------------------------------------------ counters
  int n_stall = 0, n_idle = 0, n_reads = 0;
  int n_pol0 = 0, n_pol1 = 0;
  int n_words = 0, n_pps_out = 0, n_flag_early = 0, n_flag_late = 0;
  int n_sel_eq = 0, n_sat = 0, n_ovf = 0, n_route = 0, n_slip_flag = 0;
  int first_pps_w = -1;
  int n_sat_flg = 0;
  bit want_slip = 0, slipped = 0, route_on = 0, burst = 0, stop_links = 0;
  bit sel_done = 0;
  int sel_w = 1 << 30;

  // link writer: one word per clock per link unless stalled; bursts write
  // every clock, normal operation leaves out one write in twelve
  initial begin
    int c = 0;
    for (int f = 0; f < 6; f++) begin link_wr[f] = 1'b0; link_data[f] = '0; end
    wait (!rst);
    forever begin
      @(negedge clk);
      for (int f = 0; f < 6; f++) link_wr[f] = 1'b0;
      if (!stop_links && (burst || (c % 12 != 11))) begin
        logic [59:0] a;
        a = rnd60();
        for (int f = 0; f < 6; f++) begin
          link_data[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
          link_wr[f] = 1'b1;
        end
        link_data[0][179:0] = {a, a, a};
      end
      c++;
    end
  end

  // marker generator: exactly F frames apart, except one early marker
  initial begin
    int fcount = 0;
    bit pending = 0;
    wait (!rst);
    forever begin
      @(negedge clk);
      #1;
      i_pps_req = 1'b0;
      if (dut.rd_en[0]) begin
        fcount++;
        if (pending) begin fcount = 1; pending = 0; end
      end
      if (!pending && ((fcount == F && dut.rd_en[0]) || (want_slip && !slipped && fcount == F / 2))) begin
        if (want_slip && fcount == F / 2) slipped = 1;
        i_pps_req = 1'b1;
        i_tc      = i_tc + 1;
        pending   = 1;
        fcount    = 0;
      end
    end
  end

  // monitors
  always @(posedge clk) if (!rst) begin
    automatic bit all_ne = 1;
    for (int f = 0; f < 6; f++) all_ne &= ~dut.empty[f];
    if (dut.u_fan.slot == 4'd9 && all_ne) n_idle++;
    if (!all_ne) n_stall++;
    if (dut.rd_en[0]) n_reads++;
    if (dut.g_ospfb[0].u_ospfb.c2.v) begin
      if (dut.g_ospfb[0].u_ospfb.c2.pol) n_pol1++; else n_pol0++;
    end
    for (int f = 0; f < 6; f++) if (link_ovf[f]) n_ovf++;
  end

  logic [2:0] sm_q = '0;
  always @(posedge clk) sm_q <= {sm_q[1:0], dut.g_ospfb[4].u_ospfb.pps_sm};

  always @(posedge clk) if (!rst) begin
    #1;
    if (o_lane[0][0].vld) begin
      n_words++;
      if (o_lane[0][0].pps) begin
        n_pps_out++;
        if (first_pps_w < 0) first_pps_w = n_words;
        else if (!want_slip) begin
          checks++;
          if ((n_words - first_pps_w) % 200 != 0) begin
            failures++;
            $display("FAIL marker spacing at word %0d", n_words);
          end
        end
      end
      for (int l = 0; l < 80; l++) begin
        checks++;
        if (o_lane[0][l].pps != o_lane[0][0].pps || o_lane[1][l].pps != o_lane[0][0].pps ||
            o_lane[1][l].vld != 1'b1) fail("lane markers");
      end
      // flags of bank 1: set before the first output marker, clear later
      // except on saturated words
      if (first_pps_w < 0) begin
        checks++;
        if (!o_lane[0][8].flg) fail("early flag");   // bank 1 slice 0, before the marker
        n_flag_early++;
      end else if (n_words > first_pps_w + 60 && !slipped) begin
        if (o_lane[0][8].flg && o_lane[0][8].smp != 8'sd127 && o_lane[0][8].smp != -8'sd127)
          n_flag_late++;
      end
      if (slipped && sm_q == 3'b111) begin
        checks++;
        n_slip_flag++;
        if (!o_lane[0][32].flg || !o_lane[1][0].flg) fail("slip flag");
      end
      // slice selection: bank 1 slice s+1 == bank 0 slice s
      if (sel_done && n_words > sel_w + 150 && !route_on) begin
        for (int s = 0; s < 7; s++) begin
          checks++;
          if (o_lane[0][8 + s + 1].smp != o_lane[0][s].smp) begin
            failures++;
            if (failures < 10) $display("FAIL sel word %0d slice %0d: %0d vs %0d", n_words, s,
                                        o_lane[0][8 + s + 1].smp, o_lane[0][s].smp);
          end else n_sel_eq++;
        end
      end
      // saturation on bank 2
      for (int s = 0; s < NS; s++)
        if (o_lane[0][16 + s].smp == 8'sd127 || o_lane[0][16 + s].smp == -8'sd127) begin
          n_sat++;
          if (o_lane[0][16 + s].flg) n_sat_flg++;
        end
    end
    // re-route: lane 0 copies lane 26 (one register stage, same cycle)
    if (route_on) begin
      n_route++;
      checks++;
      if (o_lane[0][0] != o_lane[0][26]) fail("re-route");
    end
  end

  // switch 1 mapping: output lanes follow the bank outputs one clock later
  lane_t sw1_exp;
  always @(posedge clk) begin
    if (!rst && !$isunknown(sw1_exp)) begin
      checks++;
      if (o_lane[1][29] != sw1_exp) begin
        failures++;
        if (failures < 10) $display("FAIL switch 1 lane 29");
      end
    end
    sw1_exp <= '{flg: dut.g_ospfb[13].fs[5].flg, pps: dut.g_ospfb[13].fs[5].pps,
                 pol: dut.g_ospfb[13].fs[5].pol, vld: dut.g_ospfb[13].fs[5].vld,
                 smp: dut.g_ospfb[13].fs[5].smp};
  end

  // ------------------------------------------------------------ sequence
  initial begin
    logic [31:0] d;
    for (int b = 0; b < 20; b++) ctl_req[b] = '0;
    for (int w = 0; w < 2; w++) begin sw_cfg_we[w] = 0; sw_cfg_out[w] = '0; sw_cfg_in[w] = '0; end
    repeat (4) @(posedge detri_clk);
    detri_rst = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    reg_wr(2, 4'd1, {12'd0, 4'd6, 16'hFFFF});
    for (int s = 1; s < NS; s++) reg_wr(2, 4'(s + 1), {12'd0, 4'd6, 16'hFFFF});
    // run, then a slice-selection change on bank 1
    repeat (2000) @(posedge clk);
    sel_w = n_words;
    reg_wr(1, 4'd0, 32'h10);
    reg_rd(1, 4'd0, d);
    checks++;
    if (d[4:3] != 2'b10 || d[0] != 1'b0) begin failures++; $display("FAIL bank 1 status %h", d); end
    sel_done = 1;
    // buffers running dry
    repeat (1500) @(posedge clk);
    stop_links = 1;
    repeat (100) @(posedge clk);
    stop_links = 0;
    repeat (1500) @(posedge clk);
    // re-route lane 0 of switch 0 to input lane 26
    @(negedge clk);
    sel_done = 0;
    sw_cfg_we[0] = 1; sw_cfg_out[0] = 7'd0; sw_cfg_in[0] = 7'd26;
    @(negedge clk);
    sw_cfg_we[0] = 0;
    @(negedge clk);
    route_on = 1;
    repeat (300) @(posedge clk);
    // early marker: slip/miss
    want_slip = 1;
    wait (slipped);
    repeat (30) @(posedge clk);
    reg_rd(4, 4'd0, d);
    checks++;
    if (d[1] != 1'b1) begin failures++; $display("FAIL slip status %h", d); end
    // write burst: link buffers overflow
    burst = 1;
    repeat (600) @(posedge clk);
    burst = 0;
    repeat (200) @(posedge clk);
    // summary
    // a word can also round to exactly +/-127 without saturating
    checks++;
    if (n_sat_flg < (9 * n_sat) / 10) failures++;
    checks++;
    if (n_pol0 - n_pol1 > 1 || n_pol1 - n_pol0 > 1) failures++;
    checks++;
    if (n_pol0 + n_pol1 < (10 * n_reads) / 9 - 40 || n_pol0 + n_pol1 > (10 * n_reads) / 9 + 2) begin
      failures++;
      $display("FAIL rate: %0d stage-1 frames for %0d reads", n_pol0 + n_pol1, n_reads);
    end
    checks++;
    if (n_stall == 0 || n_idle == 0 || n_pps_out < 3 || n_flag_early == 0 || n_sel_eq == 0 ||
        n_sat == 0 || n_ovf == 0 || n_route == 0 || n_slip_flag == 0 || n_flag_late != 0)
      failures++;
    $display("reads %0d, empty stalls %0d, throttle idles %0d", n_reads, n_stall, n_idle);
    $display("stage-1 frames of 5 / 4 new samples: %0d / %0d", n_pol0, n_pol1);
    $display("output words %0d, markers %0d, flagged before marker %0d, flagged later %0d",
             n_words, n_pps_out, n_flag_early, n_flag_late);
    $display("selection matches %0d, +/-127 words %0d (%0d flagged), link overflows %0d",
             n_sel_eq, n_sat, n_sat_flg, n_ovf);
    $display("re-routed cycles %0d, slip-flagged words %0d", n_route, n_slip_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
