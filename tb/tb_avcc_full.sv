// tb_avcc_full: the AVCC channelizer at full size (8192-word link buffers,
// 19,200,000 frames per marker period), run through one complete start-up:
// reset, register set-up, link words for 1500 frames with an epoch marker
// at frame 9, and draining.
//
// Checks: every one of the 160 lanes delivers the same number of output
// words, 10 for every 9 frames read; each lane shows exactly one output
// marker, on the same clock; every word is flagged until the first marker
// window has passed (no marker seen yet), and after it only words at +/-127
// are flagged (there is no second marker, and the slip/miss check has not
// yet got a full period to compare); bank 5, set to shift 6 through its
// register bus, saturates; the 20 banks' status registers report a marker
// seen, no slip and no overflow; o_tms carries the marker's time code.
module tb_avcc_full;
  import ospfb_pkg::*;

  logic            clk = 0, rst = 1, detri_clk = 0, detri_rst = 1;
  logic            link_wr   [6];
  logic [511:0]    link_data [6];
  logic            link_full [6];
  logic            link_ovf  [6];
  logic            i_pps_req = 1'b0;
  logic [TC_W-1:0] i_tc = 64'h0123_4567_89AB_CDEF;
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

  avcc_top dut (.*);
  always #5 clk = ~clk;
  always #8 detri_clk = ~detri_clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  int words [2][80];
  int marks [2][80];
  int n_reads = 0, n_sat = 0, n_late_flag = 0, n_early = 0;
  int pps_w = -1;

  always @(posedge clk) if (!rst) begin
    if (dut.rd_en[0]) n_reads++;
    #1;
    for (int w = 0; w < 2; w++)
      for (int l = 0; l < 80; l++)
        if (o_lane[w][l].vld) begin
          words[w][l]++;
          if (o_lane[w][l].pps) marks[w][l]++;
          if (o_lane[w][l].smp == 8'sd127 || o_lane[w][l].smp == -8'sd127) begin
            if (w == 0 && l >= 40 && l < 48) n_sat++;
          end else if (pps_w >= 0 && words[0][0] > pps_w + 30) begin
            if (o_lane[w][l].flg) n_late_flag++;
          end
          if (pps_w < 0) begin
            checks++;
            n_early++;
            if (!o_lane[w][l].flg) failures++;
          end
        end
    if (o_lane[0][0].vld && o_lane[0][0].pps) begin
      pps_w = words[0][0];
      for (int b = 0; b < 20; b++) begin
        checks++;
        if (o_tms[b] != i_tc) failures++;
      end
    end
  end

  initial begin
    logic [31:0] d;
    int q = 0;
    for (int b = 0; b < 20; b++) ctl_req[b] = '0;
    for (int w = 0; w < 2; w++) begin sw_cfg_we[w] = 0; sw_cfg_out[w] = '0; sw_cfg_in[w] = '0; end
    for (int f = 0; f < 6; f++) begin link_wr[f] = 0; link_data[f] = '0; end
    for (int w = 0; w < 2; w++) for (int l = 0; l < 80; l++) begin words[w][l] = 0; marks[w][l] = 0; end
    repeat (4) @(posedge detri_clk);
    detri_rst = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < NS; s++) reg_wr(5, 4'(s + 1), {12'd0, 4'd6, 16'hFFFF});
    // link words: one per clock per link, with one gap in twelve
    for (int c = 0; q < 1500; c++) begin
      @(negedge clk);
      i_pps_req = 1'b0;
      for (int f = 0; f < 6; f++) begin
        link_wr[f] = (c % 12 != 11);
        link_data[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                        $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      end
      if (c % 12 != 11) q++;
      // marker request before the tenth frame is read
      #1;
      if (n_reads == 8 && dut.rd_en[0]) i_pps_req = 1'b1;
    end
    @(negedge clk);
    for (int f = 0; f < 6; f++) link_wr[f] = 0;
    i_pps_req = 1'b0;
    repeat (300) @(posedge clk);
    for (int b = 0; b < 20; b++) begin
      reg_rd(b, 4'd0, d);
      checks++;
      if (d[2:0] != 3'b000) begin failures++; $display("FAIL bank %0d status %b", b, d[2:0]); end
    end
    for (int w = 0; w < 2; w++)
      for (int l = 0; l < 80; l++) begin
        checks++;
        if (words[w][l] != words[0][0] || marks[w][l] != 1) failures++;
      end
    checks++;
    if (words[0][0] < (10 * n_reads) / 9 - 2 || words[0][0] > (10 * n_reads) / 9) failures++;
    checks++;
    if (n_sat == 0 || n_late_flag != 0 || n_early == 0) failures++;
    $display("frames read %0d, words per lane %0d, marker at word %0d", n_reads, words[0][0], pps_w);
    $display("flagged words before the marker %0d, saturated words on bank 5 %0d, unexpected flags %0d",
             n_early, n_sat, n_late_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
