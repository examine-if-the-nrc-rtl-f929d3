// avcc_top: strawman very coarse channelizer FPGA for 20 sub-bands.
//
// Ingests 20 complex sub-bands (10 per polarisation, each 2.0 Gs/s with
// 1.6 GHz of science bandwidth, 32 GHz in all) arriving on six 512-bit link
// streams, and turns them into 160 frequency slices of 200 MHz:
//   6 x sync_fifo       512-bit x 8192-word input buffer per link
//   fan_in_concat       4 x 180 + 2 x 240 bits -> 1200-bit bus, 60 bits per
//                       filter bank, plus valid / epoch control
//   20 x ospfb          two-stage oversampled polyphase filter banks,
//                       8 slices each
//   2 x circuit_switch  80 x 80, 12-bit lanes: filter banks 0..9 feed switch
//                       0, filter banks 10..19 feed switch 1; lane 8 b + f of
//                       a switch carries slice f of its b-th filter bank
//
// The link receivers (100G Ethernet MACs) are outside this module: their
// receive words enter on link_wr/link_data.  The serial packers towards the
// slice processors are also outside: the switch outputs are ports.  Each
// filter bank's register bus is brought out (ctl_req/ctl_rsp, control clock
// detri_clk); so are the route-register write ports of the switches and the
// time code / end-of-frame of each filter bank, which the 12-bit lanes do not
// carry.
//
// Clocking: everything except the register buses runs on clk (450 MHz).  The
// strawman runs the buffers at 225 MHz, edge-aligned with every other clk
// edge, with multicycle paths to the filter banks; here the buffers are
// simply clocked by clk, and fan_in_concat limits reads to nine in ten
// clocks, which is the rate the filter banks need.
// The block list, counts, widths and the split of the filter banks between
// the two switches follow the strawman description; the port list and the
// single datapath clock are this design's choices.
module avcc_top
  import ospfb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8192,
  parameter int unsigned FRAMES     = FRAMES_PER_PPS
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            detri_clk,
  input  logic            detri_rst,
  input  logic            link_wr   [6],
  input  logic [511:0]    link_data [6],
  output logic            link_full [6],
  output logic            link_ovf  [6],
  input  logic            i_pps_req,
  input  logic [TC_W-1:0] i_tc,
  input  ctl_req_t        ctl_req [20],
  output ctl_rsp_t        ctl_rsp [20],
  input  logic            sw_cfg_we  [2],
  input  logic [6:0]      sw_cfg_out [2],
  input  logic [6:0]      sw_cfg_in  [2],
  output lane_t           o_lane [2][80],
  output logic [TC_W-1:0] o_tms  [20],
  output logic            o_eof  [20],
  output logic [1199:0]   o_bus
);

  logic [511:0] rd_data [6];
  logic         empty   [6];
  logic         rd_en   [6];

  for (genvar f = 0; f < 6; f++) begin : g_link
    logic [$clog2(FIFO_DEPTH+1)-1:0] unused_count;
    sync_fifo #(.WIDTH(512), .DEPTH(FIFO_DEPTH)) u_wib (
      .clk, .rst,
      .wr_en(link_wr[f]), .wr_data(link_data[f]),
      .rd_en(rd_en[f]), .rd_data(rd_data[f]),
      .full(link_full[f]), .empty(empty[f]), .count(unused_count),
      .overflow(link_ovf[f])
    );
  end

  in_strm_t strm [20][NP];

  fan_in_concat u_fan (
    .clk, .rst, .rd_data, .empty, .rd_en, .i_pps_req, .i_tc,
    .o_bus(o_bus), .o_strm(strm)
  );

  lane_t sw_in [2][80];

  for (genvar b = 0; b < 20; b++) begin : g_ospfb
    fs_strm_t fs [NS];
    ospfb #(.FRAMES(FRAMES)) u_ospfb (
      .i_clk(clk), .i_clk_reset(rst),
      .i_detri_clk(detri_clk), .i_detri_clk_reset(detri_rst),
      .i_strm(strm[b]), .o_fs(fs),
      .i_fm_endpoint(ctl_req[b]), .o_to_endpoint(ctl_rsp[b])
    );
    assign o_tms[b] = fs[0].tms;
    assign o_eof[b] = fs[0].eof;
    for (genvar s = 0; s < NS; s++) begin : g_lane
      assign sw_in[b / 10][(b % 10) * NS + s] =
        '{flg: fs[s].flg, pps: fs[s].pps, pol: fs[s].pol, vld: fs[s].vld, smp: fs[s].smp};
    end
  end

  for (genvar w = 0; w < 2; w++) begin : g_sw
    circuit_switch #(.N(80)) u_sw (
      .clk, .rst,
      .cfg_we(sw_cfg_we[w]), .cfg_out(sw_cfg_out[w]), .cfg_in(sw_cfg_in[w]),
      .in_lane(sw_in[w]), .out_lane(o_lane[w])
    );
  end

endmodule
