// fan_in_concat: glue between the six link input buffers and the 20 OSPFBs.
//
// Each read takes one 512-bit word from every one of the six buffers, which
// together hold one input frame (five 6+6 bit samples, 60 bits) for each of
// the 20 filter banks:
//   buffers 0..3: bits 179:0 -> three 60-bit streams each  (OSPFB 0..11)
//   buffers 4..5: bits 239:0 -> four 60-bit streams each   (OSPFB 12..19)
// and the 20 streams are concatenated into a 1200-bit bus, OSPFB s taking
// bits [60 s + 59 : 60 s].  Inside a 60-bit stream sample p (p = 0 oldest)
// sits in bits [12 p + 11 : 12 p] as {re[5:0], im[5:0]}.
//
// The glue also makes the OSPFB control signals: vld on every frame read,
// and an epoch marker with its time code on the first frame read after
// i_pps_req.  Reads happen only when all six buffers hold a word and never in
// the last of every NIDLE clocks: a filter bank uses 0.9 input frames per
// clock, so one idle cycle in ten keeps its scheduler FIFO from filling up
// whatever backlog the buffers hold.
//
// Interface: rd_data/empty/rd_en to the buffers, o_bus and o_strm to the
// filter banks.  Timing: o_bus and o_strm are registered, one clock after
// rd_en.
// The 4x180 + 2x240 split and the 1200-bit bus follow the strawman
// description; the sample packing, the throttle and the marker request are
// this design's choices.
module fan_in_concat
  import ospfb_pkg::*;
#(
  parameter int unsigned NIDLE = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [511:0]    rd_data [6],
  input  logic            empty   [6],
  output logic            rd_en   [6],
  input  logic            i_pps_req,
  input  logic [TC_W-1:0] i_tc,
  output logic [1199:0]   o_bus,
  output in_strm_t        o_strm [20][NP]
);

  localparam int SW = NP * 2 * X_W;   // 60 bits per filter bank

  logic [$clog2(NIDLE)-1:0] slot;
  logic                     go, pps_pend;
  logic [TC_W-1:0]          tc_pend;
  logic [1199:0]            bus;

  always_comb begin
    go = (slot != ($bits(slot))'(NIDLE - 1));
    for (int f = 0; f < 6; f++) go &= ~empty[f];
    for (int f = 0; f < 6; f++) rd_en[f] = go;
    for (int f = 0; f < 4; f++) bus[180*f +: 180] = rd_data[f][179:0];
    for (int f = 0; f < 2; f++) bus[720 + 240*f +: 240] = rd_data[4+f][239:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot     <= '0;
      pps_pend <= 1'b0;
      tc_pend  <= '0;
      o_bus    <= '0;
      for (int s = 0; s < 20; s++)
        for (int p = 0; p < NP; p++) o_strm[s][p] <= '0;
    end else begin
      slot <= (slot == ($bits(slot))'(NIDLE - 1)) ? '0 : slot + 1'b1;
      pps_pend <= i_pps_req | (pps_pend & ~go);
      if (i_pps_req) tc_pend <= i_tc;
      if (go) o_bus <= bus;
      for (int s = 0; s < 20; s++)
        for (int p = 0; p < NP; p++) begin
          o_strm[s][p].vld <= go;
          o_strm[s][p].pol <= 1'b0;
          o_strm[s][p].eof <= 1'b0;
          o_strm[s][p].flg <= 1'b0;
          o_strm[s][p].pps <= go & pps_pend & (p == 0);
          if (go) begin
            o_strm[s][p].tms <= tc_pend;
            o_strm[s][p].re  <= x_t'(bus[SW*s + 12*p + 6 +: 6]);
            o_strm[s][p].im  <= x_t'(bus[SW*s + 12*p +: 6]);
          end
        end
    end
  end

endmodule
