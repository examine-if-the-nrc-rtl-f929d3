// out_d_cond: output data condition and end-of-frame generation of the OSPFB.
//
// Builds the eight output records from the scaled slice words:
//   - the epoch marker that travels with the data (already reduced to every
//     third input marker by the scheduler) is delayed by PPS_DELAY = 13 slice
//     samples, i.e. 26 valid words, so that o_pps marks the output sample that
//     corresponds to the marked input sample through the filters' delay;
//   - o_eof marks the two words (real and imaginary part) of the sample just
//     before the o_pps sample;
//   - o_tms takes the time code latched at the input and changes only on an
//     o_pps word;
//   - o_flg of each slice combines the slice's own flag (pipeline fill, input
//     flag extension, saturation) with the PPS slip/miss status and the
//     scheduler's fatal FIFO overflow.
//
// Interface: in_ctl/in_o/in_flg from fs_scale, in_tc/pps_sm from in_d_cond,
// ovf from the scheduler; o_fs[0..7] records.
// Timing: one register stage; o_pps comes 26 valid words after the marked
// word entered.
// The 13-sample delay, the end-of-frame rule, the time-code handling and the
// flag combination follow the design description; counting the delay in
// valid words and latching the time code when the marker enters this module
// are this design's choices.
module out_d_cond
  import ospfb_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  ctl_t            in_ctl,
  input  o_t              in_o   [NS],
  input  logic            in_flg [NS],
  input  logic [TC_W-1:0] in_tc,
  input  logic            pps_sm,
  input  logic            ovf,
  output fs_strm_t        o_fs   [NS]
);

  localparam int DW = 2 * PPS_DELAY;

  logic [$clog2(DW+1)-1:0] dcnt;   // words left until the marker, 0 = idle
  logic [TC_W-1:0]         tc_hold, tc_out;

  always_ff @(posedge clk) begin
    logic pps_now, eof_now;
    if (rst) begin
      dcnt    <= '0;
      tc_hold <= '0;
      tc_out  <= '0;
      for (int s = 0; s < NS; s++) o_fs[s] <= '0;
    end else begin
      pps_now = 1'b0;
      eof_now = 1'b0;
      if (in_ctl.v) begin
        if (in_ctl.pps) begin
          dcnt    <= ($bits(dcnt))'(DW);
          tc_hold <= in_tc;
        end else if (dcnt != '0) begin
          dcnt    <= dcnt - 1'b1;
          pps_now = (dcnt == 1);
          eof_now = (dcnt == 2) || (dcnt == 3);
        end
      end
      if (pps_now) tc_out <= tc_hold;
      for (int s = 0; s < NS; s++) begin
        o_fs[s].vld <= in_ctl.v;
        o_fs[s].pol <= in_ctl.pol;
        o_fs[s].pps <= pps_now;
        o_fs[s].eof <= eof_now;
        o_fs[s].tms <= pps_now ? tc_hold : tc_out;
        o_fs[s].flg <= in_ctl.v & (in_flg[s] | pps_sm | ovf);
        if (in_ctl.v) o_fs[s].smp <= in_o[s];
      end
    end
  end

endmodule
