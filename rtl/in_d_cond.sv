// in_d_cond: input data condition and PPS slip/miss detection of the OSPFB.
//
// Takes one input frame of NP = 5 complex samples per clock, oldest sample in
// record 0, and re-orders it newest first (out_d[0] is the latest sample), as
// the polyphase filter bank expects.  It also watches the epoch marker:
//   - pps_seen goes high with the first valid frame that carries in_pps;
//   - it counts valid frames from one marker to the next and raises pps_sm
//     (slip/miss) when the next marker does not come exactly FRAMES_PER_PPS
//     valid frames later, either early (slip) or late (miss).  pps_sm clears
//     at the first marker that again arrives on time.
// The time code of a marked frame is latched into out_tc.
//
// Timing: one register stage; every output appears one clock after its input.
// The frame re-ordering, the first-marker and slip/miss detection, the
// expected count and the time-code latch follow the design description.  That
// the marker frame itself starts the count and that a missing marker is
// reported as soon as the count is exceeded are this design's choices.
module in_d_cond
  import ospfb_pkg::*;
#(
  parameter int unsigned FRAMES = FRAMES_PER_PPS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_v,
  input  logic              in_pps,
  input  logic              in_flg,
  input  logic [TC_W-1:0]   in_tc,
  input  cx_x_t             in_d   [NP],   // [0] oldest
  output ctl_t              out_ctl,
  output cx_x_t             out_d  [NP],   // [0] newest
  output logic [TC_W-1:0]   out_tc,
  output logic              pps_seen,
  output logic              pps_sm
);

  localparam int CW = $clog2(FRAMES + 2);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_ctl  <= '0;
      out_tc   <= '0;
      pps_seen <= 1'b0;
      pps_sm   <= 1'b0;
      cnt      <= '0;
      for (int i = 0; i < NP; i++) out_d[i] <= '0;
    end else begin
      out_ctl.v   <= in_v;
      out_ctl.pol <= 1'b0;
      out_ctl.pps <= in_v & in_pps;
      out_ctl.flg <= in_flg;
      if (in_v)
        for (int i = 0; i < NP; i++) out_d[i] <= in_d[NP-1-i];
      if (in_v) begin
        if (in_pps) begin
          out_tc   <= in_tc;
          pps_seen <= 1'b1;
          if (pps_seen) pps_sm <= (cnt != CW'(FRAMES));
          cnt <= CW'(1);
        end else if (pps_seen) begin
          if (cnt >= CW'(FRAMES)) pps_sm <= 1'b1;       // marker missing
          if (cnt <= CW'(FRAMES)) cnt <= cnt + 1'b1;    // saturate past FRAMES
        end
      end
    end
  end

endmodule
