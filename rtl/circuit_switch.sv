// circuit_switch: N x N crossbar circuit switch for frequency-slice lanes.
//
// Every output lane o carries the input lane selected by its own route
// register sel[o]; any input may feed any number of outputs.  In the AVCC
// strawman two 80 x 80 switches with 12-bit lanes route the 160 slices of the
// 20 filter banks towards the serial links to the slice processors.  A lane
// is {flg, pps, pol, vld, smp[7:0]} (lane_t).
//
// Interface: in_lane[0..N-1], out_lane[0..N-1]; a route register is written
// with cfg_we/cfg_out/cfg_in.  After reset output o takes input o.
// Timing: out_lane is registered, one clock after in_lane; a new route takes
// effect on the clock after it is written.
// The size (80 x 80), the lane width and the cross-bar structure follow the
// strawman description; the route registers, their reset value and the lane
// content are this design's choices.
module circuit_switch
  import ospfb_pkg::*;
#(
  parameter int unsigned N = 80
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 cfg_we,
  input  logic [$clog2(N)-1:0] cfg_out,
  input  logic [$clog2(N)-1:0] cfg_in,
  input  lane_t                in_lane  [N],
  output lane_t                out_lane [N]
);

  logic [$clog2(N)-1:0] sel [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < N; o++) begin
        sel[o]      <= ($clog2(N))'(o);
        out_lane[o] <= '0;
      end
    end else begin
      if (cfg_we && 32'(cfg_out) < N && 32'(cfg_in) < N) sel[cfg_out] <= cfg_in;
      for (int o = 0; o < N; o++) out_lane[o] <= in_lane[sel[o]];
    end
  end

endmodule
