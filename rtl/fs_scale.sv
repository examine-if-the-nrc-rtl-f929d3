// fs_scale: per-slice shift, scale and requantisation to 8 bits.
//
// For slice s the half-band word v (Q11.13) is multiplied by
//     gain = 2^(shift[s] - 2) * scale[s] / 65536
// and rounded to an 8-bit word with levels -127..127 (step 1/128):
//     o = round(v * scale * 2^shift / 2^24), saturated to +/-127.
// shift codes 0..6 give the factors 1/4, 1/2, 1, 2, 4, 8, 16; larger codes
// are treated as 6.  scale is an unsigned 16-bit fraction (0..65535/65536).
// A word that saturates sets its slice's flag (out_flg[s]), on top of the
// flag that arrived with the frame.
//
// Interface: in_ctl/in_w from the half-band array, shift/scale from the
// register block (quasi-static), out_ctl/out_o/out_flg.
// Timing: one register stage.
// The 4-bit shift and 16-bit scale fields, the factor set, the 8-bit output
// and the per-slice saturation flag follow the design description; mapping
// the shift code c to 2^(c-2) and rounding half up are this design's choices.
module fs_scale
  import ospfb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  shift [NS],
  input  logic [15:0] scale [NS],
  input  ctl_t        in_ctl,
  input  hb_t         in_w    [NS],
  output ctl_t        out_ctl,
  output o_t          out_o   [NS],
  output logic        out_flg [NS]
);

  localparam logic signed [63:0] OMAX = 64'sd127;

  always_ff @(posedge clk) begin
    logic signed [63:0] p;
    logic [2:0]         sh;
    if (rst) begin
      out_ctl <= '0;
      for (int s = 0; s < NS; s++) begin
        out_o[s]   <= '0;
        out_flg[s] <= 1'b0;
      end
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.v)
        for (int s = 0; s < NS; s++) begin
          sh = (shift[s] > 4'd6) ? 3'd6 : shift[s][2:0];
          p  = 64'(in_w[s]) * $signed({48'd0, scale[s]});
          p  = rshr(p <<< sh, 24);
          if (p > OMAX) begin
            out_o[s]   <= o_t'(OMAX);
            out_flg[s] <= 1'b1;
          end else if (p < -OMAX) begin
            out_o[s]   <= o_t'(-OMAX);
            out_flg[s] <= 1'b1;
          end else begin
            out_o[s]   <= o_t'(p);
            out_flg[s] <= in_ctl.flg;
          end
        end
    end
  end

endmodule
