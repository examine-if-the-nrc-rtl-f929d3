// circ_frm_rot: circular frame rotation between the polyphase filter bank and
// the IFFT.
//
// Frame n of branch outputs y[0..9] is rotated by r(n):
//     out[m] = y[(m - r) mod 10],   r(n) = (pol(n) - 9 n) / 2 mod 10,
// so the rotation advances by 6 after a pol = 0 frame and by 5 after a
// pol = 1 frame (9 up-sampled positions, half a branch per position).
// Applied ahead of the IFFT this multiplies channel k by
// exp(-j*2*pi*k*9n/20), which moves every channel's pass band to 0 Hz after
// the decimation by 9, so no modulator is needed after the IFFT.
//
// Interface: in_ctl/in_y from the filter bank, out_ctl/out_y to the IFFT.
// Timing: one register stage.  r starts at 0 after reset, together with the
// scheduler state, and advances on every valid frame.
// A per-frame circular rotation ahead of the IFFT follows the design
// description; the step sequence (6, 5) follows from the channel definition
// used in this design (channel k centred at k x 200 MHz).
module circ_frm_rot
  import ospfb_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  ctl_t    in_ctl,
  input  cx_fir_t in_y  [NCH],
  output ctl_t    out_ctl,
  output cx_fir_t out_y [NCH]
);

  logic [3:0] r;

  always_ff @(posedge clk) begin
    if (rst) begin
      r       <= '0;
      out_ctl <= '0;
      for (int k = 0; k < NCH; k++) out_y[k] <= '0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.v) begin
        for (int m = 0; m < NCH; m++)
          out_y[m] <= in_y[(m + NCH - 32'(r)) % NCH];
        r <= 4'((32'(r) + (in_ctl.pol ? 5 : 6)) % NCH);
      end
    end
  end

endmodule
