// hbfa: array of NS = 8 half-band filters (stage 2 of the OSPFB).
//
// Each slice stream coming out of the IFFT (2x oversampled, one complex value
// per frame) is low-pass filtered by a half-band filter of order 46 and
// decimated by two:
//     y(n) = sum_{i=0..46} h(i) x(2n - i)
// Half of the taps of a half-band filter are zero and the centre tap is 1/2,
// so each filter keeps
//   - a 24-entry delay line of the even samples x(2n), x(2n-2), .. x(2n-46),
//     whose symmetric pairs (k, 23-k) are added before one multiplication
//     by h(2k): 12 multipliers per filter;
//   - a 12-sample delay of the odd samples, whose output x(2n-23) is added
//     with weight 1/2 (a shift, no multiplier).
// Because of the decimation one complex result comes every two frames; the
// real part is computed and leaves with the even frame (pol = 0), the
// imaginary part with the following odd frame (pol = 1), so the output is one
// word per frame and the 12 multipliers serve both parts (96 for the array).
// The even/odd phase starts at reset and is re-aligned to "even" by a frame
// carrying the epoch marker, so the output marker always lands on a real part.
//
// Interface: in_ctl/in_x (Q9.13) from the IFFT; out_ctl/out_w (Q11.13, one
// word per slice, real or imaginary according to out_ctl.pol).
// Timing: one register stage.
// The order, the 12-multiplier structure shared by the real and imaginary
// parts, the odd-sample delay of 12 and the interleaved output follow the
// design description; the
// coefficient values, the phase re-alignment on the marker and the word width
// are this design's choices.
module hbfa
  import ospfb_pkg::*;
#(
  parameter hb_coef_t H = hb_coefs()
) (
  input  logic    clk,
  input  logic    rst,
  input  ctl_t    in_ctl,
  input  cx_fft_t in_x  [NS],
  output ctl_t    out_ctl,
  output hb_t     out_w [NS]
);

  localparam int ACC_W = FFT_W + 1 + C_W + 5;

  cx_fft_t ev   [NS][HB_TDL];   // even samples, [0] newest
  cx_fft_t od   [NS][HB_ODLY];  // odd samples, [0] newest
  logic    ph;                  // 0: this frame is x(2n)

  function automatic hb_t sat(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (HB_W - 1)) - 1;
    if (v >  MAXV) return hb_t'(MAXV);
    if (v < -MAXV) return hb_t'(-MAXV);
    return hb_t'(v);
  endfunction

  // one component of y(n): taps on the even line (new sample included)
  function automatic hb_t hb_out(input fft_t e [HB_TDL], input fft_t o_mid);
    logic signed [ACC_W-1:0] acc;
    acc = ACC_W'(o_mid) <<< (C_W - 2);                       // 1/2 * x(2n-23)
    for (int k = 0; k < HB_MULT; k++)
      acc += (ACC_W'(e[k]) + ACC_W'(e[HB_TDL-1-k])) * ACC_W'(H[k]);
    return sat(rshr(64'(acc), C_W - 1));
  endfunction

  logic cur_ph;
  assign cur_ph = in_ctl.pps ? 1'b0 : ph;

  // One set of 12 multipliers per slice, shared in time: on an even frame
  // it computes the real part from the new sample and the even line, on the
  // following odd frame the imaginary part from the even line alone (which
  // then holds x(2n) .. x(2n-46)) and the odd delay before it shifts.
  hb_t y [NS];
  always_comb begin
    fft_t e [HB_TDL];
    fft_t o_mid;
    for (int s = 0; s < NS; s++) begin
      if (!cur_ph) begin
        e[0] = in_x[s].re;
        for (int k = 1; k < HB_TDL; k++) e[k] = ev[s][k-1].re;
        o_mid = od[s][HB_ODLY-1].re;
      end else begin
        for (int k = 0; k < HB_TDL; k++) e[k] = ev[s][k].im;
        o_mid = od[s][HB_ODLY-1].im;
      end
      y[s] = hb_out(e, o_mid);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph      <= 1'b0;
      out_ctl <= '0;
      for (int s = 0; s < NS; s++) begin
        out_w[s] <= '0;
        for (int k = 0; k < HB_TDL; k++)  ev[s][k] <= '0;
        for (int k = 0; k < HB_ODLY; k++) od[s][k] <= '0;
      end
    end else begin
      out_ctl     <= in_ctl;
      out_ctl.pol <= cur_ph;
      if (in_ctl.v) begin
        ph <= ~cur_ph;
        for (int s = 0; s < NS; s++) begin
          if (!cur_ph) begin
            ev[s][0] <= in_x[s];
            for (int k = 1; k < HB_TDL; k++) ev[s][k] <= ev[s][k-1];
            out_w[s] <= y[s];
          end else begin
            od[s][0] <= in_x[s];
            for (int k = 1; k < HB_ODLY; k++) od[s][k] <= od[s][k-1];
            out_w[s] <= y[s];
          end
        end
      end
    end
  end

endmodule
