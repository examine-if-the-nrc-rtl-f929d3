// up_poly_fir_fb: up-sampled polyphase FIR filter bank (stage 1 of the OSPFB).
//
// Conceptually the input is up-sampled by two with zeros and shifted, nine
// positions per frame, into a tapped delay line TDL(0..NH-1) of the NH = 55
// tap prototype h.  Only every other TDL position holds a real sample, so the
// block keeps just the NTDL = 28 real samples, tdl[0] newest, and multiplies
// each by one of two coefficients picked by the scheduler state (2:1
// multiplexers):
//   pol = 0 (5 new samples, newest at TDL(0)):  tdl[i] -> h(2i)
//   pol = 1 (4 new samples, newest at TDL(1)):  tdl[i] -> h(2i+1)
// The products are summed into ten branches by i mod 10:
//     y[b] = sum_l tdl[b + 10 l] * h(2 (b + 10 l) + pol).
// Grouping the real samples (rather than all TDL positions) by ten is what
// puts the channels of the following 10-point IFFT 200 MHz apart, one
// twentieth of the up-sampled rate.
//
// Interface: in_ctl/in_d from the scheduler (in_d[0] newest, 5 or 4 new
// samples by in_ctl.pol); out_y[0..9] branch outputs, Q5.13, plus the control
// word delayed alongside.
// Timing: one register stage.
// The structure (zero-stuffed input, halved multiplier count, coefficient
// multiplexing by state) follows the design description; the coefficient
// values (see ospfb_pkg), the output word width and round-half-up are this
// design's choices.
module up_poly_fir_fb
  import ospfb_pkg::*;
#(
  parameter proto_t H = proto_coefs()
) (
  input  logic    clk,
  input  logic    rst,
  input  ctl_t    in_ctl,
  input  cx_x_t   in_d  [NP],
  output ctl_t    out_ctl,
  output cx_fir_t out_y [NCH]
);

  localparam int P_W = X_W + C_W;        // product width
  localparam int A_W = P_W + 3;          // up to 6 products per branch
  localparam int SH  = (X_W - 1) + (C_W - 1) - FRAC;

  cx_x_t tdl  [NTDL];
  cx_x_t ntdl [NTDL];

  // shift 5 or 4 new samples into the delay line
  always_comb begin
    for (int i = 0; i < NTDL; i++) begin
      if (in_ctl.pol) ntdl[i] = (i < 4)  ? in_d[i] : tdl[i-4];
      else            ntdl[i] = (i < NP) ? in_d[i] : tdl[i-NP];
    end
  end

  function automatic fir_t sat_fir(input logic signed [A_W-1:0] a);
    logic signed [63:0] r;
    r = rshr(64'(a), SH);
    if (r >  64'sd131071) r =  64'sd131071;
    if (r < -64'sd131071) r = -64'sd131071;
    return fir_t'(r);
  endfunction

  logic signed [A_W-1:0] acc_re [NCH];
  logic signed [A_W-1:0] acc_im [NCH];

  always_comb begin
    coef_t c;
    for (int b = 0; b < NCH; b++) begin
      acc_re[b] = '0;
      acc_im[b] = '0;
    end
    for (int i = 0; i < NTDL; i++) begin
      if (in_ctl.pol) c = (2 * i + 1 < NH) ? H[2*i+1] : '0;
      else            c = H[2*i];
      acc_re[i % NCH] += A_W'(ntdl[i].re) * A_W'(c);
      acc_im[i % NCH] += A_W'(ntdl[i].im) * A_W'(c);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_ctl <= '0;
      for (int i = 0; i < NTDL; i++) tdl[i]   <= '0;
      for (int k = 0; k < NCH; k++)  out_y[k] <= '0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.v) begin
        for (int i = 0; i < NTDL; i++) tdl[i] <= ntdl[i];
        for (int b = 0; b < NCH; b++) begin
          out_y[b].re <= sat_fir(acc_re[b]);
          out_y[b].im <= sat_fir(acc_im[b]);
        end
      end
    end
  end

endmodule
