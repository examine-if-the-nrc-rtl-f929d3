// ospfb: one two-stage oversampled polyphase filter bank firmware block.
//
// Splits one complex sub-band (2.0 Gs/s, 1.6 GHz of science bandwidth, 6+6
// bit samples arriving as five-sample frames) into eight frequency slices
// of 200 MHz sampled at 222.22 Ms/s, delivered as 8-bit real and imaginary
// words interleaved in time.  The chain, in order:
//   in_d_cond      frame re-ordering, first-marker and slip/miss detection
//   d_scd_flg_ext  FIFO + 5/4 sample scheduler, flag extension, marker / 3
//   up_poly_fir_fb 55-tap prototype on the zero-stuffed input, 10 branches
//   circ_frm_rot   rotation by one more position per frame
//   p10ifft        10-point IFFT, 8 contiguous channels selected
//   hbfa           8 half-band filters of order 46, decimation by two
//   fs_scale       per-slice shift/scale, 8-bit requantisation, saturation flag
//   out_d_cond     marker delay, end-of-frame, time code, flag combination
//   ospfb_regs     monitor/control registers (control clock domain)
//
// Interface: i_strm[0..4] input records, record 0 the oldest sample; only
// record 0 carries the valid, marker, flag and time code.  o_fs[0..7] output
// records, one per slice.  i_fm_endpoint / o_to_endpoint: register bus in the
// i_detri_clk domain.
// Rates: at 450 MHz the input is valid on 400 of 450 clocks (nominally one
// idle cycle after every nine frames plus 1.39% random idle cycles); the
// output is valid on 10 of every 9 valid input frames' worth of clocks.
// Timing: about 9 clocks from an input frame to the first output word that
// uses it, plus time spent in the scheduler FIFO.
// The chain of modules and their connections follow the design description;
// widths, coefficients and the register bus are this design's choices (see
// the individual modules).
module ospfb
  import ospfb_pkg::*;
#(
  parameter int unsigned FRAMES     = FRAMES_PER_PPS,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic     i_clk,
  input  logic     i_clk_reset,
  input  logic     i_detri_clk,
  input  logic     i_detri_clk_reset,
  input  in_strm_t i_strm [NP],
  output fs_strm_t o_fs   [NS],
  input  ctl_req_t i_fm_endpoint,
  output ctl_rsp_t o_to_endpoint
);

  cx_x_t in_d [NP];
  always_comb
    for (int i = 0; i < NP; i++) in_d[i] = '{re: i_strm[i].re, im: i_strm[i].im};

  // ---- input condition
  ctl_t            c1;
  cx_x_t           d1 [NP];
  logic [TC_W-1:0] tc;
  logic            pps_seen, pps_sm;

  in_d_cond #(.FRAMES(FRAMES)) u_in (
    .clk(i_clk), .rst(i_clk_reset),
    .in_v(i_strm[0].vld), .in_pps(i_strm[0].pps), .in_flg(i_strm[0].flg),
    .in_tc(i_strm[0].tms), .in_d(in_d),
    .out_ctl(c1), .out_d(d1), .out_tc(tc), .pps_seen(pps_seen), .pps_sm(pps_sm)
  );

  // ---- scheduler
  ctl_t  c2;
  cx_x_t d2 [NP];
  logic  ovf;

  d_scd_flg_ext #(.FIFO_DEPTH(FIFO_DEPTH)) u_scd (
    .clk(i_clk), .rst(i_clk_reset),
    .in_ctl(c1), .in_d(d1), .out_ctl(c2), .out_d(d2), .ovf(ovf)
  );

  // ---- stage 1
  ctl_t    c3, c4, c5;
  cx_fir_t y3 [NCH];
  cx_fir_t y4 [NCH];
  cx_fft_t y5 [NS];

  up_poly_fir_fb u_fir (
    .clk(i_clk), .rst(i_clk_reset),
    .in_ctl(c2), .in_d(d2), .out_ctl(c3), .out_y(y3)
  );

  circ_frm_rot u_rot (
    .clk(i_clk), .rst(i_clk_reset),
    .in_ctl(c3), .in_y(y3), .out_ctl(c4), .out_y(y4)
  );

  logic [1:0]  ch_sel;
  logic [3:0]  shift [NS];
  logic [15:0] scale [NS];

  p10ifft u_fft (
    .clk(i_clk), .rst(i_clk_reset), .sel(ch_sel),
    .in_ctl(c4), .in_x(y4), .out_ctl(c5), .out_fs(y5)
  );

  // ---- stage 2 and output
  ctl_t c6, c7;
  hb_t  w6 [NS];
  o_t   o7 [NS];
  logic f7 [NS];

  hbfa u_hb (
    .clk(i_clk), .rst(i_clk_reset),
    .in_ctl(c5), .in_x(y5), .out_ctl(c6), .out_w(w6)
  );

  fs_scale u_scl (
    .clk(i_clk), .rst(i_clk_reset), .shift(shift), .scale(scale),
    .in_ctl(c6), .in_w(w6), .out_ctl(c7), .out_o(o7), .out_flg(f7)
  );

  out_d_cond u_out (
    .clk(i_clk), .rst(i_clk_reset),
    .in_ctl(c7), .in_o(o7), .in_flg(f7), .in_tc(tc), .pps_sm(pps_sm), .ovf(ovf),
    .o_fs(o_fs)
  );

  // ---- registers
  ospfb_regs u_regs (
    .clk(i_detri_clk), .rst(i_detri_clk_reset),
    .req(i_fm_endpoint), .rsp(o_to_endpoint),
    .st_no_pps(~pps_seen), .st_pps_sm(pps_sm), .st_ovf(ovf),
    .ch_sel(ch_sel), .shift(shift), .scale(scale)
  );

endmodule
