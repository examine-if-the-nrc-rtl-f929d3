// ospfb_pkg: constants, types and elaboration-time tables shared by the
// two-stage oversampled polyphase filter bank (OSPFB) and the AVCC strawman.
//
// The OSPFB turns one complex sub-band sampled at 2.0 Gs/s (6+6 bit, five
// samples per clock) into eight 200 MHz frequency slices (FS) at 222.22 Ms/s,
// each delivered as 8-bit real and imaginary parts interleaved in time.
// Stage 1 is a 10-channel polyphase filter bank running on the input
// up-sampled by two (zero stuffing), with channels 200 MHz apart (1/20 of the
// 4 Gs/s up-sampled rate), decimating by 9 to 444.4 Ms/s per channel (20/9
// of the channel spacing); stage 2 is an array of half-band filters
// decimating by two to 222.2 Ms/s (oversampling 10/9).
//
// Numbers that come from the design description: 5 samples per input frame,
// 10 IFFT points, decimation 9, 8 selected slices, prototype order 54,
// half-band order 46 with 12 multipliers, 18-bit coefficients, 6-bit input,
// 8-bit output, 27-sample flag extension, 13-sample output PPS delay,
// 19,200,000 valid input frames between input PPS markers, output PPS on
// every third input PPS, shift/scale register layout.
//
// Own choices: the coefficient values themselves (the description gives only
// orders and response targets), computed here at elaboration as
// Hamming-windowed sinc filters; the internal word widths and the number of
// fraction bits; rounding (round half up) at every requantisation.
package ospfb_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int NP        = 5;    // complex samples per input frame
  localparam int NCH       = 10;   // IFFT points / stage-1 channels
  localparam int LDEC      = 9;    // stage-1 decimation in the up-sampled domain
  localparam int NS        = 8;    // frequency slices delivered
  localparam int NH        = 55;   // prototype taps (order 54)
  localparam int NTDL      = (NH + 1) / 2;  // non-zero TDL entries, 28
  localparam int NHB       = 47;   // half-band taps (order 46)
  localparam int HB_MULT   = (NHB + 1) / 4; // 12 multipliers per half-band filter
  localparam int HB_TDL    = (NHB + 1) / 2; // 24 even-sample TDL entries
  localparam int HB_ODLY   = (NHB + 1) / 4; // 12-sample odd-sample delay
  localparam int FLAG_EXT  = 27;   // FS samples touched by one input sample
  localparam int PPS_DELAY = 13;   // algorithmic delay in FS samples
  localparam int PPS_DIV   = 3;    // output epoch = every third input epoch
  localparam int FRAMES_PER_PPS = 19_200_000; // valid input frames per 48 ms

  // ---------------------------------------------------------------- widths
  localparam int X_W   = 6;    // input component, Q1.5
  localparam int C_W   = 18;   // coefficient, Q1.17
  localparam int T_W   = 18;   // twiddle / Winograd constant, Q2.16
  localparam int FRAC  = 13;   // fraction bits of all internal words
  localparam int FIR_W = 18;   // polyphase branch output, Q5.13
  localparam int FFT_W = 22;   // IFFT output, Q9.13
  localparam int HB_W  = 24;   // half-band output, Q11.13
  localparam int O_W   = 8;    // slice output, Q1.7 with levels -127..127
  localparam int TC_W  = 64;   // time code

  // ---------------------------------------------------------------- types
  typedef logic signed [X_W-1:0]   x_t;
  typedef logic signed [C_W-1:0]   coef_t;
  typedef logic signed [T_W-1:0]   twid_t;
  typedef logic signed [FIR_W-1:0] fir_t;
  typedef logic signed [FFT_W-1:0] fft_t;
  typedef logic signed [HB_W-1:0]  hb_t;
  typedef logic signed [O_W-1:0]   o_t;

  typedef struct packed { x_t   re; x_t   im; } cx_x_t;
  typedef struct packed { fir_t re; fir_t im; } cx_fir_t;
  typedef struct packed { fft_t re; fft_t im; } cx_fft_t;

  // Side-band control that travels with every frame through the datapath.
  typedef struct packed {
    logic v;    // frame valid
    logic pol;  // scheduler state (0: 5 new samples, 1: 4) / output re (0) or im (1)
    logic pps;  // epoch marker
    logic flg;  // contaminated / partially filled
  } ctl_t;

  // One input record (t_CPLX_STRM on the input side).  The 18-bit sfixed
  // sample of the original record carries only 6 significant bits at the
  // input, so only those are kept.
  typedef struct packed {
    logic            vld;
    logic            pol;
    logic            pps;
    logic [TC_W-1:0] tms;
    logic            eof;
    logic            flg;
    x_t              re;
    x_t              im;
  } in_strm_t;

  // One output record (t_CPLX_STRM on the output side): smp carries the real
  // part when pol = 0 and the imaginary part when pol = 1.
  typedef struct packed {
    logic            vld;
    logic            pol;
    logic            pps;
    logic [TC_W-1:0] tms;
    logic            eof;
    logic            flg;
    o_t              smp;
  } fs_strm_t;

  // Register bus of one firmware block (stands in for the control endpoint).
  typedef struct packed {
    logic        wr;
    logic        rd;
    logic [3:0]  addr;
    logic [3:0]  be;
    logic [31:0] wdata;
  } ctl_req_t;

  typedef struct packed {
    logic        rvalid;
    logic [31:0] rdata;
  } ctl_rsp_t;

  // 12-bit lane of the circuit switch: slice word plus its markers.
  typedef struct packed {
    logic flg;
    logic pps;
    logic pol;
    logic vld;
    o_t   smp;
  } lane_t;

  typedef coef_t proto_t [NH];
  typedef coef_t hb_coef_t [HB_MULT];

  // ---------------------------------------------------------------- tables
  localparam real PI = 3.14159265358979323846;

  function automatic real sinc(input real x);
    if (x == 0.0) return 1.0;
    return $sin(PI * x) / (PI * x);
  endfunction

  function automatic real hamming(input int n, input int len);
    return 0.54 - 0.46 * $cos(2.0 * PI * n / (len - 1));
  endfunction

  function automatic coef_t q17(input real v);
    real s;
    s = v * 131072.0;
    if (s > 131071.0)  s = 131071.0;
    if (s < -131071.0) s = -131071.0;
    return coef_t'($rtoi($floor(s + 0.5)));
  endfunction

  // Stage-1 prototype h(j), j = 0..54, linear phase about j = 27.
  // Cut-off halfway between the pass-band edge (omega/pi = 1/NCH) and the
  // stop-band edge (omega/pi = (2*Os1-1)/(Os1*NCH), Os1 = 20/9), in the
  // up-sampled domain.  Scaled so that the taps of either parity sum to 1,
  // i.e. unity gain from input sample to channel output.
  function automatic proto_t proto_coefs();
    proto_t r;
    real    h [NH];
    real    fc, sum;
    fc  = 0.5 * (1.0 / NCH + (2.0 * 20.0 / 9.0 - 1.0) / (20.0 / 9.0 * NCH)) / 2.0;
    sum = 0.0;
    for (int j = 0; j < NH; j++) begin
      h[j] = 2.0 * fc * sinc(2.0 * fc * (j - (NH - 1) / 2)) * hamming(j, NH);
      sum += h[j];
    end
    for (int j = 0; j < NH; j++) r[j] = q17(2.0 * h[j] / sum);
    return r;
  endfunction

  // Half-band taps h(2k), k = 0..11 (the non-trivial, symmetric ones; the
  // centre tap h(23) is exactly 1/2 and all other odd taps are zero).
  function automatic hb_coef_t hb_coefs();
    hb_coef_t r;
    for (int k = 0; k < HB_MULT; k++)
      r[k] = q17(0.5 * sinc(0.5 * (2 * k - (NHB - 1) / 2)) * hamming(2 * k, NHB));
    return r;
  endfunction

  // Round-half-up constant in Q2.16.
  function automatic twid_t q16(input real v);
    return twid_t'($rtoi($floor(v * 65536.0 + 0.5)));
  endfunction

  // Arithmetic right shift with round half up.
  function automatic logic signed [63:0] rshr(input logic signed [63:0] v, input int s);
    if (s <= 0) return v;
    return (v + (64'sd1 <<< (s - 1))) >>> s;
  endfunction

endpackage
