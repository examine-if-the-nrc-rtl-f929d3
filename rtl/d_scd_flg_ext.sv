// d_scd_flg_ext: data scheduler and flag extension of the OSPFB.
//
// The stage-1 filter bank works on the input up-sampled by two and advances
// by LDEC = 9 up-sampled positions per output frame, i.e. by 4.5 input
// samples.  The scheduler therefore hands out frames that alternately carry 5
// new samples (pol = 0) and 4 new samples (pol = 1); every 9 input frames
// become 10 stage-1 frames, which is what lets the block absorb the idle
// input cycles (one in ten at the nominal rate) and emit a frame on almost
// every clock.  Incoming frames wait in a FIFO; a leftover buffer of up to 4
// samples holds what a popped frame did not use.  A FIFO overflow sets the
// sticky ovf output (fatal until reset).
//
// Marker handling:
//   - an input epoch marker rides on the oldest sample of its frame and is
//     put on the stage-1 frame that carries that sample;
//   - only the first marker and every PPS_DIV-th one after it is passed on
//     (the output epoch is every third input epoch);
//   - out_ctl.flg is high for every frame until the first marker, for the
//     2*FLAG_EXT frames (FLAG_EXT output slice samples, each made of a real
//     and an imaginary word) from the first marker on, and for 2*FLAG_EXT
//     frames from any frame that uses a sample of a flagged input frame.
//
// Interface: in_ctl/in_d from in_d_cond (in_d[0] newest); out_d[0] is the
// newest of the new samples, out_d[4] is zero when pol = 1.
// Timing: the output frame is registered; a frame written into the empty FIFO
// can leave on the next clock, so the minimum latency is two clocks.
// The alternating 5/4 schedule, the toggling pol, the FIFO with fatal overflow
// and the 27-sample flag extension follow the design description.  The FIFO
// depth (FIFO_DEPTH) and the leftover buffer are this design's choices.
module d_scd_flg_ext
  import ospfb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  ctl_t  in_ctl,
  input  cx_x_t in_d  [NP],
  output ctl_t  out_ctl,
  output cx_x_t out_d [NP],
  output logic  ovf
);

  // One sample with its markers.
  typedef struct packed {
    logic  pps;
    logic  flg;
    cx_x_t d;
  } smp_t;

  localparam int FW = 2 + NP * $bits(cx_x_t);

  logic [FW-1:0] wr_word, rd_word;
  logic          f_empty, f_full, f_ovf, pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

  always_comb begin
    wr_word = '0;
    wr_word[FW-1]   = in_ctl.pps;
    wr_word[FW-2]   = in_ctl.flg;
    for (int i = 0; i < NP; i++)
      wr_word[i*$bits(cx_x_t) +: $bits(cx_x_t)] = in_d[i];
  end

  sync_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en   (in_ctl.v),
    .wr_data (wr_word),
    .rd_en   (pop),
    .rd_data (rd_word),
    .full    (f_full),
    .empty   (f_empty),
    .count   (f_count),
    .overflow(f_ovf)
  );

  smp_t        lbuf [4];     // leftover samples, [0] oldest
  logic [2:0]  bcnt;         // number of leftover samples, 0..4
  logic        state;        // 0: 5 new samples, 1: 4 new samples
  logic        seen;         // first marker has been scheduled
  logic [1:0]  pps_div;
  logic [$clog2(2*FLAG_EXT+1)-1:0] fcnt;

  smp_t        fr   [NP];    // head frame, [0] oldest
  smp_t        work [NP+4];  // leftover followed by head frame
  logic [2:0]  need;
  logic        go;

  always_comb begin
    for (int j = 0; j < NP; j++) begin
      fr[j].d   = rd_word[(NP-1-j)*$bits(cx_x_t) +: $bits(cx_x_t)];
      fr[j].flg = rd_word[FW-2];
      fr[j].pps = (j == 0) ? rd_word[FW-1] : 1'b0;
    end
    for (int i = 0; i < NP + 4; i++) begin
      work[i] = '0;
      if (i < 32'(bcnt))           work[i] = lbuf[i];
      else if (i - 32'(bcnt) < NP) work[i] = fr[i - 32'(bcnt)];
    end
    need = state ? 3'd4 : 3'd5;
    pop  = (bcnt < need) & ~f_empty;
    go   = (bcnt >= need) | ~f_empty;
  end

  always_ff @(posedge clk) begin
    logic any_pps, any_flg, pass_pps, load;
    logic [3:0] total;
    if (rst) begin
      out_ctl <= '0;
      for (int i = 0; i < NP; i++) out_d[i] <= '0;
      for (int i = 0; i < 4; i++)  lbuf[i]  <= '0;
      bcnt    <= '0;
      state   <= 1'b0;
      seen    <= 1'b0;
      pps_div <= '0;
      fcnt    <= '0;
      ovf     <= 1'b0;
    end else begin
      if (f_ovf) ovf <= 1'b1;
      out_ctl.v <= go;
      if (go) begin
        any_pps = 1'b0;
        any_flg = 1'b0;
        for (int i = 0; i < NP; i++) begin
          if (i < 32'(need)) begin
            out_d[i] <= work[32'(need) - 1 - i].d;
            any_pps |= work[i].pps;
            any_flg |= work[i].flg;
          end else begin
            out_d[i] <= '0;
          end
        end
        total = 4'(bcnt) + (pop ? 4'd5 : 4'd0) - 4'(need);
        for (int i = 0; i < 4; i++)
          lbuf[i] <= (i < 32'(total)) ? work[i + 32'(need)] : '0;
        bcnt  <= total[2:0];
        state <= ~state;

        // every third epoch marker, starting with the first
        pass_pps = any_pps & (pps_div == 2'd0);
        if (any_pps) pps_div <= (pps_div == 2'(PPS_DIV - 1)) ? 2'd0 : pps_div + 1'b1;

        // flag extension
        load = any_flg | (any_pps & ~seen);
        if (any_pps) seen <= 1'b1;
        if (load)             fcnt <= ($bits(fcnt))'(2 * FLAG_EXT - 1);
        else if (fcnt != '0)  fcnt <= fcnt - 1'b1;

        out_ctl.pol <= state;
        out_ctl.pps <= pass_pps;
        out_ctl.flg <= load | (fcnt != '0) | ~(seen | any_pps);
      end else begin
        out_ctl.pps <= 1'b0;
      end
    end
  end

endmodule
