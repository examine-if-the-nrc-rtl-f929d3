// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
//
// Used twice in this design: as the 512-bit x 8192-word input buffer of every
// 100G link in the AVCC strawman (standing in for the wideband input buffer),
// and, much smaller, as the frame FIFO of the OSPFB data scheduler.
// The head word is always present on rd_data while empty is low; rd_en pops
// it.  wr_en while full drops the word and pulses overflow (the scheduler
// turns that into its fatal-error status bit).  A simultaneous read and write
// on a full FIFO is allowed and keeps it full.
//
// Interface: wr_en/wr_data, rd_en/rd_data, full, empty, count, overflow.
// Timing: a written word is visible on rd_data on the next clock.
// The width and depth of the link buffer follow the strawman description;
// the show-ahead behaviour and the count output are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd   = rd_en & ~empty;
  assign do_wr   = wr_en & (~full | do_rd);
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en & ~do_wr;
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
