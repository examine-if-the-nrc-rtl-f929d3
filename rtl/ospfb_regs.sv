// ospfb_regs: monitor and control registers of one OSPFB.
//
// Nine 32-bit registers, written and read byte-wise through a simple
// request/response bus in the control clock domain:
//   offset 0  bit 0 (RO)  no epoch marker has arrived yet
//             bit 1 (RO)  PPS slip/miss: wrong number of valid frames between
//                         the last two markers
//             bit 2 (RO)  scheduler FIFO overflow (fatal, cleared by reset)
//             bits 4:3 (RW) slice selection: 00 ch1..8, 01 ch2..9, 10 ch0..7
//   offset 1..8  bits 19:16 (RW) shift, bits 15:0 (RW) scale of FS-00..FS-07
// Reserved bits read as zero and ignore writes.
//
// The status bits are brought into the control clock domain with two-flop
// synchronisers.  The configuration outputs change only under processor
// control and are used directly in the datapath clock domain (these paths
// are treated as false paths, as the description does for the control
// interconnect).
//
// Interface: req (wr, rd, addr, be, wdata) and rsp (rvalid, rdata; the read
// data is returned one control clock after rd).  Reset values: selection 00,
// shift 2 (gain 1) and scale 65535/65536 for every slice.
// The register map follows the design description; the bus itself (the
// original endpoint protocol is not specified) and the reset values are this
// design's choices.
module ospfb_regs
  import ospfb_pkg::*;
(
  input  logic        clk,         // control clock
  input  logic        rst,
  input  ctl_req_t    req,
  output ctl_rsp_t    rsp,
  input  logic        st_no_pps,   // datapath clock domain
  input  logic        st_pps_sm,
  input  logic        st_ovf,
  output logic [1:0]  ch_sel,
  output logic [3:0]  shift [NS],
  output logic [15:0] scale [NS]
);

  logic [2:0] st_m, st_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_m <= '0;
      st_s <= '0;
    end else begin
      st_m <= {st_ovf, st_pps_sm, st_no_pps};
      st_s <= st_m;
    end
  end

  function automatic logic [31:0] bmerge(input logic [31:0] old, input logic [31:0] nw,
                                         input logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    logic [31:0] w;
    if (rst) begin
      ch_sel <= 2'b00;
      for (int s = 0; s < NS; s++) begin
        shift[s] <= 4'd2;
        scale[s] <= 16'hFFFF;
      end
      rsp <= '0;
    end else begin
      if (req.wr) begin
        if (req.addr == 4'd0) begin
          w = bmerge({27'd0, ch_sel, 3'd0}, req.wdata, req.be);
          ch_sel <= w[4:3];
        end else if (req.addr <= 4'(NS)) begin
          w = bmerge({12'd0, shift[req.addr-1], scale[req.addr-1]}, req.wdata, req.be);
          shift[req.addr-1] <= w[19:16];
          scale[req.addr-1] <= w[15:0];
        end
      end
      rsp.rvalid <= req.rd;
      if (req.rd) begin
        if (req.addr == 4'd0)        rsp.rdata <= {27'd0, ch_sel, st_s};
        else if (req.addr <= 4'(NS)) rsp.rdata <= {12'd0, shift[req.addr-1], scale[req.addr-1]};
        else                         rsp.rdata <= '0;
      end
    end
  end

endmodule
