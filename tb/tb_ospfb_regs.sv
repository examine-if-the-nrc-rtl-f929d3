// tb_ospfb_regs: register map, byte enables, reset values and status
// synchronisation of the OSPFB control block.
//
// Checks the reset values (selection 00, shift 2, scale 0xFFFF), writes and
// read-back of every register with random data and byte enables against a
// shadow model, that reserved bits read as zero, that unmapped offsets read
// zero, that the configuration outputs follow the registers, and that each
// status input appears in bits 2:0 of offset 0 two or three clocks after it
// changes.
module tb_ospfb_regs;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  ctl_req_t req = '0;
  ctl_rsp_t rsp;
  logic st_no_pps = 1'b1, st_pps_sm = 1'b0, st_ovf = 1'b0;
  logic [1:0]  ch_sel;
  logic [3:0]  shift [NS];
  logic [15:0] scale [NS];
  int checks = 0, failures = 0;

  ospfb_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] shadow [16];

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.rd = 1'b1; req.addr = a;
    @(negedge clk);
    req = '0;
    checks++;
    if (!rsp.rvalid) failures++;
    d = rsp.rdata;
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clk);
    req = '0; req.wr = 1'b1; req.addr = a; req.wdata = d; req.be = be;
    @(negedge clk);
    req = '0;
  endtask

  function automatic logic [31:0] mask(input int a);
    if (a == 0) return 32'h18;
    if (a <= NS) return 32'h000F_FFFF;
    return 32'h0;
  endfunction

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int a = 0; a < 16; a++) shadow[a] = (a >= 1 && a <= NS) ? 32'h0002_FFFF : 32'h0;
    repeat (4) @(posedge clk);
    // reset values and status
    for (int a = 0; a < 16; a++) begin
      rd(4'(a), d);
      checks++;
      if (a == 0) begin
        if (d != 32'h1) failures++;   // no marker yet
      end else if (d != shadow[a]) failures++;
    end
    // random writes / reads
    for (int it = 0; it < 3000; it++) begin
      automatic int          a  = $urandom_range(0, 15);
      automatic logic [31:0] wd = $urandom;
      automatic logic [3:0]  be = 4'($urandom);
      wr(4'(a), wd, be);
      for (int b = 0; b < 4; b++)
        if (be[b]) shadow[a][8*b +: 8] = wd[8*b +: 8];
      shadow[a] &= mask(a);
      rd(4'(a), d);
      checks++;
      if (((a == 0) ? (d & ~32'h7) : d) != shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d got %h exp %h", a, d, shadow[a]);
      end
      checks++;
      if (ch_sel != shadow[0][4:3]) failures++;
      for (int s = 0; s < NS; s++) begin
        checks++;
        if ({shift[s], scale[s]} != shadow[s + 1][19:0]) failures++;
      end
    end
    // status synchronisation
    for (int it = 0; it < 200; it++) begin
      automatic logic [2:0] st = 3'($urandom);
      @(negedge clk);
      {st_ovf, st_pps_sm, st_no_pps} = st;
      repeat (2) @(negedge clk);
      rd(4'd0, d);
      checks++;
      if (d[2:0] != st) begin
        failures++;
        if (failures < 10) $display("FAIL status got %b exp %b", d[2:0], st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
