// tb_fs_scale: per-slice shift/scale/requantisation against a real-number
// model.
//
// Every slice gets its own shift code (0..15, codes above 6 behave as 6) and
// scale; random half-band words (mostly small, sometimes full range) are
// applied with idle cycles.  Expected output: round(v * scale * 2^sh / 2^24)
// (half up) limited to +/-127, with the slice flag set on saturation and
// otherwise copied from the frame flag.  Also checks that the control word is
// delayed by one clock and that the output holds on idle cycles.
module tb_fs_scale;
  import ospfb_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0]  shift [NS];
  logic [15:0] scale [NS];
  ctl_t in_ctl = '0, out_ctl;
  hb_t  in_w    [NS];
  o_t   out_o   [NS];
  logic out_flg [NS];
  int checks = 0, failures = 0;
  int nsat = 0;

  fs_scale dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    o_t   last_o [NS];
    logic last_f [NS];
    for (int s = 0; s < NS; s++) begin
      in_w[s] = '0; shift[s] = 4'd2; scale[s] = 16'hFFFF;
      last_o[s] = '0; last_f[s] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (c % 500 == 0)
        for (int s = 0; s < NS; s++) begin
          shift[s] = 4'($urandom_range(0, 15));
          scale[s] = ($urandom_range(0, 3) == 0) ? 16'hFFFF : 16'($urandom);
        end
      in_ctl = '0;
      in_ctl.v   = ($urandom_range(0, 4) != 0);
      in_ctl.pol = 1'($urandom);
      in_ctl.pps = 1'($urandom);
      in_ctl.flg = ($urandom_range(0, 7) == 0);
      for (int s = 0; s < NS; s++)
        in_w[s] = ($urandom_range(0, 9) == 0) ? hb_t'($urandom)
                                               : hb_t'($signed($urandom_range(0, 1 << 21)) - (1 << 20));
      @(posedge clk);
      #1;
      checks++;
      if (out_ctl != in_ctl) failures++;
      for (int s = 0; s < NS; s++) begin
        automatic int     sh = (shift[s] > 6) ? 6 : shift[s];
        automatic real    r  = real'(in_w[s]) * real'(scale[s]) * (2.0 ** sh) / (2.0 ** 24);
        automatic longint e  = longint'($floor(r + 0.5));
        automatic logic   ef = in_ctl.flg;
        if (e > 127)  begin e = 127;  ef = 1'b1; end
        if (e < -127) begin e = -127; ef = 1'b1; end
        checks++;
        if (in_ctl.v) begin
          if (ef && !in_ctl.flg) nsat++;
          if (longint'(out_o[s]) != e || out_flg[s] != ef) begin
            failures++;
            if (failures < 10)
              $display("FAIL s=%0d v=%0d sh=%0d sc=%0d got %0d/%b exp %0d/%b",
                       s, in_w[s], shift[s], scale[s], out_o[s], out_flg[s], e, ef);
          end
          last_o[s] = out_o[s];
          last_f[s] = out_flg[s];
        end else if (out_o[s] != last_o[s] || out_flg[s] != last_f[s]) begin
          failures++;
        end
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("saturations seen: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
