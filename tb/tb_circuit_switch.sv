// tb_circuit_switch: checks the identity routing after reset, then random
// route changes (including broadcast of one input to many outputs) against a
// route-table model, with the one-clock output latency.
module tb_circuit_switch;
  import ospfb_pkg::*;
  localparam int N = 80;
  logic clk = 0, rst = 1;
  logic cfg_we = 0;
  logic [6:0] cfg_out = '0, cfg_in = '0;
  lane_t in_lane [N], out_lane [N];
  int checks = 0, failures = 0;
  int route [N];

  circuit_switch #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane_t prev [N];
    for (int o = 0; o < N; o++) begin route[o] = o; in_lane[o] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) in_lane[i] = lane_t'($urandom);
      prev = in_lane;
      cfg_we = (t > 20) && ($urandom_range(0, 3) == 0);
      cfg_out = 7'($urandom_range(0, N - 1));
      cfg_in  = (t % 7 == 0) ? 7'd5 : 7'($urandom_range(0, N - 1));
      @(posedge clk);
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_lane[o] != prev[route[o]]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d out %0d", t, o);
        end
      end
      if (cfg_we) route[cfg_out] = cfg_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
