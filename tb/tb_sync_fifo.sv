// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/count and the overflow pulse on a push into a full FIFO.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_ovf = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ovf;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full  == (q.size() == D), "full");
      chk(32'(count) == q.size(), "count");
      if (q.size() > 0) chk(rd_data == q[0], "head data");
      wr_en   = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35));
      rd_en   = ($urandom_range(0, 99) < ((i / 500) % 2 ? 35 : 70));
      wr_data = W'($urandom);
      exp_ovf = wr_en && (q.size() == D) && !(rd_en && q.size() > 0);
      @(posedge clk);
      #1;
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && !exp_ovf) q.push_back(wr_data);
      chk(overflow == exp_ovf, "overflow pulse");
      if (exp_ovf) n_ovf++;
    end
    chk(n_ovf > 0, "overflow exercised");
    $display("overflows=%0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
