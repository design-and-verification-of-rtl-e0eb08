// Self-checking testbench of bme_fifo (depth 4): random pushes and pops that
// respect full/empty, including simultaneous push and pop and a flush,
// compared with a queue model for data, count, empty and full.
module tb_bme_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        clr = 1'b0, push = 1'b0, pop = 1'b0, empty, full;
  logic [31:0] din = '0, dout;
  logic [2:0]  count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int max_count = 0;

  bme_fifo #(.W(32), .DEPTH(4)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (count !== 3'(q.size()) || empty !== (q.size() == 0) || full !== (q.size() == 4) ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++;
        if (failures < 5) $display("FAIL: n=%0d count=%0d model=%0d", n, count, q.size());
      end
      if (q.size() > max_count) max_count = q.size();
      push = (q.size() < 4 || pop) && ($urandom_range(0, 2) != 0);
      pop  = (q.size() > 0) && ($urandom_range(0, 2) == 0);
      if (q.size() == 4 && !pop) push = 1'b0;
      clr  = (n % 997 == 500);
      din  = $urandom;
      @(posedge clk);
      #1;
      if (clr) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(din);
      end
          end
    checks++;
    if (max_count != 4) begin
      failures++;
      $display("FAIL: FIFO never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
