// Self-checking testbench of bme_regs: write and read back every register,
// check the decoded address and length fields, the START pulse, the busy
// write protection and the error rules.
module tb_bme_regs;
  import bme_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic            sel = 1'b0, rw = 1'b0, busy = 1'b0;
  logic [2:0]      addr = '0;
  logic [31:0]     wdata = '0, rdata;
  logic            start, reject, error;
  logic [36:0]     src_addr, dst_addr;
  logic [26:0]     blk_len;
  int checks = 0, failures = 0;

  bme_regs dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic wr(input logic [2:0] a, input logic [31:0] v);
    @(negedge clk);
    sel = 1'b1; rw = 1'b1; addr = a; wdata = v;
    @(negedge clk);
    sel = 1'b0; rw = 1'b0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [31:0] v);
    @(negedge clk);
    sel = 1'b1; rw = 1'b0; addr = a;
    #1 v = rdata;
    @(negedge clk);
    sel = 1'b0;
  endtask

  task automatic start_wr_begin();
    @(negedge clk);
    sel = 1'b1; rw = 1'b1; addr = REG_CTRL; wdata = 32'h1;
  endtask

  task automatic start_wr_end();
    @(negedge clk);
    sel = 1'b0; rw = 1'b0;
  endtask

  logic [31:0] d, s_lo, s_hi, d_lo, d_hi;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      s_lo = $urandom; s_hi = $urandom; d_lo = $urandom; d_hi = $urandom;
      wr(REG_SRC_LO, s_lo);
      wr(REG_SRC_HI, s_hi);
      wr(REG_DST_LO, d_lo);
      wr(REG_DST_HI, d_hi);
      #1;
      chk(src_addr == {s_hi[31:27], s_lo}, "source address");
      chk(dst_addr == {d_hi[31:27], d_lo}, "destination address");
      chk(blk_len == s_hi[26:0], "block length");
      rd(REG_SRC_LO, d); chk(d == s_lo, "read 0");
      rd(REG_SRC_HI, d); chk(d == s_hi, "read 1");
      rd(REG_DST_LO, d); chk(d == d_lo, "read 2");
      rd(REG_DST_HI, d); chk(d == {d_hi[31:27], 27'd0}, "read 3");
    end
    // START with a length: start pulse, no error.
    wr(REG_SRC_HI, {5'd0, 27'd77});
    start_wr_begin();
    #1 chk(start && !reject, "start pulse");
    start_wr_end();
    #1 chk(!start, "start is one cycle");
    rd(REG_CTRL, d); chk(d == 32'h0, "status idle, no error");
    // Busy: registers protected, START sets error.
    busy = 1'b1;
    wr(REG_SRC_LO, 32'h1234_5678);
    #1 chk(src_addr[31:0] == s_lo, "write ignored while busy");
    start_wr_begin();
    #1 chk(!start && !reject, "no start while busy");
    start_wr_end();
    rd(REG_CTRL, d); chk(d == 32'h6, "busy and error");
    busy = 1'b0;
    // Zero length: reject and error.
    wr(REG_SRC_HI, 32'd0);
    start_wr_begin();
    #1 chk(reject && !start, "zero length rejected");
    start_wr_end();
    rd(REG_CTRL, d); chk(d == 32'h4, "error after reject");
    // A good START clears error.
    wr(REG_SRC_HI, 32'd5);
    wr(REG_CTRL, 32'h1);
    rd(REG_CTRL, d); chk(d == 32'h0, "error cleared");
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
