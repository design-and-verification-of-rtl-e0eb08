// Self-checking testbench of funnel_shifter: every shift amount with random
// and patterned word pairs, compared with a bit-by-bit reference.
module tb_funnel_shifter;
  localparam int unsigned W = 32;
  logic [W-1:0] hi, lo, y;
  logic [4:0]   sh;
  int checks = 0, failures = 0;

  funnel_shifter #(.W(W)) dut (.*);

  function automatic logic [W-1:0] ref_y(input logic [W-1:0] h, input logic [W-1:0] l,
                                         input int s);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = (i + s < W) ? l[i + s] : h[i + s - W];
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      hi = (n < 32) ? 32'hFFFF_0000 : $urandom;
      lo = (n < 32) ? 32'h0000_FFFF : $urandom;
      sh = (n < 32) ? 5'(n) : 5'($urandom);
      #1;
      checks++;
      if (y !== ref_y(hi, lo, int'(sh))) begin
        failures++;
        if (failures < 5) $display("FAIL: hi=%h lo=%h sh=%0d y=%h exp=%h", hi, lo, sh, y,
                                   ref_y(hi, lo, int'(sh)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
