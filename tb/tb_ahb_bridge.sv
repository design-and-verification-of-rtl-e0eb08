// Self-checking testbench of ahb_bridge.
// Master side: a native-protocol master issues random reads and writes of a
// 256-word behavioural AHB memory through the bridge, with random memory
// wait states and random loss of HGRANT; every read is compared with a
// mirror of the memory. Slave side: the testbench acts as AHB master and
// writes then reads back the engine's eight register addresses, with a small
// register model on the native slave port.
module tb_ahb_bridge;
  import bme_pkg::*;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  logic           mREQ = 1'b0, mRW = 1'b0, mHOLD;
  logic [WAW-1:0] mADDR = '0;
  logic [31:0]    mWDATA = '0, mRDATA;
  ahb_m2s_t       m_ahb, s_ahb;
  ahb_s2m_t       m_rsp, s_rsp;
  logic           hbusreq, hgrant = 1'b1, hsel = 1'b0, s_hready;
  logic           sSEL, sRW;
  logic [2:0]     sADDR;
  logic [31:0]    sWDATA, sRDATA;

  ahb_bridge dut (.*);

  ahb_mem_slave #(.AW(8)) u_mem (
    .hclk, .hresetn, .hsel(hgrant && m_ahb.htrans == HT_NONSEQ), .req(m_ahb),
    .hready_in(m_rsp.hready), .waits_on(1'b1), .rsp(m_rsp)
  );

  int checks = 0, failures = 0;

  // --------------------------------------------------- native master
  logic [31:0] mirror [256];
  logic        dp_v = 1'b0, dp_w = 1'b0;
  logic [7:0]  dp_a = '0;
  int          n_ops = 0, n_held = 0;

  always @(posedge hclk) begin
    if (hresetn) begin
      if (dp_v && !mHOLD) begin
        if (!dp_w) begin
          checks++;
          if (mRDATA !== mirror[dp_a]) begin
            failures++;
            $display("FAIL: read word %0d = %h expected %h", dp_a, mRDATA, mirror[dp_a]);
          end
        end
        dp_v <= 1'b0;
      end
      if (mREQ && mHOLD) n_held++;
      if (mREQ && !mHOLD) begin
        dp_v <= 1'b1;
        dp_w <= mRW;
        dp_a <= mADDR[7:0];
        if (mRW) mirror[mADDR[7:0]] = mWDATA;
        n_ops++;
      end
    end
  end

  // New request on the falling edge, unless the last one was held.
  logic held = 1'b0;
  always @(posedge hclk) held <= mREQ && mHOLD;
  always @(negedge hclk) begin
    hgrant = ($urandom_range(0, 4) != 0);
    if (!held || !hresetn) begin
      mREQ   = hresetn && (n_ops < 600) && ($urandom_range(0, 3) != 0);
      mRW    = $urandom_range(0, 1) == 1;
      mADDR  = WAW'($urandom_range(0, 255));
      mWDATA = $urandom;
    end
  end

  // ----------------------------------------------- register model
  logic [31:0] regs [8];
  assign sRDATA = regs[sADDR];
  always @(posedge hclk) if (sSEL && sRW) regs[sADDR] <= sWDATA;
  assign s_hready = 1'b1;

  task automatic ahb_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge hclk);
    hsel = 1'b1;
    s_ahb.htrans = HT_NONSEQ; s_ahb.haddr = {27'h7FF_FFF8, a, 2'b00}; s_ahb.hwrite = 1'b1;
    @(negedge hclk);
    hsel = 1'b0;
    s_ahb.htrans = HT_IDLE; s_ahb.hwdata = d;
    checks++;
    if (!(sSEL && sRW && sADDR == a && sWDATA == d)) begin
      failures++;
      $display("FAIL: slave write %0d not presented", a);
    end
  endtask

  task automatic ahb_read(input logic [2:0] a, input logic [31:0] exp);
    @(negedge hclk);
    hsel = 1'b1;
    s_ahb.htrans = HT_NONSEQ; s_ahb.haddr = {27'h7FF_FFF8, a, 2'b00}; s_ahb.hwrite = 1'b0;
    @(negedge hclk);
    hsel = 1'b0;
    s_ahb.htrans = HT_IDLE;
    #1;
    checks++;
    if (!(sSEL && !sRW && s_rsp.hrdata == exp && s_rsp.hready)) begin
      failures++;
      $display("FAIL: slave read %0d = %h expected %h", a, s_rsp.hrdata, exp);
    end
  endtask

  logic [31:0] vals [8];
  initial begin
    s_ahb = '0;
    for (int i = 0; i < 256; i++) begin
      u_mem.mem[i] = $urandom;
      mirror[i] = u_mem.mem[i];
    end
    for (int i = 0; i < 8; i++) regs[i] = '0;
    repeat (3) @(negedge hclk);
    hresetn = 1'b1;
    for (int i = 0; i < 8; i++) begin
      vals[i] = $urandom;
      ahb_write(3'(i), vals[i]);
    end
    @(negedge hclk);
    for (int i = 0; i < 8; i++) ahb_read(3'(i), vals[i]);
    while (n_ops < 600 || dp_v) @(negedge hclk);
    repeat (3) @(negedge hclk);
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (u_mem.mem[i] !== mirror[i]) begin
        failures++;
        $display("FAIL: memory word %0d = %h expected %h", i, u_mem.mem[i], mirror[i]);
      end
    end
    checks++;
    if (n_held == 0 || u_mem.wait_cycles == 0) begin
      failures++;
      $display("FAIL: no held request or no wait state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
