// Self-checking testbench of ahb_fabric.
// A behavioural memory with random wait states sits on slave port 0, a
// register recorder on slave port 1, and a stand-in for the engine's bridge
// on master port 0. Three chains of random length (1 to 5 descriptors) are
// placed in memory. For each descriptor the testbench checks that the fabric
// writes registers 0-3 with the descriptor words and then START to register
// 4, that it grants the bus only after START, and that memory transfers made
// by the stand-in master while granted reach memory (a read of the
// descriptor's first word and a write of a marker word). It then raises
// done; the fabric must follow the link and pulse chain_done once at the end.
module tb_ahb_fabric;
  import bme_pkg::*;

  localparam logic [31:0] REG_BASE = 32'hFFFF_FF00;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  logic        ptr_wr = 1'b0, chain_busy, chain_done, bme_done = 1'b0;
  logic [31:0] ptr_wdata = '0;
  ahb_m2s_t    m0_ahb, s0_ahb, s1_ahb;
  ahb_s2m_t    m0_rsp, s0_rsp, s1_rsp;
  logic        m0_hbusreq = 1'b0, m0_hgrant;
  logic        s0_hsel, s0_hready, s1_hsel, s1_hready;

  ahb_fabric #(.REG_BASE(REG_BASE)) dut (.*);

  ahb_mem_slave #(.AW(10)) u_mem (
    .hclk, .hresetn, .hsel(s0_hsel), .req(s0_ahb), .hready_in(s0_hready),
    .waits_on(1'b1), .rsp(s0_rsp)
  );

  int checks = 0, failures = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // --------------------------------------------- register recorder (s1)
  logic        r_dp = 1'b0;
  logic [7:0]  r_addr = '0;
  logic [31:0] r_log_a [$], r_log_d [$];
  assign s1_rsp = '{hrdata: 32'h0, hready: 1'b1};
  always @(posedge hclk) begin
    if (r_dp && s1_hready) begin
      r_log_a.push_back({24'd0, r_addr});
      r_log_d.push_back(s1_ahb.hwdata);
    end
    if (s1_hready) begin
      r_dp   <= s1_hsel && s1_ahb.hwrite;
      r_addr <= s1_ahb.haddr[7:0];
    end
  end

  int n_chain_done = 0;
  always @(posedge hclk) if (hresetn && chain_done) n_chain_done++;

  // ------------------------------------------- stand-in engine master (m0)
  task automatic m0_xfer(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                         output logic [31:0] rd);
    @(negedge hclk);
    m0_hbusreq = 1'b1;
    m0_ahb.htrans = HT_NONSEQ; m0_ahb.haddr = a; m0_ahb.hwrite = wr;
    @(posedge hclk);
    while (!m0_rsp.hready) @(posedge hclk);
    @(negedge hclk);
    m0_hbusreq = 1'b0;
    m0_ahb.htrans = HT_IDLE; m0_ahb.hwdata = wd;
    @(posedge hclk);
    while (!m0_rsp.hready) @(posedge hclk);
    rd = m0_rsp.hrdata;
  endtask

  // descriptor contents of the current chain
  logic [31:0] desc [5][5];
  int          n_desc;

  initial begin
    logic [31:0] rd;
    m0_ahb = '0;
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = $urandom;
    repeat (3) @(negedge hclk);
    hresetn = 1'b1;
    for (int c = 0; c < 3; c++) begin
      int base;
      n_desc = $urandom_range(1, 5);
      base = 100 + 40 * c;
      for (int j = 0; j < n_desc; j++) begin
        for (int w = 0; w < 4; w++) desc[j][w] = $urandom;
        desc[j][0][31:10] = '0;     // word used as a marker address below 1 KiB
        desc[j][4] = (j == n_desc - 1) ? 32'd0 : 32'(4 * (base + 5 * (j + 1)));
        for (int w = 0; w < 5; w++) u_mem.mem[base + 5 * j + w] = desc[j][w];
      end
      r_log_a.delete();
      r_log_d.delete();
      @(negedge hclk);
      ptr_wr = 1'b1;
      ptr_wdata = 32'(4 * base);
      @(negedge hclk);
      ptr_wr = 1'b0;
      for (int j = 0; j < n_desc; j++) begin
        logic [31:0] marker;
        while (!m0_hgrant) @(negedge hclk);
        chk(r_log_a.size() == 5, "five register writes before grant");
        for (int w = 0; w < 5 && w < r_log_a.size(); w++) begin
          chk(r_log_a[w] == 32'(4 * w), $sformatf("register address %0d", w));
          chk(r_log_d[w] == ((w == 4) ? 32'h1 : desc[j][w]),
              $sformatf("chain %0d desc %0d register %0d data", c, j, w));
        end
        r_log_a.delete();
        r_log_d.delete();
        // Engine traffic while granted: read, then write a marker.
        m0_xfer(1'b0, 32'(4 * (base + 5 * j)), 32'h0, rd);
        chk(rd == desc[j][0], "granted master reads memory");
        marker = 32'hC0DE_0000 | 32'(c * 16 + j);
        m0_xfer(1'b1, 32'(4 * 900 + 4 * (c * 8 + j)), marker, rd);
        @(negedge hclk);
        bme_done = 1'b1;
        @(negedge hclk);
        bme_done = 1'b0;
        @(negedge hclk);
        chk(!m0_hgrant, "grant removed after done");
        chk(u_mem.mem[900 + c * 8 + j] == marker, "granted master write reached memory");
      end
      repeat (4) @(negedge hclk);
      chk(n_chain_done == c + 1, "one chain_done per chain");
      chk(!chain_busy, "chain idle at the end");
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
