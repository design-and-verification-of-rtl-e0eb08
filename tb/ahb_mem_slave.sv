// Behavioural AHB memory slave for the testbenches (not part of the design).
// 2**AW words of 32 bits, addressed by HADDR[AW+1:2] (higher bits alias).
// Single NONSEQ transfers: the address phase is taken when hsel, NONSEQ and
// the bus HREADY are high; in the data phase the slave inserts 0..2 random
// wait states when waits_on is set, then returns read data on hrdata or
// stores hwdata. Testbenches reach the array directly as mem and count
// inserted wait states in wait_cycles.
module ahb_mem_slave
  import bme_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic      hclk,
  input  logic      hresetn,
  input  logic      hsel,
  input  ahb_m2s_t  req,
  input  logic      hready_in,
  input  logic      waits_on,
  output ahb_s2m_t  rsp
);
  logic [31:0]   mem [2**AW];
  logic          dp_v = 1'b0, dp_w = 1'b0;
  logic [AW-1:0] dp_a = '0;
  int            wait_cnt = 0;
  int            wait_cycles = 0;

  assign rsp.hready = !(dp_v && wait_cnt != 0);
  assign rsp.hrdata = (dp_v && !dp_w) ? mem[dp_a] : 32'h0;

  always @(posedge hclk) begin
    if (!hresetn) begin
      dp_v     <= 1'b0;
      wait_cnt <= 0;
    end else begin
      if (dp_v && wait_cnt != 0) begin
        wait_cnt    <= wait_cnt - 1;
        wait_cycles <= wait_cycles + 1;
      end else begin
        if (dp_v && dp_w) mem[dp_a] <= req.hwdata;
        dp_v <= 1'b0;
        if (hsel && req.htrans == HT_NONSEQ && hready_in) begin
          dp_v     <= 1'b1;
          dp_w     <= req.hwrite;
          dp_a     <= req.haddr[AW+1:2];
          wait_cnt <= waits_on ? int'($urandom_range(0, 2)) : 0;
        end
      end
    end
  end
endmodule
