// Bit movement subsystem: the engine, its AHB bridge and the AHB fabric,
// wired as in the system block diagram. Memory is external: its AHB slave
// port is brought out (mem_*). Software (or a testbench) starts a chain of
// moves by writing the address of the first descriptor on ptr_wr/ptr_wdata;
// chain_done pulses when the last descriptor of the chain has completed and
// bme_done pulses at the end of each move.
// Descriptor in memory, five words at a word-aligned byte address:
//   +0 source bit address [31:0]
//   +4 [31:27] source bit address [36:32], [26:0] block length (bits)
//   +8 destination bit address [31:0]
//  +12 [31:27] destination bit address [36:32]
//  +16 byte address of the next descriptor, 0 = end of chain
// The engine's registers occupy REG_BASE .. REG_BASE+0x13 on the bus.
// Bit b of memory is bit (b mod 32) of the 32-bit word at byte address
// 4*(b/32). The structure follows the document's block diagram; the
// descriptor layout and address map are this design's choices.
module bme_soc
  import bme_pkg::*;
#(
  parameter logic [31:0] REG_BASE   = 32'hFFFF_FF00,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        ptr_wr,
  input  logic [31:0] ptr_wdata,
  output logic        chain_busy,
  output logic        chain_done,
  output logic        bme_done,
  // memory slave port
  output logic        mem_hsel,
  output ahb_m2s_t    mem_ahb,
  output logic        mem_hready,
  input  ahb_s2m_t    mem_rsp
);
  // engine native signals
  logic           sSEL, sRW;
  logic [2:0]     sADDR;
  logic [DW-1:0]  sWDATA, sRDATA;
  logic           mREQ, mRW, mHOLD;
  logic [WAW-1:0] mADDR;
  logic [DW-1:0]  mWDATA, mRDATA;

  // bridge <-> fabric
  ahb_m2s_t m0_ahb, s1_ahb;
  ahb_s2m_t m0_rsp, s1_rsp;
  logic     m0_hbusreq, m0_hgrant, s1_hsel, s1_hready;

  bit_move_engine #(.FIFO_DEPTH(FIFO_DEPTH)) u_bme (
    .clk(hclk), .rst_n(hresetn),
    .sSEL, .sRW, .sADDR, .sWDATA, .sRDATA,
    .mREQ, .mRW, .mADDR, .mWDATA, .mRDATA, .mHOLD,
    .DONE(bme_done)
  );

  ahb_bridge u_bridge (
    .hclk, .hresetn,
    .mREQ, .mRW, .mADDR, .mWDATA, .mRDATA, .mHOLD,
    .m_ahb(m0_ahb), .hbusreq(m0_hbusreq), .hgrant(m0_hgrant), .m_rsp(m0_rsp),
    .sSEL, .sRW, .sADDR, .sWDATA, .sRDATA,
    .hsel(s1_hsel), .s_ahb(s1_ahb), .s_hready(s1_hready), .s_rsp(s1_rsp)
  );

  ahb_fabric #(.REG_BASE(REG_BASE)) u_fabric (
    .hclk, .hresetn,
    .ptr_wr, .ptr_wdata, .chain_busy, .chain_done,
    .bme_done,
    .m0_ahb, .m0_hbusreq, .m0_hgrant, .m0_rsp,
    .s0_hsel(mem_hsel), .s0_ahb(mem_ahb), .s0_hready(mem_hready), .s0_rsp(mem_rsp),
    .s1_hsel, .s1_ahb, .s1_hready, .s1_rsp
  );
endmodule
