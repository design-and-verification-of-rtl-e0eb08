// AHB bridge of the bit movement engine.
// Translates between the engine's native interfaces and AHB single
// (NONSEQ) transfers, in both directions:
//  * Master side: a native request (mREQ, mRW, mADDR, mWDATA) becomes an AHB
//    address phase (HTRANS = NONSEQ, HADDR = {mADDR, 2'b00}, HWRITE = mRW)
//    with HBUSREQ raised. Write data is registered when the address phase is
//    accepted and driven on HWDATA through the data phase. mHOLD is high
//    while the running data phase waits (HREADY low) or while a request is
//    not granted; read data is HRDATA, or a copy of it kept when the data
//    phase ended during a hold.
//  * Slave side: an AHB address phase selecting the engine is registered;
//    during its data phase the bridge drives the engine's slave port (sSEL,
//    sRW, sADDR = HADDR[4:2], sWDATA = HWDATA) and returns sRDATA on HRDATA.
//    The register file never waits, so HREADYOUT is always high.
// The document gives the bridge's purpose and the NONSEQ-only restriction;
// the pipelining and the mapping of signals are this design's choices, and
// HWRITE = 1 means write as in the AMBA specification.
// Synchronous active-low reset (HRESETn).
module ahb_bridge
  import bme_pkg::*;
(
  input  logic           hclk,
  input  logic           hresetn,
  // engine native master port
  input  logic           mREQ,
  input  logic           mRW,
  input  logic [WAW-1:0] mADDR,
  input  logic [DW-1:0]  mWDATA,
  output logic [DW-1:0]  mRDATA,
  output logic           mHOLD,
  // AHB master port (towards the fabric)
  output ahb_m2s_t       m_ahb,
  output logic           hbusreq,
  input  logic           hgrant,
  input  ahb_s2m_t       m_rsp,
  // engine native slave port
  output logic           sSEL,
  output logic           sRW,
  output logic [2:0]     sADDR,
  output logic [DW-1:0]  sWDATA,
  input  logic [DW-1:0]  sRDATA,
  // AHB slave port (from the fabric)
  input  logic           hsel,
  input  ahb_m2s_t       s_ahb,
  input  logic           s_hready,   // bus HREADY seen by the slave
  output ahb_s2m_t       s_rsp
);
  // ------------------------------------------------------------ master side
  // The native side has one hold signal for both the pending data phase and
  // the next request. When an AHB data phase ends while the next request is
  // not granted, the engine still sees mHOLD high, so the bridge keeps the
  // read data (owed) and hands it over in the first cycle mHOLD falls.
  logic [DW-1:0] hwdata_q;
  logic          dp_pend;            // an AHB data phase of ours is running
  logic          owed;               // it ended but the engine has not seen it
  logic [DW-1:0] owed_data;
  logic          ready_dp, ready_ap;

  always_comb begin
    m_ahb.htrans = mREQ ? HT_NONSEQ : HT_IDLE;
    m_ahb.haddr  = {mADDR, 2'b00};
    m_ahb.hwrite = mRW;
    m_ahb.hwdata = hwdata_q;
  end

  assign hbusreq  = mREQ;
  assign ready_dp = owed || !dp_pend || m_rsp.hready;
  assign ready_ap = !mREQ || (hgrant && m_rsp.hready);
  assign mHOLD    = !(ready_dp && ready_ap);
  assign mRDATA   = owed ? owed_data : m_rsp.hrdata;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      hwdata_q  <= '0;
      dp_pend   <= 1'b0;
      owed      <= 1'b0;
      owed_data <= '0;
    end else begin
      if (mREQ && mRW && !mHOLD) hwdata_q <= mWDATA;
      if (dp_pend && m_rsp.hready && mHOLD) begin
        owed      <= 1'b1;
        owed_data <= m_rsp.hrdata;
      end else if (!mHOLD) begin
        owed <= 1'b0;
      end
      if (mREQ && !mHOLD) begin
        dp_pend <= 1'b1;
      end else if (m_rsp.hready) begin
        dp_pend <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------- slave side
  logic       dp_valid, dp_write;
  logic [2:0] dp_addr;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
    end else if (s_hready) begin
      dp_valid <= hsel && (s_ahb.htrans == HT_NONSEQ);
      dp_write <= s_ahb.hwrite;
      dp_addr  <= s_ahb.haddr[4:2];
    end
  end

  assign sSEL         = dp_valid;
  assign sRW          = dp_write;
  assign sADDR        = dp_addr;
  assign sWDATA       = s_ahb.hwdata;
  assign s_rsp.hrdata = (dp_valid && !dp_write) ? sRDATA : '0;
  assign s_rsp.hready = 1'b1;

  // An address phase that the bus does not take stays unchanged.
  a_addr_stable: assert property (@(posedge hclk) disable iff (!hresetn)
    (m_ahb.htrans == HT_NONSEQ && !(hgrant && m_rsp.hready)) |=>
      (m_ahb.htrans == HT_NONSEQ && $stable(m_ahb.haddr) && $stable(m_ahb.hwrite)));

  // Only single transfers are supported.
  a_nonseq_only: assert property (@(posedge hclk) disable iff (!hresetn)
    hsel |-> (s_ahb.htrans inside {HT_IDLE, HT_NONSEQ}));
endmodule
