// AHB fabric with descriptor sequencer.
// Connects two masters to two slaves and loads the bit movement engine from
// a linked list of descriptors in memory.
//  * Masters: the engine (through its bridge, port m0) and the fabric's own
//    sequencer. The sequencer owns the bus except while the engine runs; it
//    then grants the bus to the engine (HGRANT) until the engine's done. No
//    arbiter is needed because the two never want the bus at the same time,
//    so m0_hbusreq is accepted but does not affect the grant (the linter
//    reports it unused).
//  * Slaves: memory (port s0) and the engine's register bridge (port s1).
//    An address with HADDR[31:8] == REG_BASE[31:8] selects s1, anything else
//    s0. The selected slave of each data phase is registered and steers
//    HRDATA and HREADY back.
//  * Sequencer: a write on ptr_wr gives it the byte address of the first
//    descriptor, five words: the four engine registers 0-3 and a link word.
//    It reads the five words, writes registers 0-3, writes START to register
//    4, waits for the engine's done, then follows the link; a zero link ends
//    the chain and raises chain_done for one cycle. Each of its transfers is
//    one NONSEQ address phase followed by its data phase (two or more cycles).
// The document gives the fabric's role (pointer to the registers, pointer to
// the next set, simple state machine, placeholder for an arbiter); the
// descriptor layout, the address map, the ptr_wr port and the grant scheme
// are this design's choices. Synchronous active-low reset.
module ahb_fabric
  import bme_pkg::*;
#(
  parameter logic [31:0] REG_BASE = 32'hFFFF_FF00
) (
  input  logic        hclk,
  input  logic        hresetn,
  // pointer port
  input  logic        ptr_wr,
  input  logic [31:0] ptr_wdata,
  output logic        chain_busy,
  output logic        chain_done,
  // engine completion
  input  logic        bme_done,
  // master 0: the engine's bridge
  input  ahb_m2s_t    m0_ahb,
  input  logic        m0_hbusreq,
  output logic        m0_hgrant,
  output ahb_s2m_t    m0_rsp,
  // slave 0: memory
  output logic        s0_hsel,
  output ahb_m2s_t    s0_ahb,
  output logic        s0_hready,
  input  ahb_s2m_t    s0_rsp,
  // slave 1: engine registers
  output logic        s1_hsel,
  output ahb_m2s_t    s1_ahb,
  output logic        s1_hready,
  input  ahb_s2m_t    s1_rsp
);
  typedef enum logic [2:0] {
    F_IDLE, F_RD_ADDR, F_RD_DATA, F_WR_ADDR, F_WR_DATA, F_WAIT_DONE
  } fab_state_t;

  fab_state_t  fstate;
  logic [31:0] ptr;
  logic [2:0]  idx;
  logic [31:0] desc [5];

  // ---------------------------------------------------- sequencer master
  ahb_m2s_t seq_ahb;
  always_comb begin
    seq_ahb        = '0;
    seq_ahb.htrans = HT_IDLE;
    unique case (fstate)
      F_RD_ADDR: begin
        seq_ahb.htrans = HT_NONSEQ;
        seq_ahb.haddr  = ptr + {27'd0, idx, 2'b00};
      end
      F_WR_ADDR: begin
        seq_ahb.htrans = HT_NONSEQ;
        seq_ahb.haddr  = REG_BASE + {27'd0, idx, 2'b00};
        seq_ahb.hwrite = 1'b1;
      end
      F_WR_DATA:
        seq_ahb.hwdata = (idx == 3'd4) ? 32'h1 : desc[idx];
      default: ;
    endcase
  end

  // -------------------------------------------------------------- bus
  logic      owner_bme;
  ahb_m2s_t  bus;
  logic      sel_regs;
  logic      dp_valid, dp_regs;
  logic      hready;
  logic [31:0] hrdata;

  assign owner_bme = (fstate == F_WAIT_DONE);
  assign m0_hgrant = owner_bme;
  assign bus       = owner_bme ? m0_ahb : seq_ahb;
  assign sel_regs  = (bus.haddr[31:8] == REG_BASE[31:8]);

  assign s0_hsel   = (bus.htrans == HT_NONSEQ) && !sel_regs;
  assign s1_hsel   = (bus.htrans == HT_NONSEQ) &&  sel_regs;
  assign s0_ahb    = bus;
  assign s1_ahb    = bus;

  assign hready    = !dp_valid ? 1'b1 : (dp_regs ? s1_rsp.hready : s0_rsp.hready);
  assign hrdata    = dp_regs ? s1_rsp.hrdata : s0_rsp.hrdata;
  assign s0_hready = hready;
  assign s1_hready = hready;
  assign m0_rsp    = '{hrdata: hrdata, hready: hready};

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      dp_valid <= 1'b0;
      dp_regs  <= 1'b0;
    end else if (hready) begin
      dp_valid <= (bus.htrans == HT_NONSEQ);
      dp_regs  <= sel_regs;
    end
  end

  // ---------------------------------------------------- sequencer control
  assign chain_busy = (fstate != F_IDLE);

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      fstate     <= F_IDLE;
      ptr        <= '0;
      idx        <= '0;
      chain_done <= 1'b0;
      for (int i = 0; i < 5; i++) desc[i] <= '0;
    end else begin
      chain_done <= 1'b0;
      unique case (fstate)
        F_IDLE:
          if (ptr_wr && ptr_wdata != '0) begin
            ptr    <= ptr_wdata;
            idx    <= '0;
            fstate <= F_RD_ADDR;
          end
        F_RD_ADDR: if (hready) fstate <= F_RD_DATA;
        F_RD_DATA:
          if (hready) begin
            desc[idx] <= hrdata;
            if (idx == 3'd4) begin
              idx    <= '0;
              fstate <= F_WR_ADDR;
            end else begin
              idx    <= idx + 1'b1;
              fstate <= F_RD_ADDR;
            end
          end
        F_WR_ADDR: if (hready) fstate <= F_WR_DATA;
        F_WR_DATA:
          if (hready) begin
            if (idx == 3'd4) begin
              fstate <= F_WAIT_DONE;
            end else begin
              idx    <= idx + 1'b1;
              fstate <= F_WR_ADDR;
            end
          end
        F_WAIT_DONE:
          if (bme_done) begin
            if (desc[4] != '0) begin
              ptr    <= desc[4];
              idx    <= '0;
              fstate <= F_RD_ADDR;
            end else begin
              chain_done <= 1'b1;
              fstate     <= F_IDLE;
            end
          end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // The engine only drives the bus while it holds the grant.
  a_m0_granted: assert property (@(posedge hclk) disable iff (!hresetn)
    (m0_ahb.htrans == HT_NONSEQ) |-> m0_hgrant);
  // Ownership changes only with no data phase in flight.
  a_clean_handover: assert property (@(posedge hclk) disable iff (!hresetn)
    (owner_bme != $past(owner_bme)) |-> !dp_valid);
endmodule
