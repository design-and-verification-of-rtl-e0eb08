// Control and status registers of the bit movement engine (slave interface).
// Five 32-bit registers, selected by a 3-bit word address:
//   0  source bit address [31:0]
//   1  [31:27] source bit address [36:32], [26:0] block length in bits
//   2  destination bit address [31:0]
//   3  [31:27] destination bit address [36:32], [26:0] unused (read as 0)
//   4  [2] error, [1] busy, [0] START (write 1 to start; reads as 0)
// A write takes effect at the clock edge of the cycle in which sel and rw are
// high; reads are combinational, and so are start and reject, which are high
// in the cycle of the START write itself. Registers 0-3 ignore writes while the
// engine is busy. Writing START while idle with a non-zero length raises
// start and clears error; writing START while busy or with a
// zero length sets error instead, and a zero length also raises reject for
// one cycle so a waiting controller is released.
// The map follows the document's register table; the bit positions of the
// 5-bit high fields and of error/busy/START, the busy write protection and
// the error rules are this design's choices. Synchronous active-low reset.
module bme_regs
  import bme_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // slave interface
  input  logic            sel,
  input  logic            rw,        // 1 = write
  input  logic [2:0]      addr,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  // engine side
  input  logic            busy,
  output logic            start,
  output logic            reject,
  output logic            error,
  output logic [BAW-1:0]  src_addr,
  output logic [BAW-1:0]  dst_addr,
  output logic [LENW-1:0] blk_len
);
  logic [31:0] src_lo, dst_lo;
  logic [4:0]  src_hi, dst_hi;

  assign src_addr = {src_hi, src_lo};
  assign dst_addr = {dst_hi, dst_lo};

  logic wr;
  assign wr = sel && rw;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      src_lo  <= '0;
      src_hi  <= '0;
      dst_lo  <= '0;
      dst_hi  <= '0;
      blk_len <= '0;
      error   <= 1'b0;
    end else begin
      if (wr && !busy) begin
        unique case (addr)
          REG_SRC_LO: src_lo <= wdata;
          REG_SRC_HI: begin
            src_hi  <= wdata[31:27];
            blk_len <= wdata[26:0];
          end
          REG_DST_LO: dst_lo <= wdata;
          REG_DST_HI: dst_hi <= wdata[31:27];
          default: ;
        endcase
      end
      if (wr && addr == REG_CTRL && wdata[0]) begin
        error <= busy || (blk_len == '0);
      end
    end
  end

  logic start_wr;
  assign start_wr = wr && (addr == REG_CTRL) && wdata[0];
  assign start    = start_wr && !busy && (blk_len != '0);
  assign reject   = start_wr && !busy && (blk_len == '0);

  always_comb begin
    unique case (addr)
      REG_SRC_LO: rdata = src_lo;
      REG_SRC_HI: rdata = {src_hi, blk_len};
      REG_DST_LO: rdata = dst_lo;
      REG_DST_HI: rdata = {dst_hi, 27'd0};
      REG_CTRL:   rdata = {29'd0, error, busy, 1'b0};
      default:    rdata = '0;
    endcase
  end
endmodule
