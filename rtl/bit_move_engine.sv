// Bit movement engine: copies a field of blk_len bits from any source bit
// address to any non-overlapping destination bit address in a memory that is
// only word (32-bit) addressable.
//
// How it works. Bit b of the address space is bit (b mod 32) of word b/32.
// Destination word k of the move (k = 0 .. M-1) is one funnel-shifter output:
// the concatenation of two consecutive words V[k+1]:V[k] of the source
// stream, shifted right by sh = (src_offset - dst_offset) mod 32. V is the
// run of source words starting at the word that holds the first source bit,
// preceded by a zero word when src_offset < dst_offset and followed by zero
// words once the source run is exhausted. The first and last destination
// words are merged with their old contents through three masks (old bits
// below the field, the field, old bits above it), so the engine reads those
// two words first; it skips either read when the field covers that word
// completely.
//
// Ten controller states follow the state diagram: ADDRESS DECODE (idle,
// registers writable) -> ADDRESS COMPUTATION (word addresses, word counts,
// offsets) -> READ DATA TO FIFO (the destination edge reads, then up to four
// source words) -> COMPARE OFFSET (shift amount, and whether the field fits
// in one destination word) -> either COMPUTE FOR CORNER CASES (one word,
// three masks) -> WRITE LAST DATA, or COMPUTE FOR NORMAL CASES -> WRITE FIRST
// DATA -> [WRITE INTERMEDIATE DATA] -> WRITE LAST DATA -> DONE, which raises
// done for one cycle once the last write has completed, then ADDRESS DECODE.
// From READ DATA TO FIFO on, a bus stage runs next to the controller: each
// cycle it issues an edge read, else a source read when the FIFO (with the
// read in flight) has room, else the buffered write word. This interleaves
// reads and writes one transfer per cycle, about two cycles per 32 moved
// bits, inside the (block length)/16 + 10 cycle budget with a zero-wait
// memory.
//
// Master interface (native, pipelined like the AHB it is bridged to): a
// transfer is accepted in a cycle with mREQ high and mHOLD low; mADDR, mRW
// and mWDATA are held while mHOLD is high. The data phase is the next cycle
// and ends in the first cycle with mHOLD low, when read data on mRDATA is
// taken. Slave interface: see bme_regs. Synchronous active-low reset.
//
// From the document: the register map, 37-bit bit addresses, 27-bit length,
// the 30-bit word address mADDR, the interface signal names, the ten states,
// the four-word FIFO, the funnel shifter and the three masks. This design's
// own choices: the little-endian bit order, the bus stage and its priority,
// the skipping of full-word edge reads, and mRW/sRW = 1 meaning write.
// mADDR is bits [34:5] of a bit address; bits [36:35] select nothing.
module bit_move_engine
  import bme_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // slave interface
  input  logic           sSEL,
  input  logic           sRW,
  input  logic [2:0]     sADDR,
  input  logic [DW-1:0]  sWDATA,
  output logic [DW-1:0]  sRDATA,
  // master interface
  output logic           mREQ,
  output logic           mRW,
  output logic [WAW-1:0] mADDR,
  output logic [DW-1:0]  mWDATA,
  input  logic [DW-1:0]  mRDATA,
  input  logic           mHOLD,
  // completion
  output logic           DONE
);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  bme_state_t state, state_n;

  // ---------------------------------------------------------------- registers
  logic            start, reject, error, busy;
  logic [BAW-1:0]  src_addr, dst_addr;
  logic [LENW-1:0] blk_len;

  assign busy = (state != ST_ADDR_DECODE);

  bme_regs u_regs (
    .clk, .rst_n,
    .sel(sSEL), .rw(sRW), .addr(sADDR), .wdata(sWDATA), .rdata(sRDATA),
    .busy, .start, .reject, .error,
    .src_addr, .dst_addr, .blk_len
  );

  // ------------------------------------------------------ operation geometry
  logic [WAW-1:0]  src_w0, dst_w0;      // first source / destination word
  logic [OFFW-1:0] soff, doff, eoff;    // first src bit, first / last dst bit
  logic [CNTW-1:0] n_src, n_dst;        // words touched
  logic            need_first, need_last;
  logic [OFFW-1:0] sh;                  // funnel shift amount
  logic            pre_zero;            // V[0] is a zero word
  logic            fits;                // field inside one destination word

  // Values computed in ADDRESS COMPUTATION from the registers.
  logic [BAW-1:0]  src_end, dst_end;
  logic [CNTW-1:0] n_src_c, n_dst_c;
  logic [OFFW-1:0] eoff_c;
  always_comb begin
    src_end = src_addr + BAW'(blk_len) - 1'b1;
    dst_end = dst_addr + BAW'(blk_len) - 1'b1;
    n_src_c = CNTW'(src_end[BAW-1:OFFW] - src_addr[BAW-1:OFFW]) + 1'b1;
    n_dst_c = CNTW'(dst_end[BAW-1:OFFW] - dst_addr[BAW-1:OFFW]) + 1'b1;
    eoff_c  = dst_end[OFFW-1:0];
  end

  // ----------------------------------------------------------------- FIFO
  logic           f_push, f_pop, f_empty, f_full, f_clr;
  logic [DW-1:0]  f_dout;
  logic [FCW-1:0] f_count;

  bme_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(f_clr),
    .push(f_push), .din(mRDATA), .pop(f_pop),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count)
  );

  // ------------------------------------------------------------- bus stage
  logic            first_pend, last_pend;   // edge reads still to issue
  logic            first_ok, last_ok;       // edge data available
  logic [DW-1:0]   old_first, old_last;
  logic [CNTW-1:0] src_issued;              // source reads issued
  logic            dp_valid, dp_write;      // transfer in its data phase
  rd_tag_t         dp_tag;
  logic            bus_on;                  // states in which the bus stage runs

  logic            wbuf_valid;
  logic [DW-1:0]   wbuf;
  logic [WAW-1:0]  wbuf_addr;

  logic src_inflight, src_room, want_src;
  logic held_wr;                            // last cycle's write was held
  logic accept, dp_done;
  rd_tag_t req_tag;

  assign bus_on       = (state inside {ST_READ_FIFO, ST_COMPARE_OFFSET, ST_COMPUTE_CORNER,
                                       ST_COMPUTE_NORMAL, ST_WRITE_FIRST, ST_WRITE_INTER,
                                       ST_WRITE_LAST});
  assign src_inflight = dp_valid && !dp_write && (dp_tag == TAG_SRC);
  assign src_room     = (32'(f_count) + 32'(src_inflight)) < FIFO_DEPTH;
  assign want_src     = (src_issued != n_src) && src_room;

  always_comb begin
    mREQ    = 1'b0;
    mRW     = 1'b0;
    mADDR   = '0;
    mWDATA  = wbuf;
    req_tag = TAG_SRC;
    if (bus_on) begin
      if (held_wr) begin
        // A write held by mHOLD is presented again unchanged.
        mREQ    = 1'b1;
        mRW     = 1'b1;
        mADDR   = wbuf_addr;
      end else if (first_pend) begin
        mREQ    = 1'b1;
        mADDR   = dst_w0;
        req_tag = TAG_FIRST;
      end else if (last_pend) begin
        mREQ    = 1'b1;
        mADDR   = dst_w0 + WAW'(n_dst - 1'b1);
        req_tag = TAG_LAST;
      end else if (want_src) begin
        mREQ    = 1'b1;
        mADDR   = src_w0 + WAW'(src_issued);
        req_tag = TAG_SRC;
      end else if (wbuf_valid) begin
        mREQ    = 1'b1;
        mRW     = 1'b1;
        mADDR   = wbuf_addr;
      end
    end
  end

  assign accept  = mREQ && !mHOLD;
  assign dp_done = dp_valid && !mHOLD;
  assign f_push  = dp_done && !dp_write && (dp_tag == TAG_SRC);

  logic wr_accept;
  assign wr_accept = accept && mRW;

  // ---------------------------------------------------------- compute stage
  logic [CNTW-1:0] k;            // next destination word to compute
  logic [CNTW-1:0] src_popped;   // source words taken from the FIFO
  logic [DW-1:0]   prev;         // V[k]
  logic            prev_ok;
  logic            next_avail;
  logic [DW-1:0]   next_v;       // V[k+1]
  logic            wbuf_free;

  assign next_avail = (src_popped == n_src) || !f_empty;
  assign next_v     = (src_popped == n_src) ? '0 : f_dout;
  assign wbuf_free  = !wbuf_valid || wr_accept;

  logic [DW-1:0]   shifted, keep_lo, field, keep_hi, merged, old_word;
  logic [OFFW-1:0] m_lo, m_hi;
  logic            k_first, k_last;

  assign k_first = (k == '0);
  assign k_last  = (k == n_dst - 1'b1);
  assign m_lo    = k_first ? doff : '0;
  assign m_hi    = k_last  ? eoff : '1;
  assign old_word = k_first ? old_first : old_last;

  funnel_shifter #(.W(DW)) u_funnel (.hi(next_v), .lo(prev), .sh(sh), .y(shifted));
  bme_mask_gen   #(.W(DW)) u_mask   (.lo(m_lo), .hi(m_hi), .keep_lo, .field, .keep_hi);

  assign merged = (shifted & field) | (old_word & (keep_lo | keep_hi));

  // Edge data needed by the word about to be computed.
  logic edge_ok;
  assign edge_ok = (!k_first || first_ok) && (!k_last || last_ok);

  logic load_prev, do_word;
  always_comb begin
    load_prev = 1'b0;
    do_word   = 1'b0;
    unique case (state)
      ST_ADDR_DECODE, ST_ADDR_COMPUTE, ST_DONE: ;
      default:
        load_prev = !prev_ok && (pre_zero || next_avail);
    endcase
    unique case (state)
      ST_COMPUTE_CORNER, ST_COMPUTE_NORMAL, ST_WRITE_FIRST, ST_WRITE_INTER, ST_WRITE_LAST:
        do_word = prev_ok && (k != n_dst) && next_avail && edge_ok && wbuf_free;
      default: ;
    endcase
  end

  // Pop whenever a real source word is consumed.
  assign f_pop = ((load_prev && !pre_zero) || do_word) && (src_popped != n_src);
  assign f_clr = (state == ST_ADDR_COMPUTE);

  // ------------------------------------------------------------ controller
  logic [31:0] prefetch;  // source reads issued in READ DATA TO FIFO
  assign prefetch = (32'(n_src) < FIFO_DEPTH) ? 32'(n_src) : FIFO_DEPTH;

  logic last_done;   // the last write has left the data phase
  assign last_done = !(dp_valid && mHOLD);

  always_comb begin
    state_n = state;
    unique case (state)
      ST_ADDR_DECODE:    if (start) state_n = ST_ADDR_COMPUTE;
      ST_ADDR_COMPUTE:   state_n = ST_READ_FIFO;
      // Leave once the edge reads and the first min(n_src, FIFO_DEPTH)
      // source reads have been issued, counting one accepted this cycle.
      ST_READ_FIFO:
        if (!first_pend && !last_pend &&
            (32'(src_issued) + 32'(accept && !mRW && req_tag == TAG_SRC)) >= prefetch)
          state_n = ST_COMPARE_OFFSET;
      ST_COMPARE_OFFSET: state_n = fits ? ST_COMPUTE_CORNER : ST_COMPUTE_NORMAL;
      ST_COMPUTE_CORNER: if (do_word) state_n = ST_WRITE_LAST;
      // The first word is computed here and written in WRITE FIRST DATA.
      ST_COMPUTE_NORMAL: if (do_word) state_n = ST_WRITE_FIRST;
      ST_WRITE_FIRST:
        if (wr_accept)
          state_n = ((k + CNTW'(do_word)) < n_dst - 1'b1) ? ST_WRITE_INTER : ST_WRITE_LAST;
      ST_WRITE_INTER:    if (do_word && k + CNTW'(2) == n_dst) state_n = ST_WRITE_LAST;
      ST_WRITE_LAST:     if (k == n_dst && (!wbuf_valid || wr_accept)) state_n = ST_DONE;
      ST_DONE:           if (last_done) state_n = ST_ADDR_DECODE;
      default:           state_n = ST_ADDR_DECODE;
    endcase
  end

  // A rejected START (zero length) is answered with done in the next cycle,
  // so a controller that waits for done after writing START is released.
  logic reject_q;
  assign DONE = ((state == ST_DONE) && last_done) || reject_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_ADDR_DECODE;
      reject_q   <= 1'b0;
      src_w0     <= '0;
      dst_w0     <= '0;
      soff       <= '0;
      doff       <= '0;
      eoff       <= '0;
      n_src      <= '0;
      n_dst      <= '0;
      need_first <= 1'b0;
      need_last  <= 1'b0;
      sh         <= '0;
      pre_zero   <= 1'b0;
      fits       <= 1'b0;
      first_pend <= 1'b0;
      last_pend  <= 1'b0;
      first_ok   <= 1'b0;
      last_ok    <= 1'b0;
      old_first  <= '0;
      old_last   <= '0;
      src_issued <= '0;
      dp_valid   <= 1'b0;
      dp_write   <= 1'b0;
      held_wr    <= 1'b0;
      dp_tag     <= TAG_SRC;
      wbuf_valid <= 1'b0;
      wbuf       <= '0;
      wbuf_addr  <= '0;
      k          <= '0;
      src_popped <= '0;
      prev       <= '0;
      prev_ok    <= 1'b0;
    end else begin
      state    <= state_n;
      reject_q <= reject;

      // ADDRESS COMPUTATION: decode the registers into word geometry.
      if (state == ST_ADDR_COMPUTE) begin
        src_w0     <= src_addr[OFFW +: WAW];
        dst_w0     <= dst_addr[OFFW +: WAW];
        soff       <= src_addr[OFFW-1:0];
        doff       <= dst_addr[OFFW-1:0];
        eoff       <= eoff_c;
        n_src      <= n_src_c;
        n_dst      <= n_dst_c;
        // An edge word is read only if some of its old bits survive.
        pre_zero   <= (src_addr[OFFW-1:0] < dst_addr[OFFW-1:0]);
        need_first <= (dst_addr[OFFW-1:0] != '0) || (n_dst_c == 1 && eoff_c != '1);
        need_last  <= (n_dst_c > 1) && (eoff_c != '1);
        first_pend <= (dst_addr[OFFW-1:0] != '0) || (n_dst_c == 1 && eoff_c != '1);
        last_pend  <= (n_dst_c > 1) && (eoff_c != '1);
        first_ok   <= 1'b0;
        last_ok    <= 1'b0;
        src_issued <= '0;
        k          <= '0;
        src_popped <= '0;
        prev_ok    <= 1'b0;
        wbuf_valid <= 1'b0;
      end

      if (state == ST_READ_FIFO && !need_first) first_ok <= 1'b1;
      if (state == ST_READ_FIFO && !need_last)  last_ok  <= 1'b1;

      // COMPARE OFFSET: shift amount and single-word test.
      if (state == ST_COMPARE_OFFSET) begin
        sh       <= soff - doff;
        fits     <= (n_dst == 1);
      end

      // Bus stage bookkeeping.
      held_wr <= mREQ && mRW && mHOLD;
      if (accept) begin
        if (!mRW) begin
          if (req_tag == TAG_FIRST)     first_pend <= 1'b0;
          else if (req_tag == TAG_LAST) last_pend  <= 1'b0;
          else                          src_issued <= src_issued + 1'b1;
        end
        dp_valid <= 1'b1;
        dp_write <= mRW;
        dp_tag   <= req_tag;
      end else if (dp_done) begin
        dp_valid <= 1'b0;
      end

      if (dp_done && !dp_write) begin
        if (dp_tag == TAG_FIRST) begin
          old_first <= mRDATA;
          first_ok  <= 1'b1;
        end
        if (dp_tag == TAG_LAST) begin
          old_last <= mRDATA;
          last_ok  <= 1'b1;
        end
      end

      // Compute stage.
      if (load_prev) begin
        prev    <= pre_zero ? '0 : next_v;
        prev_ok <= 1'b1;
      end
      if (f_pop) src_popped <= src_popped + 1'b1;

      if (wr_accept) wbuf_valid <= 1'b0;
      if (do_word) begin
        wbuf       <= merged;
        wbuf_addr  <= dst_w0 + WAW'(k);
        wbuf_valid <= 1'b1;
        prev       <= next_v;
        k          <= k + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ assertions
  // A held request must not change.
  a_hold_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mREQ && mHOLD) |=> (mREQ && $stable(mRW) && $stable(mADDR) && (!mRW || $stable(mWDATA))));
  // done lasts one cycle.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) DONE |=> !DONE);

endmodule
