// End-to-end testbench of bme_soc at its default parameters.
// Builds descriptor chains in a behavioural AHB memory, hands the first
// descriptor's address to the fabric, and after each chain compares the
// whole memory with a reference that applies the same moves bit by bit in
// order. Chain 1 holds 20 random moves (mixed lengths and offsets) on a
// zero-wait memory and checks every move against the (block length)/16 + 10
// cycle budget, from the START register write to done. Chain 2 runs with
// random memory wait states and includes a zero-length descriptor, which the
// engine rejects with an error while the chain goes on. The testbench counts
// how often each mechanism occurred (corner case, normal case with and
// without intermediate words, negative, positive and zero shift, skipped
// edge reads, bus stalls, wait states, chaining, reject) and counts a failure
// for any that never did.
module tb_bme_soc;
  import bme_pkg::*;

  localparam int unsigned AW       = 14;              // memory words: 16384
  localparam int unsigned HALF     = 196608;          // bit, start of upper data half
  localparam int unsigned DESC_W   = 12288;           // first descriptor word
  localparam int unsigned MW       = 2**AW;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  logic        ptr_wr = 1'b0;
  logic [31:0] ptr_wdata = '0;
  logic        chain_busy, chain_done, bme_done;
  logic        mem_hsel, mem_hready, waits_on = 1'b0;
  ahb_m2s_t    mem_ahb;
  ahb_s2m_t    mem_rsp;

  bme_soc dut (.*);

  ahb_mem_slave #(.AW(AW)) u_mem (
    .hclk, .hresetn, .hsel(mem_hsel), .req(mem_ahb), .hready_in(mem_hready),
    .waits_on, .rsp(mem_rsp)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge hclk) cyc <= cyc + 1;

  // ------------------------------------------------ mechanism counters
  int n_corner = 0, n_normal2 = 0, n_inter = 0, n_neg = 0, n_pos = 0, n_zero = 0;
  int n_skip = 0, n_stall = 0, n_chain = 0, n_reject = 0, n_moves = 0;
  bme_state_t st_q = ST_ADDR_DECODE;
  int t_start = 0;
  logic perf_on = 1'b0;
  int worst_slack = 1 << 30;

  always @(posedge hclk) begin
    bme_state_t st;
    st = dut.u_bme.state;
    st_q <= st;
    if (st != st_q) begin
      if (st == ST_COMPUTE_CORNER) n_corner++;
      if (st == ST_WRITE_INTER) n_inter++;
      if (st == ST_WRITE_FIRST && dut.u_bme.n_dst == 2) n_normal2++;
      if (st == ST_COMPUTE_NORMAL || st == ST_COMPUTE_CORNER) begin
        if (dut.u_bme.pre_zero) n_neg++;
        else if (dut.u_bme.sh != 0) n_pos++;
        else n_zero++;
      end
      if (st == ST_READ_FIFO &&
          (!dut.u_bme.need_first || (dut.u_bme.n_dst > 1 && !dut.u_bme.need_last))) n_skip++;
    end
    if (dut.mREQ && dut.mHOLD) n_stall++;
    if (hresetn && dut.u_bme.reject_q) begin
      n_reject++;
      checks++;
      if (!dut.u_bme.error) begin
        failures++;
        $display("FAIL: error flag not set by a zero-length START");
      end
    end
    if (bme_done && dut.u_fabric.desc[4] != 0) n_chain++;
    if (dut.u_bme.start) begin
      t_start <= cyc;
      n_moves++;
    end
    if (bme_done && perf_on && !dut.u_bme.reject_q) begin
      int len, budget;
      len = int'(dut.u_bme.blk_len);
      budget = len / 16 + 10;
      checks++;
      if (budget - (cyc - t_start) < worst_slack) worst_slack = budget - (cyc - t_start);
      $display("move of %0d bits: budget %0d cycles, taken %0d", len, budget, cyc - t_start);
      if (cyc - t_start > budget) begin
        failures++;
        $display("FAIL: move of %0d bits took %0d cycles, budget %0d", len, cyc - t_start, budget);
      end
    end
  end

  // ------------------------------------------------------- reference
  logic [31:0] ref_mem [MW];

  function automatic logic get_ref(input int b);
    return ref_mem[b / 32][b % 32];
  endfunction

  task automatic ref_move(input int s, input int d, input int l);
    logic tmp [];
    tmp = new [l];
    for (int i = 0; i < l; i++) tmp[i] = get_ref(s + i);
    for (int i = 0; i < l; i++) ref_mem[(d + i) / 32][(d + i) % 32] = tmp[i];
  endtask

  // Build a chain of n descriptors at word dw; zl = index of a zero-length
  // descriptor (-1 for none). Returns the byte address of the first.
  task automatic build_chain(input int n, input int dw, input int zl);
    for (int j = 0; j < n; j++) begin
      int len, s, d, w;
      case (j % 4)
        0: len = $urandom_range(1, 31);
        1: len = $urandom_range(32, 400);
        2: len = $urandom_range(400, 4000);
        default: len = $urandom_range(1, 70);
      endcase
      if (j == zl) len = 0;
      s = $urandom_range(0, HALF - 4001);
      d = HALF + $urandom_range(0, HALF - 4001);
      if (j % 2 == 1) begin int x; x = s; s = d; d = x; end
      if (j % 5 == 4) d = d - d % 32 + s % 32;   // equal offsets: no shift
      w = dw + 5 * j;
      u_mem.mem[w + 0] = 32'(s);
      u_mem.mem[w + 1] = {5'd0, 27'(len)};
      u_mem.mem[w + 2] = 32'(d);
      u_mem.mem[w + 3] = 32'd0;
      u_mem.mem[w + 4] = (j == n - 1) ? 32'd0 : 32'(4 * (w + 5));
      ref_mem[w + 0] = u_mem.mem[w + 0];
      ref_mem[w + 1] = u_mem.mem[w + 1];
      ref_mem[w + 2] = u_mem.mem[w + 2];
      ref_mem[w + 3] = u_mem.mem[w + 3];
      ref_mem[w + 4] = u_mem.mem[w + 4];
      if (len != 0) ref_move(s, d, len);
    end
  endtask

  task automatic run_chain(input int dw);
    @(negedge hclk);
    ptr_wr = 1'b1;
    ptr_wdata = 32'(4 * dw);
    @(negedge hclk);
    ptr_wr = 1'b0;
    while (!chain_done) @(negedge hclk);
    @(negedge hclk);
  endtask

  task automatic compare_mem(input string what);
    int bad = 0;
    for (int i = 0; i < MW; i++) begin
      checks++;
      if (u_mem.mem[i] !== ref_mem[i]) begin
        failures++;
        bad++;
        if (bad < 5) $display("FAIL: %s: word %0d = %h expected %h", what, i,
                              u_mem.mem[i], ref_mem[i]);
      end
    end
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    for (int i = 0; i < MW; i++) begin
      u_mem.mem[i] = $urandom;
      ref_mem[i] = u_mem.mem[i];
    end
    repeat (3) @(negedge hclk);
    hresetn = 1'b1;

    // Chain 1: 20 moves, zero-wait memory, cycle budget checked.
    build_chain(20, DESC_W, -1);
    perf_on = 1'b1;
    run_chain(DESC_W);
    perf_on = 1'b0;
    compare_mem("chain 1");

    // Chain 2: wait states, with one zero-length descriptor.
    waits_on = 1'b1;
    build_chain(15, DESC_W + 200, 6);
    run_chain(DESC_W + 200);
    compare_mem("chain 2");

    $display("mechanisms:");
    need(n_moves,   "moves started");
    need(n_corner,  "corner case (one word)");
    need(n_normal2, "normal case, two words");
    need(n_inter,   "intermediate words");
    need(n_neg,     "negative shift");
    need(n_pos,     "positive shift");
    need(n_zero,    "zero shift");
    need(n_skip,    "edge read skipped");
    need(n_stall,   "master held (mHOLD)");
    need(u_mem.wait_cycles, "memory wait states");
    need(n_chain,   "descriptor chaining");
    need(n_reject,  "zero-length reject");
    $display("smallest cycle-budget slack: %0d", worst_slack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
