// Self-checking testbench of bit_move_engine on its native interfaces.
// A memory of 1024 words answers the master port with the engine's
// pipelined protocol, optionally inserting random wait states and random
// no-grant cycles through mHOLD. Each test programs random source and
// destination bit addresses and a random length through the slave port,
// starts the engine, waits for done and compares the whole memory with a
// reference copy moved bit by bit in the testbench. Besides random moves it
// sweeps all 32 x 32 offset pairs at eight lengths. With wait states off it
// also checks the cycle budget (block length)/16 + 10, counted from the cycle
// START is written to the cycle done is high. Further checks: register
// readback, busy/error behaviour and the zero-length reject.
module tb_bit_move_engine;
  import bme_pkg::*;

  localparam int unsigned MW = 1024;   // memory words
  localparam int unsigned MB = MW * 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           sSEL = 1'b0, sRW = 1'b0;
  logic [2:0]     sADDR = '0;
  logic [31:0]    sWDATA = '0, sRDATA;
  logic           mREQ, mRW, mHOLD;
  logic [WAW-1:0] mADDR;
  logic [31:0]    mWDATA, mRDATA;
  logic           DONE;

  bit_move_engine dut (.*);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- memory
  logic [31:0] mem [MW];
  logic [31:0] ref_mem [MW];
  logic        waits_on = 1'b0;
  logic        dp_v = 1'b0, dp_w = 1'b0;
  logic [9:0]  dp_a = '0;
  logic [31:0] dp_d = '0;
  int          wait_cnt = 0;
  logic        nogrant = 1'b0;
  logic [19:0] hi_src = '0, hi_dst = '0;   // expected mADDR[29:10]
  int          cyc = 0;
  int          t_start = 0, t_done = 0;

  // Cycle of the START write and of done, for the budget check.
  always @(posedge clk) begin
    if (sSEL && sRW && sADDR == REG_CTRL && sWDATA[0]) t_start <= cyc;
    if (DONE) t_done <= cyc;
  end

  assign mHOLD  = dp_v ? (wait_cnt != 0) : nogrant;
  assign mRDATA = (dp_v && !dp_w) ? mem[dp_a] : 32'hDEAD_BEEF;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // data phase end
      if (dp_v && wait_cnt == 0) begin
        if (dp_w) mem[dp_a] <= dp_d;
        dp_v <= 1'b0;
      end else if (dp_v) begin
        wait_cnt <= wait_cnt - 1;
      end
      // address phase
      if (mREQ && !mHOLD) begin
        if (mADDR[29:10] != hi_src && mADDR[29:10] != hi_dst) begin
          failures++;
          $display("FAIL: access outside the expected regions, mADDR=%h", mADDR);
        end
        dp_v     <= 1'b1;
        dp_w     <= mRW;
        dp_a     <= mADDR[9:0];
        dp_d     <= mWDATA;
        wait_cnt <= waits_on ? int'($urandom_range(0, 2)) : 0;
      end
      nogrant <= waits_on && !(mREQ && !mHOLD) && ($urandom_range(0, 3) == 0);
    end
  end

  // ------------------------------------------------------------ reg access
  task automatic reg_write(input logic [2:0] a, input logic [31:0] d);
    sSEL <= 1'b1; sRW <= 1'b1; sADDR <= a; sWDATA <= d;
    @(posedge clk);
    sSEL <= 1'b0; sRW <= 1'b0;
  endtask

  task automatic reg_check(input logic [2:0] a, input logic [31:0] exp, input string what);
    sADDR <= a; sSEL <= 1'b1; sRW <= 1'b0;
    #1;
    checks++;
    if (sRDATA !== exp) begin
      failures++;
      $display("FAIL: %s: reg %0d = %h expected %h", what, a, sRDATA, exp);
    end
    @(posedge clk);
    sSEL <= 1'b0;
  endtask

  function automatic logic get_bit(input longint b);
    return mem[int'(b / 32)][int'(b % 32)];
  endfunction

  // ------------------------------------------------------------------ test
  longint  src, dst;
  int      len;
  int      max_cycles = 0;
  int      last_cycles = 0;

  task automatic run_move(input longint s, input longint d, input int l,
                          input logic [4:0] shi, input logic [4:0] dhi);
    int cycles, budget, bad;
    logic [36:0] sa, da;
    sa = {shi, 32'(s)};
    da = {dhi, 32'(d)};
    hi_src = sa[34:15];
    hi_dst = da[34:15];
    for (int i = 0; i < MW; i++) ref_mem[i] = mem[i];
    for (int i = 0; i < l; i++)
      ref_mem[int'((d + i) / 32)][int'((d + i) % 32)] = get_bit(s + i);
    @(posedge clk);
    reg_write(REG_SRC_LO, sa[31:0]);
    reg_write(REG_SRC_HI, {sa[36:32], 27'(l)});
    reg_write(REG_DST_LO, da[31:0]);
    reg_write(REG_DST_HI, {da[36:32], 27'd0});
    reg_check(REG_SRC_HI, {sa[36:32], 27'(l)}, "readback");
    sSEL <= 1'b1; sRW <= 1'b1; sADDR <= REG_CTRL; sWDATA <= 32'h1;
    @(posedge clk);
    sSEL <= 1'b0; sRW <= 1'b0;
    sADDR <= REG_CTRL;
    @(posedge clk);
    #1;
    checks++;
    if (!DONE && sRDATA[1] !== 1'b1) begin
      failures++;
      $display("FAIL: engine not busy after START");
    end
    while (!DONE) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    cycles = t_done - t_start;
    last_cycles = cycles;
    budget = l / 16 + 10;
    if (!waits_on) begin
      checks++;
      if (cycles > max_cycles) max_cycles = cycles;
      if (cycles > budget) begin
        failures++;
        $display("FAIL: len=%0d soff=%0d doff=%0d took %0d cycles, budget %0d",
                 l, s % 32, d % 32, cycles, budget);
      end
    end
    @(posedge clk);
    @(posedge clk);
    bad = 0;
    for (int i = 0; i < MW; i++) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin
        failures++;
        bad++;
        if (bad < 4) $display("FAIL: word %0d = %h expected %h (src %0d dst %0d len %0d)",
                              i, mem[i], ref_mem[i], s, d, l);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < MW; i++) mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Register reset values and status.
    reg_check(REG_CTRL, 32'h0, "idle status");

    // Directed corner cases: single word, aligned, word-spanning.
    run_move(0, 16384, 1, 5'd0, 5'd0);
    run_move(3, 16384 + 7, 9, 5'd0, 5'd0);
    run_move(40, 16384 + 2, 30, 5'd0, 5'd0);     // corner, shift positive
    run_move(2, 16384 + 30, 2, 5'd0, 5'd0);      // crosses a dst word
    run_move(0, 16384, 32, 5'd0, 5'd0);          // exact word, no edge reads
    run_move(0, 16384, 64, 5'd0, 5'd0);
    run_move(31, 16384 + 1, 351, 5'd0, 5'd0);    // widest budget case
    run_move(5, 16384 + 20, 336, 5'd0, 5'd0);    // negative shift
    run_move(16384 + 9, 100, 777, 5'd0, 5'd0);   // destination below source
    run_move(32, 16384 + 32, 128, 5'd0, 5'd0);
    // High address bits select other words.
    run_move(64 + 5, 16384 + 7, 100, 5'd1, 5'd2);

    // Lengths whose budgets are 18, 21 and 31 cycles, at several offset
    // pairs: report the worst cycle count of each.
    begin
      int lens [6] = '{128, 143, 176, 191, 336, 351};
      int offs [5][2] = '{'{0, 0}, '{31, 1}, '{1, 31}, '{17, 5}, '{5, 17}};
      for (int i = 0; i < 6; i++) begin
        int worst;
        worst = 0;
        for (int j = 0; j < 5; j++) begin
          run_move(64 * 32 + offs[j][0], 16384 + 64 * 32 + offs[j][1], lens[i], 5'd0, 5'd0);
          if (last_cycles > worst) worst = last_cycles;
        end
        $display("length %0d: budget %0d cycles, worst measured %0d", lens[i],
                 lens[i] / 16 + 10, worst);
      end
    end

    // Every source/destination offset pair at lengths around the word and
    // half-word boundaries: data and cycle budget.
    begin
      int lens [8] = '{1, 15, 16, 17, 33, 34, 1026, 1039};
      int worst_slack = 1000;
      for (int li = 0; li < 8; li++)
        for (int so = 0; so < 32; so++)
          for (int dof = 0; dof < 32; dof++) begin
            run_move(64 * 32 + so, 16384 + 64 * 32 + dof, lens[li], 5'd0, 5'd0);
            if (lens[li] / 16 + 10 - last_cycles < worst_slack)
              worst_slack = lens[li] / 16 + 10 - last_cycles;
          end
      $display("offset sweep: smallest budget slack %0d cycles", worst_slack);
    end

    // Random moves, zero-wait memory.
    for (int t = 0; t < 60; t++) begin
      len = (t % 3 == 0) ? int'($urandom_range(1, 40)) : int'($urandom_range(1, 3000));
      src = $urandom_range(0, 16383 - len);
      dst = 16384 + $urandom_range(0, 16383 - len);
      if (t % 2 == 1) begin longint x; x = src; src = dst; dst = x; end
      run_move(src, dst, len, 5'd0, 5'd0);
    end

    // Random moves with wait states and lost grants.
    waits_on = 1'b1;
    for (int t = 0; t < 40; t++) begin
      len = (t % 3 == 0) ? int'($urandom_range(1, 40)) : int'($urandom_range(1, 2000));
      src = $urandom_range(0, 16383 - len);
      dst = 16384 + $urandom_range(0, 16383 - len);
      if (t % 2 == 0) begin longint x; x = src; src = dst; dst = x; end
      run_move(src, dst, len, 5'd0, 5'd0);
    end
    waits_on = 1'b0;

    // START while busy sets error; zero length is rejected with done.
    reg_write(REG_SRC_HI, {5'd0, 27'd2000});
    reg_write(REG_SRC_LO, 32'd0);
    reg_write(REG_DST_LO, 32'd16384);
    hi_src = '0; hi_dst = '0;
    reg_write(REG_CTRL, 32'h1);
    @(posedge clk);
    reg_write(REG_CTRL, 32'h1);
    reg_check(REG_CTRL, 32'h6, "error and busy after START while busy");
    while (!DONE) @(posedge clk);
    @(posedge clk);
    reg_check(REG_CTRL, 32'h4, "error stays after done");
    reg_write(REG_SRC_HI, 32'd0);
    reg_write(REG_CTRL, 32'h1);
    #1;
    checks++;
    if (DONE !== 1'b1) begin
      failures++;
      $display("FAIL: zero length START not answered with done");
    end
    reg_check(REG_CTRL, 32'h4, "error after zero length");

    $display("largest cycle count at zero wait: %0d", max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
