// Self-checking testbench of bme_mask_gen: all lo <= hi pairs, checking the
// three masks bit by bit against their definition and that they partition
// the word.
module tb_bme_mask_gen;
  logic [4:0]  lo, hi;
  logic [31:0] keep_lo, field, keep_hi;
  int checks = 0, failures = 0;

  bme_mask_gen #(.W(32)) dut (.*);

  initial begin
    for (int l = 0; l < 32; l++) begin
      for (int h = l; h < 32; h++) begin
        lo = 5'(l);
        hi = 5'(h);
        #1;
        for (int i = 0; i < 32; i++) begin
          checks++;
          if (keep_lo[i] !== (i < l) || field[i] !== (i >= l && i <= h) ||
              keep_hi[i] !== (i > h)) begin
            failures++;
            if (failures < 5) $display("FAIL: lo=%0d hi=%0d bit %0d", l, h, i);
          end
        end
        checks++;
        if ((keep_lo | field | keep_hi) !== 32'hFFFF_FFFF ||
            (keep_lo & field) != 0 || (field & keep_hi) != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
