// tb_slice_write: feeds twenty random slices, with random gaps, into the
// write module and records its memory writes. Checks that nothing is written
// before all twenty slices are buffered, that exactly 260 words are written
// at addresses 0..259 one per clock, that each word is the expected
// 32-bit part of its slice (most significant first, last word zero-padded),
// that done follows the last write by one clock, and that dropping en
// restarts the module.
module tb_slice_write;
  import vd_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          en = 0, in_valid = 0;
  logic [399:0]  twoD = '0;
  logic          we, done;
  logic [13:0]   addr;
  logic [31:0]   din;
  logic [399:0]  slices [20];

  slice_write dut (.clk(clk), .rst(rst), .en(en), .in_valid(in_valid), .twoD(twoD),
                   .we(we), .addr(addr), .din(din), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: every write is checked against the expected word
  int done_cyc = 0, nwrites = 0, early_writes = 0, bad_words = 0, last_write_cyc = 0, cyc = 0, gaps = 0;
  bit all_fed = 0;
  always @(negedge clk) begin
    cyc++;
    if (done && done_cyc == 0) done_cyc = cyc;
    if (we) begin
      if (!all_fed) early_writes++;
      if (int'(addr) != nwrites) bad_words++;
      else if (din != ref_slice_word(slices[nwrites / 13], nwrites % 13)) bad_words++;
      if (nwrites > 0 && cyc != last_write_cyc + 1) gaps++;
      last_write_cyc = cyc;
      nwrites++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int run = 0; run < 2; run++) begin
      en <= 1;
      nwrites = 0; all_fed = 0;
      for (int s = 0; s < 20; s++) begin
        slices[s] = '0;
        for (int w = 0; w < 13; w++) slices[s][w * 32 +: 32] = $urandom();
        if (s == 0) slices[s] = '1;      // padding must still be zero
      end
      // stimulus changes at falling edges, so the module samples it cleanly
      for (int s = 0; s < 20; s++) begin
        @(negedge clk);
        in_valid = 0; twoD = '0;
        repeat ($urandom_range(3)) @(negedge clk);
        twoD = slices[s]; in_valid = 1;
      end
      @(negedge clk);
      in_valid = 0; twoD = '0;
      all_fed = 1;
      wait (done);
      @(negedge clk);
      check(nwrites == 260, $sformatf("%0d words written", nwrites));
      check(early_writes == 0, "no write before all slices buffered");
      check(bad_words == 0, $sformatf("%0d wrong words", bad_words));
      check(gaps == 0, "one word per clock");
      check(ref_slice_word(slices[0], 12) == 32'hffff0000, "reference padding");
      repeat (5) @(posedge clk);
      check(done && !we, "done holds, writing stopped");
      check(done_cyc == last_write_cyc + 1, $sformatf("done at %0d, last write at %0d", done_cyc, last_write_cyc));
      en <= 0;
      @(posedge clk);
      @(negedge clk);
      check(!done, "done cleared by en low");
      early_writes = 0; bad_words = 0; gaps = 0; done_cyc = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
