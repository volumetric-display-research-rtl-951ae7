// tb_vga_timing: runs the VGA timing generator with a pixel enable every
// clock for two frames and checks the standard 640x480 60 Hz timing: 800
// pixels per line with hs low for pixels 656..751, 525 lines per frame with
// vs low on lines 490..491, blank high exactly outside the visible area, and
// counters that hold while pix_ce is low.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       pix_ce = 0;
  logic [9:0] hcnt, vcnt;
  logic       blank, hs, vs;

  vga_timing dut (.clk(clk), .rst(rst), .pix_ce(pix_ce), .hcnt(hcnt), .vcnt(vcnt),
                  .blank(blank), .hs(hs), .vs(vs));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad_blank, bad_hs, bad_vs, bad_seq, hs_falls, vs_falls;
    int ph, pv;
    logic hs_q, vs_q;
    repeat (3) @(negedge clk);
    rst = 0;
    // held while pix_ce is low
    repeat (10) @(negedge clk);
    check(hcnt == 0 && vcnt == 0, "counters hold without pix_ce");
    pix_ce = 1;
    bad_blank = 0; bad_hs = 0; bad_vs = 0; bad_seq = 0; hs_falls = 0; vs_falls = 0;
    ph = 0; pv = 0; hs_q = 1; vs_q = 1;
    // expected position advances by one pixel per clock
    for (int i = 0; i < 2 * 800 * 525; i++) begin
      @(negedge clk);
      ph++;
      if (ph == 800) begin ph = 0; pv = (pv + 1) % 525; end
      if (int'(hcnt) != ph || int'(vcnt) != pv) bad_seq++;
      if (blank != (ph >= 640 || pv >= 480)) bad_blank++;
      if (hs != !(ph >= 656 && ph < 752)) bad_hs++;
      if (vs != !(pv >= 490 && pv < 492)) bad_vs++;
      if (!hs && hs_q) hs_falls++;
      if (!vs && vs_q) vs_falls++;
      hs_q = hs; vs_q = vs;
    end
    check(bad_seq == 0, $sformatf("counter sequence, %0d wrong", bad_seq));
    check(bad_blank == 0, $sformatf("blank, %0d wrong", bad_blank));
    check(bad_hs == 0, $sformatf("hs, %0d wrong", bad_hs));
    check(bad_vs == 0, $sformatf("vs, %0d wrong", bad_vs));
    check(hs_falls == 2 * 525, $sformatf("%0d line syncs in two frames", hs_falls));
    check(vs_falls == 2, $sformatf("%0d frame syncs in two frames", vs_falls));
    // pixel enable every fourth clock: one pixel per four clocks
    begin
      logic [9:0] h0;
      h0 = hcnt;
      pix_ce = 0;
      repeat (7) @(negedge clk);
      check(hcnt == h0, "hold while pix_ce low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
