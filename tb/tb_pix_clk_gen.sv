// tb_pix_clk_gen: checks that the pixel enable is high for exactly one clock
// in every four, i.e. 25 MHz from a 100 MHz clock, and low during reset.
module tb_pix_clk_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pix_ce;

  pix_clk_gen dut (.clk(clk), .rst(rst), .pix_ce(pix_ce));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n, bad;
    repeat (3) @(negedge clk);
    check(!pix_ce, "low in reset");
    rst = 0;
    last = -1; n = 0; bad = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (pix_ce) begin
        if (last >= 0 && i - last != 4) bad++;
        last = i; n++;
      end
    end
    check(bad == 0, $sformatf("%0d enables not four clocks apart", bad));
    check(n == 100, $sformatf("%0d enables in 400 clocks", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
