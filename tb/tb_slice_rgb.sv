// tb_slice_rgb: drives pixel coordinates directly and checks the colour the
// grid renderer produces for N = 20 and N = 3: white for a set slice bit,
// purple for a clear one, black outside the grid and in blanking, with one
// pixel of latency.
module tb_slice_rgb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]   hcnt = '0, vcnt = '0;
  logic         blank = 0;
  logic [399:0] twoD20;
  logic [8:0]   twoD3 = 9'h1ef;
  logic [3:0]   r20, g20, b20, r3, g3, b3;

  slice_rgb dut20 (.clk(clk), .rst(rst), .pix_ce(1'b1), .hcnt(hcnt), .vcnt(vcnt), .blank(blank),
                   .twoD(twoD20), .red(r20), .green(g20), .blue(b20));
  slice_rgb #(.N(3)) dut3 (.clk(clk), .rst(rst), .pix_ce(1'b1), .hcnt(hcnt), .vcnt(vcnt), .blank(blank),
                   .twoD(twoD3), .red(r3), .green(g3), .blue(b3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected colour, grid of n cells of `cell` pixels centred on 640x480
  function automatic logic [11:0] expect_rgb(int h, int v, bit blk, int n, int csz, logic [399:0] bits);
    int side, x0, y0;
    side = n * csz; x0 = (640 - side) / 2; y0 = (480 - side) / 2;
    if (blk || h < x0 || h >= x0 + side || v < y0 || v >= y0 + side) return 12'h000;
    return bits[(h - x0) / csz + n * ((v - y0) / csz)] ? 12'hfff : 12'h808;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad20, bad3;
    for (int w = 0; w < 13; w++) twoD20[w * 32 +: 32] = $urandom();
    repeat (3) @(negedge clk);
    rst = 0;
    bad20 = 0; bad3 = 0;
    // every pixel of a frame-sized area, stepping 1 pixel per clock
    for (int v = 0; v < 500; v += 1) begin
      for (int h = 0; h < 660; h += 3) begin
        logic [11:0] e20, e3;
        hcnt = 10'(h); vcnt = 10'(v); blank = (h >= 640 || v >= 480);
        e20 = expect_rgb(h, v, blank, 20, 18, twoD20);
        e3  = expect_rgb(h, v, blank, 3, 120, {391'b0, twoD3});
        @(negedge clk);
        if ({r20, g20, b20} != e20) bad20++;
        if ({r3, g3, b3} != e3) bad3++;
      end
    end
    check(bad20 == 0, $sformatf("N=20: %0d wrong pixels", bad20));
    check(bad3 == 0, $sformatf("N=3: %0d wrong pixels", bad3));
    // the 3x3 example: centre cell purple, corner cell white
    hcnt = 10'd320; vcnt = 10'd240; blank = 0; @(negedge clk);
    check({r3, g3, b3} == 12'h808, "3x3 centre purple");
    hcnt = 10'd150; vcnt = 10'd70; @(negedge clk);
    check({r3, g3, b3} == 12'hfff, "3x3 corner white");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
