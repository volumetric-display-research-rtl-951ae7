// tb_slice_vga_test: the 3x3x3 slice display fixture end to end. The object
// is a solid cube and the surface a slanted plane, whose slice is 1ef: all
// cells white except the centre. The testbench follows hs and vs, counts
// lines and frames (525 lines of 3200 clocks each at 100 MHz), and at the
// centre of each of the nine cells in the second frame checks the colour.
module tb_slice_vga_test;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       hs, vs;
  logic [3:0] red, green, blue;

  slice_vga_test #(.N(3)) dut (.clk(clk), .rst(rst), .obj(27'h7ffffff), .surf(27'h4910449),
                               .hs(hs), .vs(vs), .red(red), .green(green), .blue(blue));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // after a vs falling edge, line counting restarts; pixel position is
  // recovered from the hs falling edge (pixel 656 of the line)
  int clk_since_hs = 0, line = 0, hs_period = 0, lines_per_frame = 0, frames = 0;
  logic hs_q = 1, vs_q = 1;
  int bad_colour = 0, sampled = 0, black_bad = 0;
  always @(negedge clk) if (!rst) begin
    clk_since_hs++;
    if (!hs && hs_q) begin
      hs_period = clk_since_hs; clk_since_hs = 0; line++;
    end
    if (!vs && vs_q) begin
      frames++; lines_per_frame = line; line = 0;
    end
    hs_q = hs; vs_q = vs;
    // in the second full frame, sample each cell centre and a border pixel
    if (frames == 2) begin
      int pix, vis_line;
      pix = (656 + clk_since_hs / 4) % 800;       // pixel shown now
      vis_line = (line + 490 + 2 - 1) % 525;      // lines since vs fall, from line 490..491
      if (clk_since_hs % 4 == 2) begin
        for (int cy = 0; cy < 3; cy++)
          for (int cx = 0; cx < 3; cx++)
            if (pix == 140 + 120 * cx + 60 && vis_line == 60 + 120 * cy + 60) begin
              sampled++;
              if ({red, green, blue} != ((cx == 1 && cy == 1) ? 12'h808 : 12'hfff)) bad_colour++;
            end
        if (pix == 100 && vis_line == 240 && {red, green, blue} != 12'h000) black_bad++;
      end
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    wait (frames == 3);
    check(hs_period == 3200, $sformatf("line period %0d clocks", hs_period));
    check(lines_per_frame == 525, $sformatf("%0d lines per frame", lines_per_frame));
    check(sampled == 9, $sformatf("%0d cells sampled", sampled));
    check(bad_colour == 0, $sformatf("%0d cells with the wrong colour", bad_colour));
    check(black_bad == 0, "black outside the grid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
