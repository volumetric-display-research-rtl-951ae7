// tb_slice_ctrl: drives the controller's status inputs as the other slice
// processor blocks would and checks its outputs: nothing before a rising
// edge of en, one helix_start pulse after helix_en, slice_en only while
// slicing and only with surf_valid, done after write_done until en falls,
// and an abort when en falls in the middle of a run.
module tb_slice_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, helix_en = 0, surf_valid = 0, write_done = 0;
  logic helix_start, slice_en, write_en, busy, done;
  int   starts = 0;

  slice_ctrl dut (.clk(clk), .rst(rst), .en(en), .helix_en(helix_en), .surf_valid(surf_valid),
                  .write_done(write_done), .helix_start(helix_start), .slice_en(slice_en),
                  .write_en(write_en), .busy(busy), .done(done));

  always @(posedge clk) if (helix_start) starts++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(3); rst = 0;
    // status inputs without a start do nothing
    surf_valid = 1; helix_en = 1; step(2);
    check(!busy && !slice_en && !write_en && starts == 0, "idle before en");
    surf_valid = 0; helix_en = 0;
    for (int run = 0; run < 2; run++) begin
      en = 1; step(1);
      check(busy && !write_en && !done, "waiting for the object");
      surf_valid = 1; step(1);
      check(!slice_en, "no slice while the object loads");
      surf_valid = 0; step(3);
      helix_en = 1; step(1);
      check(helix_start, "helix_start pulse after helix_en");
      step(1);
      check(!helix_start && starts == 1 + run, "one helix_start after helix_en");
      check(write_en && busy, "slicing: write enabled");
      for (int r = 0; r < 20; r++) begin
        surf_valid = 1;
        #1 check(slice_en, "slice_en follows surf_valid");
        step(1);
        surf_valid = 0;
        #1 check(!slice_en, "slice_en only with surf_valid");
        step(2);
      end
      check(starts == 1 + run, "still one helix_start");
      write_done = 1; step(1);
      check(done && write_en && !busy, "done after write_done");
      step(5);
      check(done, "done holds while en is high");
      en = 0; helix_en = 0; write_done = 0; step(1);
      check(!done && !write_en && !busy, "en low returns to idle");
      step(2);
    end
    // abort: en falls while waiting for the object
    en = 1; step(2); en = 0; step(1);
    check(!busy, "abort while loading");
    helix_en = 1; step(2);
    check(starts == 2, "no start after an abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
