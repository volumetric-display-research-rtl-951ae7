// tb_encoder_sync: drives the two active-low wheel inputs as a spinning
// wheel would (forty frame positions and two home marks per turn) and checks
// the frame trigger: no pulses in standby, even if the encoder track moves;
// entry into the active state at the first home mark; afterwards pulse is
// the inverse of the encoder input delayed by three clocks; one pulse per
// frame position; and a return to standby when en is low.
module tb_encoder_sync;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 0, home_n = 1, encoder_n = 1;
  logic pulse, active;
  logic [3:0] enc_hist;        // encoder_n as sampled at the last four edges
  int   rises = 0;
  logic pulse_q = 0;
  int   mismatches = 0, compared = 0;
  bit   expect_active = 0;

  encoder_sync dut (.clk(clk), .rst(rst), .en(en), .home_n(home_n), .encoder_n(encoder_n),
                    .pulse(pulse), .active(active));

  // pulse at a negedge reflects encoder_n sampled three edges earlier
  always @(posedge clk) begin
    enc_hist <= {enc_hist[2:0], encoder_n};
    pulse_q  <= pulse;
    if (pulse && !pulse_q) rises++;
  end
  always @(negedge clk) if (expect_active) begin
    compared++;
    if (pulse != !enc_hist[2]) mismatches++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one frame position: the encoder track is low for `low` clocks
  task automatic position(int low, int high, bit home);
    @(negedge clk);
    encoder_n = 0; if (home) home_n = 0;
    repeat (low) @(negedge clk);
    encoder_n = 1; home_n = 1;
    repeat (high) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // enabled, wheel turning, no home mark yet: standby
    en = 1;
    for (int p = 0; p < 7; p++) position(4, 6, 0);
    check(rises == 0 && !active, "no pulses before home");
    // home mark together with a frame position
    position(4, 6, 1);
    check(active, "active after home");
    rises = 0;
    repeat (4) @(negedge clk);
    expect_active = 1;
    // two half turns: 40 positions with home marks at 0 and 20
    for (int p = 0; p < 40; p++) position(3 + p % 3, 5 + p % 4, (p % 20) == 0);
    repeat (4) @(negedge clk);
    expect_active = 0;
    check(rises == 40, $sformatf("%0d pulses for 40 positions", rises));
    check(mismatches == 0 && compared > 300, $sformatf("pulse = !encoder delayed: %0d of %0d wrong", mismatches, compared));
    // en low: standby, no output
    en = 0; rises = 0;
    for (int p = 0; p < 5; p++) position(4, 6, p == 2);
    check(!active && rises == 0, "standby while en is low");
    // re-enable: waits for home again
    en = 1;
    for (int p = 0; p < 5; p++) position(4, 6, 0);
    check(!active && rises == 0, "re-enabled: waits for home");
    position(4, 6, 1);
    check(active, "active again after home");
    // reset returns to standby
    rst = 1; @(negedge clk); rst = 0;
    check(!active && !pulse, "reset returns to standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
