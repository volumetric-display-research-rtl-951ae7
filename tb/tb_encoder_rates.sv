// tb_encoder_rates: runs the encoder module at the two wheel speeds the
// design is sized for, with the 100 MHz system clock:
//   * the minimum speed for a stable image, 15 turns per second with forty
//     frame positions per turn, a 600 Hz trigger rate (166 667 clocks per
//     position);
//   * the measured speed under full load, a 1.563 kHz position rate
//     (63 980 clocks per position).
// For each speed the wheel turns twice after the home mark (eighty
// positions, the track low for half of each). The testbench counts the
// trigger pulses, measures the distance between successive rising edges
// and the delay from each encoder edge to the trigger edge, and checks the
// pulse rate against the projector's 4 kHz trigger limit. The first pulse
// of a run, at the home position, comes one clock later than the rest
// because the module must first enter its active state.
module tb_encoder_rates;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CLK_HZ = 100_000_000;
  localparam int TRIGGER_MAX_HZ = 4000;
  localparam int TURNS = 2, POSITIONS = 40;

  logic en = 0, home_n = 1, encoder_n = 1;
  logic pulse, active;

  encoder_sync dut (.clk(clk), .rst(rst), .en(en), .home_n(home_n), .encoder_n(encoder_n),
                    .pulse(pulse), .active(active));

  // measurement, sampled at the falling edge like the stimulus
  longint cyc = 0, last_rise = -1, last_fall_in = -1;
  longint period_len = 0;
  int     rises = 0, period_bad = 0, delay_bad = 0, first_delay = 0;
  logic   pulse_q = 0, enc_q = 1;
  always @(negedge clk) begin
    cyc++;
    if (!encoder_n && enc_q) last_fall_in = cyc;
    if (pulse && !pulse_q) begin
      rises++;
      // the first pulse also waits for the state change at the home mark
      if (rises == 1) first_delay = int'(cyc - last_fall_in);
      else if (cyc - last_fall_in != 3) delay_bad++;
      if (rises > 2 && cyc - last_rise != period_len) period_bad++;
      last_rise = cyc;
    end
    pulse_q = pulse;
    enc_q = encoder_n;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one wheel speed: `period` clocks per frame position
  task automatic run_speed(int period, string name);
    rises = 0; period_bad = 0; delay_bad = 0; last_rise = -1; period_len = period;
    en = 1;
    for (int p = 0; p < TURNS * POSITIONS; p++) begin
      encoder_n = 0;
      if (p % (POSITIONS / 2) == 0) home_n = 0;
      repeat (period / 2) @(negedge clk);
      encoder_n = 1; home_n = 1;
      repeat (period - period / 2) @(negedge clk);
    end
    check(active, $sformatf("%s: module active", name));
    check(rises == TURNS * POSITIONS, $sformatf("%s: %0d trigger pulses for %0d positions", name, rises, TURNS * POSITIONS));
    check(period_bad == 0, $sformatf("%s: %0d pulse intervals differ from %0d clocks", name, period_bad, period));
    check(first_delay >= 3 && first_delay <= 4, $sformatf("%s: first pulse %0d clocks after the home mark", name, first_delay));
    check(delay_bad == 0, $sformatf("%s: %0d pulses not 3 clocks after the encoder edge", name, delay_bad));
    check(CLK_HZ / period <= TRIGGER_MAX_HZ, $sformatf("%s: %0d Hz above the trigger limit", name, CLK_HZ / period));
    $display("%s: %0d pulses, %0d Hz", name, rises, CLK_HZ / period);
    en = 0;
    repeat (10) @(negedge clk);
    check(!active && !pulse, $sformatf("%s: back in standby", name));
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    run_speed(CLK_HZ / (15 * POSITIONS), "15 turns/s");
    run_speed(CLK_HZ / 1563, "1.563 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
