// tb_vd_pl_top: end-to-end run of the programmable-logic system at its full
// size (20x20x20 voxels, twenty helix positions).
//
// The processor side is played by the testbench: it writes an object into
// the object memory, starts the slice processor, waits for done and reads the
// twenty slices back, comparing them with a reference. Meanwhile the encoder
// module is enabled and a model of the spinning wheel drives the active-low
// sensor inputs: forty frame positions per turn, home marks at positions 0
// and 20. A projector model counts rising edges of the frame trigger and
// shows stored frame (count mod 20). The test checks that nothing is shown
// before the first home mark and that afterwards the frame shown at wheel
// position p is slice (p - p_home) mod 20, for three turns.
// Mechanisms counted (each must happen at least once): slicing runs
// completed, helix models sliced while the next one is being loaded, a run
// aborted by lowering en, frame positions ignored in standby, entries into
// the active state, trigger pulses, standby on encoder enable low, and
// frames drawn by the slice display fixture. The fixture is given an object
// and helix model 5; in its second frame the colour at the centre of each
// of the 400 grid cells must be white for a set slice bit, purple otherwise.
module tb_vd_pl_top;
  import vd_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         slice_en = 0;
  logic         ps_obj_we = 0;
  logic [7:0]   ps_obj_addr = '0;
  logic [49:0]  ps_obj_wdata = '0;
  logic         ps_slice_en = 0;
  logic [13:0]  ps_slice_addr = '0;
  logic [31:0]  ps_slice_rdata;
  logic         slice_busy, slice_done;
  logic         encoder_en = 0, home_n = 1, encoder_n = 1;
  logic         frame_pulse, encoder_active;
  logic [7999:0] vga_obj = '0, vga_surf = '0;
  logic         vga_hs, vga_vs;
  logic [3:0]   vga_red, vga_green, vga_blue;

  vd_pl_top dut (.clk(clk), .rst(rst), .slice_en(slice_en), .ps_obj_we(ps_obj_we),
                 .ps_obj_addr(ps_obj_addr), .ps_obj_wdata(ps_obj_wdata), .ps_slice_en(ps_slice_en),
                 .ps_slice_addr(ps_slice_addr), .ps_slice_rdata(ps_slice_rdata),
                 .slice_busy(slice_busy), .slice_done(slice_done), .encoder_en(encoder_en),
                 .home_n(home_n), .encoder_n(encoder_n), .frame_pulse(frame_pulse),
                 .encoder_active(encoder_active), .vga_obj(vga_obj), .vga_surf(vga_surf),
                 .vga_hs(vga_hs), .vga_vs(vga_vs), .vga_red(vga_red), .vga_green(vga_green),
                 .vga_blue(vga_blue));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- event counters ----------------
  int n_runs = 0, n_overlap = 0, n_abort = 0, n_ignored = 0, n_home = 0, n_pulses = 0, n_standby = 0;
  logic pulse_q = 0, active_q = 0;
  always @(posedge clk) begin
    pulse_q  <= frame_pulse;
    active_q <= encoder_active;
    if (frame_pulse && !pulse_q) n_pulses++;
    if (encoder_active && !active_q) n_home++;
    if (!encoder_active && active_q) n_standby++;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- slice display fixture ----------------
  // pixel position recovered from hs (falls at pixel 656) and vs (falls at
  // line 490); one pixel lasts four clocks
  int   vga_clk_since_hs = 0, vga_line = 0, vga_frames = 0, vga_bad = 0, vga_sampled = 0;
  logic vga_hs_q = 1, vga_vs_q = 1;
  logic [399:0] vga_expect = '0;
  always @(negedge clk) if (!rst) begin
    vga_clk_since_hs++;
    if (!vga_hs && vga_hs_q) begin vga_clk_since_hs = 0; vga_line++; end
    if (!vga_vs && vga_vs_q) begin vga_frames++; vga_line = 0; end
    vga_hs_q = vga_hs; vga_vs_q = vga_vs;
    if (vga_frames == 2 && vga_clk_since_hs % 4 == 2) begin
      int pix, ln;
      pix = (656 + vga_clk_since_hs / 4) % 800;
      ln  = (vga_line + 491) % 525;
      if (pix >= 140 && pix < 500 && ln >= 60 && ln < 420 && (pix - 140) % 18 == 9 && (ln - 60) % 18 == 9) begin
        vga_sampled++;
        if ({vga_red, vga_green, vga_blue} != (vga_expect[(pix - 140) / 18 + 20 * ((ln - 60) / 18)] ? 12'hfff : 12'h808))
          vga_bad++;
      end
    end
  end

  // ---------------- processor side ----------------
  task automatic write_object(logic [7999:0] obj);
    for (int a = 0; a < 160; a++) begin
      @(negedge clk);
      ps_obj_we = 1; ps_obj_addr = 8'(a); ps_obj_wdata = obj[a * 50 +: 50];
    end
    @(negedge clk);
    ps_obj_we = 0;
  endtask

  task automatic run_and_check(logic [7999:0] obj, string tag);
    int cyc, bad;
    slice_en = 1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!slice_done && cyc < 10000);
    check(slice_done, {tag, ": run finished"});
    check(cyc == 3629, $sformatf("%s: done after %0d clocks", tag, cyc));
    if (slice_done) n_runs++;
    // 3629 clocks leave no room for a stall between helix models: each of the
    // nineteen models before the last was sliced while the next one loaded
    if (cyc == 3629) n_overlap += 19;
    bad = 0;
    for (int w = 0; w < 260; w++) begin
      ps_slice_en = 1; ps_slice_addr = 14'(w);
      @(negedge clk);
      ps_slice_en = 0;
      if (ps_slice_rdata != ref_slice_word(ref_slice(obj, ref_helix_model(w / 13)), w % 13)) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d slice words wrong", tag, bad));
    slice_en = 0;
    @(negedge clk);
  endtask

  // ---------------- wheel and projector ----------------
  // one frame position every POS clocks, track low for LOW clocks
  localparam int POS = 40, LOW = 12;
  int  wheel_pos = 0;           // 0..39
  int  home_pos  = -1;          // wheel position of the home mark that started projection
  int  shown     = -1;          // projector frame (pulses - 1) mod 20
  int  frame_errors = 0, frames_checked = 0;
  bit  wheel_on = 0, check_frames = 0;

  always @(posedge clk) if (frame_pulse && !pulse_q) shown = (shown + 1) % 20;

  initial begin : wheel
    forever begin
      @(negedge clk);
      if (wheel_on) begin
        encoder_n = 0;
        if (wheel_pos % 20 == 0) home_n = 0;
        repeat (LOW) @(negedge clk);
        encoder_n = 1; home_n = 1;
        // before the home mark has been seen, positions are ignored
        if (!encoder_active && encoder_en) n_ignored++;
        repeat (POS - LOW - 1) @(negedge clk);
        if (check_frames) begin
          frames_checked++;
          if (shown != ((wheel_pos - home_pos + 40) % 20)) frame_errors++;
        end
        wheel_pos = (wheel_pos + 1) % 40;
      end
    end
  end

  initial begin
    logic [7999:0] obj;
    vga_obj = rand_object(0);
    vga_surf = ref_helix_model(5);
    vga_expect = ref_slice(vga_obj, vga_surf);
    repeat (3) @(negedge clk);
    rst = 0;
    // start the wheel at a position away from home, encoder enabled
    wheel_pos = 7;
    encoder_en = 1;
    wheel_on = 1;
    // slicing run 1 while the wheel turns
    obj = rand_object(1);
    write_object(obj);
    run_and_check(obj, "run 1");
    // abort: en lowered while the object loads, then a clean run
    slice_en = 1; repeat (50) @(negedge clk);
    slice_en = 0; @(negedge clk);
    if (!slice_busy && !slice_done) n_abort++;
    check(!slice_busy, "abort returns to idle");
    obj = rand_object(0);
    write_object(obj);
    run_and_check(obj, "run 2");
    // the projector must have started at a home mark
    check(encoder_active, "encoder active");
    // restart the projection in step with the wheel: disable, re-enable, wait for home
    @(negedge clk);
    while (wheel_pos != 35) @(negedge clk);
    encoder_en = 0;
    repeat (POS) @(negedge clk);
    check(!encoder_active, "encoder enable low: standby");
    encoder_en = 1;
    // the next home mark is wheel position 0; projector frame counter restarts there
    while (!encoder_active) @(negedge clk);
    home_pos = 0;
    shown = -1;
    // the pulse of the home position itself advances to frame 0
    repeat (POS - LOW) @(negedge clk);
    check_frames = 1;
    repeat (3 * 40 * POS) @(negedge clk);
    check_frames = 0;
    check(frames_checked >= 100, $sformatf("%0d frame positions checked", frames_checked));
    check(frame_errors == 0, $sformatf("%0d frames out of step with the wheel", frame_errors));
    // slice display: wait for its second frame to finish
    while (vga_frames < 3) @(negedge clk);
    check(vga_sampled == 400, $sformatf("display: %0d cells sampled", vga_sampled));
    check(vga_bad == 0, $sformatf("display: %0d cells with the wrong colour", vga_bad));
    // every mechanism happened
    check(n_runs >= 2, $sformatf("slicing runs %0d", n_runs));
    check(n_overlap >= 19, $sformatf("slices overlapped with loading %0d", n_overlap));
    check(n_abort >= 1, $sformatf("aborted runs %0d", n_abort));
    check(n_ignored >= 1, $sformatf("positions ignored in standby %0d", n_ignored));
    check(n_home >= 2, $sformatf("home detections %0d", n_home));
    check(n_pulses >= 120, $sformatf("trigger pulses %0d", n_pulses));
    check(n_standby >= 1, $sformatf("returns to standby %0d", n_standby));
    check(vga_frames >= 2, $sformatf("display frames %0d", vga_frames));
    $display("events: runs=%0d overlap=%0d abort=%0d ignored=%0d home=%0d pulses=%0d standby=%0d frames=%0d",
             n_runs, n_overlap, n_abort, n_ignored, n_home, n_pulses, n_standby, vga_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
