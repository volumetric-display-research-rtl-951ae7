// tb_slice_processor: end-to-end test of the slice processor. For each of
// three objects (random balls with noise, plus an all-ones object) the
// testbench writes the 160 x 50-bit object memory through the processor
// port, raises en, waits for done and reads the 260 slice words back. Every
// word is compared with a reference computed voxel by voxel from the object
// and a real-arithmetic helicoid. done must come 3629 clocks after the rising
// edge of en: 162 to load the object, 1 to start the helix reader, 3202 for
// the twenty helix models, 2 for the last slice to reach the buffer and 262
// for the 260 memory writes and the done handshake.
module tb_slice_processor;
  import vd_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         en = 0;
  logic         ps_obj_we = 0;
  logic [7:0]   ps_obj_addr = '0;
  logic [49:0]  ps_obj_wdata = '0;
  logic         ps_slice_en = 0;
  logic [13:0]  ps_slice_addr = '0;
  logic [31:0]  ps_slice_rdata;
  logic         busy, done;
  logic [7999:0] helix [20];

  slice_processor dut (.clk(clk), .rst(rst), .en(en), .ps_obj_we(ps_obj_we), .ps_obj_addr(ps_obj_addr),
                       .ps_obj_wdata(ps_obj_wdata), .ps_slice_en(ps_slice_en), .ps_slice_addr(ps_slice_addr),
                       .ps_slice_rdata(ps_slice_rdata), .busy(busy), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) helix[r] = ref_helix_model(r);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 3; run++) begin
      logic [7999:0] obj;
      int cyc, bad, nonzero;
      obj = (run == 2) ? '1 : rand_object(run);
      // processor writes the object
      for (int a = 0; a < 160; a++) begin
        @(negedge clk);
        ps_obj_we = 1; ps_obj_addr = 8'(a); ps_obj_wdata = obj[a * 50 +: 50];
      end
      @(negedge clk);
      ps_obj_we = 0;
      en = 1;
      cyc = 0;
      do begin
        @(negedge clk);
        cyc++;
      end while (!done && cyc < 10000);
      check(cyc == 3629, $sformatf("done %0d clocks after en", cyc));
      check(!busy, "not busy when done");
      // processor reads the slices back
      bad = 0; nonzero = 0;
      for (int w = 0; w < 260; w++) begin
        logic [31:0] exp_w;
        exp_w = ref_slice_word(ref_slice(obj, helix[w / 13]), w % 13);
        ps_slice_en = 1; ps_slice_addr = 14'(w);
        @(negedge clk);
        ps_slice_en = 0;
        if (ps_slice_rdata != exp_w) begin
          bad++;
          if (bad < 4) $display("word %0d: %h, expected %h", w, ps_slice_rdata, exp_w);
        end
        if (ps_slice_rdata != 0) nonzero++;
      end
      check(bad == 0, $sformatf("run %0d: %0d of 260 slice words wrong", run, bad));
      check(nonzero > 20, "slices are not empty");
      en = 0;
      @(negedge clk);
      check(!done, "done cleared by en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
