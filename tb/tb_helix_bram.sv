// tb_helix_bram: reads every word of two preloaded helix memories (rotation
// 0 and rotation 13) and compares them with a helicoid computed with real
// trigonometry. Checks the one-clock read latency and that dout holds while
// en is low.
module tb_helix_bram;
  import vd_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en = 0;
  logic [7:0]  addr = '0;
  logic [49:0] dout0, dout13;
  logic [7999:0] m0, m13;

  helix_bram #(.ROT(0))  dut0  (.clk(clk), .en(en), .addr(addr), .dout(dout0));
  helix_bram #(.ROT(13)) dut13 (.clk(clk), .en(en), .addr(addr), .dout(dout13));

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
    int ones;
    m0  = ref_helix_model(0);
    m13 = ref_helix_model(13);
    ones = 0;
    @(posedge clk);
    for (int a = 0; a < 160; a++) begin
      en <= 1; addr <= 8'(a);
      @(posedge clk);
      en <= 0;
      @(negedge clk);
      check(dout0  == m0[a * 50 +: 50],  $sformatf("rot 0 word %0d", a));
      check(dout13 == m13[a * 50 +: 50], $sformatf("rot 13 word %0d", a));
      ones += $countones(dout0);
      addr <= 8'(a + 1);
      @(negedge clk);
      check(dout0 == m0[a * 50 +: 50], "dout holds while en is low");
    end
    // the blade covers roughly two voxels per unit of radius on each level
    check(ones > 200 && ones < 1000, $sformatf("helix voxel count %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
