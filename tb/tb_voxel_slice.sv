// tb_voxel_slice: checks the slice unit on the 3x3x3 example (solid cube
// against a slanted plane, expected slice 1ef) and on random 20x20x20
// object/helix pairs against a voxel-by-voxel reference. Also checks that
// the result appears one clock after en and holds while en is low.
module tb_voxel_slice;
  import vd_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          en3 = 0, valid3;
  logic [26:0]   obj3 = '0, surf3 = '0;
  logic [8:0]    twoD3;
  logic          en20 = 0, valid20;
  logic [7999:0] obj20 = '0, surf20 = '0;
  logic [399:0]  twoD20, exp20;

  voxel_slice #(.N(3)) dut3 (.clk(clk), .rst(rst), .en(en3), .obj(obj3), .surf(surf3),
                             .twoD(twoD3), .valid(valid3));
  voxel_slice dut20 (.clk(clk), .rst(rst), .en(en20), .obj(obj20), .surf(surf20),
                     .twoD(twoD20), .valid(valid20));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // 3x3x3 example: full cube and a slanted plane
    obj3 <= 27'h7ffffff; surf3 <= 27'h4910449; en3 <= 1;
    @(posedge clk); en3 <= 0;
    @(negedge clk);
    check(valid3 == 1, "valid one clock after en (3x3)");
    check(twoD3 == 9'h1ef, $sformatf("3x3 slice %h, expected 1ef", twoD3));
    // result holds while en is low
    obj3 <= '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(twoD3 == 9'h1ef && valid3 == 0, "3x3 slice holds while en is low");
    // empty object gives an empty slice
    en3 <= 1; @(posedge clk); en3 <= 0; @(negedge clk);
    check(twoD3 == 9'h000, "empty object, empty slice");
    // 20x20x20: helix models against random objects
    for (int t = 0; t < 40; t++) begin
      int rot;
      rot = t % 20;
      obj20  <= rand_object(t % 2);
      surf20 <= (t < 20) ? ref_helix_model(rot) : {250{$urandom()}};
      @(posedge clk);
      en20 <= 1;
      @(posedge clk);
      en20 <= 0;
      exp20 = ref_slice(obj20, surf20);
      @(negedge clk);
      check(valid20 == 1, "valid one clock after en (20)");
      check(twoD20 == exp20, $sformatf("20x20 slice, test %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
