// tb_helix_read: starts the sequential helix reader and captures surf at
// every surf_valid. Checks that the twenty models arrive in order, each equal
// to the reference helicoid of its rotation, each at clock 160*(r+1)+2 after
// start, and that done rises at clock 3203. A second run checks restart.
module tb_helix_read;
  import vd_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start = 0;
  logic [7999:0] surf;
  logic          surf_valid, done;
  logic [4:0]    surf_rot;
  logic [7999:0] refm [20];

  helix_read dut (.clk(clk), .rst(rst), .start(start), .surf(surf),
                  .surf_valid(surf_valid), .surf_rot(surf_rot), .done(done));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) refm[r] = ref_helix_model(r);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      int cyc, nmod;
      start <= 1;
      @(posedge clk);            // start sampled: clock 0
      start <= 0;
      cyc = 0; nmod = 0;
      do begin
        @(negedge clk);
        cyc++;
        if (surf_valid) begin
          check(int'(surf_rot) == nmod, $sformatf("rotation order %0d", nmod));
          check(cyc == 160 * (nmod + 1) + 2, $sformatf("model %0d at clock %0d", nmod, cyc));
          check(surf == refm[nmod], $sformatf("helix model %0d contents", nmod));
          nmod++;
        end
      end while (!done && cyc < 4000);
      check(nmod == 20, $sformatf("%0d models read", nmod));
      check(cyc == 20 * 160 + 3, $sformatf("done at clock %0d", cyc));
      repeat (5) @(posedge clk);
      check(done == 1 && surf_valid == 0, "done holds, no further models");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
