// tb_bram_sdp: random writes and reads on the 160 x 50-bit object memory
// configuration against an array model. Checks the one-clock read latency,
// that rdata holds while ren is low, that a read of the address being
// written returns the old word, and that out-of-range writes are ignored.
module tb_bram_sdp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 0, ren = 0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [49:0] wdata = '0, rdata;
  logic [49:0] model [256];

  bram_sdp dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                .ren(ren), .raddr(raddr), .rdata(rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [49:0] expect_q;
    for (int i = 0; i < 256; i++) model[i] = '0;
    @(posedge clk);
    // fill every word, Figure-5-1 style pattern first
    for (int a = 0; a < 160; a++) begin
      we <= 1; waddr <= 8'(a); wdata <= {$urandom(), $urandom()} & {50{1'b1}};
      @(posedge clk);
      model[a] = wdata;
    end
    we <= 0;
    // read back every word, one clock latency
    for (int a = 0; a < 160; a++) begin
      ren <= 1; raddr <= 8'(a);
      @(posedge clk);
      ren <= 0;
      @(negedge clk);
      check(rdata == model[a], $sformatf("read %0d", a));
      raddr <= 8'(a + 1);
      @(posedge clk);
      @(negedge clk);
      check(rdata == model[a], $sformatf("hold %0d", a));
    end
    // read and write of the same address: old word
    for (int t = 0; t < 50; t++) begin
      int a;
      a = int'($urandom_range(159));
      expect_q = model[a];
      @(negedge clk);
      we <= 1; waddr <= 8'(a); wdata <= {$urandom(), $urandom()} & {50{1'b1}};
      ren <= 1; raddr <= 8'(a);
      @(posedge clk);
      model[a] = wdata;
      we <= 0; ren <= 0;
      @(negedge clk);
      check(rdata == expect_q, "read during write returns old word");
      ren <= 1;
      @(posedge clk); ren <= 0; @(negedge clk);
      check(rdata == model[a], "new word after write");
    end
    // out-of-range write is ignored, out-of-range read gives zero
    we <= 1; waddr <= 8'd200; wdata <= 50'h3ffff_ffff_ffff;
    @(posedge clk); we <= 0;
    ren <= 1; raddr <= 8'd200; @(posedge clk); ren <= 0; @(negedge clk);
    check(rdata == '0, "out-of-range read is zero");
    for (int a = 0; a < 160; a++) begin
      ren <= 1; raddr <= 8'(a); @(posedge clk); ren <= 0; @(negedge clk);
      check(rdata == model[a], $sformatf("final read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
