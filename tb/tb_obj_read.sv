// tb_obj_read: the object reader against a behavioural 160 x 50-bit memory
// with one clock of read latency. Loads random objects and checks that obj
// equals the memory image, that the reader asks for each address once and in
// order, that helix_en rises exactly at clock 162 after the rising edge of en
// and stays high, and that a second rising edge of en reloads new contents.
module tb_obj_read;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          en = 0;
  logic          mem_en;
  logic [7:0]    mem_addr;
  logic [49:0]   mem_dout;
  logic [7999:0] obj;
  logic          helix_en;
  logic [49:0]   mem [160];

  obj_read dut (.clk(clk), .rst(rst), .en(en), .mem_en(mem_en), .mem_addr(mem_addr),
                .mem_dout(mem_dout), .obj(obj), .helix_en(helix_en));

  // behavioural block RAM, one clock read latency
  always_ff @(posedge clk) if (mem_en) mem_dout <= (mem_addr < 160) ? mem[mem_addr] : '0;

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
    logic [7999:0] image;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      int cyc, nreq, next_addr;
      bit order_ok;
      for (int a = 0; a < 160; a++) begin
        mem[a] = {$urandom(), $urandom()} & {50{1'b1}};
        image[a * 50 +: 50] = mem[a];
      end
      en <= 1;
      @(posedge clk);               // rising edge of en sampled: clock 0
      cyc = 0; nreq = 0; next_addr = 0; order_ok = 1;
      do begin
        @(negedge clk);
        cyc++;
        if (mem_en) begin
          if (int'(mem_addr) != next_addr) order_ok = 0;
          next_addr++; nreq++;
        end
      end while (!helix_en && cyc < 400);
      check(order_ok, "addresses requested in order");
      check(nreq == 160, $sformatf("%0d addresses requested", nreq));
      check(cyc == 162, $sformatf("helix_en at clock %0d", cyc));
      check(obj == image, "object register equals memory image");
      repeat (10) @(posedge clk);
      @(negedge clk);
      check(helix_en == 1 && mem_en == 0, "helix_en holds, reading stopped");
      en <= 0;
      @(posedge clk);
      @(negedge clk);
      check(helix_en == 1, "helix_en holds after en falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
