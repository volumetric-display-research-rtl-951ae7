// bram_sdp: simple dual-port block RAM with one write port and one read port.
//
// Models the on-chip block memories that sit between the processor side and
// the slice processor: the object memory (written by the processor, read by
// the slice processor, 160 x 50 bits) and the slice memory (written by the
// slice processor, read by the processor, 32-bit words). Both ports share one
// clock. A write stores wdata at waddr on the rising edge when we is high. A
// read returns the word at raddr one cycle after ren is high (read latency of
// one cycle, as a block RAM with no output register); rdata holds its value
// while ren is low. A simultaneous read and write of the same address returns
// the old word. Addresses at or above DEPTH are ignored on write and read as
// zero. The memory is cleared at start-up; there is no reset of the contents.
// Width, depth and the one-cycle latency of the block RAMs are taken from the
// design description; write/read collision behaviour is this design's choice.
module bram_sdp #(
  parameter int unsigned DW    = 50,
  parameter int unsigned AW    = 8,
  parameter int unsigned DEPTH = 160
) (
  input  logic          clk,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // read port
  input  logic          ren,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < int'(DEPTH))) mem[waddr[IW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (ren) rdata <= (int'(raddr) < int'(DEPTH)) ? mem[raddr[IW-1:0]] : '0;
  end

endmodule
