// helix_bram: preloaded read-only block memory holding one helix model.
//
// Each of the twenty helix rotations is stored in a memory of its own,
// RD_DEPTH words of RD_WIDTH bits (160 x 50 bits = one 20x20x20 model). The
// contents are fixed at configuration time; they are computed here from
// vd_pkg::helix_word() for rotation ROT instead of being read from an
// initialisation file. Reads are synchronous: dout shows the word at addr one
// clock after en is high and holds while en is low.
// The memory organisation and preloading follow the design description; the
// helicoid shape itself (see vd_pkg) is this design's choice.
module helix_bram
  import vd_pkg::*;
#(
  parameter int unsigned ROT = 0
) (
  input  logic             clk,
  input  logic             en,
  input  logic [RD_AW-1:0] addr,
  output rd_word_t         dout
);

  rd_word_t rom [RD_DEPTH];

  initial begin
    for (int a = 0; a < int'(RD_DEPTH); a++) rom[a] = helix_word(int'(ROT), a);
  end

  always_ff @(posedge clk) begin
    if (en) dout <= (int'(addr) < int'(RD_DEPTH)) ? rom[addr] : '0;
  end

endmodule
