// pix_clk_gen: pixel-rate enable for the slice display.
//
// Divides the 100 MHz system clock by DIV (4) and produces pix_ce, high for
// one clock in every DIV, which clocks the VGA timing at 25 MHz. Everything
// stays on the one system clock, so no second clock domain is created.
// The source does not describe the display's clocking; the 25 MHz rate is
// the one the 640x480 mode needs, and making it a clock enable is this
// design's choice.
module pix_clk_gen #(
  parameter int unsigned DIV = 4
) (
  input  logic clk,
  input  logic rst,
  output logic pix_ce
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      pix_ce <= 1'b0;
    end else begin
      cnt    <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      pix_ce <= (cnt == CW'(DIV - 1));
    end
  end

endmodule
