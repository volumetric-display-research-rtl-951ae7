// slice_rgb: draws a two-dimensional slice as an N x N grid of squares.
//
// The grid is a square of N*CELL pixels centred on the 640x480 screen
// (CELL = 360/N, 18 pixels for N = 20, 120 for N = 3). Grid cell (x, y),
// column x from the left and row y from the top, shows slice bit
// twoD[x + N*y]: white (F,F,F) when the bit is 1, purple (8,0,8) when it is
// 0. Pixels outside the grid and in the blanking interval are black. The
// colour for pixel (hcnt, vcnt) is registered, so it appears one pixel
// enable after the counters; the testbench and the top account for that by
// delaying hs/vs by the same amount.
// White for a set bit and purple for a clear one follow the description of
// the 20x20 display grid; the grid size, position and the row/column order
// are this design's choices.
module slice_rgb #(
  parameter int unsigned N = 20
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           pix_ce,
  input  logic [9:0]     hcnt,
  input  logic [9:0]     vcnt,
  input  logic           blank,
  input  logic [N*N-1:0] twoD,
  output logic [3:0]     red,
  output logic [3:0]     green,
  output logic [3:0]     blue
);

  localparam int unsigned CELL = 360 / N;
  localparam int unsigned SIDE = CELL * N;
  localparam int unsigned X0   = (640 - SIDE) / 2;
  localparam int unsigned Y0   = (480 - SIDE) / 2;

  logic in_grid;
  int   gx, gy;

  always_comb begin
    in_grid = !blank && (int'(hcnt) >= int'(X0)) && (int'(hcnt) < int'(X0 + SIDE))
                     && (int'(vcnt) >= int'(Y0)) && (int'(vcnt) < int'(Y0 + SIDE));
    gx = (int'(hcnt) - int'(X0)) / int'(CELL);
    gy = (int'(vcnt) - int'(Y0)) / int'(CELL);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      red   <= '0;
      green <= '0;
      blue  <= '0;
    end else if (pix_ce) begin
      if (!in_grid) begin
        red <= 4'h0; green <= 4'h0; blue <= 4'h0;
      end else if (twoD[gx + int'(N) * gy]) begin
        red <= 4'hf; green <= 4'hf; blue <= 4'hf;
      end else begin
        red <= 4'h8; green <= 4'h0; blue <= 4'h8;
      end
    end
  end

endmodule
