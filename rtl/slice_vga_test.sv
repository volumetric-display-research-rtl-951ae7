// slice_vga_test: bench fixture that shows the slice of a fixed object and
// surface on a VGA monitor.
//
// voxel_slice computes the slice of obj and surf (N x N x N voxels) once per
// frame, at the start of vertical blanking; vga_timing produces 640x480 60 Hz
// timing from a 25 MHz pixel enable made by pix_clk_gen; slice_rgb draws
// the N x N slice as white (bit set) and purple (bit clear) squares. hs and
// vs are delayed by one pixel so that they line up with the registered
// colour outputs.
// Interface: clk (100 MHz), rst, obj and surf models, VGA outputs hs, vs and
// 4-bit red, green and blue.
// Following the source: the slice module feeding a VGA grid of purple
// (clear) and white (set) squares, first at 3x3x3 (N = 3), then at 20x20x20.
// This design's choices: the split into clock enable, timing and colour
// blocks, the 640x480 mode and the once-per-frame slice update.
module slice_vga_test #(
  parameter int unsigned N = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N*N*N-1:0] obj,
  input  logic [N*N*N-1:0] surf,
  output logic             hs,
  output logic             vs,
  output logic [3:0]       red,
  output logic [3:0]       green,
  output logic [3:0]       blue
);

  logic           pix_ce;
  logic [9:0]     hcnt, vcnt;
  logic           blank, hs_t, vs_t;
  logic [N*N-1:0] twoD;
  logic           frame_start;

  pix_clk_gen u_clk_gen (.clk(clk), .rst(rst), .pix_ce(pix_ce));

  vga_timing u_vga (.clk(clk), .rst(rst), .pix_ce(pix_ce), .hcnt(hcnt), .vcnt(vcnt),
                    .blank(blank), .hs(hs_t), .vs(vs_t));

  // recompute the slice once per frame, on the first pixel of line 480
  assign frame_start = pix_ce && (hcnt == 10'd0) && (vcnt == 10'd480);

  voxel_slice #(.N(N)) u_slice (.clk(clk), .rst(rst), .en(frame_start || rst), .obj(obj),
                                .surf(surf), .twoD(twoD), .valid());

  slice_rgb #(.N(N)) u_rgb (.clk(clk), .rst(rst), .pix_ce(pix_ce), .hcnt(hcnt), .vcnt(vcnt),
                            .blank(blank), .twoD(twoD), .red(red), .green(green), .blue(blue));

  always_ff @(posedge clk) begin
    if (rst) begin
      hs <= 1'b1;
      vs <= 1'b1;
    end else if (pix_ce) begin
      hs <= hs_t;
      vs <= vs_t;
    end
  end

endmodule
