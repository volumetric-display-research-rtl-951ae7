// vd_pl_top: programmable-logic system of the helical volumetric display.
//
// A volumetric image is made by projecting, onto a spinning double-bladed
// helicoid screen, at each screen angle the part of the object that the
// screen passes through at that angle. This top holds the two custom blocks
// of the logic side: the slice processor, which turns a 20x20x20 voxel model
// of the object into the twenty 20x20 slices (one per 9 degrees of a half
// turn), and the encoder module, which produces the projector's frame
// trigger from the wheel mounted on the helix shaft.
// The processor-side blocks (the processing system, its interconnect, the
// general-purpose I/O and the AXI BRAM controller) are vendor parts and are
// not included: their signals are the ports of this module.
//   slice_en       start a slicing run (GPIO); slice_done/slice_busy report it
//   ps_obj_*       write port of the object memory (160 x 50 bits)
//   ps_slice_*     read port of the slice memory (260 x 32 bits used), one
//                  clock read latency
//   encoder_en     enable of the encoder module (GPIO)
//   home_n, encoder_n  active-low wheel sensor inputs
//   frame_pulse    active-high frame trigger to the projector
// Beside them, with ports of its own, stands the slice display fixture
// (slice_vga_test), a separate bench design that shows the slice of the
// models on vga_obj and vga_surf on a VGA monitor:
//   vga_obj, vga_surf  object and surface models (8000 bits each)
//   vga_hs, vga_vs, vga_red, vga_green, vga_blue  VGA outputs, 640x480 60 Hz
// Everything runs on one clock (the 100 MHz fabric clock) with a
// synchronous active-high reset.
module vd_pl_top
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             slice_en,
  input  logic             ps_obj_we,
  input  logic [RD_AW-1:0] ps_obj_addr,
  input  rd_word_t         ps_obj_wdata,
  input  logic             ps_slice_en,
  input  logic [WR_AW-1:0] ps_slice_addr,
  output wr_word_t         ps_slice_rdata,
  output logic             slice_busy,
  output logic             slice_done,
  input  logic             encoder_en,
  input  logic             home_n,
  input  logic             encoder_n,
  output logic             frame_pulse,
  output logic             encoder_active,
  input  model_t           vga_obj,
  input  model_t           vga_surf,
  output logic             vga_hs,
  output logic             vga_vs,
  output logic [3:0]       vga_red,
  output logic [3:0]       vga_green,
  output logic [3:0]       vga_blue
);

  slice_processor u_slice_processor (
    .clk            (clk),
    .rst            (rst),
    .en             (slice_en),
    .ps_obj_we      (ps_obj_we),
    .ps_obj_addr    (ps_obj_addr),
    .ps_obj_wdata   (ps_obj_wdata),
    .ps_slice_en    (ps_slice_en),
    .ps_slice_addr  (ps_slice_addr),
    .ps_slice_rdata (ps_slice_rdata),
    .busy           (slice_busy),
    .done           (slice_done)
  );

  encoder_sync u_encoder (
    .clk       (clk),
    .rst       (rst),
    .en        (encoder_en),
    .home_n    (home_n),
    .encoder_n (encoder_n),
    .pulse     (frame_pulse),
    .active    (encoder_active)
  );

  slice_vga_test #(.N(GRID)) u_slice_display (
    .clk   (clk),
    .rst   (rst),
    .obj   (vga_obj),
    .surf  (vga_surf),
    .hs    (vga_hs),
    .vs    (vga_vs),
    .red   (vga_red),
    .green (vga_green),
    .blue  (vga_blue)
  );

endmodule
