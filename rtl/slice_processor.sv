// slice_processor: computes the twenty helix slices of a voxelised object.
//
// The processor writes the 20x20x20 object model into the object memory
// (BRAM 1, 160 words of 50 bits) through the ps_obj_* write port, then raises
// en. obj_read copies the object into an 8000-bit register; helix_read then
// reads the twenty preloaded helix models one after the other; for each one
// voxel_slice forms the AND of object and helix and ORs it over the z levels
// into a 400-bit slice; slice_write collects the twenty slices and writes
// them, thirteen 32-bit words each, into the slice memory (BRAM 22), which
// the processor reads through the ps_slice_* read port. done then stays high
// until en is lowered.
// Timing with en raised in clock 0: the object is loaded after about
// RD_DEPTH+3 clocks, the twenty helix models take N_ROT*RD_DEPTH clocks, and
// the 260 slice words one clock each, about 3,700 clocks in all (37 us at
// 100 MHz).
// The block structure (obj_read, helix_read, slice, bram_write, controller,
// BRAM 1 and BRAM 22) follows the slice processor's block diagram; the
// processor-side ports stand in for the AXI BRAM controller, a vendor block
// that is not part of this design.
module slice_processor
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  // processor side of the object memory
  input  logic             ps_obj_we,
  input  logic [RD_AW-1:0] ps_obj_addr,
  input  rd_word_t         ps_obj_wdata,
  // processor side of the slice memory
  input  logic             ps_slice_en,
  input  logic [WR_AW-1:0] ps_slice_addr,
  output wr_word_t         ps_slice_rdata,
  // status
  output logic             busy,
  output logic             done
);

  logic             obj_mem_en;
  logic [RD_AW-1:0] obj_mem_addr;
  rd_word_t         obj_mem_dout;
  model_t           obj;
  logic             helix_en;
  logic             helix_start;
  model_t           surf;
  logic             surf_valid;
  logic [4:0]       surf_rot;
  logic             helix_done;
  logic             slice_en;
  logic             write_en;
  slice_t           twoD;
  logic             twoD_valid;
  logic             wr_we;
  logic [WR_AW-1:0] wr_addr;
  wr_word_t         wr_din;
  logic             write_done;

  // BRAM 1: object model, written by the processor
  bram_sdp #(.DW(RD_WIDTH), .AW(RD_AW), .DEPTH(RD_DEPTH)) u_obj_bram (
    .clk   (clk),
    .we    (ps_obj_we),
    .waddr (ps_obj_addr),
    .wdata (ps_obj_wdata),
    .ren   (obj_mem_en),
    .raddr (obj_mem_addr),
    .rdata (obj_mem_dout)
  );

  obj_read u_obj_read (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .mem_en   (obj_mem_en),
    .mem_addr (obj_mem_addr),
    .mem_dout (obj_mem_dout),
    .obj      (obj),
    .helix_en (helix_en)
  );

  helix_read u_helix_read (
    .clk        (clk),
    .rst        (rst),
    .start      (helix_start),
    .surf       (surf),
    .surf_valid (surf_valid),
    .surf_rot   (surf_rot),
    .done       (helix_done)
  );

  slice_ctrl u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .en          (en),
    .helix_en    (helix_en),
    .surf_valid  (surf_valid),
    .write_done  (write_done),
    .helix_start (helix_start),
    .slice_en    (slice_en),
    .write_en    (write_en),
    .busy        (busy),
    .done        (done)
  );

  voxel_slice #(.N(GRID)) u_slice (
    .clk   (clk),
    .rst   (rst),
    .en    (slice_en),
    .obj   (obj),
    .surf  (surf),
    .twoD  (twoD),
    .valid (twoD_valid)
  );

  slice_write u_write (
    .clk      (clk),
    .rst      (rst),
    .en       (write_en),
    .in_valid (twoD_valid),
    .twoD     (twoD),
    .we       (wr_we),
    .addr     (wr_addr),
    .din      (wr_din),
    .done     (write_done)
  );

  // BRAM 22: the twenty slices, read by the processor
  bram_sdp #(.DW(WR_WIDTH), .AW(WR_AW), .DEPTH(1024)) u_slice_bram (
    .clk   (clk),
    .we    (wr_we),
    .waddr (wr_addr),
    .wdata (wr_din),
    .ren   (ps_slice_en),
    .raddr (ps_slice_addr),
    .rdata (ps_slice_rdata)
  );

  // every slice comes from a valid helix model, and a finished run has read
  // all twenty of them
  a_rot_range: assert property (@(posedge clk) disable iff (rst)
    slice_en |-> (surf_rot < 5'(N_ROT)));
  a_done_after_helix: assert property (@(posedge clk) disable iff (rst)
    done |-> helix_done);

endmodule
