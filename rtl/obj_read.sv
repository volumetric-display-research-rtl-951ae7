// obj_read: loads the voxelised object from its block RAM into a register.
//
// On a rising edge of en the module walks addresses 0 .. RD_DEPTH-1 of the
// object memory, one address per clock, and writes each returned 50-bit word
// into obj[RD_WIDTH*a +: RD_WIDTH]. The memory answers one clock after the
// address, so the last word lands RD_DEPTH+1 clocks after the start. In the
// clock after that, helix_en rises and stays high until the next start or
// reset, telling the controller that the full 8000-bit object is held in obj.
// Interface: the memory read port (mem_en, mem_addr, mem_dout) and the
// parallel model output obj. Reset is synchronous and active high.
// Start on en, the 160 x 50-bit memory layout and the helix_en output follow
// the design description; start on the rising edge of a level en and the
// exact cycle timing are this design's choices.
module obj_read
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic             mem_en,
  output logic [RD_AW-1:0] mem_addr,
  input  rd_word_t         mem_dout,
  output model_t           obj,
  output logic             helix_en
);

  logic             en_q;
  logic             busy;
  logic             rd_valid;
  logic [RD_AW-1:0] rd_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q     <= 1'b0;
      busy     <= 1'b0;
      mem_addr <= '0;
      rd_valid <= 1'b0;
      rd_addr  <= '0;
      obj      <= '0;
      helix_en <= 1'b0;
    end else begin
      en_q     <= en;
      rd_valid <= mem_en;
      rd_addr  <= mem_addr;
      if (en && !en_q) begin
        busy     <= 1'b1;
        mem_addr <= '0;
        helix_en <= 1'b0;
      end else if (busy) begin
        if (mem_addr == RD_AW'(RD_DEPTH - 1)) busy <= 1'b0;
        else mem_addr <= mem_addr + 1'b1;
      end
      if (rd_valid) begin
        obj[int'(rd_addr) * RD_WIDTH +: RD_WIDTH] <= mem_dout;
        if (rd_addr == RD_AW'(RD_DEPTH - 1)) helix_en <= 1'b1;
      end
    end
  end

  assign mem_en = busy;

endmodule
