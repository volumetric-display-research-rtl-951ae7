// slice_ctrl: sequencing controller of the slice processor.
//
// The processor starts a slicing run by raising en (a general-purpose output
// on the processor side). obj_read sees the same edge and loads the object;
// when it reports the object loaded (helix_en), the controller pulses
// helix_start for one clock, which starts helix_read, and raises write_en,
// which lets slice_write collect slices. While the run is active, every
// helix model that helix_read completes (surf_valid) is passed on as slice_en
// in the same clock, so voxel_slice captures the intersection before surf is
// overwritten. When slice_write reports write_done the run is complete: done
// goes high and stays high, with write_en, until en is lowered, which returns
// the controller to idle. busy is high from the start until done.
// States: IDLE -> WAIT_OBJ -> SLICING -> DONE -> (en low) IDLE.
// The controller's place between obj_read, helix_read, slice and bram_write
// follows the block diagram of the slice processor; its states and the
// level-sensitive en/done handshake are this design's choices.
module slice_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic helix_en,
  input  logic surf_valid,
  input  logic write_done,
  output logic helix_start,
  output logic slice_en,
  output logic write_en,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {IDLE, WAIT_OBJ, SLICING, FINISHED} state_t;

  state_t state;
  logic   en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      en_q        <= 1'b0;
      helix_start <= 1'b0;
    end else begin
      en_q        <= en;
      helix_start <= 1'b0;
      case (state)
        IDLE:     if (en && !en_q) state <= WAIT_OBJ;
        WAIT_OBJ: if (!en) state <= IDLE;
                  else if (helix_en) begin
                    state       <= SLICING;
                    helix_start <= 1'b1;
                  end
        SLICING:  if (!en) state <= IDLE;
                  else if (write_done) state <= FINISHED;
        FINISHED: if (!en) state <= IDLE;
        default:  state <= IDLE;
      endcase
    end
  end

  assign slice_en = (state == SLICING) && surf_valid;
  assign write_en = (state == SLICING) || (state == FINISHED);
  assign busy     = (state == WAIT_OBJ) || (state == SLICING);
  assign done     = (state == FINISHED);

endmodule
