// encoder_sync: projection trigger from the rotary encoder of the helix.
//
// The encoder wheel has two optical tracks read by phototransistors whose
// outputs are active low: home_n goes low at each of the two home positions
// (the helix is symmetric under a half turn) and encoder_n goes low at each
// of the forty frame positions. The module has two states. In STANDBY,
// entered at reset and whenever en is low, the output pulse is held low. When
// the home input is seen low while en is high, the module enters ACTIVE and
// from then on drives pulse with the inverse of the encoder input, so every
// frame position produces one active-high pulse and the projector, triggered
// on its rising edge, advances one frame. Both inputs come from the wheel,
// asynchronous to clk, and pass through a two-flop synchroniser first, so
// pulse follows the encoder input with a delay of three clocks (two
// synchroniser stages and the output register).
// The two states, the active-low inputs, home detection and the inverted
// pass-through of the encoder track follow the design description; the
// enable input is taken from the programmable-logic block diagram; the
// synchroniser and the registered output are this design's choices.
module encoder_sync (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic home_n,
  input  logic encoder_n,
  output logic pulse,
  output logic active
);

  typedef enum logic {STANDBY, ACTIVE} state_t;

  state_t     state;
  logic [1:0] home_sync;
  logic [1:0] enc_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      home_sync <= 2'b11;
      enc_sync  <= 2'b11;
      state     <= STANDBY;
      pulse     <= 1'b0;
    end else begin
      home_sync <= {home_sync[0], home_n};
      enc_sync  <= {enc_sync[0], encoder_n};
      if (!en)                          state <= STANDBY;
      else if (state == STANDBY && !home_sync[1]) state <= ACTIVE;
      pulse <= (state == ACTIVE) && en && !enc_sync[1];
    end
  end

  assign active = (state == ACTIVE);

endmodule
