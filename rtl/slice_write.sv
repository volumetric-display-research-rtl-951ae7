// slice_write: buffers the twenty slices and writes them into the slice BRAM.
//
// While en is high, every clock with in_valid high stores twoD into slice
// buffer register read_count and advances read_count (0 .. N_ROT-1). When all
// N_ROT slices are held, the write phase starts: write_next selects one slice
// buffer at a time and write_count selects one 32-bit word of it, so the
// memory receives WORDS_PER_SLICE (13) words per slice at consecutive
// addresses 0 .. SLICE_WORDS-1 (260 words), one word per clock. Word w of a
// slice holds slice bits [SLICE_BITS-1-32w -: 32]; the last word carries the
// remaining 16 bits in its upper half and zeros below. After the last write
// done goes high and stays high until en is dropped. Dropping en clears the
// counters, so the next rise of en starts a new batch.
// Interface: slice input (in_valid, twoD), memory write port (we, addr, din).
// The slice buffers, read_count, write_next and write_count and the 32-bit
// memory width follow the design description; the word order (most
// significant first, one word per clock) is read from the printed
// simulation trace; the zero padding of the last word is this design's
// choice.
module slice_write
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             in_valid,
  input  slice_t           twoD,
  output logic             we,
  output logic [WR_AW-1:0] addr,
  output wr_word_t         din,
  output logic             done
);

  localparam int unsigned PAD_BITS = WORDS_PER_SLICE * WR_WIDTH - SLICE_BITS;  // 16

  typedef enum logic [1:0] {S_LOAD, S_WRITE, S_DONE} state_t;

  state_t     state;
  slice_t     slice_buf [N_ROT];
  logic [4:0] read_count;
  logic [4:0] write_next;
  logic [3:0] write_count;
  slice_t     curr_slice;
  logic [WORDS_PER_SLICE*WR_WIDTH-1:0] padded;

  // slice multiplexer, then word multiplexer
  assign curr_slice = slice_buf[write_next];
  assign padded     = {curr_slice, {PAD_BITS{1'b0}}};

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state       <= S_LOAD;
      read_count  <= '0;
      write_next  <= '0;
      write_count <= '0;
      we          <= 1'b0;
      addr        <= '0;
      din         <= '0;
      done        <= 1'b0;
    end else begin
      we <= 1'b0;
      case (state)
        S_LOAD: begin
          if (in_valid) begin
            slice_buf[read_count] <= twoD;
            if (read_count == 5'(N_ROT - 1)) state <= S_WRITE;
            else read_count <= read_count + 1'b1;
          end
        end
        S_WRITE: begin
          we   <= 1'b1;
          din  <= padded[(WORDS_PER_SLICE - 1 - int'(write_count)) * WR_WIDTH +: WR_WIDTH];
          addr <= WR_AW'(write_next * WORDS_PER_SLICE + write_count);
          if (write_count == 4'(WORDS_PER_SLICE - 1)) begin
            write_count <= '0;
            if (write_next == 5'(N_ROT - 1)) state <= S_DONE;
            else write_next <= write_next + 1'b1;
          end else begin
            write_count <= write_count + 1'b1;
          end
        end
        S_DONE: done <= 1'b1;
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
