// helix_read: sequential reader of the twenty preloaded helix models.
//
// The module holds N_ROT helix_bram memories, one per helix rotation, and a
// multiplexer that selects the output of memory `sel`. When started it walks
// every address of memory 0, then of memory 1, and so on, one address per
// clock, so exactly one memory is read at a time. Each returned 50-bit word
// is written into the 8000-bit model register surf at position
// RD_WIDTH*address. In the clock after the last word of a memory has been
// written, surf_valid is high for one clock and surf_rot gives that memory's
// number: surf then holds one complete helix model. The first word of the
// next memory overwrites surf at the end of that same clock, so a consumer
// must capture surf while surf_valid is high. done rises after the last
// model and stays high until the next start.
// Timing: if start is sampled in clock 0, surf_valid for rotation r is high
// in clock RD_DEPTH*(r+1)+2, and done is high from clock N_ROT*RD_DEPTH+3.
// Twenty memories, 160 x 50-bit organisation, the sel multiplexer and the
// surf_count address counter follow the design description; running on the
// system clock rather than a divided clock is this design's choice.
module helix_read
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output model_t           surf,
  output logic             surf_valid,
  output logic [4:0]       surf_rot,
  output logic             done
);

  logic             busy;
  logic [4:0]       sel;
  logic [RD_AW-1:0] surf_count;
  logic             rd_valid;
  logic [4:0]       rd_sel;
  logic [RD_AW-1:0] rd_addr;
  rd_word_t         dout [N_ROT];
  rd_word_t         doutb;

  for (genvar r = 0; r < int'(N_ROT); r++) begin : g_mem
    helix_bram #(.ROT(r)) u_mem (
      .clk  (clk),
      .en   (busy && (sel == 5'(r))),
      .addr (surf_count),
      .dout (dout[r])
    );
  end

  // output multiplexer: the memory that was read last clock
  always_comb begin
    doutb = '0;
    for (int r = 0; r < int'(N_ROT); r++)
      if (rd_sel == 5'(r)) doutb = dout[r];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      sel        <= '0;
      surf_count <= '0;
      rd_valid   <= 1'b0;
      rd_sel     <= '0;
      rd_addr    <= '0;
      surf       <= '0;
      surf_valid <= 1'b0;
      surf_rot   <= '0;
      done       <= 1'b0;
    end else begin
      rd_valid   <= busy;
      rd_sel     <= sel;
      rd_addr    <= surf_count;
      surf_valid <= 1'b0;
      if (start) begin
        busy       <= 1'b1;
        sel        <= '0;
        surf_count <= '0;
        done       <= 1'b0;
      end else if (busy) begin
        if (surf_count == RD_AW'(RD_DEPTH - 1)) begin
          surf_count <= '0;
          if (sel == 5'(N_ROT - 1)) busy <= 1'b0;
          else sel <= sel + 1'b1;
        end else begin
          surf_count <= surf_count + 1'b1;
        end
      end
      if (rd_valid) begin
        surf[int'(rd_addr) * RD_WIDTH +: RD_WIDTH] <= doutb;
        if (rd_addr == RD_AW'(RD_DEPTH - 1)) begin
          surf_valid <= 1'b1;
          surf_rot   <= rd_sel;
        end
      end
      if (surf_valid && surf_rot == 5'(N_ROT - 1)) done <= 1'b1;
    end
  end

endmodule
