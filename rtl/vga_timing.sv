// vga_timing: 640x480, 60 Hz VGA timing generator for the slice display.
//
// Counts pixels (hcnt, 0..799) and lines (vcnt, 0..524) on every clock with
// pix_ce high, so with a 100 MHz clock and pix_ce every fourth clock the
// pixel rate is 25 MHz. A line is 640 visible pixels, 16 front porch, 96
// sync and 48 back porch; a frame is 480 visible lines, 10 front porch, 2
// sync and 33 back porch. hs and vs are active low (low during the sync
// interval); blank is high outside the 640x480 visible area. All outputs are
// registered together and change only on pix_ce clocks.
// The source says only that the slice was shown on a VGA display; the
// 640x480 standard timing, the port set and the clock enable in place of a
// separate 25 MHz clock are this design's choices.
module vga_timing #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pix_ce,
  output logic [9:0] hcnt,
  output logic [9:0] vcnt,
  output logic       blank,
  output logic       hs,
  output logic       vs
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  logic [9:0] h_next, v_next;

  always_comb begin
    h_next = hcnt + 1'b1;
    v_next = vcnt;
    if (hcnt == 10'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcnt == 10'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt  <= '0;
      vcnt  <= '0;
      blank <= 1'b0;
      hs    <= 1'b1;
      vs    <= 1'b1;
    end else if (pix_ce) begin
      hcnt  <= h_next;
      vcnt  <= v_next;
      blank <= (h_next >= 10'(H_VISIBLE)) || (v_next >= 10'(V_VISIBLE));
      hs    <= !((h_next >= 10'(H_VISIBLE + H_FRONT)) && (h_next < 10'(H_VISIBLE + H_FRONT + H_SYNC)));
      vs    <= !((v_next >= 10'(V_VISIBLE + V_FRONT)) && (v_next < 10'(V_VISIBLE + V_FRONT + V_SYNC)));
    end
  end

endmodule
