// voxel_slice: intersection of the object with one helix position, flattened
// to a two-dimensional slice.
//
// The three-dimensional intersection is the bitwise AND of the object model
// obj and the helix model surf. The slice bit (x, y) is set when the
// intersection has a voxel at (x, y) on any z level, i.e.
//   twoD[i] = OR over z of (obj & surf)[i + N*N*z],  i = 0 .. N*N-1,
// with voxel (x, y, z) at bit x + N*y + N*N*z. All N*N slice bits are computed
// in parallel in one clock: when en is high the result is registered into
// twoD and valid is high in the following clock; twoD holds until the next
// en. N is the grid size (20 in the design; a small grid such as 3 is handy
// for tests).
// The AND-then-OR-over-z computation and the twoD name follow the design
// description; registering the result is this design's choice.
module voxel_slice #(
  parameter int unsigned N = 20
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [N*N*N-1:0]   obj,
  input  logic [N*N*N-1:0]   surf,
  output logic [N*N-1:0]     twoD,
  output logic               valid
);

  logic [N*N*N-1:0] x3d;
  logic [N*N-1:0]   flat;

  assign x3d = obj & surf;

  always_comb begin
    flat = '0;
    for (int z = 0; z < int'(N); z++)
      flat |= x3d[z * N * N +: N * N];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      twoD  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) twoD <= flat;
    end
  end

endmodule
