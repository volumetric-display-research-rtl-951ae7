// vd_ref_pkg: reference models for the volumetric-display testbenches.
//
// Written independently of the RTL: the helicoid is evaluated with real
// trigonometry instead of the RTL's integer sine table, and the slice is
// formed voxel by voxel with explicit x, y, z loops. Voxel (x, y, z) of a
// 20x20x20 model is bit x + 20*y + 400*z.
package vd_ref_pkg;

  localparam int G = 20;

  // helix model `rot`: blade through the axis at angle 9*(rot + 2z) degrees,
  // voxel centre within half a voxel of it and within radius G/2 of the axis
  function automatic bit ref_helix_voxel(int rot, int x, int y, int z);
    real th, dx, dy, d;
    dx = 2.0 * x - (G - 1);
    dy = 2.0 * y - (G - 1);
    th = 3.14159265358979 * 9.0 * (rot + 2 * z) / 180.0;
    d  = dx * $sin(th) - dy * $cos(th);
    if (d < 0.0) d = -d;
    return (d <= 1.001) && (dx * dx + dy * dy <= G * G);
  endfunction

  function automatic logic [7999:0] ref_helix_model(int rot);
    logic [7999:0] m;
    for (int z = 0; z < G; z++)
      for (int y = 0; y < G; y++)
        for (int x = 0; x < G; x++)
          m[x + G * y + G * G * z] = ref_helix_voxel(rot, x, y, z);
    return m;
  endfunction

  function automatic logic [399:0] ref_slice(logic [7999:0] obj, logic [7999:0] surf);
    logic [399:0] s;
    s = '0;
    for (int y = 0; y < G; y++)
      for (int x = 0; x < G; x++)
        for (int z = 0; z < G; z++)
          if (obj[x + G * y + G * G * z] && surf[x + G * y + G * G * z]) s[x + G * y] = 1'b1;
    return s;
  endfunction

  // word w (0..12) of a slice as stored in the slice memory
  function automatic logic [31:0] ref_slice_word(logic [399:0] s, int w);
    logic [31:0] r;
    for (int b = 0; b < 32; b++) begin
      int idx;
      idx = 399 - 32 * w - (31 - b);
      r[b] = (idx >= 0) ? s[idx] : 1'b0;
    end
    return r;
  endfunction

  // a random object: a ball of random centre and radius plus noise
  function automatic logic [7999:0] rand_object(int seed_sel);
    logic [7999:0] m;
    int cx, cy, cz, r2;
    cx = 5 + int'($urandom_range(9));
    cy = 5 + int'($urandom_range(9));
    cz = 5 + int'($urandom_range(9));
    r2 = 9 + int'($urandom_range(40));
    for (int z = 0; z < G; z++)
      for (int y = 0; y < G; y++)
        for (int x = 0; x < G; x++)
          m[x + G * y + G * G * z] = ((x - cx) * (x - cx) + (y - cy) * (y - cy) + (z - cz) * (z - cz) <= r2)
                                     || (seed_sel != 0 && $urandom_range(99) < 3);
    return m;
  endfunction

endpackage
