// tb_fd_util_pkg: stimulus functions shared by the face detection
// testbenches. Pixels and mask bytes are pseudo-random but reproducible
// functions of their coordinates / address, so reference models can
// recompute them without storing anything.
package tb_fd_util_pkg;

  function automatic logic [31:0] mix32(logic [31:0] v);
    v = v ^ (v >> 16);
    v = v * 32'h7feb352d;
    v = v ^ (v >> 15);
    v = v * 32'h846ca68b;
    v = v ^ (v >> 16);
    return v;
  endfunction

  // Pixel (y, x) of camera frame f.
  function automatic logic [7:0] frame_pix(int f, int y, int x);
    return mix32(32'(f * 1000003 + y * 4099 + x + 17))[7:0];
  endfunction

  // Byte at address a of the external mask memory (a signed coefficient).
  function automatic logic [7:0] mem_byte(logic [31:0] a);
    return mix32(a ^ 32'h5a5a1234)[15:8];
  endfunction

endpackage
