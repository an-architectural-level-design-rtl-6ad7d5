// fd_pkg: shared sizes and types of the face detection datapath.
//
// The default numbers describe the main configuration: a 240x320 8-bit
// grey-scale frame, downsampled by 2 to 120x160, processed in stripes of
// 65 rows x 160 columns against a set of 93 elliptical masks of 65x81
// coefficients. Pixel and coefficient widths (8 bits, coefficients signed)
// and the 32-bit correlation accumulator are this design's own choices.
package fd_pkg;

  localparam int unsigned PIX_W   = 8;   // image pixel, unsigned
  localparam int unsigned COEF_W  = 8;   // mask coefficient, two's complement
  localparam int unsigned CORR_W  = 32;  // correlation sum, two's complement
  localparam int unsigned ADDR_W  = 32;  // external memory byte address

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [CORR_W-1:0] corr_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  // Detection result of one frame (or of one PE pass, with row unused).
  typedef struct packed {
    corr_t       value;  // largest correlation found
    logic [15:0] row;    // top row of the stripe (downsampled image rows)
    logic [15:0] col;    // left column of the mask window in the stripe
    logic [15:0] mask;   // mask number, 0 .. N_MASKS-1
  } detect_t;

  // Number of passes m = ceil(N / n) needed to apply N masks with n PEs.
  function automatic int unsigned num_passes(int unsigned n_masks, int unsigned n_pe);
    return (n_masks + n_pe - 1) / n_pe;
  endfunction

endpackage
