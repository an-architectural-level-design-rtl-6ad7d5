// downsampler: the Downsampled Image Source of the detector.
//
// Takes the camera frame as a raster-order pixel stream (IMG_H rows of
// IMG_W pixels, valid/ready handshake) and emits the image downsampled by
// DS in both directions, again in raster order. Downsampling keeps the top-left pixel
// of every DS x DS block (decimation); pixels that are dropped are accepted
// without waiting for the output.
//
// Timing: combinational from input to output, no latency. in_ready is low
// only while a kept pixel waits for out_ready.
//
// The frame size (240 x 320) and the factor (2, which turns the frame into
// the 160-column stripes the detector works on) follow the document; the
// decimation filter is this design's own choice.
module downsampler
  import fd_pkg::*;
#(
  parameter int unsigned IMG_H = 240,
  parameter int unsigned IMG_W = 320,
  parameter int unsigned DS    = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix
);
  localparam int unsigned OUT_H = IMG_H / DS;
  localparam int unsigned OUT_W = IMG_W / DS;

  logic [$clog2(IMG_H)-1:0] y;
  logic [$clog2(IMG_W)-1:0] x;
  logic keep, fire;

  always_comb begin
    // Keep the top-left pixel of every block inside the OUT_H x OUT_W area.
    keep = (32'(y) % DS == 0) && (32'(x) % DS == 0)
        && (32'(y) / DS < OUT_H) && (32'(x) / DS < OUT_W);
    out_valid      = in_valid && keep;
    out_pix        = in_pix;
    in_ready       = keep ? out_ready : 1'b1;
    fire           = in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (fire) begin
      if (32'(x) == IMG_W - 1) begin
        x <= '0;
        y <= (32'(y) == IMG_H - 1) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

endmodule
