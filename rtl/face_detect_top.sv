// face_detect_top: hardware part of a shape-based embedded face detector.
//
// A face is searched as an ellipse: a bank of N_MASKS elliptical edge masks
// of different sizes (precomputed and stored in external memory) is
// correlated with the downsampled camera image, and the position and mask
// of the largest correlation locate the face. The frame (IMG_H x IMG_W) is
// downsampled by DS and processed in stripes of MASK_H rows: N_PE
// processing elements each apply one mask to their own copy of the stripe,
// so the mask set takes M = ceil(N_MASKS / N_PE) passes per stripe.
//
//   pixel stream -> downsampler -> row_transfer_ctrl --rows--> PE stripe RAMs
//   external memory -> mask_transfer_ctrl --one mask per PE--> PE mask RAMs
//   corr_pe[0..N_PE-1] --done--> pe_synch --next pass--> mask_transfer_ctrl
//                      --best--> max_tracker -> det
//
// Control is a mix of self-timed and ordered operation: mask transfers
// follow a fixed order (PE 0, 1, .. of pass 0, then of pass 1, ...), each
// PE starts as soon as its own mask is loaded, and pe_synch waits for all
// PEs before the next pass may overwrite their masks. The masks of pass 0
// are pre-loaded while the rows of the next stripe arrive. After M passes the
// stripe slides down by STEP rows. det_valid pulses once per frame with the
// best correlation, its stripe row, column and mask number.
//
// Ports: pix_* is the raster-order frame input (valid/ready); mem_* reads
// one mask byte per request with in-order responses; mask_base is the byte
// address of mask 0; busy is high while masks are
// transferred, a PE computes or a stripe is being processed. All parameters default to the main configuration of
// the design: 2 PEs with 10 extra multipliers each, window step 4.
module face_detect_top
  import fd_pkg::*;
#(
  parameter int unsigned IMG_H   = 240,
  parameter int unsigned IMG_W   = 320,
  parameter int unsigned DS      = 2,
  parameter int unsigned N_PE    = 2,
  parameter int unsigned DOP     = 10,
  parameter int unsigned STEP    = 4,
  parameter int unsigned N_MASKS = 93,
  parameter int unsigned MASK_H  = 65,
  parameter int unsigned MASK_W  = 81,
  parameter int unsigned MAX_OUT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // camera frame
  input  logic        pix_valid,
  output logic        pix_ready,
  input  pix_t        pix_data,
  // external mask memory
  input  addr_t       mask_base,
  output logic        mem_req_valid,
  output addr_t       mem_req_addr,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  logic [7:0]  mem_rsp_data,
  // status and detection result
  output logic        busy,
  output logic        det_valid,
  output detect_t     det
);
  localparam int unsigned STRIPE_H = MASK_H;
  localparam int unsigned STRIPE_W = IMG_W / DS;
  localparam int unsigned DS_H     = IMG_H / DS;

  // Downsampled image source.
  logic ds_valid, ds_ready;
  pix_t ds_pix;

  downsampler #(.IMG_H(IMG_H), .IMG_W(IMG_W), .DS(DS)) u_ds (
    .clk, .rst_n,
    .in_valid(pix_valid), .in_ready(pix_ready), .in_pix(pix_data),
    .out_valid(ds_valid), .out_ready(ds_ready), .out_pix(ds_pix));

  // Row transfer controller.
  logic [N_PE-1:0]             s_we;
  logic [$clog2(STRIPE_H)-1:0] s_row, stripe_base;
  logic [$clog2(STRIPE_W)-1:0] s_col;
  pix_t                        s_data;
  logic                        stripe_start, stripe_done, frame_done;
  logic [15:0]                 stripe_top;

  row_transfer_ctrl #(.N_PE(N_PE), .STRIPE_H(STRIPE_H), .STRIPE_W(STRIPE_W),
                      .DS_H(DS_H), .STEP(STEP)) u_rtc (
    .clk, .rst_n,
    .in_valid(ds_valid), .in_ready(ds_ready), .in_pix(ds_pix),
    .wr_en(s_we), .wr_row(s_row), .wr_col(s_col), .wr_data(s_data),
    .stripe_start, .stripe_top, .stripe_base, .stripe_done, .frame_done);

  // Mask transfer controller and PE synchronisation.
  logic [N_PE-1:0]           m_we, mask_ready, mask_present;
  logic [N_PE-1:0]           pe_done, pe_start, pe_has_mask;
  logic                      pass_start, sync, stripe_active;
  logic [15:0]               pass_idx, sync_pass;

  pe_synch #(.N_PE(N_PE), .N_MASKS(N_MASKS)) u_sync (
    .clk, .rst_n, .stripe_start, .stripe_done, .mask_ready, .mask_present,
    .pe_start, .pe_has_mask, .pe_done,
    .pass_start, .pass_idx, .sync, .sync_pass, .active(stripe_active));

  logic [$clog2(MASK_H)-1:0] m_row;
  logic [$clog2(MASK_W)-1:0] m_col;
  coef_t                     m_data;
  logic                      mtc_busy;

  mask_transfer_ctrl #(.N_PE(N_PE), .N_MASKS(N_MASKS), .MASK_H(MASK_H),
                       .MASK_W(MASK_W), .MAX_OUT(MAX_OUT)) u_mtc (
    .clk, .rst_n, .mask_base, .pass_start, .pass_idx, .busy(mtc_busy),
    .mem_req_valid, .mem_req_addr, .mem_req_ready, .mem_rsp_valid, .mem_rsp_data,
    .mwr_en(m_we), .mwr_row(m_row), .mwr_col(m_col), .mwr_data(m_data),
    .mask_ready, .mask_present);

  // Processing elements.
  logic [N_PE-1:0]       pe_busy, res_valid;
  corr_t [N_PE-1:0]      res_value;
  logic [N_PE-1:0][15:0] res_col;

  for (genvar j = 0; j < N_PE; j++) begin : g_pe
    corr_pe #(.MASK_H(MASK_H), .MASK_W(MASK_W), .STRIPE_H(STRIPE_H),
              .STRIPE_W(STRIPE_W), .DOP(DOP), .STEP(STEP)) u_pe (
      .clk, .rst_n,
      .s_we(s_we[j]), .s_row, .s_col, .s_data,
      .m_we(m_we[j]), .m_row, .m_col, .m_data,
      .start(pe_start[j]), .has_mask(pe_has_mask[j]), .stripe_base,
      .busy(pe_busy[j]), .done(pe_done[j]),
      .res_valid(res_valid[j]), .res_value(res_value[j]), .res_col(res_col[j]));
  end

  assign busy = mtc_busy || (|pe_busy) || stripe_active;

  // Frame maximum.
  max_tracker #(.N_PE(N_PE)) u_max (
    .clk, .rst_n, .sync, .sync_pass, .stripe_top, .res_valid, .res_value, .res_col,
    .frame_done, .det_valid, .det);

endmodule
