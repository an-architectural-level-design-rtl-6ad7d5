// fd_checker: stimulus and reference model for the whole face detector.
// Streams FRAMES camera frames (tb_fd_util_pkg::frame_pix, with random gaps)
// into the detector, serves its mask reads from the external memory model
// and compares every det result with a reference: the downsampled frame is
// correlated with every mask at every stripe top row (0, STEP, ..) and
// window column (0, STEP, ..), and the first largest value in the order
// (stripe, mask, column) is the expected detection. The parameters must
// match the detector's. done goes high after the last frame's result.
module fd_checker
  import fd_pkg::*;
  import tb_fd_util_pkg::*;
#(
  parameter int IMG_H = 240, IMG_W = 320, DS = 2, STEP = 4,
  parameter int N_MASKS = 93, MASK_H = 65, MASK_W = 81, FRAMES = 1,
  parameter int VALID_PCT = 90
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        pix_valid,
  input  logic        pix_ready,
  output pix_t        pix_data,
  output addr_t       mask_base,
  input  logic        mem_req_valid,
  input  addr_t       mem_req_addr,
  output logic        mem_req_ready,
  output logic        mem_rsp_valid,
  output logic [7:0]  mem_rsp_data,
  input  logic        det_valid,
  input  detect_t     det,
  output int          checks,
  output int          failures,
  output int unsigned mem_stalls,
  output int          in_stalls,
  output int          frame_cycles,
  output bit          done
);
  localparam logic [31:0] BASE = 32'h0010_0000;
  localparam int DH = IMG_H / DS, DW = IMG_W / DS;
  localparam int SZ = MASK_H * MASK_W;
  localparam int LAST_TOP = ((DH - MASK_H) / STEP) * STEP;
  localparam int NPOS = (DW - MASK_W) / STEP + 1;

  assign mask_base = BASE;

  ext_mem_model #(.LAT(6), .STALL_PCT(10)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data), .stalls(mem_stalls));

  coef_t   coef [N_MASKS][MASK_H][MASK_W];
  // Loop bounds held in variables: the loops below run at simulation time.
  int n_masks_v, mask_h_v, mask_w_v, npos_v, last_top_v, dh_v, dw_v;
  pix_t    ds   [DH][DW];
  detect_t ref_det [FRAMES];

  function automatic void compute_ref(int f);
    corr_t v;
    bit have = 0;
    for (int y = 0; y < dh_v; y++)
      for (int x = 0; x < dw_v; x++) ds[y][x] = frame_pix(f, y * DS, x * DS);
    for (int top = 0; top <= last_top_v; top += STEP)
      for (int k = 0; k < n_masks_v; k++)
        for (int p = 0; p < npos_v; p++) begin
          v = 0;
          for (int r = 0; r < mask_h_v; r++)
            for (int c = 0; c < mask_w_v; c++)
              v += corr_t'($signed({1'b0, ds[top + r][p * STEP + c]}) * coef[k][r][c]);
          if (!have || v > ref_det[f].value) begin
            have = 1;
            ref_det[f] = '{value: v, row: 16'(top), col: 16'(p * STEP), mask: 16'(k)};
          end
        end
  endfunction

  int in_cnt = 0, n_det = 0, cyc = 0, t_frame = 0;

  always_comb begin
    automatic int f = in_cnt / (IMG_H * IMG_W);
    automatic int k = in_cnt % (IMG_H * IMG_W);
    pix_data = frame_pix(f, k / IMG_W, k % IMG_W);
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      pix_valid <= 0;
    end else begin
      if (pix_valid && pix_ready) in_cnt <= in_cnt + 1;
      if (pix_valid && !pix_ready) in_stalls <= in_stalls + 1;
      pix_valid <= ($urandom_range(99) < VALID_PCT)
                && (in_cnt + int'(pix_valid && pix_ready) < FRAMES * IMG_H * IMG_W);
      if (det_valid) begin
        checks++;
        if (n_det >= FRAMES || det != ref_det[n_det]) begin
          failures++;
          $display("FAIL frame %0d: got %0d at row %0d col %0d mask %0d, expected %0d at row %0d col %0d mask %0d",
                   n_det, det.value, det.row, det.col, det.mask, ref_det[n_det].value,
                   ref_det[n_det].row, ref_det[n_det].col, ref_det[n_det].mask);
        end else begin
          $display("frame %0d: correlation %0d at stripe row %0d, column %0d, mask %0d after %0d cycles",
                   n_det, det.value, det.row, det.col, det.mask, cyc - t_frame);
        end
        frame_cycles <= cyc - t_frame;
        t_frame <= cyc;
        n_det <= n_det + 1;
        if (n_det + 1 == FRAMES) done <= 1;
      end
    end
  end

  initial begin
    rst_n = 0; checks = 0; failures = 0; in_stalls = 0; done = 0; frame_cycles = 0;
    n_masks_v = N_MASKS; mask_h_v = MASK_H; mask_w_v = MASK_W; npos_v = NPOS;
    last_top_v = LAST_TOP; dh_v = DH; dw_v = DW;
    for (int k = 0; k < n_masks_v; k++)
      for (int r = 0; r < mask_h_v; r++)
        for (int c = 0; c < mask_w_v; c++)
          coef[k][r][c] = coef_t'(mem_byte(BASE + 32'(k * SZ + r * MASK_W + c)));
    for (int f = 0; f < FRAMES; f++) compute_ref(f);
    repeat (4) @(posedge clk);
    rst_n = 1;
  end
endmodule
