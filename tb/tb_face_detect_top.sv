// tb_face_detect_top: end-to-end test of the detector at a reduced size:
// 20x24 frames downsampled to 10x12, 5 masks of 5x7, 2 PEs with 2 extra
// multipliers each, step 2 (3 stripes of 3 passes per frame, the last pass
// with a mask for PE 0 only), three frames. Every detection is compared with
// the reference, and each mechanism of the design is counted and must occur:
// dropped pixels in downsampling, input back-pressure, dropped rows below
// the last stripe, stripe starts, PE synchronisations, a PE idle for lack of
// a mask, a PE computing while the next mask is transferred, memory
// back-pressure, and pass-0 masks arriving before their stripe is ready.
module tb_face_detect_top
  import fd_pkg::*;
;
  localparam int IMG_H = 20, IMG_W = 24, DS = 2, N_PE = 2, DOP = 2, STEP = 2;
  localparam int N_MASKS = 5, MASK_H = 5, MASK_W = 7, FRAMES = 3;
  localparam int M = (N_MASKS + N_PE - 1) / N_PE;
  localparam int STRIPES = ((IMG_H / DS - MASK_H) / STEP) + 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, pix_valid, pix_ready, mem_req_valid, mem_req_ready, mem_rsp_valid, busy, det_valid;
  pix_t pix_data;
  addr_t mask_base, mem_req_addr;
  logic [7:0] mem_rsp_data;
  detect_t det;
  int checks, failures, in_stalls, frame_cycles;
  int unsigned mem_stalls;
  bit done;

  face_detect_top #(.IMG_H(IMG_H), .IMG_W(IMG_W), .DS(DS), .N_PE(N_PE), .DOP(DOP), .STEP(STEP),
                    .N_MASKS(N_MASKS), .MASK_H(MASK_H), .MASK_W(MASK_W), .MAX_OUT(4)) dut (.*);

  fd_checker #(.IMG_H(IMG_H), .IMG_W(IMG_W), .DS(DS), .STEP(STEP), .N_MASKS(N_MASKS),
               .MASK_H(MASK_H), .MASK_W(MASK_W), .FRAMES(FRAMES), .VALID_PCT(80)) chk (.*);

  // Mechanism counters.
  int n_preload = 0, n_ds_drop = 0, n_row_drop = 0, n_stripe = 0, n_sync = 0, n_idle_pe = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ds.in_valid && dut.u_ds.in_ready && !dut.u_ds.keep) n_ds_drop++;
    if (dut.u_rtc.buf_full && !dut.u_rtc.copying && !dut.u_rtc.need_row) n_row_drop++;
    if (dut.stripe_start) n_stripe++;
    if (dut.sync) n_sync++;
    for (int j = 0; j < N_PE; j++) if (dut.mask_ready[j] && !dut.mask_present[j]) n_idle_pe++;
    if (dut.pe_busy[0] && dut.m_we[1]) n_overlap++;
    if (|dut.mask_ready && !dut.stripe_active) n_preload++;
  end

  task automatic need(int n, int expected, string what);
    if (n == 0 || (expected >= 0 && n != expected)) begin
      chk.failures++;
      $display("FAIL mechanism %s: %0d times (expected %0d)", what, n, expected);
    end else $display("mechanism %s: %0d times", what, n);
    chk.checks++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    repeat (10) @(posedge clk);
    need(n_ds_drop, FRAMES * (IMG_H * IMG_W - (IMG_H / DS) * (IMG_W / DS)), "downsampling drop");
    need(in_stalls, -1, "input back-pressure");
    need(n_row_drop, FRAMES * (IMG_H / DS - ((STRIPES - 1) * STEP + MASK_H)), "row below last stripe dropped");
    need(n_stripe, FRAMES * STRIPES, "stripe start");
    need(n_sync, FRAMES * STRIPES * M, "PE synchronisation");
    need(n_idle_pe, FRAMES * STRIPES * (M * N_PE - N_MASKS), "PE without mask");
    need(n_overlap, -1, "PE computing during mask transfer");
    need(int'(mem_stalls), -1, "memory back-pressure");
    need(n_preload, -1, "mask of pass 0 pre-loaded before the stripe");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end
endmodule
