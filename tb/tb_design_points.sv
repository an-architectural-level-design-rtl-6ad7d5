// tb_design_points: the fourteen (PEs, extra multipliers, step) design
// points of the architecture study, each on its own detector instance:
// n = 6 with no extra multiplier, and n = 1..6 with 20, 10, 6, 5, 4, 3
// extra multipliers, each at step 2 and step 4. To keep the run short the
// image and masks are scaled down (40x64 frames, 13 masks of 9x21); every
// detection is checked against the reference model, and the frame time of
// each point is printed. Step 4 must be faster than step 2 for every n.
module tb_design_points
  import fd_pkg::*;
;
  localparam int NPT = 7;
  localparam int PE_N [NPT] = '{6, 1, 2, 3, 4, 5, 6};
  localparam int DOP_N[NPT] = '{0, 20, 10, 6, 5, 4, 3};
  localparam int IMG_H = 40, IMG_W = 64, N_MASKS = 13, MASK_H = 9, MASK_W = 21, FRAMES = 2;

  logic clk = 0;
  always #4 clk = ~clk;

  int  chk_n  [2*NPT];
  int  fail_n [2*NPT];
  int  cyc_n  [2*NPT];
  bit  done_n [2*NPT];

  for (genvar p = 0; p < NPT; p++) begin : g_pt
    for (genvar s = 0; s < 2; s++) begin : g_step
      localparam int STEP = 2 + 2 * s;
      logic rst_n, pix_valid, pix_ready, mem_req_valid, mem_req_ready, mem_rsp_valid, busy, det_valid;
      pix_t pix_data;
      addr_t mask_base, mem_req_addr;
      logic [7:0] mem_rsp_data;
      detect_t det;
      int checks, failures, in_stalls, frame_cycles;
      int unsigned mem_stalls;
      bit done;

      face_detect_top #(.IMG_H(IMG_H), .IMG_W(IMG_W), .DS(2), .N_PE(PE_N[p]), .DOP(DOP_N[p]),
                        .STEP(STEP), .N_MASKS(N_MASKS), .MASK_H(MASK_H), .MASK_W(MASK_W)) dut (.*);
      fd_checker #(.IMG_H(IMG_H), .IMG_W(IMG_W), .DS(2), .STEP(STEP), .N_MASKS(N_MASKS),
                   .MASK_H(MASK_H), .MASK_W(MASK_W), .FRAMES(FRAMES), .VALID_PCT(95)) chk (.*);

      always_comb begin
        chk_n[2*p+s]  = checks;
        fail_n[2*p+s] = failures;
        cyc_n[2*p+s]  = frame_cycles;
        done_n[2*p+s] = done;
      end
    end
  end

  function automatic int total(bit fails);
    int t = 0;
    for (int i = 0; i < 2 * NPT; i++) t += fails ? fail_n[i] : chk_n[i];
    return t;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(0), total(1) + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < 2 * NPT; i++) all_done &= done_n[i];
    end while (!all_done);
    repeat (5) @(posedge clk);
    checks = total(0); failures = total(1);
    $display("  n  extra  cycles/frame step 2  step 4");
    for (int p = 0; p < NPT; p++) begin
      $display("%3d  %5d  %19d  %6d", PE_N[p], DOP_N[p], cyc_n[2*p], cyc_n[2*p+1]);
      checks++;
      if (!(cyc_n[2*p+1] < cyc_n[2*p] && cyc_n[2*p+1] > 0)) begin
        failures++;
        $display("FAIL step 4 not faster than step 2 for n=%0d", PE_N[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
