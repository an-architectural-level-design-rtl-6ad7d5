// tb_face_detect_full: one complete 240x320 frame through the detector at
// its default configuration (2 PEs with 10 extra multipliers, step 4, 93
// masks of 65x81: 14 stripes of 47 passes), compared with the reference
// detection. Also reports the cycles the frame took.
module tb_face_detect_full
  import fd_pkg::*;
;
  logic clk = 0;
  always #4 clk = ~clk;   // 125 MHz

  logic rst_n, pix_valid, pix_ready, mem_req_valid, mem_req_ready, mem_rsp_valid, busy, det_valid;
  pix_t pix_data;
  addr_t mask_base, mem_req_addr;
  logic [7:0] mem_rsp_data;
  detect_t det;
  int checks, failures, in_stalls, frame_cycles;
  int unsigned mem_stalls;
  bit done;

  face_detect_top dut (.*);

  fd_checker #(.FRAMES(1)) chk (.*);

  initial begin
    repeat (40000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    repeat (10) @(posedge clk);
    $display("frame time %0d cycles = %0d us at 125 MHz", frame_cycles, frame_cycles / 125);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
