// tb_mask_transfer_ctrl: 3 PEs, 7 masks of 3x4 coefficients (3 passes, the
// last one with masks for PE 0 only), read from the external memory model
// with random back-pressure and a 5-cycle latency. Checks the fixed
// transfer order (pass by pass, PE 0, 1, 2, one mask at a time), every
// request address, every coefficient written and where, the mask_ready /
// mask_present pulses, the outstanding-request limit and the minimum time
// of one mask (one coefficient per cycle).
module tb_mask_transfer_ctrl
  import fd_pkg::*;
  import tb_fd_util_pkg::*;
;
  localparam int N_PE = 3, N_MASKS = 7, MH = 3, MW = 4, MAX_OUT = 4;
  localparam int SZ = MH * MW;
  localparam int M = (N_MASKS + N_PE - 1) / N_PE;
  localparam logic [31:0] BASE = 32'h0000_1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t mask_base = BASE;
  logic pass_start = 0, busy;
  logic [15:0] pass_idx = 0;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  addr_t mem_req_addr;
  logic [7:0] mem_rsp_data;
  logic [N_PE-1:0] mwr_en, mask_ready, mask_present;
  logic [1:0] mwr_row;
  logic [1:0] mwr_col;
  coef_t mwr_data;
  int unsigned stalls;

  mask_transfer_ctrl #(.N_PE(N_PE), .N_MASKS(N_MASKS), .MASK_H(MH), .MASK_W(MW),
                       .MAX_OUT(MAX_OUT)) dut (.*);
  ext_mem_model #(.LAT(5), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr), .req_ready(mem_req_ready),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data), .stalls);

  int cur_pass = 0, exp_pe = 0, nreq = 0, nwr = 0, outst = 0, cyc = 0, t_first = 0;
  int readies = 0, absent = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      automatic int idx = cur_pass * N_PE + exp_pe;
      if (mem_req_valid && mem_req_ready) begin
        checks++;
        if (mem_req_addr !== BASE + 32'(idx * SZ + nreq)) begin
          failures++;
          $display("FAIL request address %h, expected %h", mem_req_addr, BASE + 32'(idx * SZ + nreq));
        end
        if (nreq == 0) t_first = cyc;
        nreq++;
      end
      outst = outst + int'(mem_req_valid && mem_req_ready) - int'(mem_rsp_valid);
      if (outst > MAX_OUT) begin
        failures++;
        $display("FAIL %0d requests outstanding", outst);
      end
      if (|mwr_en) begin
        checks++;
        if (mwr_en != (N_PE)'(1 << exp_pe) || int'(mwr_row) != nwr / MW || int'(mwr_col) != nwr % MW
            || mwr_data !== coef_t'(mem_byte(BASE + 32'(idx * SZ + nwr)))) begin
          failures++;
          $display("FAIL write en %b row %0d col %0d data %h (pass %0d PE %0d k %0d)",
                   mwr_en, mwr_row, mwr_col, mwr_data, cur_pass, exp_pe, nwr);
        end
        nwr++;
      end
      if (|mask_ready) begin
        checks++;
        if (mask_ready != (N_PE)'(1 << exp_pe) || mask_present[exp_pe] != (idx < N_MASKS)
            || (idx < N_MASKS && (nwr != SZ || nreq != SZ || cyc - t_first < SZ))
            || (idx >= N_MASKS && nwr != 0)) begin
          failures++;
          $display("FAIL mask_ready %b present %b for pass %0d PE %0d after %0d writes",
                   mask_ready, mask_present, cur_pass, exp_pe, nwr);
        end
        if (idx >= N_MASKS) absent++;
        readies++;
        nwr = 0; nreq = 0;
        exp_pe = (exp_pe + 1) % N_PE;
      end
    end
  end

  task automatic run_pass(int p);
    @(negedge clk);
    cur_pass = p; exp_pe = 0;
    pass_idx = 16'(p); pass_start = 1;
    @(negedge clk);
    pass_start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after pass_start"); end
    wait (!busy);
    repeat ($urandom_range(5)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < M; p++) run_pass(p);
    repeat (10) @(posedge clk);
    checks++;
    if (readies != 2 * M * N_PE || absent != 2 * (M * N_PE - N_MASKS) || stalls == 0) begin
      failures++;
      $display("FAIL readies %0d absent %0d stalls %0d", readies, absent, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
