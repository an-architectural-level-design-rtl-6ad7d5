// tb_max_tracker: 3 PEs, three frames of random pass results (some PEs
// without a result, some equal values), compared with a reference that
// keeps the first largest result in the order stripe, pass, PE.
module tb_max_tracker
  import fd_pkg::*;
;
  localparam int N_PE = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sync = 0, frame_done = 0, det_valid;
  logic [15:0] sync_pass = 0, stripe_top = 0;
  logic [N_PE-1:0] res_valid = 0;
  corr_t [N_PE-1:0] res_value;
  logic [N_PE-1:0][15:0] res_col;
  detect_t det;

  max_tracker #(.N_PE(N_PE)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    detect_t best;
    bit have;
    res_value = '0; res_col = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      have = 0; best = '0;
      for (int s = 0; s < 5; s++) begin
        for (int p = 0; p < 4; p++) begin
          @(negedge clk);
          stripe_top = 16'(s * 4); sync_pass = 16'(p);
          for (int j = 0; j < N_PE; j++) begin
            res_valid[j] = ($urandom_range(5) != 0);
            res_value[j] = corr_t'($urandom_range(40)) - 20 - 40 * (2 - f);
            res_col[j]   = 16'($urandom_range(100));
            if (res_valid[j] && (!have || res_value[j] > best.value)) begin
              have = 1;
              best = '{value: res_value[j], row: stripe_top, col: res_col[j],
                       mask: 16'(p * N_PE + j)};
            end
          end
          sync = 1;
          @(negedge clk);
          sync = 0;
          res_valid = '0;
          res_value = '1;
          repeat ($urandom_range(2)) @(negedge clk);
        end
      end
      frame_done = 1;
      @(negedge clk);
      frame_done = 0;
      checks++;
      if (!det_valid || det != best) begin
        failures++;
        $display("FAIL frame %0d: got %0d (%0d,%0d) mask %0d, expected %0d (%0d,%0d) mask %0d",
                 f, det.value, det.row, det.col, det.mask, best.value, best.row, best.col, best.mask);
      end
      @(negedge clk);
      checks++;
      if (det_valid) begin failures++; $display("FAIL det_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
