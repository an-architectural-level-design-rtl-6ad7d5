// tb_corr_pe: checks the correlation PE at a small size (3x5 mask, 4x11
// stripe, 3 multipliers, step 2) and at the full default size (65x81 mask,
// 65x160 stripe, 11 multipliers, step 4: 10403 cycles per pass).
module tb_corr_pe;
  logic clk = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  bit d0, d1;

  corr_pe_harness #(.MASK_H(3), .MASK_W(5), .STRIPE_H(4), .STRIPE_W(11),
                    .DOP(2), .STEP(2), .TRIALS(8)) h_small (
    .clk, .checks(c0), .failures(f0), .finished(d0));
  corr_pe_harness #(.MASK_H(65), .MASK_W(81), .STRIPE_H(65), .STRIPE_W(160),
                    .DOP(10), .STEP(4), .TRIALS(4)) h_full (
    .clk, .checks(c1), .failures(f1), .finished(d1));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
