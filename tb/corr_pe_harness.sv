// corr_pe_harness: drives one corr_pe through TRIALS passes and checks it.
// Each trial writes a random stripe into the PE's circular stripe RAM at a
// random base row, writes a random mask, starts the PE and compares the best
// correlation and its column with a reference computed here, and the pass
// time with NPOS * MASK_H * ceil(MASK_W / (DOP + 1)) + 3 cycles. One trial
// uses extreme values (pixels 255, coefficients -128 and 127), one starts
// the PE without a mask.
module corr_pe_harness
  import fd_pkg::*;
#(
  parameter int MASK_H = 3, MASK_W = 5, STRIPE_H = 4, STRIPE_W = 11,
  parameter int DOP = 2, STEP = 2, TRIALS = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int LANES = DOP + 1;
  localparam int NQ    = (MASK_W + LANES - 1) / LANES;
  localparam int NPOS  = (STRIPE_W - MASK_W) / STEP + 1;
  localparam int T_PASS = NPOS * MASK_H * NQ + 3;

  logic rst_n = 0;
  logic s_we = 0, m_we = 0, start = 0, has_mask = 0;
  logic [$clog2(STRIPE_H)-1:0] s_row = 0, stripe_base = 0;
  logic [$clog2(STRIPE_W)-1:0] s_col = 0;
  logic [$clog2(MASK_H)-1:0]   m_row = 0;
  logic [$clog2(MASK_W)-1:0]   m_col = 0;
  pix_t  s_data = 0;
  coef_t m_data = 0;
  logic  busy, done, res_valid;
  corr_t res_value;
  logic [15:0] res_col;

  corr_pe #(.MASK_H(MASK_H), .MASK_W(MASK_W), .STRIPE_H(STRIPE_H), .STRIPE_W(STRIPE_W),
            .DOP(DOP), .STEP(STEP)) dut (.*);

  pix_t  img  [MASK_H][STRIPE_W];  // stripe row r as seen by the PE
  coef_t mask [MASK_H][MASK_W];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL corr_pe %0dx%0d DOP %0d: %s", MASK_H, MASK_W, DOP, what);
    end
  endtask

  task automatic one_pass(int trial, bit with_mask);
    int base, cycles;
    corr_t best, v;
    int best_col;
    base = $urandom_range(STRIPE_H - 1);
    // Stripe: the PE's row r lives in RAM row (base + r) mod STRIPE_H.
    for (int r = 0; r < STRIPE_H; r++)
      for (int c = 0; c < STRIPE_W; c++) begin
        pix_t p;
        p = (trial == 1) ? 8'hff : 8'($urandom);
        if (r < MASK_H) img[r][c] = p;
        @(negedge clk);
        s_we = 1; s_row = $bits(s_row)'((base + r) % STRIPE_H); s_col = $bits(s_col)'(c); s_data = p;
      end
    for (int r = 0; r < MASK_H; r++)
      for (int c = 0; c < MASK_W; c++) begin
        coef_t k;
        k = (trial == 1) ? ((c % 2 == 0) ? 8'sh80 : 8'sh7f) : coef_t'($urandom);
        mask[r][c] = k;
        @(negedge clk);
        s_we = 0; m_we = 1; m_row = $bits(m_row)'(r); m_col = $bits(m_col)'(c); m_data = k;
      end
    @(negedge clk);
    s_we = 0; m_we = 0;
    stripe_base = $bits(stripe_base)'(base);
    start = 1; has_mask = with_mask;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    if (!with_mask) begin
      check(!res_valid && cycles == 1, "pass without a mask");
      return;
    end
    // Reference: the first largest window.
    best = 0; best_col = 0;
    for (int p = 0; p < NPOS; p++) begin
      v = 0;
      for (int r = 0; r < MASK_H; r++)
        for (int k = 0; k < MASK_W; k++)
          v += corr_t'($signed({1'b0, img[r][p * STEP + k]}) * mask[r][k]);
      if (p == 0 || v > best) begin best = v; best_col = p * STEP; end
    end
    check(res_valid && res_value == best && int'(res_col) == best_col,
          $sformatf("trial %0d value %0d col %0d, expected %0d col %0d",
                    trial, res_value, res_col, best, best_col));
    check(cycles == T_PASS, $sformatf("pass took %0d cycles, expected %0d", cycles, T_PASS));
    check(!busy, "busy after done");
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < TRIALS; t++) one_pass(t, t != 2);
    finished = 1;
  end
endmodule
