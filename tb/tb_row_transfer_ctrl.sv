// tb_row_transfer_ctrl: two frames of a 12-row, 6-column downsampled image
// through the row transfer controller with 2 PEs, 5-row stripes and step 2.
// Checks the order of the row copies (PE 0 then PE 1, one pixel per cycle,
// so N_PE * STRIPE_W cycles per row), the content of every PE's circular
// stripe RAM when a stripe starts, stripe_top / stripe_base, that nothing is
// written while a stripe is being processed, the rows below the last stripe
// being dropped, and frame_done after the last stripe.
module tb_row_transfer_ctrl
  import fd_pkg::*;
  import tb_fd_util_pkg::*;
;
  localparam int N_PE = 2, SH = 5, SW = 6, DH = 12, STEP = 2;
  localparam int LAST_TOP = ((DH - SH) / STEP) * STEP;
  localparam int N_STRIPES = LAST_TOP / STEP + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready;
  pix_t in_pix;
  logic [N_PE-1:0] wr_en;
  logic [2:0] wr_row, stripe_base;
  logic [2:0] wr_col;
  pix_t wr_data;
  logic stripe_start, stripe_done, frame_done;
  logic [15:0] stripe_top;

  row_transfer_ctrl #(.N_PE(N_PE), .STRIPE_H(SH), .STRIPE_W(SW), .DS_H(DH), .STEP(STEP)) dut (.*);

  pix_t model [N_PE][SH][SW];
  int in_cnt = 0, wcnt = 0, row_start_cyc = 0, cyc = 0;
  int stripes = 0, frames = 0, exp_top = 0, frame = 0;
  bit active = 0;
  int done_delay = -1;
  int frame_done_seen = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    automatic int f = in_cnt / (DH * SW);
    automatic int k = in_cnt % (DH * SW);
    in_pix = frame_pix(f, k / SW, k % SW);
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      in_valid    <= 0;
      stripe_done <= 0;
    end else begin
      if (in_valid && in_ready) in_cnt <= in_cnt + 1;
      in_valid    <= ($urandom_range(4) != 0) && (in_cnt + (in_valid && in_ready) < 2 * DH * SW);
      stripe_done <= 0;

      // Row copies: pixel wcnt of a row goes to PE (wcnt / SW), column wcnt % SW.
      if (|wr_en) begin
        automatic int ep = (wcnt / SW) % N_PE;
        checks++;
        if (active || wr_en != (N_PE)'(1 << ep) || int'(wr_col) != wcnt % SW) begin
          failures++;
          $display("FAIL write %0d: en %b col %0d active %0d", wcnt, wr_en, wr_col, active);
        end
        for (int j = 0; j < N_PE; j++) if (wr_en[j]) model[j][wr_row][wr_col] = wr_data;
        if (wcnt % (SW * N_PE) == 0) row_start_cyc <= cyc;
        if (wcnt % (SW * N_PE) == SW * N_PE - 1) begin
          checks++;
          if (cyc - row_start_cyc != SW * N_PE - 1) begin
            failures++;
            $display("FAIL row copy took %0d cycles", cyc - row_start_cyc + 1);
          end
        end
        wcnt <= wcnt + 1;
      end

      if (stripe_start) begin
        checks++;
        if (int'(stripe_top) != exp_top || int'(stripe_base) != exp_top % SH || active) begin
          failures++;
          $display("FAIL stripe_start top %0d base %0d exp %0d", stripe_top, stripe_base, exp_top);
        end
        for (int j = 0; j < N_PE; j++)
          for (int r = 0; r < SH; r++)
            for (int c = 0; c < SW; c++) begin
              checks++;
              if (model[j][(exp_top + r) % SH][c] !== frame_pix(frame, exp_top + r, c)) begin
                failures++;
                $display("FAIL stripe %0d PE %0d row %0d col %0d", exp_top, j, r, c);
              end
            end
        active     = 1;
        done_delay = $urandom_range(30);
      end else if (active && done_delay == 0) begin
        stripe_done <= 1;
        active      = 0;
        done_delay  = -1;
        stripes++;
        exp_top     = exp_top + STEP;
        if (exp_top > LAST_TOP) begin
          exp_top = 0;
          frame_done_seen = 3;
        end
      end else if (done_delay > 0) begin
        done_delay--;
      end

      if (frame_done) begin
        checks++;
        if (frame_done_seen != 1) begin
          failures++;
          $display("FAIL frame_done at the wrong time (%0d)", frame_done_seen);
        end
        frames++;
        frame++;
      end
      if (frame_done_seen > 0) frame_done_seen--;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (frames == 2);
    repeat (20) @(posedge clk);
    checks++;
    if (stripes != 2 * N_STRIPES || in_cnt != 2 * DH * SW
        || wcnt != 2 * (LAST_TOP + SH) * SW * N_PE) begin
      failures++;
      $display("FAIL stripes %0d inputs %0d writes %0d", stripes, in_cnt, wcnt);
    end
    $display("rows dropped per frame: %0d", DH - (LAST_TOP + SH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
