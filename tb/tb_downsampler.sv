// tb_downsampler: streams two 6x8 frames through the downsampler (DS = 2)
// with random input gaps and random output back-pressure and checks that
// exactly the pixels (2i, 2j) come out, in raster order.
module tb_downsampler
  import fd_pkg::*;
  import tb_fd_util_pkg::*;
;
  localparam int H = 6, W = 8, DS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  pix_t in_pix, out_pix;
  int   in_cnt = 0, out_cnt = 0, stalls = 0, dropped = 0;

  downsampler #(.IMG_H(H), .IMG_W(W), .DS(DS)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source: pixel k of the stream is frame_pix(frame, y, x).
  always_comb begin
    automatic int f = in_cnt / (H * W);
    automatic int k = in_cnt % (H * W);
    in_pix = frame_pix(f, k / W, k % W);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid  <= 0;
      out_ready <= 0;
    end else begin
      if (!in_valid || in_ready) in_valid <= ($urandom_range(3) != 0) && (in_cnt < 2 * H * W - 1 || !in_valid) && (in_cnt < 2 * H * W);
      out_ready <= ($urandom_range(2) != 0);
      if (in_valid && in_ready) begin
        in_cnt <= in_cnt + 1;
        if (!out_valid) dropped <= dropped + 1;
      end
      if (in_valid && !in_ready) stalls <= stalls + 1;
      if (out_valid && out_ready) begin
        automatic int f = out_cnt / ((H / DS) * (W / DS));
        automatic int k = out_cnt % ((H / DS) * (W / DS));
        automatic logic [7:0] exp = frame_pix(f, (k / (W / DS)) * DS, (k % (W / DS)) * DS);
        checks++;
        if (out_pix !== exp) begin
          failures++;
          $display("FAIL out %0d: got %h exp %h", out_cnt, out_pix, exp);
        end
        out_cnt <= out_cnt + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (in_cnt == 2 * H * W);
    repeat (5) @(posedge clk);
    checks++;
    if (out_cnt != 2 * (H / DS) * (W / DS)) begin
      failures++;
      $display("FAIL output count %0d", out_cnt);
    end
    checks++;
    if (stalls == 0 || dropped != 2 * (H * W - (H / DS) * (W / DS))) begin
      failures++;
      $display("FAIL stalls %0d dropped %0d", stalls, dropped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
