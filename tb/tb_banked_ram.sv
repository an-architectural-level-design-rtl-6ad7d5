// tb_banked_ram: random writes and unaligned multi-lane reads of the
// banked RAM, checked against a plain array, for 4 lanes and for 1 lane.
// Checks the one-cycle read latency as well.
module tb_banked_ram;
  localparam int ROWS = 5, COLS = 13;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       wr_en, rd_en;
  logic [2:0] wr_row, rd_row;
  logic [3:0] wr_col, rd_col;
  logic [7:0] wr_data;
  logic [3:0][7:0] q4;
  logic [0:0][7:0] q1;
  logic [7:0] model [ROWS][COLS];

  banked_ram #(.DW(8), .ROWS(ROWS), .COLS(COLS), .LANES(4)) dut4 (
    .clk, .wr_en, .wr_row, .wr_col, .wr_data, .rd_en, .rd_row, .rd_col, .rd_data(q4));
  banked_ram #(.DW(8), .ROWS(ROWS), .COLS(COLS), .LANES(1)) dut1 (
    .clk, .wr_en, .wr_row, .wr_col, .wr_data, .rd_en, .rd_row, .rd_col, .rd_data(q1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_row = 0; wr_col = 0; wr_data = 0; rd_row = 0; rd_col = 0;
    // Fill every cell, in a scrambled order.
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < ROWS * COLS; i++) begin
        automatic int idx = (i * 7 + pass * 3) % (ROWS * COLS);
        @(negedge clk);
        wr_en = 1; wr_row = 3'(idx / COLS); wr_col = 4'(idx % COLS);
        wr_data = 8'($urandom);
        model[idx / COLS][idx % COLS] = wr_data;
      end
    end
    @(negedge clk); wr_en = 0;
    // Random reads; rewrite a cell now and then in the same cycle.
    for (int t = 0; t < 400; t++) begin
      int rr, cc;
      rr = $urandom_range(ROWS - 1); cc = $urandom_range(COLS - 1);
      @(negedge clk);
      rd_en = 1; rd_row = 3'(rr); rd_col = 4'(cc);
      wr_en = 0;
      if (t % 5 == 0) begin
        int wr, wc;
        wr = $urandom_range(ROWS - 1); wc = $urandom_range(COLS - 1);
        if (!(wr == rr)) begin
          wr_en = 1; wr_row = 3'(wr); wr_col = 4'(wc); wr_data = 8'($urandom);
          model[wr][wc] = wr_data;
        end
      end
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      for (int l = 0; l < 4; l++) begin
        if (cc + l < COLS) begin
          checks++;
          if (q4[l] !== model[rr][cc + l]) begin
            failures++;
            $display("FAIL 4-lane (%0d,%0d) lane %0d: got %h exp %h", rr, cc, l, q4[l], model[rr][cc + l]);
          end
        end
      end
      checks++;
      if (q1[0] !== model[rr][cc]) begin
        failures++;
        $display("FAIL 1-lane (%0d,%0d): got %h exp %h", rr, cc, q1[0], model[rr][cc]);
      end
      // Output holds while rd_en is low.
      @(negedge clk);
      checks++;
      if (q1[0] !== model[rr][cc]) begin
        failures++;
        $display("FAIL 1-lane hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
