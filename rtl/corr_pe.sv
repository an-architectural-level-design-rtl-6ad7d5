// corr_pe: processing element that correlates one elliptical mask with
// one image stripe.
//
// The PE owns two block RAMs: its private copy of the stripe (STRIPE_H x
// STRIPE_W pixels, written by the row transfer controller) and the mask it
// is applying (MASK_H x MASK_W signed coefficients, written by the mask
// transfer controller). After start it computes, for every window position
// c = 0, STEP, 2*STEP, .. <= STRIPE_W - MASK_W,
//     corr(c) = sum_{r,k} stripe[r][c+k] * mask[r][k]
// and keeps the largest corr(c) and its c (the first one on ties).
//
// Fine-grain parallelism: DOP additional multipliers work beside the first,
// so LANES = DOP + 1 products of one row are formed per cycle. A mask row
// takes NQ = ceil(MASK_W / LANES) cycles, a window MASK_H * NQ cycles, and a
// pass NPOS * MASK_H * NQ + 3 cycles (three pipeline stages: RAM read,
// multiply-and-add tree, accumulate). With the defaults (DOP 10, STEP 4)
// this is 20 * 65 * 8 + 3 = 10403 cycles.
//
// Interface: start (one cycle, the PE must be idle) with has_mask; a PE
// without a mask answers done one cycle later with res_valid low. Otherwise
// done pulses when the pass is finished and res_value/res_col hold the best
// window until the next start. stripe_base is the RAM row that holds the top
// row of the stripe (the stripe RAM is circular).
//
// The correlation, the mask and stripe sizes, DOP and STEP follow the
// document; the raw (unnormalised) sum, the data widths and the schedule of
// the multipliers over a row are this design's own choices.
module corr_pe
  import fd_pkg::*;
#(
  parameter int unsigned MASK_H   = 65,
  parameter int unsigned MASK_W   = 81,
  parameter int unsigned STRIPE_H = 65,
  parameter int unsigned STRIPE_W = 160,
  parameter int unsigned DOP      = 10,
  parameter int unsigned STEP     = 4
) (
  input  logic clk,
  input  logic rst_n,
  // stripe RAM write port
  input  logic                          s_we,
  input  logic [$clog2(STRIPE_H)-1:0]   s_row,
  input  logic [$clog2(STRIPE_W)-1:0]   s_col,
  input  pix_t                          s_data,
  // mask RAM write port
  input  logic                          m_we,
  input  logic [$clog2(MASK_H)-1:0]     m_row,
  input  logic [$clog2(MASK_W)-1:0]     m_col,
  input  coef_t                         m_data,
  // control
  input  logic                          start,
  input  logic                          has_mask,
  input  logic [$clog2(STRIPE_H)-1:0]   stripe_base,
  output logic                          busy,
  output logic                          done,
  output logic                          res_valid,
  output corr_t                         res_value,
  output logic [15:0]                   res_col
);
  localparam int unsigned LANES = DOP + 1;
  localparam int unsigned NQ    = (MASK_W + LANES - 1) / LANES;
  localparam int unsigned NPOS  = (STRIPE_W - MASK_W) / STEP + 1;
  localparam int unsigned RW    = $clog2(MASK_H);
  localparam int unsigned QW    = (NQ > 1) ? $clog2(NQ) : 1;
  localparam int unsigned PSW   = (NPOS > 1) ? $clog2(NPOS) : 1;

  // ---------------------------------------------------------------- RAMs
  logic [RW-1:0]                 r;
  logic                          rd_en;
  logic [$clog2(STRIPE_H)-1:0]   s_rd_row;
  logic [$clog2(STRIPE_W)-1:0]   s_rd_col;
  logic [$clog2(MASK_W)-1:0]     m_rd_col;
  logic [LANES-1:0][PIX_W-1:0]   s_q;
  logic [LANES-1:0][COEF_W-1:0]  m_q;

  banked_ram #(.DW(PIX_W), .ROWS(STRIPE_H), .COLS(STRIPE_W), .LANES(LANES)) u_stripe (
    .clk, .wr_en(s_we), .wr_row(s_row), .wr_col(s_col), .wr_data(s_data),
    .rd_en, .rd_row(s_rd_row), .rd_col(s_rd_col), .rd_data(s_q));

  banked_ram #(.DW(COEF_W), .ROWS(MASK_H), .COLS(MASK_W), .LANES(LANES)) u_mask (
    .clk, .wr_en(m_we), .wr_row(m_row), .wr_col(m_col), .wr_data(m_data),
    .rd_en, .rd_row(r), .rd_col(m_rd_col), .rd_data(m_q));

  // ------------------------------------------------------ issue counters
  logic [PSW-1:0] pos;
  logic [QW-1:0]  q;
  logic           issuing;
  logic [$clog2(STRIPE_H)-1:0] base;

  always_comb begin
    rd_en    = issuing;
    s_rd_row = $bits(s_rd_row)'((32'(base) + 32'(r)) % STRIPE_H);
    s_rd_col = $bits(s_rd_col)'(32'(pos) * STEP + 32'(q) * LANES);
    m_rd_col = $bits(m_rd_col)'(32'(q) * LANES);
  end

  // Pipeline stage 1 (aligned with RAM output) and stage 2 (row-chunk sum).
  logic           v1, first1, last1;
  logic [QW-1:0]  q1;
  logic [PSW-1:0] pos1;
  logic           v2, first2, last2;
  logic [PSW-1:0] pos2;
  corr_t          sum1, sum2, acc, acc_n;

  always_comb begin
    sum1 = '0;
    for (int unsigned l = 0; l < LANES; l++) begin
      if (32'(q1) * LANES + l < MASK_W)
        sum1 += corr_t'($signed({1'b0, s_q[l]}) * $signed(m_q[l]));
    end
    acc_n = first2 ? sum2 : acc + sum2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issuing   <= 1'b0;
      pos       <= '0;
      r         <= '0;
      q         <= '0;
      base      <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      first1    <= 1'b0;
      last1     <= 1'b0;
      first2    <= 1'b0;
      last2     <= 1'b0;
      q1        <= '0;
      pos1      <= '0;
      pos2      <= '0;
      sum2      <= '0;
      acc       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      res_valid <= 1'b0;
      res_value <= '0;
      res_col   <= '0;
    end else begin
      done <= 1'b0;

      if (start && !busy) begin
        busy      <= 1'b1;
        res_valid <= 1'b0;
        base      <= stripe_base;
        pos       <= '0;
        r         <= '0;
        q         <= '0;
        if (has_mask) issuing <= 1'b1;
        else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end

      // Walk q (row chunk), then r (mask row), then pos (window).
      if (issuing) begin
        if (32'(q) == NQ - 1) begin
          q <= '0;
          if (32'(r) == MASK_H - 1) begin
            r <= '0;
            if (32'(pos) == NPOS - 1) issuing <= 1'b0;
            else pos <= pos + 1'b1;
          end else begin
            r <= r + 1'b1;
          end
        end else begin
          q <= q + 1'b1;
        end
      end

      v1     <= issuing;
      first1 <= (r == '0) && (q == '0);
      last1  <= (32'(r) == MASK_H - 1) && (32'(q) == NQ - 1);
      q1     <= q;
      pos1   <= pos;

      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      pos2   <= pos1;
      sum2   <= sum1;

      if (v2) begin
        acc <= acc_n;
        if (last2) begin
          if (pos2 == '0 || acc_n > res_value) begin
            res_value <= acc_n;
            res_col   <= 16'(32'(pos2) * STEP);
          end
          if (32'(pos2) == NPOS - 1) begin
            busy      <= 1'b0;
            done      <= 1'b1;
            res_valid <= 1'b1;
          end
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("corr_pe: start while busy");

endmodule
