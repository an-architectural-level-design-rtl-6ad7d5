// max_tracker: finds the maximum correlation value of a frame.
//
// At every PE synchronisation (sync) the PE results are stable; the
// tracker takes the largest valid one (the lowest PE on ties), tags it with
// its mask number sync_pass * N_PE + j and the stripe's top row, and keeps
// it if it beats the best of the frame so far (strictly larger, so the
// earliest wins ties). On frame_done it presents the frame's best on det
// with det_valid for one cycle and starts a new frame. The location of the
// best response and the mask that gave it locate the face and its size.
//
// Timing: one cycle from sync to the updated best, one cycle from
// frame_done to det_valid. Taking the maximum follows the document; the tie
// rule and the result format are this design's own choices.
module max_tracker
  import fd_pkg::*;
#(
  parameter int unsigned N_PE = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sync,
  input  logic [15:0]           sync_pass,
  input  logic [15:0]           stripe_top,
  input  logic [N_PE-1:0]       res_valid,
  input  corr_t [N_PE-1:0]      res_value,
  input  logic [N_PE-1:0][15:0] res_col,
  input  logic                  frame_done,
  output logic                  det_valid,
  output detect_t               det
);
  detect_t cand, best;
  logic    cand_ok, have_best;

  // Best valid PE result of this pass.
  always_comb begin
    cand    = '0;
    cand_ok = 1'b0;
    for (int unsigned j = 0; j < N_PE; j++) begin
      if (res_valid[j] && (!cand_ok || res_value[j] > cand.value)) begin
        cand_ok    = 1'b1;
        cand.value = res_value[j];
        cand.row   = stripe_top;
        cand.col   = res_col[j];
        cand.mask  = 16'(32'(sync_pass) * N_PE + j);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best      <= '0;
      have_best <= 1'b0;
      det       <= '0;
      det_valid <= 1'b0;
    end else begin
      det_valid <= 1'b0;
      if (sync && cand_ok && (!have_best || cand.value > best.value)) begin
        best      <= cand;
        have_best <= 1'b1;
      end
      if (frame_done) begin
        det       <= best;
        det_valid <= 1'b1;
        have_best <= 1'b0;
      end
    end
  end

endmodule
