// pe_synch: PE synchronisation unit (PESynch_i, with the REPEAT and
// Mask Synch behaviour folded in).
//
// The PEs run self-timed: each starts when its own mask has arrived and
// finishes on its own. This unit collects one done pulse from every PE
// (PEs without a mask in the last pass answer too) and then, one cycle
// later, pulses sync for the pass just completed (sync_pass) and starts the
// next pass through the mask transfer controller (pass_start, pass_idx).
// Per stripe it runs exactly M = ceil(N_MASKS / N_PE) passes, started by
// stripe_start from the row transfer controller (REPEAT); after the M-th
// sync it pulses stripe_done back to it (Mask Synch), which lets it load the
// next image rows.
//
// Pre-loading: the masks of pass 0 are requested right after reset and
// right after the last pass of every stripe, so they are transferred while
// the row transfer controller loads the next rows. A PE's start
// (mask_ready from the transfer controller) is therefore held here until
// the stripe is ready and passed on as pe_start / pe_has_mask; during a
// stripe it is passed on in the same cycle.
//
// Timing: the PE synchronisation costs one clock cycle per pass. The pass
// structure and the pre-loading of the first mask set follow the document;
// the pulse handshakes are this design's own choice.
module pe_synch
  import fd_pkg::*;
#(
  parameter int unsigned N_PE    = 2,
  parameter int unsigned N_MASKS = 93
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stripe_start,
  output logic            stripe_done,
  input  logic [N_PE-1:0] mask_ready,
  input  logic [N_PE-1:0] mask_present,
  output logic [N_PE-1:0] pe_start,
  output logic [N_PE-1:0] pe_has_mask,
  input  logic [N_PE-1:0] pe_done,
  output logic            pass_start,
  output logic [15:0]     pass_idx,
  output logic            sync,
  output logic [15:0]     sync_pass,
  output logic            active
);
  localparam int unsigned M = num_passes(N_MASKS, N_PE);

  logic            boot;
  logic [N_PE-1:0] seen, seen_n, pend, pend_has;

  assign seen_n = seen | pe_done;

  // Pass a PE start on at once during a stripe, or hold it until the stripe.
  always_comb begin
    for (int unsigned j = 0; j < N_PE; j++) begin
      pe_start[j]    = active && (mask_ready[j] || pend[j]);
      pe_has_mask[j] = mask_ready[j] ? mask_present[j] : pend_has[j];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      boot        <= 1'b1;
      active      <= 1'b0;
      seen        <= '0;
      pend        <= '0;
      pend_has    <= '0;
      pass_idx    <= '0;
      pass_start  <= 1'b0;
      sync        <= 1'b0;
      sync_pass   <= '0;
      stripe_done <= 1'b0;
    end else begin
      pass_start  <= 1'b0;
      sync        <= 1'b0;
      stripe_done <= 1'b0;

      for (int unsigned j = 0; j < N_PE; j++) begin
        if (pe_start[j]) pend[j] <= 1'b0;
        else if (mask_ready[j]) begin
          pend[j]     <= 1'b1;
          pend_has[j] <= mask_present[j];
        end
      end

      // Pre-load the first mask set after reset.
      if (boot) begin
        boot       <= 1'b0;
        pass_idx   <= '0;
        pass_start <= 1'b1;
      end

      if (stripe_start && !active) begin
        active <= 1'b1;
        seen   <= '0;
      end else if (active) begin
        if (&seen_n) begin
          seen      <= '0;
          sync      <= 1'b1;
          sync_pass <= pass_idx;
          if (32'(pass_idx) == M - 1) begin
            // Stripe finished: pre-load pass 0 for the next stripe.
            active      <= 1'b0;
            stripe_done <= 1'b1;
            pass_idx    <= '0;
          end else begin
            pass_idx    <= pass_idx + 1'b1;
          end
          pass_start <= 1'b1;
        end else begin
          seen <= seen_n;
        end
      end
    end
  end

  a_one_done: assert property (@(posedge clk) disable iff (!rst_n)
    (|(pe_done & seen)) == 1'b0)
    else $error("pe_synch: a PE finished twice in one pass");
  a_no_early_done: assert property (@(posedge clk) disable iff (!rst_n)
    (|pe_done) |-> active)
    else $error("pe_synch: a PE finished outside a stripe");

endmodule
