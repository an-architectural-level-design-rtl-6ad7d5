// row_transfer_ctrl: Row Transfer Controller (the IR_1 .. IR_n actors).
//
// Receives the downsampled image one row at a time into a one-row buffer
// and copies each row that a stripe needs into the stripe RAM of PE 1,
// then PE 2, ... up to PE n (one pixel per cycle, STRIPE_W cycles per PE),
// so a row costs n * STRIPE_W cycles to distribute. The stripe RAMs are
// circular: downsampled row y lives in RAM row y mod STRIPE_H.
//
// Once the last row of a stripe (top .. top+STRIPE_H-1) is in place it
// pulses stripe_start with the stripe's top row (this starts the m mask
// passes, the REPEAT behaviour) and copies nothing more until stripe_done
// (Mask Synch) comes back, because the next rows overwrite the oldest rows
// of the stripe in use. It then moves the stripe down by STEP rows. While a
// stripe is processed the next input row may already be received into the
// row buffer. Rows below the last stripe are accepted and dropped. After the
// last stripe of a frame it pulses frame_done and starts over at row 0.
//
// Interface: in_* is a valid/ready pixel stream (in_ready low while the row
// buffer is full); wr_* is one write port shared by all stripe RAMs, wr_en
// selecting the PE. Sequential row distribution follows the document; the
// row buffer and the handshakes are this design's own choices.
module row_transfer_ctrl
  import fd_pkg::*;
#(
  parameter int unsigned N_PE     = 2,
  parameter int unsigned STRIPE_H = 65,
  parameter int unsigned STRIPE_W = 160,
  parameter int unsigned DS_H     = 120,
  parameter int unsigned STEP     = 4
) (
  input  logic clk,
  input  logic rst_n,
  // downsampled pixel stream
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  // stripe RAM write port, shared by the PEs
  output logic [N_PE-1:0]               wr_en,
  output logic [$clog2(STRIPE_H)-1:0]   wr_row,
  output logic [$clog2(STRIPE_W)-1:0]   wr_col,
  output pix_t                          wr_data,
  // stripe handshake with the PE synchronisation unit
  output logic                          stripe_start,
  output logic [15:0]                   stripe_top,
  output logic [$clog2(STRIPE_H)-1:0]   stripe_base,
  input  logic                          stripe_done,
  output logic                          frame_done
);
  localparam int unsigned LAST_TOP = ((DS_H - STRIPE_H) / STEP) * STEP;
  localparam int unsigned LAST_ROW = LAST_TOP + STRIPE_H - 1;
  localparam int unsigned XW = $clog2(STRIPE_W);
  localparam int unsigned PW = (N_PE > 1) ? $clog2(N_PE) : 1;

  pix_t          rowbuf [STRIPE_W];
  logic [XW-1:0] fill_x, cp_x;
  logic [PW-1:0] cp_pe;
  logic [15:0]   in_y, buf_y, top;
  logic          buf_full, copying, active;
  logic          need_row;

  assign in_ready    = !buf_full;
  assign stripe_top  = top;
  assign stripe_base = $bits(stripe_base)'(32'(top) % STRIPE_H);
  assign need_row    = (32'(buf_y) <= LAST_ROW);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) rowbuf[fill_x] <= in_pix;
  end

  always_comb begin
    wr_en   = '0;
    wr_en[cp_pe] = copying;
    wr_row  = $bits(wr_row)'(32'(buf_y) % STRIPE_H);
    wr_col  = cp_x;
    wr_data = rowbuf[cp_x];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill_x       <= '0;
      in_y         <= '0;
      buf_y        <= '0;
      buf_full     <= 1'b0;
      copying      <= 1'b0;
      cp_x         <= '0;
      cp_pe        <= '0;
      top          <= '0;
      active       <= 1'b0;
      stripe_start <= 1'b0;
      frame_done   <= 1'b0;
    end else begin
      stripe_start <= 1'b0;
      frame_done   <= 1'b0;

      // Receive a row into the row buffer.
      if (in_valid && in_ready) begin
        if (32'(fill_x) == STRIPE_W - 1) begin
          fill_x   <= '0;
          buf_full <= 1'b1;
          buf_y    <= in_y;
          in_y     <= (32'(in_y) == DS_H - 1) ? '0 : in_y + 1'b1;
        end else begin
          fill_x <= fill_x + 1'b1;
        end
      end

      // Distribute or drop the buffered row.
      if (buf_full && !copying) begin
        if (!need_row) begin
          buf_full <= 1'b0;
        end else if (!active) begin
          copying <= 1'b1;
          cp_x    <= '0;
          cp_pe   <= '0;
        end
      end

      if (copying) begin
        if (32'(cp_x) == STRIPE_W - 1) begin
          cp_x <= '0;
          if (32'(cp_pe) == N_PE - 1) begin
            copying  <= 1'b0;
            buf_full <= 1'b0;
            if (32'(buf_y) == 32'(top) + STRIPE_H - 1) begin
              stripe_start <= 1'b1;
              active       <= 1'b1;
            end
          end else begin
            cp_pe <= cp_pe + 1'b1;
          end
        end else begin
          cp_x <= cp_x + 1'b1;
        end
      end

      // Stripe finished: slide down by STEP rows or end the frame.
      if (stripe_done && active) begin
        active <= 1'b0;
        if (32'(top) >= LAST_TOP) begin
          top        <= '0;
          frame_done <= 1'b1;
        end else begin
          top <= top + 16'(STEP);
        end
      end
    end
  end

endmodule
