// mask_transfer_ctrl: Mask Transfer Controller (the MR_{i,j} actors).
//
// The mask set lives in external memory as N_MASKS masks of MASK_H x MASK_W
// signed 8-bit coefficients, row by row, one byte per coefficient, mask k
// starting at mask_base + k * MASK_H * MASK_W. For pass i (pass_start with
// pass_idx = i) the controller copies mask i*N_PE + j into the mask RAM of
// PE j, for j = 0, 1, .. N_PE-1 in that fixed order, one mask at a time:
// the transfer order is decided at design time, as in an ordered-
// transaction system, so the memory bus needs no arbitration. As soon as
// PE j's mask is complete it pulses mask_ready[j], so PE j can start (through
// the PE synchronisation unit) while the next PE's mask is still being read. In the last pass, PEs without a mask
// (N_MASKS not a multiple of N_PE) get mask_ready with mask_present low.
//
// Memory interface: a read request (mem_req_valid/ready, byte address) per
// coefficient and in-order responses (mem_rsp_valid, mem_rsp_data) some
// cycles later; at most MAX_OUT requests are outstanding. Mask write port:
// one coefficient per cycle, mwr_en selecting the PE. The request/response
// bus and the outstanding limit are this design's own choices.
module mask_transfer_ctrl
  import fd_pkg::*;
#(
  parameter int unsigned N_PE    = 2,
  parameter int unsigned N_MASKS = 93,
  parameter int unsigned MASK_H  = 65,
  parameter int unsigned MASK_W  = 81,
  parameter int unsigned MAX_OUT = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  addr_t mask_base,
  // pass control from the PE synchronisation unit
  input  logic        pass_start,
  input  logic [15:0] pass_idx,
  output logic        busy,
  // external memory read port
  output logic        mem_req_valid,
  output addr_t       mem_req_addr,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  logic [7:0]  mem_rsp_data,
  // mask RAM write port, shared by the PEs
  output logic [N_PE-1:0]            mwr_en,
  output logic [$clog2(MASK_H)-1:0]  mwr_row,
  output logic [$clog2(MASK_W)-1:0]  mwr_col,
  output coef_t                      mwr_data,
  // per-PE mask status
  output logic [N_PE-1:0]            mask_ready,
  output logic [N_PE-1:0]            mask_present
);
  localparam int unsigned MASK_SZ = MASK_H * MASK_W;
  localparam int unsigned CW = $clog2(MASK_SZ + 1);
  localparam int unsigned OW = $clog2(MAX_OUT + 1);
  localparam int unsigned PW = (N_PE > 1) ? $clog2(N_PE) : 1;

  typedef enum logic [1:0] {IDLE, NEXT, LOAD} state_t;
  state_t state;

  logic [PW-1:0]              cur_pe;
  logic [15:0]                cur_mask;
  logic [CW-1:0]              issued, received;
  logic [OW-1:0]              outstanding;
  logic [$clog2(MASK_H)-1:0]  r_row;
  logic [$clog2(MASK_W)-1:0]  r_col;
  addr_t                      mask_addr;
  logic                       req_fire;

  assign busy          = (state != IDLE);
  assign mem_req_valid = (state == LOAD) && (32'(issued) < MASK_SZ)
                       && (32'(outstanding) < MAX_OUT);
  assign mem_req_addr  = mask_addr + addr_t'(issued);
  assign req_fire      = mem_req_valid && mem_req_ready;

  always_comb begin
    mwr_en          = '0;
    mwr_en[cur_pe]  = (state == LOAD) && mem_rsp_valid;
    mwr_row         = r_row;
    mwr_col         = r_col;
    mwr_data        = coef_t'(mem_rsp_data);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= IDLE;
      cur_pe       <= '0;
      cur_mask     <= '0;
      issued       <= '0;
      received     <= '0;
      outstanding  <= '0;
      r_row        <= '0;
      r_col        <= '0;
      mask_addr    <= '0;
      mask_ready   <= '0;
      mask_present <= '0;
    end else begin
      mask_ready <= '0;
      unique case (state)
        IDLE: if (pass_start) begin
          cur_pe   <= '0;
          cur_mask <= 16'(32'(pass_idx) * N_PE);
          state    <= NEXT;
        end
        NEXT: begin
          // Begin the transfer for PE cur_pe, or report that it has no mask.
          issued      <= '0;
          received    <= '0;
          outstanding <= '0;
          r_row       <= '0;
          r_col       <= '0;
          mask_addr   <= mask_base + addr_t'(32'(cur_mask) * MASK_SZ);
          if (32'(cur_mask) < N_MASKS) begin
            state <= LOAD;
          end else begin
            mask_ready[cur_pe]   <= 1'b1;
            mask_present[cur_pe] <= 1'b0;
            if (32'(cur_pe) == N_PE - 1) state <= IDLE;
            else begin
              cur_pe   <= cur_pe + 1'b1;
              cur_mask <= cur_mask + 1'b1;
            end
          end
        end
        LOAD: begin
          if (req_fire) issued <= issued + 1'b1;
          outstanding <= outstanding + OW'(req_fire) - OW'(mem_rsp_valid);
          if (mem_rsp_valid) begin
            received <= received + 1'b1;
            if (32'(r_col) == MASK_W - 1) begin
              r_col <= '0;
              r_row <= r_row + 1'b1;
            end else begin
              r_col <= r_col + 1'b1;
            end
            if (32'(received) == MASK_SZ - 1) begin
              mask_ready[cur_pe]   <= 1'b1;
              mask_present[cur_pe] <= 1'b1;
              if (32'(cur_pe) == N_PE - 1) state <= IDLE;
              else begin
                cur_pe   <= cur_pe + 1'b1;
                cur_mask <= cur_mask + 1'b1;
                state    <= NEXT;
              end
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Bus rules: no response without an outstanding request; a new pass is
  // only started when the previous one is finished.
  a_rsp_has_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> (state == LOAD && outstanding != 0))
    else $error("mask_transfer_ctrl: response without a request");
  a_pass_idle: assert property (@(posedge clk) disable iff (!rst_n)
    pass_start |-> (state == IDLE))
    else $error("mask_transfer_ctrl: pass started while busy");

endmodule
