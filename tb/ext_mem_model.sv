// ext_mem_model: behavioural model of the external mask memory and its
// controller, for simulation only. Accepts one byte read per cycle when
// req_ready is high (req_ready drops at random, STALL_PCT percent of the
// cycles) and returns the data LAT cycles later, in order. The content is
// tb_fd_util_pkg::mem_byte(address).
module ext_mem_model
  import tb_fd_util_pkg::*;
#(
  parameter int unsigned LAT       = 5,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic [31:0] req_addr,
  output logic        req_ready,
  output logic        rsp_valid,
  output logic [7:0]  rsp_data,
  output int unsigned stalls
);
  logic [LAT-1:0]      vpipe;
  logic [7:0]          dpipe [LAT];

  assign rsp_valid = vpipe[LAT-1];
  assign rsp_data  = dpipe[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe     <= '0;
      req_ready <= 1'b0;
      stalls    <= 0;
      for (int i = 0; i < LAT; i++) dpipe[i] <= '0;
    end else begin
      req_ready <= ($urandom_range(99) >= STALL_PCT);
      if (req_valid && !req_ready) stalls <= stalls + 1;
      vpipe[0] <= req_valid && req_ready;
      dpipe[0] <= mem_byte(req_addr);
      for (int i = 1; i < LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        dpipe[i] <= dpipe[i-1];
      end
    end
  end
endmodule
