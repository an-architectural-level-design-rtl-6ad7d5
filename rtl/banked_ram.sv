// banked_ram: per-PE block RAM with a single-pixel write port and a
// multi-pixel read port.
//
// Each processing element owns two of these: one holds its copy of the
// image stripe (ROWS x COLS = 65 x 160 pixels), the other the mask it is
// applying (65 x 81 coefficients). A PE with LANES multipliers needs LANES
// horizontally consecutive values of one row per cycle, starting at any
// column. The array is therefore split into LANES banks by column
// (bank = col mod LANES, word = row*WPR + col div LANES), so each bank is
// an ordinary one-read one-write memory and every bank is read once per
// access; the bank outputs are then rotated into lane order.
//
// Timing: write in the cycle wr_en is high. Read data appears on rd_data
// one clock after rd_en (registered outputs, like a block RAM). Lane l holds
// the value at (rd_row, rd_col + l). Each row is padded by one bank word so
// that lanes past the last column read padding instead of the next row; what
// they return there is undefined and the reader must ignore it.
//
// The banking is this design's own choice; the document only says that each
// PE has dedicated BRAMs for its mask and its stripe copy.
module banked_ram #(
  parameter int unsigned DW    = 8,
  parameter int unsigned ROWS  = 65,
  parameter int unsigned COLS  = 160,
  parameter int unsigned LANES = 11
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_row,
  input  logic [$clog2(COLS)-1:0]  wr_col,
  input  logic [DW-1:0]            wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(ROWS)-1:0]  rd_row,
  input  logic [$clog2(COLS)-1:0]  rd_col,
  output logic [LANES-1:0][DW-1:0] rd_data
);
  localparam int unsigned WPR   = (COLS + LANES - 1) / LANES + 1; // words per row per bank
  localparam int unsigned DEPTH = ROWS * WPR;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1;

  logic [DW-1:0] mem [LANES][DEPTH];

  // Write: one pixel into its bank.
  logic [LW-1:0] wr_bank;
  logic [AW-1:0] wr_addr;
  always_comb begin
    wr_bank = LW'(32'(wr_col) % LANES);
    wr_addr = AW'(32'(wr_row) * WPR + 32'(wr_col) / LANES);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
  end

  // Read: bank b supplies column rd_col + ((b - rd_col) mod LANES).
  logic [LW-1:0] rot;
  logic [LANES-1:0][AW-1:0] rd_addr;
  always_comb begin
    rot = LW'(32'(rd_col) % LANES);
    for (int unsigned b = 0; b < LANES; b++) begin
      rd_addr[b] = AW'(32'(rd_row) * WPR
                       + (32'(rd_col) + ((b + LANES - 32'(rot)) % LANES)) / LANES);
    end
  end

  logic [LANES-1:0][DW-1:0] bank_q;
  logic [LW-1:0]            rot_q;
  for (genvar b = 0; b < LANES; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (rd_en) bank_q[b] <= mem[b][rd_addr[b]];
    end
  end
  always_ff @(posedge clk) begin
    if (rd_en) rot_q <= rot;
  end

  // Lane l comes from bank (rot + l) mod LANES.
  always_comb begin
    for (int unsigned l = 0; l < LANES; l++) begin
      rd_data[l] = bank_q[(32'(rot_q) + l) % LANES];
    end
  end

endmodule
