// cell_array: behavioural model of the storage cells of one bit-plane
// subarray of a DRAM or STT-MRAM mat, with hard faults.
//
// This is a model of the memory cells (1T1C DRAM or 1T1MTJ STT-MRAM), not
// logic to be synthesized as the product: it stands in for the process-
// specific array and its row/column periphery. ROWS x COLS one-bit cells are
// addressed by (row, col). Writes are synchronous; the read value is
// combinational from the address, so the caller decides when to sample it.
//
// Hard faults are injected through the f_* port: f_en = 1 makes the cell at
// (f_row, f_col) return f_val on every read whatever was written (stuck-at
// behaviour), f_en = 0 heals it. The document lists stuck-at, stuck-open,
// transition and coupling faults for DRAM and transition, read-disturb and
// incorrect-read faults for STT-MRAM, and notes that for repair only the
// presence of a fault matters; this model reduces them all to a fixed read
// value. Faults are cleared by reset; the stored data is not.
module cell_array #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 16,
  localparam int unsigned RAW = $clog2(ROWS),
  localparam int unsigned CAW = $clog2(COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // access port
  input  logic           we,
  input  logic [RAW-1:0] row,
  input  logic [CAW-1:0] col,
  input  logic           wbit,
  output logic           rbit,
  // fault injection port
  input  logic           f_we,
  input  logic [RAW-1:0] f_row,
  input  logic [CAW-1:0] f_col,
  input  logic           f_en,
  input  logic           f_val
);

  logic [COLS-1:0] cells    [ROWS];
  logic [COLS-1:0] stuck_en [ROWS];
  logic [COLS-1:0] stuck_v  [ROWS];

  always_ff @(posedge clk) begin
    if (we) cells[row][col] <= wbit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        stuck_en[r] <= '0;
        stuck_v[r]  <= '0;
      end
    end else if (f_we) begin
      stuck_en[f_row][f_col] <= f_en;
      stuck_v[f_row][f_col]  <= f_val;
    end
  end

  assign rbit = stuck_en[row][col] ? stuck_v[row][col] : cells[row][col];

endmodule
