// repair_subarray: one bit-plane subarray with spare rows and spare columns.
//
// Each bit of a byte lives in its own subarray of (M/2) x (N/W) cells; this
// module is one of them. It adds SR spare rows and SC spare columns. A row
// CAM holds the addresses of the rows replaced by the spare rows and a
// column CAM those of the columns replaced by the spare columns. On every
// access both CAMs are searched with the incoming address; on a row hit the
// access goes to the matching spare row, otherwise on a column hit to the
// matching spare column, otherwise to the main cells. Giving spare rows
// priority over spare columns is this design's choice. Writes that are
// redirected do not touch the (faulty) main cell.
//
// SR or SC may be 0 (no spares of that kind, as for the less protected
// planes of k-MSB repair). Spare cells are modelled as fault-free.
//
// Timing: writes complete at the clock edge; rbit, row_hit and col_hit are
// combinational from the address. CAM entries are written through cam_*
// in one cycle; cam_addr carries a subarray row address for the row CAM and
// a column address for the column CAM.
module repair_subarray
  import repair_pkg::*;
#(
  parameter int unsigned ROWS = 64,   // M/2
  parameter int unsigned COLS = 16,   // N/W
  parameter int unsigned SR   = 2,    // spare rows, m
  parameter int unsigned SC   = 2,    // spare columns, n
  localparam int unsigned RAW = $clog2(ROWS),
  localparam int unsigned CAW = $clog2(COLS),
  localparam int unsigned PAW = (RAW > CAW) ? RAW : CAW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // access port
  input  logic                 we,
  input  logic [RAW-1:0]       row,
  input  logic [CAW-1:0]       col,
  input  logic                 wbit,
  output logic                 rbit,
  output logic                 row_hit,
  output logic                 col_hit,
  // CAM programming
  input  logic                 cam_we,
  input  logic                 cam_col,     // 0: row CAM, 1: column CAM
  input  logic [CAM_IDX_W-1:0] cam_idx,
  input  logic [PAW-1:0]       cam_addr,
  input  logic                 cam_valid,
  // fault injection into the main cells
  input  logic                 f_we,
  input  logic [RAW-1:0]       f_row,
  input  logic [CAW-1:0]       f_col,
  input  logic                 f_en,
  input  logic                 f_val
);

  logic main_rbit, sr_rbit, sc_rbit;

  // ---------------- spare rows ----------------
  if (SR > 0) begin : g_sr
    localparam int unsigned IW = (SR > 1) ? $clog2(SR) : 1;
    logic [IW-1:0]   idx;
    logic [COLS-1:0] spare [SR];

    repair_cam #(.ENTRIES(SR), .AW(RAW)) u_row_cam (
      .clk, .rst_n,
      .prog_we   (cam_we && !cam_col),
      .prog_idx  (IW'(cam_idx)),
      .prog_addr (cam_addr[RAW-1:0]),
      .prog_valid(cam_valid),
      .key       (row),
      .hit       (row_hit),
      .hit_idx   (idx)
    );

    always_ff @(posedge clk) begin
      if (we && row_hit) spare[idx][col] <= wbit;
    end
    assign sr_rbit = spare[idx][col];
  end else begin : g_no_sr
    assign row_hit = 1'b0;
    assign sr_rbit = 1'b0;
  end

  // ---------------- spare columns ----------------
  if (SC > 0) begin : g_sc
    localparam int unsigned IW = (SC > 1) ? $clog2(SC) : 1;
    logic [IW-1:0] idx;
    logic [SC-1:0] spare [ROWS];

    repair_cam #(.ENTRIES(SC), .AW(CAW)) u_col_cam (
      .clk, .rst_n,
      .prog_we   (cam_we && cam_col),
      .prog_idx  (IW'(cam_idx)),
      .prog_addr (cam_addr[CAW-1:0]),
      .prog_valid(cam_valid),
      .key       (col),
      .hit       (col_hit),
      .hit_idx   (idx)
    );

    always_ff @(posedge clk) begin
      if (we && col_hit && !row_hit) spare[row][idx] <= wbit;
    end
    assign sc_rbit = spare[row][idx];
  end else begin : g_no_sc
    assign col_hit = 1'b0;
    assign sc_rbit = 1'b0;
  end

  // ---------------- main cells ----------------
  cell_array #(.ROWS(ROWS), .COLS(COLS)) u_cells (
    .clk, .rst_n,
    .we   (we && !row_hit && !col_hit),
    .row, .col, .wbit,
    .rbit (main_rbit),
    .f_we, .f_row, .f_col, .f_en, .f_val
  );

  // Spare/main select multiplexer.
  assign rbit = row_hit ? sr_rbit : (col_hit ? sc_rbit : main_rbit);

endmodule
