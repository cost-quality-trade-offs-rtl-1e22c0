// approx_mem_top: banked approximate image memory.
//
// The memory is split into NUM_BANKS identical banks chosen by the bank
// address, each one approximately repaired mat (approx_repair_mat: limited
// spare rows/columns per bit plane, k-MSB skew, compressed bit-shuffling).
// Only the addressed bank sees an access; configuration and fault-injection
// writes carry their own bank address. Read data of the bank addressed one
// cycle earlier is returned with rvalid, one cycle after the request.
//
// A bank is reduced here to a single mat; subbanks and multiple mats per
// bank are not modelled, so a bank's capacity is one mat's.
module approx_mem_top
  import repair_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 8,
  parameter int unsigned ROWS      = 128,
  parameter int unsigned BYTES     = 16,
  parameter int unsigned NFM       = 3,
  parameter int unsigned Q         = 2,
  parameter int unsigned K         = 8,
  parameter int unsigned SR        = 2,
  parameter int unsigned SC        = 2,
  parameter int unsigned SR_LESS   = 1,
  parameter int unsigned SC_LESS   = 1,
  localparam int unsigned BAW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned RAW = $clog2(ROWS),
  localparam int unsigned CAW = $clog2(BYTES),
  localparam int unsigned R   = 1 << Q
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // access port
  input  logic                     req,
  input  logic                     we,
  input  logic [BAW-1:0]           bank,
  input  logic [RAW-1:0]           row,
  input  logic [CAW-1:0]           col,
  input  logic [BYTE_W-1:0]        wdata,
  output logic                     rvalid,
  output logic [BYTE_W-1:0]        rdata,
  output logic                     r_row_spare,
  output logic                     r_col_spare,
  output logic                     r_shifted,
  // repair configuration port (from off-line redundancy analysis / fault map)
  input  logic                     cfg_we,
  input  cfg_op_e                  cfg_op,
  input  logic [BAW-1:0]           cfg_bank,
  input  logic [2:0]               cfg_plane,
  input  logic [RAW-1:0]           cfg_row,
  input  logic [CAW-1:0]           cfg_col,
  input  logic [CAM_IDX_W-1:0]     cfg_idx,
  input  logic                     cfg_valid,
  input  logic [R-1:0][BYTE_W-1:0] cfg_fmask,
  // fault injection port of the cell models
  input  logic                     flt_we,
  input  logic [BAW-1:0]           flt_bank,
  input  logic [2:0]               flt_plane,
  input  logic [RAW-1:0]           flt_row,
  input  logic [CAW-1:0]           flt_col,
  input  logic                     flt_en,
  input  logic                     flt_val
);

  logic [NUM_BANKS-1:0]              b_rvalid, b_row_spare, b_col_spare, b_shifted;
  logic [NUM_BANKS-1:0][BYTE_W-1:0]  b_rdata;
  logic [BAW-1:0]                    bank_q;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    approx_repair_mat #(
      .ROWS(ROWS), .BYTES(BYTES), .NFM(NFM), .Q(Q), .K(K),
      .SR(SR), .SC(SC), .SR_LESS(SR_LESS), .SC_LESS(SC_LESS)
    ) u_mat (
      .clk, .rst_n,
      .req        (req && bank == BAW'(b)),
      .we, .row, .col, .wdata,
      .rvalid     (b_rvalid[b]),
      .rdata      (b_rdata[b]),
      .r_row_spare(b_row_spare[b]),
      .r_col_spare(b_col_spare[b]),
      .r_shifted  (b_shifted[b]),
      .cfg_we     (cfg_we && cfg_bank == BAW'(b)),
      .cfg_op, .cfg_plane, .cfg_row, .cfg_col, .cfg_idx, .cfg_valid, .cfg_fmask,
      .flt_we     (flt_we && flt_bank == BAW'(b)),
      .flt_plane, .flt_row, .flt_col, .flt_en, .flt_val
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   bank_q <= '0;
    else if (req) bank_q <= bank;
  end

  assign rvalid      = |b_rvalid;
  assign rdata       = b_rdata[bank_q];
  assign r_row_spare = b_row_spare[bank_q];
  assign r_col_spare = b_col_spare[bank_q];
  assign r_shifted   = b_shifted[bank_q];

  one_bank_answers : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(b_rvalid));

endmodule
