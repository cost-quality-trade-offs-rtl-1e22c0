// shuffle_map: position and shift-value arrays of compressed bit-shuffling.
//
// For every line (row) of the mat, the BYTES bytes are split into groups of
// R = 2^Q bytes. Each group owns one NFM-bit shift value (the array to the
// right of the data array) and a Q-bit position naming the byte of the group
// the shift applies to (the array to the left). A lookup uses the row
// address and the column address minus its low Q bits to select the group
// entry; the low Q bits are compared with the stored position and, if they
// match, the stored shift value is returned, otherwise 0. With Q = 0 every
// byte has its own shift value and no position is stored (the uncompressed
// scheme).
//
// Entries are written through prog_* in one cycle and are all 0 (no shift)
// after reset. The lookup is combinational, so it runs in parallel with the
// data array access.
module shuffle_map #(
  parameter int unsigned ROWS  = 128,  // lines of the mat, M
  parameter int unsigned BYTES = 16,   // bytes per line, b = N/W
  parameter int unsigned NFM   = 3,    // shift-value bits (>= 1)
  parameter int unsigned Q     = 2,    // log2 of the compression rate
  localparam int unsigned GROUPS = BYTES >> Q,
  localparam int unsigned RAW = $clog2(ROWS),
  localparam int unsigned CAW = $clog2(BYTES),
  localparam int unsigned GW  = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned PW  = (Q > 0) ? Q : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           prog_we,
  input  logic [RAW-1:0] prog_row,
  input  logic [GW-1:0]  prog_group,
  input  logic [PW-1:0]  prog_pos,
  input  logic [NFM-1:0] prog_shift,
  input  logic [RAW-1:0] lk_row,
  input  logic [CAW-1:0] lk_col,
  output logic [NFM-1:0] lk_shift
);

  logic [NFM-1:0] shift_q [ROWS][GROUPS];
  logic [PW-1:0]  pos_q   [ROWS][GROUPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        for (int g = 0; g < GROUPS; g++) begin
          shift_q[r][g] <= '0;
          pos_q[r][g]   <= '0;
        end
      end
    end else if (prog_we) begin
      shift_q[prog_row][prog_group] <= prog_shift;
      pos_q[prog_row][prog_group]   <= prog_pos;
    end
  end

  logic [GW-1:0] grp;
  logic          pos_match;

  assign grp = GW'(lk_col >> Q);

  if (Q > 0) begin : g_pos
    assign pos_match = (pos_q[lk_row][grp] == lk_col[PW-1:0]);
  end else begin : g_nopos
    assign pos_match = 1'b1;
  end

  assign lk_shift = pos_match ? shift_q[lk_row][grp] : '0;

  prog_group_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    prog_we |-> (int'(prog_group) < GROUPS));

endmodule
