// repair_cam: content-addressable memory of reconfiguration addresses.
//
// Each of ENTRIES entries holds the address of a faulty row (or column) of a
// subarray and a valid bit. A lookup key is compared with every valid entry
// in parallel; hit is set when one matches and hit_idx names the spare
// element that replaces the addressed row or column. If two entries hold the
// same address the lowest index wins (this design's choice; redundancy
// analysis never allocates two spares to one address).
//
// Entries are written one at a time through the prog_* port (synchronous,
// one cycle) and are all invalid after reset. The lookup is combinational,
// so redirection happens within the access cycle, as the document's delay
// model assumes.
module repair_cam #(
  parameter int unsigned ENTRIES = 2,   // number of spare elements (>= 1)
  parameter int unsigned AW      = 6,   // address width of a row or column
  localparam int unsigned IW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          prog_we,
  input  logic [IW-1:0] prog_idx,
  input  logic [AW-1:0] prog_addr,
  input  logic          prog_valid,
  input  logic [AW-1:0] key,
  output logic          hit,
  output logic [IW-1:0] hit_idx
);

  logic [AW-1:0]      addr_q  [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) addr_q[i] <= '0;
    end else if (prog_we) begin
      valid_q[prog_idx]  <= prog_valid;
      addr_q[prog_idx]   <= prog_addr;
    end
  end

  // Match lines, then a priority encoder.
  logic [ENTRIES-1:0] match;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) match[i] = valid_q[i] && (addr_q[i] == key);
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  prog_idx_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    prog_we |-> (int'(prog_idx) < ENTRIES));

endmodule
