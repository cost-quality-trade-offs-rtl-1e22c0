// tb_repair_subarray: spare-row / spare-column redirection of one bit-plane
// subarray (16 rows x 8 columns).
//
// Instance A has 2 spare rows and 2 spare columns, instance B none of the
// first kind and 1 spare column (a less protected k-MSB plane). A row
// fault, a column fault and scattered single-cell faults are injected into
// both. The CAMs are programmed to replace some of the faulty lines; then
// every cell is written with random data and read back. A reference model
// predicts each read: data from a spare if the row (first) or column is
// replaced, the stuck value if the main cell is faulty, else the data. The
// row/column hit flags are checked too.
module tb_repair_subarray;
  import repair_pkg::*;
  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;
  int         row_hits = 0, col_hits = 0, unrepaired = 0;

  logic       we = 0, wbit = 0;
  logic [3:0] row = 0;
  logic [2:0] col = 0;
  logic       rbit_a, rbit_b, rh_a, rh_b, ch_a, ch_b;
  logic       cam_we_a = 0, cam_we_b = 0, cam_col = 0, cam_valid = 0;
  logic [CAM_IDX_W-1:0] cam_idx = 0;
  logic [3:0] cam_addr = 0;
  logic       f_we = 0, f_en = 0, f_val = 0;
  logic [3:0] f_row = 0;
  logic [2:0] f_col = 0;

  bit ref_data [16][8];
  bit ref_en   [16][8];
  bit ref_val  [16][8];
  int camr_a [2], camc_a [2], camc_b;   // -1: entry invalid

  always #5 clk = ~clk;

  repair_subarray #(.ROWS(16), .COLS(8), .SR(2), .SC(2)) u_a (
    .clk, .rst_n, .we, .row, .col, .wbit, .rbit(rbit_a), .row_hit(rh_a), .col_hit(ch_a),
    .cam_we(cam_we_a), .cam_col, .cam_idx, .cam_addr, .cam_valid,
    .f_we, .f_row, .f_col, .f_en, .f_val);
  repair_subarray #(.ROWS(16), .COLS(8), .SR(0), .SC(1)) u_b (
    .clk, .rst_n, .we, .row, .col, .wbit, .rbit(rbit_b), .row_hit(rh_b), .col_hit(ch_b),
    .cam_we(cam_we_b), .cam_col, .cam_idx, .cam_addr, .cam_valid,
    .f_we, .f_row, .f_col, .f_en, .f_val);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fault(int r, int c, bit v);
    f_we = 1; f_row = 4'(r); f_col = 3'(c); f_en = 1; f_val = v;
    @(posedge clk); #1;
    f_we = 0;
    ref_en[r][c] = 1; ref_val[r][c] = v;
  endtask

  task automatic cam(bit inst_b, bit is_col, int idx, int addr, bit v);
    cam_we_a = !inst_b; cam_we_b = inst_b; cam_col = is_col;
    cam_idx = CAM_IDX_W'(idx); cam_addr = 4'(addr); cam_valid = v;
    @(posedge clk); #1;
    cam_we_a = 0; cam_we_b = 0;
    if (!inst_b && !is_col) camr_a[idx] = v ? addr : -1;
    if (!inst_b &&  is_col) camc_a[idx] = v ? addr : -1;
    if ( inst_b &&  is_col) camc_b      = v ? addr : -1;
  endtask

  task automatic write_read_all();
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 8; c++) begin
        bit v = 1'($urandom_range(0, 1));
        we = 1; row = 4'(r); col = 3'(c); wbit = v;
        @(posedge clk); #1;
        ref_data[r][c] = v;
      end
    we = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 8; c++) begin
        bit ra = (camr_a[0] == r) || (camr_a[1] == r);
        bit ca = !ra && ((camc_a[0] == c) || (camc_a[1] == c));
        bit cb = (camc_b == c);
        bit faulty = ref_en[r][c];
        bit ea = (ra || ca || !faulty) ? ref_data[r][c] : ref_val[r][c];
        bit eb = (cb || !faulty) ? ref_data[r][c] : ref_val[r][c];
        row = 4'(r); col = 3'(c);
        #1;
        checks += 4;
        if (rbit_a != ea) begin failures++; $display("A %0d,%0d read %b exp %b", r, c, rbit_a, ea); end
        if (rbit_b != eb) begin failures++; $display("B %0d,%0d read %b exp %b", r, c, rbit_b, eb); end
        if (rh_a != ra || (!ra && ch_a != ca)) begin failures++; $display("A %0d,%0d hit flags %b%b", r, c, rh_a, ch_a); end
        if (rh_b != 1'b0 || ch_b != cb) begin failures++; $display("B %0d,%0d hit flags %b%b", r, c, rh_b, ch_b); end
        if (ra) row_hits++;
        if (ca) col_hits++;
        if (faulty && !ra && !ca) unrepaired++;
      end
  endtask

  initial begin
    for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) begin ref_en[r][c] = 0; ref_val[r][c] = 0; end
    camr_a[0] = -1; camr_a[1] = -1; camc_a[0] = -1; camc_a[1] = -1; camc_b = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // Fault-free pass.
    write_read_all();
    // Row fault on row 5, column fault on column 2, scattered single faults.
    for (int c = 0; c < 8; c++) fault(5, c, 1'(c % 2));
    for (int r = 0; r < 16; r++) fault(r, 2, ~r[0]);
    for (int n = 0; n < 6; n++) fault($urandom_range(0, 15), $urandom_range(3, 7), 1'($urandom_range(0, 1)));
    fault(11, 6, 1); fault(12, 6, 0);
    write_read_all();          // nothing repaired yet
    cam(0, 0, 0, 5, 1);        // A: spare row 0 replaces row 5
    cam(0, 1, 1, 2, 1);        // A: spare column 1 replaces column 2
    cam(0, 0, 1, 11, 1);       // A: spare row 1 replaces row 11
    cam(0, 1, 0, 6, 1);        // A: spare column 0 replaces column 6
    cam(1, 1, 0, 2, 1);        // B: its only spare column replaces column 2
    repeat (2) write_read_all();
    cam(0, 0, 0, 5, 0);        // A: release spare row 0
    write_read_all();
    checks++;
    if (row_hits == 0 || col_hits == 0 || unrepaired == 0) begin
      failures++;
      $display("mechanism not exercised: row %0d col %0d unrepaired %0d", row_hits, col_hits, unrepaired);
    end
    $display("row-spare reads %0d, column-spare reads %0d, unrepaired faulty reads %0d", row_hits, col_hits, unrepaired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
