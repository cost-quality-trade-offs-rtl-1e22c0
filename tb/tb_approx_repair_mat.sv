// tb_approx_repair_mat: one mat (16 lines x 8 bytes) in three repair
// configurations, driven with the same accesses and the same hard faults.
//
//   A  hybrid: 2 spare rows + 2 spare columns per subarray, compressed
//      bit-shuffling with n_FM = 3 and groups of 4 bytes (the default scheme)
//   B  k-MSB: K = 2 planes with 2 + 2 spares, the other planes 0 spare rows
//      and 1 spare column, no bit-shuffling
//   C  uncompressed bit-shuffling only: n_FM = 2, one shift per byte, no
//      spares
//
// Faults: a row fault, a column fault, a 2 x 2 cluster and scattered single
// cells. Repairs are allocated as an off-line flow would: spares for the
// line faults first, then the shuffle entries are computed from the faults
// that spares left unrepaired. Every byte is then written with random data
// and read back with one read per cycle; each result is checked, on the
// cycle after its request, against a reference model of the stored bits
// (rotation, spare redirection, stuck cells, inverse rotation), together
// with the spare/shift status flags. The run fails if any mechanism (spare
// row, spare column, non-zero rotation, a fault left visible) never occurs.
module tb_approx_repair_mat;
  import repair_pkg::*;

  localparam int ROWS = 16, BYTES = 8;

  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;
  int         n_row_spare = 0, n_col_spare = 0, n_shifted = 0, n_approx = 0;

  logic       req = 0, we = 0;
  logic [3:0] row = 0;
  logic [2:0] col = 0;
  logic [7:0] wdata = 0;
  logic       cfg_we_a = 0, cfg_we_b = 0, cfg_we_c = 0, cfg_valid = 0;
  cfg_op_e    cfg_op = CFG_NONE;
  logic [2:0] cfg_plane = 0, cfg_col = 0;
  logic [3:0] cfg_row = 0;
  logic [CAM_IDX_W-1:0] cfg_idx = 0;
  logic [3:0][7:0] fmask4 = '0;
  logic [0:0][7:0] fmask1 = '0;
  logic       flt_we = 0, flt_en = 0, flt_val = 0;
  logic [2:0] flt_plane = 0, flt_col = 0;
  logic [3:0] flt_row = 0;

  logic [2:0]      rvalid, rs, cs, sh;
  logic [2:0][7:0] rdata;

  always #5 clk = ~clk;

  approx_repair_mat #(.ROWS(ROWS), .BYTES(BYTES), .NFM(3), .Q(2), .K(8), .SR(2), .SC(2)) u_a (
    .clk, .rst_n, .req, .we, .row, .col, .wdata,
    .rvalid(rvalid[0]), .rdata(rdata[0]), .r_row_spare(rs[0]), .r_col_spare(cs[0]), .r_shifted(sh[0]),
    .cfg_we(cfg_we_a), .cfg_op, .cfg_plane, .cfg_row, .cfg_col, .cfg_idx, .cfg_valid, .cfg_fmask(fmask4),
    .flt_we, .flt_plane, .flt_row, .flt_col, .flt_en, .flt_val);
  approx_repair_mat #(.ROWS(ROWS), .BYTES(BYTES), .NFM(0), .Q(2), .K(2), .SR(2), .SC(2),
                      .SR_LESS(0), .SC_LESS(1)) u_b (
    .clk, .rst_n, .req, .we, .row, .col, .wdata,
    .rvalid(rvalid[1]), .rdata(rdata[1]), .r_row_spare(rs[1]), .r_col_spare(cs[1]), .r_shifted(sh[1]),
    .cfg_we(cfg_we_b), .cfg_op, .cfg_plane, .cfg_row, .cfg_col, .cfg_idx, .cfg_valid, .cfg_fmask(fmask4),
    .flt_we, .flt_plane, .flt_row, .flt_col, .flt_en, .flt_val);
  approx_repair_mat #(.ROWS(ROWS), .BYTES(BYTES), .NFM(2), .Q(0), .K(8), .SR(0), .SC(0),
                      .SR_LESS(0), .SC_LESS(0)) u_c (
    .clk, .rst_n, .req, .we, .row, .col, .wdata,
    .rvalid(rvalid[2]), .rdata(rdata[2]), .r_row_spare(rs[2]), .r_col_spare(cs[2]), .r_shifted(sh[2]),
    .cfg_we(cfg_we_c), .cfg_op, .cfg_plane, .cfg_row, .cfg_col, .cfg_idx, .cfg_valid, .cfg_fmask(fmask1),
    .flt_we, .flt_plane, .flt_row, .flt_col, .flt_en, .flt_val);

  // ---------------- reference state ----------------
  bit   f_en  [ROWS][BYTES][8];
  bit   f_val [ROWS][BYTES][8];
  int   camr  [3][2][8][2];   // [inst][half][plane][idx] -> subarray row, -1 invalid
  int   camc  [3][2][8][2];   // [inst][half][plane][idx] -> column, -1 invalid
  int   shv   [3][ROWS][BYTES];  // effective shift per byte
  logic [7:0] data [ROWS][BYTES];

  localparam int NFM_I [3] = '{3, 0, 2};
  localparam int Q_I   [3] = '{2, 2, 0};

  function automatic bit row_rep(int i, int r, int p);
    int h = r / (ROWS / 2), sr = r % (ROWS / 2);
    return camr[i][h][p][0] == sr || camr[i][h][p][1] == sr;
  endfunction
  function automatic bit col_rep(int i, int r, int c, int p);
    int h = r / (ROWS / 2);
    return camc[i][h][p][0] == c || camc[i][h][p][1] == c;
  endfunction

  function automatic logic [7:0] rot(logic [7:0] x, int a, bit left);
    logic [7:0] y;
    for (int k = 0; k < 8; k++) begin
      if (left) y[(k + a) % 8] = x[k];
      else      y[k] = x[(k + a) % 8];
    end
    return y;
  endfunction

  // Expected read value and flags of instance i at (r, c).
  function automatic logic [10:0] expect_rd(int i, int r, int c);
    logic [7:0] phys, got;
    bit any_r = 0, any_c = 0;
    phys = rot(data[r][c], shv[i][r][c], 1'b0);
    for (int p = 0; p < 8; p++) begin
      bit rr = row_rep(i, r, p);
      bit cr = !rr && col_rep(i, r, c, p);
      any_r |= rr; any_c |= cr;
      got[p] = (rr || cr || !f_en[r][c][p]) ? phys[p] : f_val[r][c][p];
    end
    return {any_r, any_c, shv[i][r][c] != 0, rot(got, shv[i][r][c], 1'b1)};
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic fault(int r, int c, int p, bit v);
    flt_we = 1; flt_row = 4'(r); flt_col = 3'(c); flt_plane = 3'(p); flt_en = 1; flt_val = v;
    @(posedge clk); #1;
    flt_we = 0;
    f_en[r][c][p] = 1; f_val[r][c][p] = v;
  endtask

  task automatic cam(int i, bit is_col, int r, int c, int p, int idx);
    cfg_we_a = (i == 0); cfg_we_b = (i == 1); cfg_we_c = (i == 2);
    cfg_op = is_col ? CFG_COL_CAM : CFG_ROW_CAM;
    cfg_row = 4'(r); cfg_col = 3'(c); cfg_plane = 3'(p); cfg_idx = CAM_IDX_W'(idx); cfg_valid = 1;
    @(posedge clk); #1;
    {cfg_we_a, cfg_we_b, cfg_we_c} = '0;
    if (is_col) camc[i][r / (ROWS / 2)][p][idx] = c;
    else        camr[i][r / (ROWS / 2)][p][idx] = r % (ROWS / 2);
  endtask

  // Program the shuffle entry of every group of instance i from the faults
  // its spares leave, and record the reference shift of every byte.
  task automatic program_shuffle(int i);
    int rsz = 1 << Q_I[i];
    int maxs = (1 << NFM_I[i]) - 1;
    for (int r = 0; r < ROWS; r++) begin
      for (int g = 0; g < BYTES / rsz; g++) begin
        int best_n = 99, best_b = 0;
        logic [3:0][7:0] m = '0;
        for (int b = 0; b < rsz; b++) begin
          int c = g * rsz + b, n = 0;
          for (int p = 0; p < 8; p++)
            m[b][p] = f_en[r][c][p] && !row_rep(i, r, p) && !col_rep(i, r, c, p);
          for (int p = 7; p >= 0; p--) if (m[b][p]) begin n = 8 - p; break; end
          if (n >= 1 && n <= maxs && n < best_n) begin best_n = n; best_b = b; end
        end
        for (int b = 0; b < rsz; b++)
          shv[i][r][g * rsz + b] = (best_n != 99 && b == best_b) ? best_n : 0;
        cfg_we_a = (i == 0); cfg_we_b = (i == 1); cfg_we_c = (i == 2);
        cfg_op = CFG_SHUFFLE; cfg_row = 4'(r); cfg_col = 3'(g * rsz);
        fmask4 = m; fmask1 = m[0];
        @(posedge clk); #1;
        {cfg_we_a, cfg_we_b, cfg_we_c} = '0;
      end
    end
  endtask

  task automatic write_all();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < BYTES; c++) begin
        logic [7:0] v = 8'($urandom);
        req = 1; we = 1; row = 4'(r); col = 3'(c); wdata = v;
        @(posedge clk); #1;
        data[r][c] = v;
        checks++;
        if (rvalid != 3'b000) begin failures++; $display("rvalid after a write"); end
      end
    req = 0; we = 0;
  endtask

  // One read per cycle: the request is presented in a cycle, its answer is
  // registered at that cycle's closing edge and checked right after it.
  task automatic read_all();
    for (int n = 0; n < ROWS * BYTES; n++) begin
      int pr = n / BYTES, pc = n % BYTES;
      req = 1; we = 0; row = 4'(pr); col = 3'(pc);
      @(posedge clk); #1;
      for (int i = 0; i < 3; i++) begin
        logic [10:0] e = expect_rd(i, pr, pc);
        checks++;
        if (!rvalid[i] || rdata[i] != e[7:0] || {rs[i], cs[i], sh[i]} != e[10:8]) begin
          failures++;
          $display("inst %0d (%0d,%0d): valid %b data %h flags %b%b%b, expected %h flags %b",
                   i, pr, pc, rvalid[i], rdata[i], rs[i], cs[i], sh[i], e[7:0], e[10:8]);
        end
        if (i == 0) begin
          if (e[10]) n_row_spare++;
          if (e[9])  n_col_spare++;
          if (e[8])  n_shifted++;
        end
        if (e[7:0] != data[pr][pc]) n_approx++;
      end
    end
    req = 0;
    @(posedge clk); #1;
    checks++;
    if (rvalid != 3'b000) begin failures++; $display("rvalid without a read"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < BYTES; c++) for (int p = 0; p < 8; p++) begin
      f_en[r][c][p] = 0; f_val[r][c][p] = 0;
    end
    for (int i = 0; i < 3; i++) begin
      for (int h = 0; h < 2; h++) for (int p = 0; p < 8; p++) for (int k = 0; k < 2; k++) begin
        camr[i][h][p][k] = -1; camc[i][h][p][k] = -1;
      end
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < BYTES; c++) shv[i][r][c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // Fault-free memory returns exact data.
    write_all(); read_all();

    // Row fault: line 3, plane 7. Column fault: column 5 of plane 6, upper half.
    for (int c = 0; c < BYTES; c++) fault(3, c, 7, 1'(c % 2));
    for (int r = ROWS / 2; r < ROWS; r++) fault(r, 5, 6, 1);
    // Cluster: lines 9-10, columns 1-2, plane 5.
    for (int r = 9; r <= 10; r++) for (int c = 1; c <= 2; c++) fault(r, c, 5, 1'(r % 2));
    // Scattered single-cell faults.
    fault(0, 0, 6, 1); fault(1, 4, 4, 0); fault(1, 4, 7, 1); fault(6, 7, 2, 1);
    fault(12, 3, 3, 0); fault(14, 6, 0, 1); fault(4, 1, 1, 1); fault(4, 2, 6, 0);
    for (int n = 0; n < 10; n++)
      fault($urandom_range(0, ROWS - 1), $urandom_range(0, BYTES - 1), $urandom_range(0, 7), 1'($urandom_range(0, 1)));

    // Unrepaired pass: every configuration shows the faults.
    write_all(); read_all();

    // A: spares for the line faults and the cluster, then shuffling.
    cam(0, 0, 3, 0, 7, 0);                 // spare row for line 3 in plane 7
    cam(0, 1, 8, 5, 6, 0);                 // spare column for column 5, plane 6, upper half
    cam(0, 0, 9, 0, 5, 0);                 // cluster lines 9 and 10 in plane 5
    cam(0, 0, 10, 0, 5, 1);
    program_shuffle(0);
    // B: k-MSB, planes 7 and 6 fully spared, plane 5 has one spare column.
    cam(1, 0, 3, 0, 7, 0);
    cam(1, 1, 8, 5, 6, 0);
    cam(1, 1, 9, 1, 5, 0);                 // covers half of the cluster
    // C: shuffling only.
    program_shuffle(2);

    repeat (2) begin write_all(); read_all(); end

    checks++;
    if (n_row_spare == 0 || n_col_spare == 0 || n_shifted == 0 || n_approx == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("reads from spare rows %0d, spare columns %0d, rotated %0d, approximate %0d",
             n_row_spare, n_col_spare, n_shifted, n_approx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
