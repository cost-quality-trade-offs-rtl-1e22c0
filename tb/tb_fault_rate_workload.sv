// tb_fault_rate_workload: the fault-rate study on the full-size memory.
//
// For each cell failure probability P_cell = 0.1 %, 0.25 %, 0.5 % and 0.75 %
// the number of faults is drawn as a binomial sample over all cells of the
// memory (8 banks x 128 lines x 16 bytes x 8 bits). Each fault becomes a row
// fault (1 %), a column fault (10 %), a cluster fault (2 %) or a single-cell
// fault (87 %). A row fault spans one row of a bit-plane subarray (16
// cells), a column fault one column of it (64 cells), a cluster 2 x 2 cells
// of one plane (the cluster shape is this test's choice). Faulty cells read
// a random fixed value.
//
// Two memories receive the same faults:
//   A  the default hybrid memory (2 + 2 spares per subarray, compressed
//      bit-shuffling, n_FM = 3, groups of 4 bytes)
//   B  k-MSB redundant repair: the 2 most significant planes get 4 spare rows
//      and 4 spare columns, the others 1 + 1, no bit-shuffling
// A greedy off-line flow (not essential spare pivoting) spends, per
// subarray, spare rows on row faults and then on cluster rows, and spare
// columns on column faults; A's shuffle entries are computed from the
// faults that are left.
// Random image bytes are written and read back; every read is checked
// against a bit-level reference model. The test reports the PSNR of the
// read-back data for no repair (from the model), A and B, and requires both
// repaired memories to beat the unrepaired one at every rate.
module tb_fault_rate_workload;
  import repair_pkg::*;

  localparam int NB = 8, ROWS = 128, BYTES = 16, HALF = ROWS / 2;
  localparam int NI = 2;  // memories under test

  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;
  int         n_row_spare = 0, n_col_spare = 0, n_shifted = 0, n_approx = 0;

  logic       req = 0, we = 0;
  logic [2:0] bank = 0;
  logic [6:0] row = 0;
  logic [3:0] col = 0;
  logic [7:0] wdata = 0;
  logic       cfg_valid = 0;
  logic [NI-1:0] cfg_we = '0;
  cfg_op_e    cfg_op = CFG_NONE;
  logic [2:0] cfg_bank = 0, cfg_plane = 0;
  logic [6:0] cfg_row = 0;
  logic [3:0] cfg_col = 0;
  logic [CAM_IDX_W-1:0] cfg_idx = 0;
  logic [3:0][7:0] cfg_fmask = '0;
  logic       flt_we = 0, flt_en = 0, flt_val = 0;
  logic [2:0] flt_bank = 0, flt_plane = 0;
  logic [6:0] flt_row = 0;
  logic [3:0] flt_col = 0;

  logic [NI-1:0]      rvalid, rs, cs, sh;
  logic [NI-1:0][7:0] rdata;

  always #5 clk = ~clk;

  approx_mem_top u_a (
    .clk, .rst_n, .req, .we, .bank, .row, .col, .wdata,
    .rvalid(rvalid[0]), .rdata(rdata[0]), .r_row_spare(rs[0]), .r_col_spare(cs[0]), .r_shifted(sh[0]),
    .cfg_we(cfg_we[0]), .cfg_op, .cfg_bank, .cfg_plane, .cfg_row, .cfg_col, .cfg_idx, .cfg_valid, .cfg_fmask,
    .flt_we, .flt_bank, .flt_plane, .flt_row, .flt_col, .flt_en, .flt_val);
  approx_mem_top #(.NFM(0), .K(2), .SR(4), .SC(4), .SR_LESS(1), .SC_LESS(1)) u_b (
    .clk, .rst_n, .req, .we, .bank, .row, .col, .wdata,
    .rvalid(rvalid[1]), .rdata(rdata[1]), .r_row_spare(rs[1]), .r_col_spare(cs[1]), .r_shifted(sh[1]),
    .cfg_we(cfg_we[1]), .cfg_op, .cfg_bank, .cfg_plane, .cfg_row, .cfg_col, .cfg_idx, .cfg_valid, .cfg_fmask,
    .flt_we, .flt_bank, .flt_plane, .flt_row, .flt_col, .flt_en, .flt_val);

  // ---------------- reference state ----------------
  bit         f_en  [NB][ROWS][BYTES][8];
  bit         f_val [NB][ROWS][BYTES][8];
  int         camr  [NI][NB][2][8][4];
  int         camc  [NI][NB][2][8][4];
  int         shv   [NB][ROWS][BYTES];          // memory A only
  logic [7:0] data  [NB][ROWS][BYTES];
  // Candidate lines per subarray, in allocation order.
  int         rowq  [NB][2][8][$];
  int         colq  [NB][2][8][$];

  function automatic int spares(int i, int p, bit is_col);
    if (i == 0) return 2;
    return (p >= 6) ? 4 : 1;
  endfunction

  function automatic bit row_rep(int i, int b, int r, int p);
    for (int k = 0; k < 4; k++) if (camr[i][b][r / HALF][p][k] == r % HALF) return 1;
    return 0;
  endfunction
  function automatic bit col_rep(int i, int b, int r, int c, int p);
    for (int k = 0; k < 4; k++) if (camc[i][b][r / HALF][p][k] == c) return 1;
    return 0;
  endfunction
  function automatic logic [7:0] rot(logic [7:0] x, int a, bit left);
    logic [7:0] y;
    for (int k = 0; k < 8; k++) begin
      if (left) y[(k + a) % 8] = x[k];
      else      y[k] = x[(k + a) % 8];
    end
    return y;
  endfunction

  // {row spare, column spare, shifted, data} of memory i
  function automatic logic [10:0] expect_rd(int i, int b, int r, int c);
    logic [7:0] phys, got;
    int s = (i == 0) ? shv[b][r][c] : 0;
    bit any_r = 0, any_c = 0;
    phys = rot(data[b][r][c], s, 1'b0);
    for (int p = 0; p < 8; p++) begin
      bit rr = row_rep(i, b, r, p);
      bit cr = !rr && col_rep(i, b, r, c, p);
      any_r |= rr; any_c |= cr;
      got[p] = (rr || cr || !f_en[b][r][c][p]) ? phys[p] : f_val[b][r][c][p];
    end
    return {any_r, any_c, s != 0, rot(got, s, 1'b1)};
  endfunction

  function automatic logic [7:0] unrepaired(int b, int r, int c);
    logic [7:0] v = data[b][r][c];
    for (int p = 0; p < 8; p++) if (f_en[b][r][c][p]) v[p] = f_val[b][r][c][p];
    return v;
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic fault(int b, int r, int c, int p);
    bit v = 1'($urandom_range(0, 1));
    flt_we = 1; flt_bank = 3'(b); flt_row = 7'(r); flt_col = 4'(c); flt_plane = 3'(p);
    flt_en = 1; flt_val = v;
    @(posedge clk); #1;
    flt_we = 0;
    f_en[b][r][c][p] = 1; f_val[b][r][c][p] = v;
  endtask

  task automatic add_row(int b, int r, int p);
    foreach (rowq[b][r / HALF][p][k]) if (rowq[b][r / HALF][p][k] == r) return;
    rowq[b][r / HALF][p].push_back(r);
  endtask
  task automatic add_col(int b, int h, int c, int p);
    foreach (colq[b][h][p][k]) if (colq[b][h][p][k] == c) return;
    colq[b][h][p].push_back(c);
  endtask

  task automatic cam(int i, int b, bit is_col, int r, int c, int p, int idx);
    cfg_we = '0; cfg_we[i] = 1'b1;
    cfg_bank = 3'(b); cfg_op = is_col ? CFG_COL_CAM : CFG_ROW_CAM;
    cfg_row = 7'(r); cfg_col = 4'(c); cfg_plane = 3'(p); cfg_idx = CAM_IDX_W'(idx); cfg_valid = 1;
    @(posedge clk); #1;
    cfg_we = '0;
    if (is_col) camc[i][b][r / HALF][p][idx] = c;
    else        camr[i][b][r / HALF][p][idx] = r % HALF;
  endtask

  task automatic allocate(int i);
    for (int b = 0; b < NB; b++)
      for (int h = 0; h < 2; h++)
        for (int p = 0; p < 8; p++) begin
          int nr = spares(i, p, 0), nc = spares(i, p, 1);
          for (int k = 0; k < nr && k < rowq[b][h][p].size(); k++)
            cam(i, b, 0, rowq[b][h][p][k], 0, p, k);
          for (int k = 0; k < nc && k < colq[b][h][p].size(); k++)
            cam(i, b, 1, h * HALF, colq[b][h][p][k], p, k);
        end
  endtask

  task automatic program_shuffle();
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++)
        for (int g = 0; g < BYTES / 4; g++) begin
          int best_n = 99, best_k = 0;
          logic [3:0][7:0] m = '0;
          bit any = 0;
          for (int k = 0; k < 4; k++) begin
            int c = g * 4 + k, n = 0;
            for (int p = 0; p < 8; p++)
              m[k][p] = f_en[b][r][c][p] && !row_rep(0, b, r, p) && !col_rep(0, b, r, c, p);
            for (int p = 7; p >= 0; p--) if (m[k][p]) begin n = 8 - p; break; end
            if (n >= 1 && n <= 7 && n < best_n) begin best_n = n; best_k = k; end
            any |= (m[k] != 0);
          end
          for (int k = 0; k < 4; k++)
            shv[b][r][g * 4 + k] = (best_n != 99 && k == best_k) ? best_n : 0;
          if (any) begin
            cfg_we = 2'b01; cfg_bank = 3'(b); cfg_op = CFG_SHUFFLE; cfg_row = 7'(r);
            cfg_col = 4'(g * 4); cfg_fmask = m;
            @(posedge clk); #1;
            cfg_we = '0;
          end
        end
  endtask

  task automatic run_rate(int rate_x100, input real p_cell);
    int   nfault = 0, nrow = 0, ncol = 0, ncl = 0, nsingle = 0;
    real  se [NI+1];
    real  psnr [NI+1];
    // reset memories and reference
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < BYTES; c++) begin
        shv[b][r][c] = 0;
        for (int p = 0; p < 8; p++) begin f_en[b][r][c][p] = 0; f_val[b][r][c][p] = 0; end
      end
      for (int h = 0; h < 2; h++) for (int p = 0; p < 8; p++) begin
        rowq[b][h][p].delete(); colq[b][h][p].delete();
        for (int k = 0; k < 4; k++) for (int i = 0; i < NI; i++) begin
          camr[i][b][h][p][k] = -1; camc[i][b][h][p][k] = -1;
        end
      end
    end
    // binomial number of faults over all cells
    for (int n = 0; n < NB * ROWS * BYTES * 8; n++)
      if ($urandom_range(0, 999999) < int'(p_cell * 1.0e6)) nfault++;
    for (int n = 0; n < nfault; n++) begin
      int b = $urandom_range(0, NB - 1), r = $urandom_range(0, ROWS - 1);
      int c = $urandom_range(0, BYTES - 1), p = $urandom_range(0, 7);
      int t = $urandom_range(0, 99);
      if (t < 1) begin                                   // row fault
        nrow++;
        for (int cc = 0; cc < BYTES; cc++) fault(b, r, cc, p);
        add_row(b, r, p);
      end else if (t < 11) begin                         // column fault
        ncol++;
        for (int rr = 0; rr < HALF; rr++) fault(b, (r / HALF) * HALF + rr, c, p);
        add_col(b, r / HALF, c, p);
      end else if (t < 13) begin                         // 2 x 2 cluster
        int r2 = (r % HALF == HALF - 1) ? r - 1 : r;
        int c2 = (c == BYTES - 1) ? c - 1 : c;
        ncl++;
        for (int rr = r2; rr <= r2 + 1; rr++) for (int cc = c2; cc <= c2 + 1; cc++) fault(b, rr, cc, p);
        add_row(b, r2, p); add_row(b, r2 + 1, p);
      end else begin                                     // single cell
        nsingle++;
        fault(b, r, c, p);
      end
    end
    for (int i = 0; i < NI; i++) allocate(i);
    program_shuffle();
    // write an image's worth of random bytes, then read it back
    for (int n = 0; n < NB * ROWS * BYTES; n++) begin
      int b = n % NB, r = (n / NB) % ROWS, c = n / (NB * ROWS);
      logic [7:0] v = 8'($urandom);
      req = 1; we = 1; bank = 3'(b); row = 7'(r); col = 4'(c); wdata = v;
      @(posedge clk); #1;
      data[b][r][c] = v;
    end
    for (int i = 0; i <= NI; i++) se[i] = 0.0;
    for (int n = 0; n < NB * ROWS * BYTES; n++) begin
      int b = n % NB, r = (n / NB) % ROWS, c = n / (NB * ROWS);
      real d;
      req = 1; we = 0; bank = 3'(b); row = 7'(r); col = 4'(c);
      @(posedge clk); #1;
      bank = 3'(b + 3);
      #1;
      for (int i = 0; i < NI; i++) begin
        logic [10:0] e = expect_rd(i, b, r, c);
        checks++;
        if (!rvalid[i] || rdata[i] != e[7:0] || {rs[i], cs[i], sh[i]} != e[10:8]) begin
          failures++;
          if (failures < 20)
            $display("P=%0d/10000 mem %0d bank %0d (%0d,%0d): data %h flags %b%b%b, expected %h flags %b",
                     rate_x100, i, b, r, c, rdata[i], rs[i], cs[i], sh[i], e[7:0], e[10:8]);
        end
        if (e[10]) n_row_spare++;
        if (e[9])  n_col_spare++;
        if (e[8])  n_shifted++;
        if (e[7:0] != data[b][r][c]) n_approx++;
        d = real'(int'(rdata[i])) - real'(int'(data[b][r][c]));
        se[i] += d * d;
      end
      d = real'(int'(unrepaired(b, r, c))) - real'(int'(data[b][r][c]));
      se[NI] += d * d;
    end
    req = 0;
    for (int i = 0; i <= NI; i++) begin
      real mse = se[i] / real'(NB * ROWS * BYTES);
      psnr[i] = (mse > 0.0) ? 10.0 * $log10(255.0 * 255.0 / mse) : 99.0;
    end
    $display("P_cell %0d.%02d%%: %0d faults (row %0d, column %0d, cluster %0d, single %0d); PSNR dB: unrepaired %.1f, hybrid %.1f, k-MSB %.1f",
             rate_x100 / 100, rate_x100 % 100, nfault, nrow, ncol, ncl, nsingle, psnr[NI], psnr[0], psnr[1]);
    checks++;
    if (!(psnr[0] > psnr[NI]) || !(psnr[1] > psnr[NI])) begin
      failures++;
      $display("a repaired memory is not better than the unrepaired one");
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    run_rate(10, 0.001);
    run_rate(25, 0.0025);
    run_rate(50, 0.005);
    run_rate(75, 0.0075);
    checks++;
    if (n_row_spare == 0 || n_col_spare == 0 || n_shifted == 0 || n_approx == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
