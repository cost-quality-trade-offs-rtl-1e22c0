// tb_approx_mem_top: end-to-end test of the banked memory at its default
// size (8 banks x 128 lines x 16 bytes, hybrid repair with 2 spare rows and
// 2 spare columns per bit-plane subarray, compressed bit-shuffling with
// n_FM = 3 and groups of 4 bytes).
//
// Every bank gets its own hard faults: a row fault, a column fault, a 2 x 2
// cluster, a column fault that is left without a spare, and scattered single
// cells. A simple off-line repair flow then spends spare rows on the row
// fault and the cluster and a spare column on the repaired column fault, and
// programs every group's shuffle entry from the faults left over. The whole
// memory is written with random bytes and read back one byte per cycle,
// round-robin over banks so consecutive reads switch banks; each answer is
// checked on the cycle after its request against a reference model of the
// stored bits. The test counts reads served by a spare row, by a spare
// column, undone rotations, results that stay approximate (faults left
// unrepaired), exact results despite a faulty cell under the data, and bank
// switches, and fails if any of them never happens.
module tb_approx_mem_top;
  import repair_pkg::*;

  localparam int NB = 8, ROWS = 128, BYTES = 16, HALF = ROWS / 2;

  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;
  int         n_row_spare = 0, n_col_spare = 0, n_shifted = 0, n_approx = 0;
  int         n_masked = 0, n_bank_switch = 0;

  logic       req = 0, we = 0;
  logic [2:0] bank = 0;
  logic [6:0] row = 0;
  logic [3:0] col = 0;
  logic [7:0] wdata = 0;
  logic       rvalid, r_row_spare, r_col_spare, r_shifted;
  logic [7:0] rdata;
  logic       cfg_we = 0, cfg_valid = 0;
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

  always #5 clk = ~clk;

  approx_mem_top dut (.*);

  // ---------------- reference state ----------------
  bit         f_en  [NB][ROWS][BYTES][8];
  bit         f_val [NB][ROWS][BYTES][8];
  int         camr  [NB][2][8][2];
  int         camc  [NB][2][8][2];
  int         shv   [NB][ROWS][BYTES];
  logic [7:0] data  [NB][ROWS][BYTES];

  function automatic bit row_rep(int b, int r, int p);
    return camr[b][r / HALF][p][0] == r % HALF || camr[b][r / HALF][p][1] == r % HALF;
  endfunction
  function automatic bit col_rep(int b, int r, int c, int p);
    return camc[b][r / HALF][p][0] == c || camc[b][r / HALF][p][1] == c;
  endfunction
  function automatic logic [7:0] rot(logic [7:0] x, int a, bit left);
    logic [7:0] y;
    for (int k = 0; k < 8; k++) begin
      if (left) y[(k + a) % 8] = x[k];
      else      y[k] = x[(k + a) % 8];
    end
    return y;
  endfunction

  // {row spare, column spare, shifted, faulty cell hidden, data}
  function automatic logic [11:0] expect_rd(int b, int r, int c);
    logic [7:0] phys, got;
    bit any_r = 0, any_c = 0, hidden = 0;
    phys = rot(data[b][r][c], shv[b][r][c], 1'b0);
    for (int p = 0; p < 8; p++) begin
      bit rr = row_rep(b, r, p);
      bit cr = !rr && col_rep(b, r, c, p);
      any_r |= rr; any_c |= cr;
      if (f_en[b][r][c][p]) hidden = 1;
      got[p] = (rr || cr || !f_en[b][r][c][p]) ? phys[p] : f_val[b][r][c][p];
    end
    return {any_r, any_c, shv[b][r][c] != 0, hidden, rot(got, shv[b][r][c], 1'b1)};
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic fault(int b, int r, int c, int p, bit v);
    flt_we = 1; flt_bank = 3'(b); flt_row = 7'(r); flt_col = 4'(c); flt_plane = 3'(p);
    flt_en = 1; flt_val = v;
    @(posedge clk); #1;
    flt_we = 0;
    f_en[b][r][c][p] = 1; f_val[b][r][c][p] = v;
  endtask

  task automatic cam(int b, bit is_col, int r, int c, int p, int idx);
    cfg_we = 1; cfg_bank = 3'(b); cfg_op = is_col ? CFG_COL_CAM : CFG_ROW_CAM;
    cfg_row = 7'(r); cfg_col = 4'(c); cfg_plane = 3'(p); cfg_idx = CAM_IDX_W'(idx); cfg_valid = 1;
    @(posedge clk); #1;
    cfg_we = 0;
    if (is_col) camc[b][r / HALF][p][idx] = c;
    else        camr[b][r / HALF][p][idx] = r % HALF;
  endtask

  task automatic program_shuffle(int b);
    for (int r = 0; r < ROWS; r++) begin
      for (int g = 0; g < BYTES / 4; g++) begin
        int best_n = 99, best_b = 0;
        logic [3:0][7:0] m = '0;
        for (int k = 0; k < 4; k++) begin
          int c = g * 4 + k, n = 0;
          for (int p = 0; p < 8; p++)
            m[k][p] = f_en[b][r][c][p] && !row_rep(b, r, p) && !col_rep(b, r, c, p);
          for (int p = 7; p >= 0; p--) if (m[k][p]) begin n = 8 - p; break; end
          if (n >= 1 && n <= 7 && n < best_n) begin best_n = n; best_b = k; end
        end
        for (int k = 0; k < 4; k++)
          shv[b][r][g * 4 + k] = (best_n != 99 && k == best_b) ? best_n : 0;
        cfg_we = 1; cfg_bank = 3'(b); cfg_op = CFG_SHUFFLE; cfg_row = 7'(r);
        cfg_col = 4'(g * 4); cfg_fmask = m;
        @(posedge clk); #1;
        cfg_we = 0;
      end
    end
  endtask

  task automatic write_all();
    for (int n = 0; n < NB * ROWS * BYTES; n++) begin
      int b = n % NB, r = (n / NB) % ROWS, c = n / (NB * ROWS);
      logic [7:0] v = 8'($urandom);
      req = 1; we = 1; bank = 3'(b); row = 7'(r); col = 4'(c); wdata = v;
      @(posedge clk); #1;
      data[b][r][c] = v;
      checks++;
      if (rvalid) begin failures++; $display("rvalid after a write"); end
    end
    req = 0; we = 0;
  endtask

  task automatic read_all();
    int last_b = -1;
    for (int n = 0; n < NB * ROWS * BYTES; n++) begin
      int b = n % NB, r = (n / NB) % ROWS, c = n / (NB * ROWS);
      logic [11:0] e;
      req = 1; we = 0; bank = 3'(b); row = 7'(r); col = 4'(c);
      @(posedge clk); #1;
      // The address bus moves on before the answer is sampled.
      bank = 3'(b + 1); row = 7'(r + 1); col = 4'(c + 1);
      #1;
      e = expect_rd(b, r, c);
      checks++;
      if (!rvalid || rdata != e[7:0] || {r_row_spare, r_col_spare, r_shifted} != e[11:9]) begin
        failures++;
        if (failures < 20)
          $display("bank %0d (%0d,%0d): valid %b data %h flags %b%b%b, expected %h flags %b",
                   b, r, c, rvalid, rdata, r_row_spare, r_col_spare, r_shifted, e[7:0], e[11:9]);
      end
      if (e[11]) n_row_spare++;
      if (e[10]) n_col_spare++;
      if (e[9])  n_shifted++;
      if (e[7:0] != data[b][r][c]) n_approx++;
      else if (e[8]) n_masked++;
      if (last_b >= 0 && last_b != b) n_bank_switch++;
      last_b = b;
    end
    req = 0;
    @(posedge clk); #1;
    checks++;
    if (rvalid) begin failures++; $display("rvalid without a read"); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < BYTES; c++) begin
        shv[b][r][c] = 0;
        for (int p = 0; p < 8; p++) begin f_en[b][r][c][p] = 0; f_val[b][r][c][p] = 0; end
      end
      for (int h = 0; h < 2; h++) for (int p = 0; p < 8; p++) for (int k = 0; k < 2; k++) begin
        camr[b][h][p][k] = -1; camc[b][h][p][k] = -1;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    write_all(); read_all();
    checks++;
    if (n_approx != 0) begin failures++; $display("fault-free memory returned wrong data"); end

    for (int b = 0; b < NB; b++) begin
      automatic int fr = $urandom_range(0, ROWS - 1), fp = $urandom_range(4, 7);
      automatic int cc = $urandom_range(0, BYTES - 1), cp = $urandom_range(0, 7), ch = $urandom_range(0, 1);
      automatic int ur = $urandom_range(0, ROWS - 2), uc = $urandom_range(0, BYTES - 2), up = $urandom_range(0, 3);
      automatic int xc = $urandom_range(0, BYTES - 1), xp = $urandom_range(0, 3);
      for (int c = 0; c < BYTES; c++) fault(b, fr, c, fp, 1'(c % 2));        // row fault
      for (int r = 0; r < HALF; r++) fault(b, ch * HALF + r, cc, cp, 1);      // column fault
      for (int r = ur; r <= ur + 1; r++)                                      // 2 x 2 cluster
        for (int c = uc; c <= uc + 1; c++) fault(b, r, c, up, 1'(r % 2));
      for (int r = 0; r < HALF; r++) fault(b, r, xc, xp, 0);                  // unspared column
      for (int n = 0; n < 40; n++)
        fault(b, $urandom_range(0, ROWS - 1), $urandom_range(0, BYTES - 1), $urandom_range(0, 7),
              1'($urandom_range(0, 1)));
      cam(b, 0, fr, 0, fp, 0);
      cam(b, 1, ch * HALF, cc, cp, 0);
      cam(b, 0, ur, 0, up, 0);             // cluster: its plane differs from the row fault's
      cam(b, 0, ur + 1, 0, up, 1);
      program_shuffle(b);
    end

    write_all(); read_all();

    checks++;
    if (n_row_spare == 0 || n_col_spare == 0 || n_shifted == 0 || n_approx == 0 ||
        n_masked == 0 || n_bank_switch == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("reads: spare row %0d, spare column %0d, rotated %0d, approximate %0d, fault hidden %0d, bank switches %0d",
             n_row_spare, n_col_spare, n_shifted, n_approx, n_masked, n_bank_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
