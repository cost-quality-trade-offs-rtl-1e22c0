// tb_shuffle_map: programs random position/shift entries into a compressed
// map (8 lines x 16 bytes, groups of 4, n_FM = 3) and an uncompressed one
// (Q = 0), then checks the lookup of every byte of every line against a
// reference table: the shift applies only to the byte at the stored
// position of its group; every other byte reads shift 0.
module tb_shuffle_map;
  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;

  logic       we_c = 0, we_u = 0;
  logic [2:0] prow = 0, lrow = 0;
  logic [1:0] pgrp_c = 0, ppos_c = 0;
  logic [3:0] pgrp_u = 0;
  logic [2:0] psh = 0;
  logic [3:0] lcol = 0;
  logic [2:0] sh_c, sh_u;

  int ref_sh_c [8][4], ref_pos_c [8][4];
  int ref_sh_u [8][16];

  always #5 clk = ~clk;

  shuffle_map #(.ROWS(8), .BYTES(16), .NFM(3), .Q(2)) u_c (
    .clk, .rst_n, .prog_we(we_c), .prog_row(prow), .prog_group(pgrp_c),
    .prog_pos(ppos_c), .prog_shift(psh), .lk_row(lrow), .lk_col(lcol), .lk_shift(sh_c));
  shuffle_map #(.ROWS(8), .BYTES(16), .NFM(3), .Q(0)) u_u (
    .clk, .rst_n, .prog_we(we_u), .prog_row(prow), .prog_group(pgrp_u),
    .prog_pos(1'b0), .prog_shift(psh), .lk_row(lrow), .lk_col(lcol), .lk_shift(sh_u));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 16; c++) begin
        int g = c / 4;
        int ec = (ref_pos_c[r][g] == c % 4) ? ref_sh_c[r][g] : 0;
        lrow = 3'(r); lcol = 4'(c);
        #1;
        checks += 2;
        if (sh_c != 3'(ec)) begin failures++; $display("compressed r%0d c%0d: %0d exp %0d", r, c, sh_c, ec); end
        if (sh_u != 3'(ref_sh_u[r][c])) begin failures++; $display("plain r%0d c%0d: %0d exp %0d", r, c, sh_u, ref_sh_u[r][c]); end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int g = 0; g < 4; g++) begin ref_sh_c[r][g] = 0; ref_pos_c[r][g] = 0; end
      for (int c = 0; c < 16; c++) ref_sh_u[r][c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    sweep();
    for (int n = 0; n < 60; n++) begin
      automatic int r = $urandom_range(0, 7), g = $urandom_range(0, 3), p = $urandom_range(0, 3);
      automatic int s = $urandom_range(0, 7), c = $urandom_range(0, 15);
      prow = 3'(r); pgrp_c = 2'(g); ppos_c = 2'(p); pgrp_u = 4'(c); psh = 3'(s);
      we_c = 1; we_u = 1;
      @(posedge clk); #1;
      we_c = 0; we_u = 0;
      ref_sh_c[r][g] = s; ref_pos_c[r][g] = p; ref_sh_u[r][c] = s;
      if (n % 10 == 9) sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
