// tb_shuffle_encoder: random and directed group fault maps against a
// reference selection, for R = 4 bytes with n_FM = 3 and n_FM = 2.
//
// Reference rule: for each byte, n is 8 minus the index of its highest
// faulty cell; a byte is protectable when 1 <= n <= 2^n_FM - 1; the byte
// with the smallest protectable n wins, lowest position on a tie.
module tb_shuffle_encoder;
  logic             clk = 0;
  int               checks = 0, failures = 0;
  logic [3:0][7:0]  fmask;
  logic [1:0]       pos3, pos2;
  logic [2:0]       sh3;
  logic [1:0]       sh2;
  logic             f3, f2;

  always #5 clk = ~clk;

  shuffle_encoder #(.Q(2), .NFM(3)) u3 (.fmask, .pos(pos3), .shift(sh3), .found(f3));
  shuffle_encoder #(.Q(2), .NFM(2)) u2 (.fmask, .pos(pos2), .shift(sh2), .found(f2));

  task automatic expect_enc(int nfm, output bit ef, output int ep, output int es);
    int maxs = (1 << nfm) - 1;
    ef = 0; ep = 0; es = 0;
    for (int b = 0; b < 4; b++) begin
      int n = 0;
      for (int i = 7; i >= 0; i--) if (fmask[b][i]) begin n = 8 - i; break; end
      if (n >= 1 && n <= maxs && (!ef || n < es)) begin ef = 1; ep = b; es = n; end
    end
  endtask

  task automatic check_now();
    bit ef; int ep, es;
    #1;
    expect_enc(3, ef, ep, es);
    checks++;
    if (f3 != ef || sh3 != 3'(es) || (ef && pos3 != 2'(ep))) begin
      failures++;
      $display("nfm3 mask %h: got f=%b pos=%0d sh=%0d exp f=%b pos=%0d sh=%0d", fmask, f3, pos3, sh3, ef, ep, es);
    end
    expect_enc(2, ef, ep, es);
    checks++;
    if (f2 != ef || sh2 != 2'(es) || (ef && pos2 != 2'(ep))) begin
      failures++;
      $display("nfm2 mask %h: got f=%b pos=%0d sh=%0d exp f=%b pos=%0d sh=%0d", fmask, f2, pos2, sh2, ef, ep, es);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: one faulty cell at every position of every byte.
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 8; i++) begin
        fmask = '0;
        fmask[b][i] = 1'b1;
        check_now();
        @(posedge clk);
      end
    end
    // Directed: byte 2 has bit 6 faulty, byte 1 bit 7 faulty -> byte 1, shift 1.
    fmask = '0; fmask[2][6] = 1; fmask[1][7] = 1; check_now();
    // Random sparse maps.
    for (int n = 0; n < 4000; n++) begin
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < 8; i++)
          fmask[b][i] = ($urandom_range(0, 15) == 0);
      check_now();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
