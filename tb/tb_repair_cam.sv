// tb_repair_cam: programs a 4-entry CAM of 6-bit addresses and checks every
// key against a reference list of valid entries, including invalidation,
// overwriting an entry and the lowest-index priority on duplicate entries.
module tb_repair_cam;
  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;
  logic       prog_we = 0, prog_valid = 0;
  logic [1:0] prog_idx = 0;
  logic [5:0] prog_addr = 0, key = 0;
  logic       hit;
  logic [1:0] hit_idx;

  logic [5:0] ref_addr [4];
  bit         ref_valid [4];

  always #5 clk = ~clk;

  repair_cam #(.ENTRIES(4), .AW(6)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog(int idx, int addr, bit v);
    prog_we = 1; prog_idx = 2'(idx); prog_addr = 6'(addr); prog_valid = v;
    @(posedge clk); #1;
    prog_we = 0;
    ref_addr[idx] = 6'(addr); ref_valid[idx] = v;
  endtask

  task automatic sweep();
    for (int k = 0; k < 64; k++) begin
      bit exp_hit = 0; int exp_idx = 0;
      for (int i = 3; i >= 0; i--)
        if (ref_valid[i] && ref_addr[i] == 6'(k)) begin exp_hit = 1; exp_idx = i; end
      key = 6'(k);
      #1;
      checks++;
      if (hit != exp_hit || (exp_hit && hit_idx != 2'(exp_idx))) begin
        failures++;
        $display("key %0d: hit=%b idx=%0d expected hit=%b idx=%0d", k, hit, hit_idx, exp_hit, exp_idx);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin ref_addr[i] = 0; ref_valid[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    sweep();                   // nothing valid after reset
    prog(0, 5, 1); prog(1, 40, 1); prog(3, 63, 1);
    sweep();
    prog(2, 40, 1);            // duplicate: index 1 must win
    sweep();
    prog(1, 12, 1);            // overwrite: now index 2 holds 40
    sweep();
    prog(0, 5, 0);             // invalidate
    sweep();
    for (int n = 0; n < 20; n++) begin
      prog($urandom_range(0, 3), $urandom_range(0, 63), 1'($urandom_range(0, 1)));
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
