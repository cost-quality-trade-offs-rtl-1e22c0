// tb_cell_array: writes random data into a 16 x 8 cell model, injects
// stuck-at-0 and stuck-at-1 faults, and checks that faulty cells return the
// stuck value whatever is written while all other cells return their data;
// then heals the faults and checks the cells store data again.
module tb_cell_array;
  logic       clk = 0, rst_n = 0;
  int         checks = 0, failures = 0;
  logic       we = 0, wbit = 0, rbit;
  logic [3:0] row = 0;
  logic [2:0] col = 0;
  logic       f_we = 0, f_en = 0, f_val = 0;
  logic [3:0] f_row = 0;
  logic [2:0] f_col = 0;

  bit ref_data [16][8];
  bit ref_en   [16][8];
  bit ref_val  [16][8];

  always #5 clk = ~clk;

  cell_array #(.ROWS(16), .COLS(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_all();
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 8; c++) begin
        bit v = 1'($urandom_range(0, 1));
        we = 1; row = 4'(r); col = 3'(c); wbit = v;
        @(posedge clk); #1;
        ref_data[r][c] = v;
      end
    we = 0;
  endtask

  task automatic read_all();
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 8; c++) begin
        bit e = ref_en[r][c] ? ref_val[r][c] : ref_data[r][c];
        row = 4'(r); col = 3'(c);
        #1;
        checks++;
        if (rbit != e) begin failures++; $display("cell %0d,%0d read %b exp %b", r, c, rbit, e); end
      end
  endtask

  task automatic fault(int r, int c, bit en, bit v);
    f_we = 1; f_row = 4'(r); f_col = 3'(c); f_en = en; f_val = v;
    @(posedge clk); #1;
    f_we = 0;
    ref_en[r][c] = en; ref_val[r][c] = v;
  endtask

  initial begin
    for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) begin ref_en[r][c] = 0; ref_val[r][c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    write_all(); read_all();
    for (int n = 0; n < 24; n++) fault($urandom_range(0, 15), $urandom_range(0, 7), 1, 1'($urandom_range(0, 1)));
    fault(3, 3, 1, 0); fault(4, 4, 1, 1);
    repeat (3) begin write_all(); read_all(); end
    for (int r = 0; r < 16; r++) for (int c = 0; c < 8; c++) if (ref_en[r][c]) fault(r, c, 0, 0);
    write_all(); read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
