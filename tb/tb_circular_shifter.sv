// tb_circular_shifter: exhaustive check of the left and right rotators.
//
// Every byte value is rotated by every amount 0..7 through one left and one
// right rotator (3-bit amount, n_FM = 3) and through a 2-bit right rotator
// (n_FM = 2), and the results are compared with a bit-by-bit reference.
// A left rotation must also undo the right rotation by the same amount.
module tb_circular_shifter;
  logic       clk = 0;
  int         checks = 0, failures = 0;
  logic [7:0] din;
  logic [2:0] amt;
  logic [7:0] dl, dr, dr2, back;

  always #5 clk = ~clk;

  circular_shifter #(.W(8), .SW(3), .LEFT(1'b1)) u_l  (.din, .amt, .dout(dl));
  circular_shifter #(.W(8), .SW(3), .LEFT(1'b0)) u_r  (.din, .amt, .dout(dr));
  circular_shifter #(.W(8), .SW(2), .LEFT(1'b0)) u_r2 (.din, .amt(amt[1:0]), .dout(dr2));
  circular_shifter #(.W(8), .SW(3), .LEFT(1'b1)) u_b  (.din(dr), .amt, .dout(back));

  function automatic logic [7:0] ref_rot(logic [7:0] x, int a, bit left);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) begin
      if (left) y[(i + a) % 8] = x[i];
      else      y[i] = x[(i + a) % 8];
    end
    return y;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int a = 0; a < 8; a++) begin
        din = 8'(v);
        amt = 3'(a);
        @(posedge clk);
        checks += 4;
        if (dl != ref_rot(din, a, 1'b1)) begin failures++; $display("left  %h by %0d -> %h", din, a, dl); end
        if (dr != ref_rot(din, a, 1'b0)) begin failures++; $display("right %h by %0d -> %h", din, a, dr); end
        if (dr2 != ref_rot(din, a % 4, 1'b0)) begin failures++; $display("right2 %h by %0d -> %h", din, a, dr2); end
        if (back != din) begin failures++; $display("round trip %h by %0d -> %h", din, a, back); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
