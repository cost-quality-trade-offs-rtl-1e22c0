// circular_shifter: barrel rotator used by bit-shuffling.
//
// Rotates a W-bit data item by 0 .. 2^SW-1 places. It is built as SW layers
// of W two-input multiplexers; layer l rotates by 2^l when bit l of the
// amount is set. The direction is fixed per instance: the write path of the
// memory uses a right rotation, which places the least significant data bit
// into the faulty cell, and the read path uses a left rotation, which puts
// the data bits back in order. With SW = n_FM this is the shifter of the
// bit-shuffling scheme; the document counts n_FM + 1 layers for a shifter
// that serves both directions, while this design uses one fixed-direction
// rotator per path.
//
// Purely combinational: dout follows din and amt in the same cycle.
module circular_shifter #(
  parameter int unsigned W    = 8,     // data width (one byte)
  parameter int unsigned SW   = 3,     // amount width, n_FM (>= 1)
  parameter bit          LEFT = 1'b1   // 1: rotate left, 0: rotate right
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  dout
);

  logic [W-1:0] stage [SW+1];

  assign stage[0] = din;

  for (genvar l = 0; l < SW; l++) begin : g_layer
    localparam int unsigned D = (1 << l) % W;
    logic [W-1:0] rot;
    if (D == 0) begin : g_id
      assign rot = stage[l];
    end else if (LEFT) begin : g_left
      assign rot = {stage[l][W-1-D:0], stage[l][W-1:W-D]};
    end else begin : g_right
      assign rot = {stage[l][D-1:0], stage[l][W-1:D]};
    end
    assign stage[l+1] = amt[l] ? rot : stage[l];
  end

  assign dout = stage[SW];

endmodule
