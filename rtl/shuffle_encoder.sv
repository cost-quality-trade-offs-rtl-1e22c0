// shuffle_encoder: computes the bit-shuffling entry of one group of bytes
// from the group's fault map.
//
// Compressed bit-shuffling keeps one shift value for a group of R = 2^Q
// bytes, plus the position of the byte inside the group that it applies to.
// For one byte, if its most significant faulty cell is the n-th most
// significant bit (n = 1 for bit 7), storing the byte rotated right by n
// places puts the data LSB into that cell. A shift of n needs n <= 2^NFM - 1,
// so the 2^NFM - 1 most significant cells can be protected. When several
// bytes of the group have faults only one can be protected: this encoder
// picks the byte whose worst fault is the most significant one, the lowest
// position on a tie (the selection rule is this design's choice). A group
// with no protectable fault gets shift 0.
//
// Purely combinational. fmask[b][i] = 1 marks cell i of byte b as faulty.
module shuffle_encoder
  import repair_pkg::*;
#(
  parameter int unsigned Q   = 2,   // log2 of the compression rate R
  parameter int unsigned NFM = 3,   // bits of a shift value (>= 1)
  localparam int unsigned R  = 1 << Q,
  localparam int unsigned PW = (Q > 0) ? Q : 1
) (
  input  logic [R-1:0][BYTE_W-1:0] fmask,
  output logic [PW-1:0]            pos,
  output logic [NFM-1:0]           shift,
  output logic                     found
);

  localparam int unsigned MAX_SHIFT = (1 << NFM) - 1;

  always_comb begin
    int unsigned best_n;
    int unsigned nb;
    best_n = BYTE_W + 1;
    pos    = '0;
    found  = 1'b0;
    for (int unsigned b = 0; b < R; b++) begin
      // n of the most significant faulty cell of byte b, 0 when fault-free.
      nb = 0;
      for (int unsigned i = 0; i < BYTE_W; i++) begin
        if (fmask[b][i]) nb = BYTE_W - i;
      end
      if (nb != 0 && nb <= MAX_SHIFT && nb < best_n) begin
        best_n = nb;
        pos    = PW'(b);
        found  = 1'b1;
      end
    end
    shift = found ? NFM'(best_n) : '0;
  end

endmodule
