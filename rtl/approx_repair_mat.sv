// approx_repair_mat: one mat of an approximately repaired image memory,
// using the hybrid scheme: limited redundant repair (spare rows and columns
// per bit-plane subarray, optionally skewed to the k most significant bits)
// combined with compressed bit-shuffling.
//
// Organisation. A mat holds ROWS lines of BYTES bytes. The bits of a byte
// are interleaved: bit p of every byte of the upper (lower) half of the
// lines lives in its own subarray of ROWS/2 x BYTES cells, so a mat has
// 2 x 8 subarrays. Subarrays of the K most significant bit planes get SR
// spare rows and SC spare columns, the others SR_LESS and SC_LESS (k-MSB
// repair; K = 8 gives the same spares to every plane). Each subarray
// redirects an access to its spares through its own row and column CAMs.
//
// Bit-shuffling. A shuffle map holds, per group of 2^Q bytes of a line, one
// NFM-bit shift value and the position of the byte it applies to. On a write
// the byte is rotated right by its shift value before it reaches the bit
// planes, so that the data LSB lands in the most significant faulty cell;
// on a read the raw byte is rotated left by the same amount. The CAM search
// and the shift-value lookup run in parallel with the array access. NFM = 0
// removes bit-shuffling (plain limited or k-MSB redundant repair); Q = 0 is
// the uncompressed scheme with one shift value per byte.
//
// Interface and timing. One access per cycle: req with we writes wdata at
// (row, col) at the clock edge; req without we reads, and rdata is valid
// with rvalid in the next cycle (one-cycle latency, this design's choice).
// r_row_spare / r_col_spare / r_shifted report, with the read data, whether
// any bit came from a spare row or spare column and whether a non-zero
// rotation was undone. cfg_* writes one repair entry per cycle: a row or
// column CAM entry of subarray (cfg_row MSB, cfg_plane), or the shuffle
// entry of group cfg_col >> Q of line cfg_row, computed from that group's
// fault map cfg_fmask. flt_* injects a hard fault into the cell model.
module approx_repair_mat
  import repair_pkg::*;
#(
  parameter int unsigned ROWS    = 128, // lines per mat, M
  parameter int unsigned BYTES   = 16,  // bytes per line, N/W
  parameter int unsigned NFM     = 3,   // shift-value bits, n_FM (0: no shuffling)
  parameter int unsigned Q       = 2,   // compression rate R = 2^Q
  parameter int unsigned K       = 8,   // bit planes with the full spare count
  parameter int unsigned SR      = 2,   // spare rows per subarray, m
  parameter int unsigned SC      = 2,   // spare columns per subarray, n
  parameter int unsigned SR_LESS = 1,   // spare rows of the other planes, m_less
  parameter int unsigned SC_LESS = 1,   // spare columns of the other planes, n_less
  localparam int unsigned RAW  = $clog2(ROWS),
  localparam int unsigned CAW  = $clog2(BYTES),
  localparam int unsigned R    = 1 << Q,
  localparam int unsigned SRAW = RAW - 1,
  localparam int unsigned PAW  = (SRAW > CAW) ? SRAW : CAW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // access port
  input  logic                       req,
  input  logic                       we,
  input  logic [RAW-1:0]             row,
  input  logic [CAW-1:0]             col,
  input  logic [BYTE_W-1:0]          wdata,
  output logic                       rvalid,
  output logic [BYTE_W-1:0]          rdata,
  output logic                       r_row_spare,
  output logic                       r_col_spare,
  output logic                       r_shifted,
  // repair configuration port
  input  logic                       cfg_we,
  input  cfg_op_e                    cfg_op,
  input  logic [2:0]                 cfg_plane,
  input  logic [RAW-1:0]             cfg_row,
  input  logic [CAW-1:0]             cfg_col,
  input  logic [CAM_IDX_W-1:0]       cfg_idx,
  input  logic                       cfg_valid,
  input  logic [R-1:0][BYTE_W-1:0]   cfg_fmask,
  // fault injection port of the cell model
  input  logic                       flt_we,
  input  logic [2:0]                 flt_plane,
  input  logic [RAW-1:0]             flt_row,
  input  logic [CAW-1:0]             flt_col,
  input  logic                       flt_en,
  input  logic                       flt_val
);

  localparam int unsigned SHW = (NFM > 0) ? NFM : 1;

  logic [SHW-1:0]    shift;
  logic [BYTE_W-1:0] wphys;     // byte as stored in the cells
  logic [BYTE_W-1:0] rphys;     // byte as read from the cells
  logic [BYTE_W-1:0] rrestored; // byte after undoing the rotation

  // ---------------- bit-shuffling ----------------
  if (NFM > 0) begin : g_shuffle
    localparam int unsigned GW = ((BYTES >> Q) > 1) ? $clog2(BYTES >> Q) : 1;
    localparam int unsigned PW = (Q > 0) ? Q : 1;
    logic [PW-1:0]  enc_pos;
    logic [NFM-1:0] enc_shift;
    logic           enc_found;

    shuffle_encoder #(.Q(Q), .NFM(NFM)) u_enc (
      .fmask(cfg_fmask), .pos(enc_pos), .shift(enc_shift), .found(enc_found)
    );

    shuffle_map #(.ROWS(ROWS), .BYTES(BYTES), .NFM(NFM), .Q(Q)) u_map (
      .clk, .rst_n,
      .prog_we   (cfg_we && cfg_op == CFG_SHUFFLE),
      .prog_row  (cfg_row),
      .prog_group(GW'(cfg_col >> Q)),
      .prog_pos  (enc_pos),
      .prog_shift(enc_shift),
      .lk_row    (row),
      .lk_col    (col),
      .lk_shift  (shift)
    );

    circular_shifter #(.W(BYTE_W), .SW(NFM), .LEFT(1'b0)) u_wrot (
      .din(wdata), .amt(shift), .dout(wphys)
    );
    circular_shifter #(.W(BYTE_W), .SW(NFM), .LEFT(1'b1)) u_rrot (
      .din(rphys), .amt(shift), .dout(rrestored)
    );
  end else begin : g_no_shuffle
    assign shift     = '0;
    assign wphys     = wdata;
    assign rrestored = rphys;
  end

  // ---------------- bit-plane subarrays ----------------
  logic [1:0][BYTE_W-1:0] sub_rbit, sub_row_hit, sub_col_hit;

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar p = 0; p < BYTE_W; p++) begin : g_plane
      localparam bit MSB_PLANE = (p >= BYTE_W - K);
      localparam int unsigned P_SR = MSB_PLANE ? SR : SR_LESS;
      localparam int unsigned P_SC = MSB_PLANE ? SC : SC_LESS;
      logic in_half, cfg_here;
      assign in_half  = (row[RAW-1] == 1'(h));
      assign cfg_here = cfg_we && (cfg_plane == 3'(p)) && (cfg_row[RAW-1] == 1'(h));

      repair_subarray #(.ROWS(ROWS / 2), .COLS(BYTES), .SR(P_SR), .SC(P_SC)) u_sub (
        .clk, .rst_n,
        .we       (req && we && in_half),
        .row      (row[SRAW-1:0]),
        .col      (col),
        .wbit     (wphys[p]),
        .rbit     (sub_rbit[h][p]),
        .row_hit  (sub_row_hit[h][p]),
        .col_hit  (sub_col_hit[h][p]),
        .cam_we   (cfg_here && (cfg_op == CFG_ROW_CAM || cfg_op == CFG_COL_CAM)),
        .cam_col  (cfg_op == CFG_COL_CAM),
        .cam_idx  (cfg_idx),
        .cam_addr (cfg_op == CFG_COL_CAM ? PAW'(cfg_col) : PAW'(cfg_row[SRAW-1:0])),
        .cam_valid(cfg_valid),
        .f_we     (flt_we && (flt_plane == 3'(p)) && (flt_row[RAW-1] == 1'(h))),
        .f_row    (flt_row[SRAW-1:0]),
        .f_col    (flt_col),
        .f_en     (flt_en),
        .f_val    (flt_val)
      );
    end
  end

  logic [BYTE_W-1:0] row_hit_sel, col_hit_sel;
  assign rphys       = sub_rbit[row[RAW-1]];
  assign row_hit_sel = sub_row_hit[row[RAW-1]];
  assign col_hit_sel = sub_col_hit[row[RAW-1]];

  // ---------------- read register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid      <= 1'b0;
      rdata       <= '0;
      r_row_spare <= 1'b0;
      r_col_spare <= 1'b0;
      r_shifted   <= 1'b0;
    end else begin
      rvalid <= req && !we;
      if (req && !we) begin
        rdata       <= rrestored;
        r_row_spare <= |row_hit_sel;
        r_col_spare <= |(col_hit_sel & ~row_hit_sel);
        r_shifted   <= (shift != '0);
      end
    end
  end

  read_latency_one : assert property (@(posedge clk) disable iff (!rst_n)
    (req && !we) |=> rvalid);
  no_spurious_rvalid : assert property (@(posedge clk) disable iff (!rst_n)
    !(req && !we) |=> !rvalid);

endmodule
