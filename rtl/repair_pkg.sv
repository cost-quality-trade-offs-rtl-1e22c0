// repair_pkg: types and constants shared by the approximate-repair memory.
//
// The memory stores one image byte per address. Configuration writes
// program the repair structures (the row and column CAMs of a bit-plane
// subarray, and the compressed bit-shuffling map of a line); cfg_op_e names
// which structure a configuration write targets. The encoding is this
// design's own choice.
package repair_pkg;

  // Data items are image bytes.
  localparam int unsigned BYTE_W = 8;

  // Width of a spare-entry index on the configuration port (up to 16 spares
  // per subarray and dimension).
  localparam int unsigned CAM_IDX_W = 4;

  // Target of a configuration write.
  typedef enum logic [1:0] {
    CFG_NONE    = 2'd0,  // no operation
    CFG_ROW_CAM = 2'd1,  // write one spare-row CAM entry of one subarray
    CFG_COL_CAM = 2'd2,  // write one spare-column CAM entry of one subarray
    CFG_SHUFFLE = 2'd3   // encode a group fault map into the shuffle map
  } cfg_op_e;

endpackage
