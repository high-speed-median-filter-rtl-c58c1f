// scam_pkg: types and constants shared by the shiftable-CAM median filter.
//
// The sorter keeps its samples in descending order in a row of processor
// elements (PEs). Each sample is an unsigned W-bit word; the prototype size is
// 64 PEs of 8 bits. The operation selector 'shc' picks insertion (low) or
// deletion (high), as in the compare-cell description.
package scam_pkg;

  // Prototype size: 64 samples of 8 bits.
  localparam int unsigned DEF_N = 64;
  localparam int unsigned DEF_W = 8;

  // shc encoding: low = insert, high = delete.
  typedef enum logic {
    OP_INSERT = 1'b0,
    OP_DELETE = 1'b1
  } scam_op_e;

  // Per-PE control word produced by a compare-cell for its sort-cell.
  typedef struct packed {
    logic shl;   // take the right neighbour's item (delete)
    logic shr;   // take the left neighbour's item (insert)
    logic load;  // take the input sample (insert position)
  } sort_ctrl_t;

endpackage
