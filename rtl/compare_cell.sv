// compare_cell: control generator of one PE of the shiftable CAM.
//
// It compares the current input sample Din with the item Tin stored in its
// sort-cell: C_i = (Din >= Tin), i.e. C_i is high when the stored item belongs
// to the "less than or equal" (LE) group. Because the array is kept in
// descending order, the C bits along the row read 0..0 1..1; the PE whose C_i
// is high while its left neighbour's C_{i-1} is low is the insert position.
// The controls follow the compare-cell equations:
//   shr  = C_i & ~shc              (insert: LE items move right)
//   shl  = C_i &  shc              (delete: LE items move left)
//   load = ~C_{i-1} & C_i & ~shc   (insert: sample goes to the boundary PE)
// All are gated by 'en' so that an idle cycle holds every item.
//
// Every PE compares against the broadcast input in parallel, so C_i does not
// ripple from PE to PE; C_{i-1} is only the neighbour's comparator result.
// The carry-look-ahead of the transistor design is read here as the fast
// magnitude comparator, which synthesis builds from '>='.
//
// Timing: purely combinational (the phi1 work of the two-phase original).
// Dout repeats Din for the next PE, as in the cell description.
module compare_cell
  import scam_pkg::*;
#(
  parameter int unsigned W = DEF_W
) (
  input  logic         en,     // an operation is requested this cycle
  input  scam_op_e     shc,    // insert / delete
  input  logic [W-1:0] din,    // current input sample
  input  logic [W-1:0] tin,    // item held by this PE's sort-cell
  input  logic         c_prev, // C_{i-1} from the left neighbour
  output logic         c,      // C_i to the right neighbour
  output logic [W-1:0] dout,   // input sample passed on
  output sort_ctrl_t   ctrl    // shl / shr / load for the sort-cell
);

  always_comb begin
    c         = (din >= tin);
    ctrl.shr  = en && c && (shc == OP_INSERT);
    ctrl.shl  = en && c && (shc == OP_DELETE);
    ctrl.load = en && !c_prev && c && (shc == OP_INSERT);
  end

  assign dout = din;

endmodule
