// scam_pe: one processor element of the shiftable CAM.
//
// A PE pairs a sort-cell (the stored item) with a compare-cell (the
// comparison of that item with the broadcast input sample and the resulting
// shift/load controls). Neighbouring PEs exchange their items (for shifting)
// and their comparison results C (to find the insert boundary).
//
// Interface: left side lin / c_prev, right side rin / c, the input sample din
// (passed on unchanged on dout, as the compare-cell hands the sample to the
// next stage) with the operation (en, shc) and clear, and the stored item on
// 'item' for the neighbours and the selection unit. Timing: item changes at the rising
// clk edge after a requested operation; c is combinational in din and item.
module scam_pe
  import scam_pkg::*;
#(
  parameter int unsigned W = DEF_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  scam_op_e     shc,
  input  logic         clr,     // clear the stored item (new input set)
  input  logic [W-1:0] din,
  input  logic         c_prev,  // C_{i-1}
  input  logic [W-1:0] lin,     // left neighbour's item
  input  logic [W-1:0] rin,     // right neighbour's item
  output logic         c,       // C_i
  output logic [W-1:0] dout,    // input sample passed on to the next PE
  output logic [W-1:0] item     // stored item (also goes to both neighbours)
);

  sort_ctrl_t   ctrl;
  logic [W-1:0] tin;
  logic [W-1:0] lout_unused, rout_unused;

  compare_cell #(.W(W)) u_cmp (
    .en    (en),
    .shc   (shc),
    .din   (din),
    .tin   (tin),
    .c_prev(c_prev),
    .c     (c),
    .dout  (dout),
    .ctrl  (ctrl)
  );

  sort_cell #(.W(W)) u_sort (
    .clk  (clk),
    .rst_n(rst_n),
    .shl  (ctrl.shl),
    .shr  (ctrl.shr),
    .load (ctrl.load),
    .reset(clr),
    .lin  (lin),
    .rin  (rin),
    .bin  (din),
    .lout (lout_unused),
    .rout (rout_unused),
    .bout (tin)
  );

  assign item = tin;

endmodule
