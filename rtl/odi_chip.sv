// odi_chip: median filter / sorter built on a shiftable CAM (SCAM).
//
// The chip keeps up to N samples (64 of 8 bits by default) sorted in
// descending order in a row of processor elements. Each clock with en high
// it either inserts din (shc = insert) or deletes din (shc = delete) in one
// step: every PE compares din with its own item in parallel, the items less
// than or equal to din shift one place right (insert) or left (delete), and
// an inserted sample is written at the boundary. A selection unit then
// outputs the item of rank 'order' on median_out; after k inserted samples
// the median is rank (k-1)/2. Because the sort is complete at the clock edge
// that takes the last sample, the median is on median_out right after that
// edge, with no further cycles. A running window (running median) is one
// delete of the oldest sample and one insert of the newest, two cycles per
// new sample.
//
// Shift ports: max_out is the item of PE 0 and min_out the item of PE N-1;
// on an insert into a full chip the smallest item leaves through min_out.
// Cascading: connect casc_cout/min_out of one chip to casc_cin/casc_lin of
// the next, and the next chip's max_out to this chip's casc_rin, to sort 2N
// samples. A single chip ties casc_cin, casc_lin and casc_rin to zero.
//
// clr zeroes every item (start of a new input set). rst_n is an asynchronous
// power-on clear. The single-edge clock replaces the two-phase clock of the
// original circuit; the port list is this design's own.
module odi_chip
  import scam_pkg::*;
#(
  parameter int unsigned N = DEF_N,
  parameter int unsigned W = DEF_W,
  localparam int unsigned OW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // perform the operation this cycle
  input  scam_op_e      shc,         // OP_INSERT / OP_DELETE
  input  logic          clr,         // clear all items to zero
  input  logic [W-1:0]  din,         // sample to insert or delete
  input  logic [OW-1:0] order,       // rank to select (0 = maximum)
  output logic [W-1:0]  median_out,  // item of rank 'order'
  output logic [W-1:0]  max_out,     // left shift port (largest item)
  output logic [W-1:0]  min_out,     // right shift port (smallest item)
  input  logic          casc_cin,
  input  logic [W-1:0]  casc_lin,
  input  logic [W-1:0]  casc_rin,
  output logic          casc_cout
);

  logic [N-1:0][W-1:0] items;

  scam_array #(.N(N), .W(W)) u_scam (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .shc      (shc),
    .clr      (clr),
    .din      (din),
    .casc_cin (casc_cin),
    .casc_lin (casc_lin),
    .casc_rin (casc_rin),
    .casc_cout(casc_cout),
    .max_out  (max_out),
    .min_out  (min_out),
    .items    (items)
  );

  selection_unit #(.N(N), .W(W)) u_sel (
    .items  (items),
    .order  (order),
    .sel_out(median_out)
  );

endmodule
