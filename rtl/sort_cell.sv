// sort_cell: one W-bit storage word of the shiftable CAM.
//
// The cell holds one sorted item (SReg). On a clock edge it can take the item
// of its left neighbour (shift right, insert), take the item of its right
// neighbour (shift left, delete), load the input sample, hold, or clear to
// zero. Its item is always visible to both neighbours (lout, rout) and to the
// compare-cell and selection unit (bout).
//
// The list of five functions and the port names follow the behavioural
// description of the cell. The transistor cell uses two non-overlapping clock
// phases with a pre-shift buffer (INV_1): neighbours' items are copied into the
// buffer in phi1 and stored in phi2. Here the neighbour paths are plain wires
// into a register clocked by the rising edge, so the pre-shift gates
// (pright/pleft) have no counterpart.
//
// Priority (own choice where the description conflicts): shl, then load, then
// shr, then reset. The described order puts shr before load, but the PE at
// the insert position sees both shr and load active; it must take the input
// sample, so load wins there. Its old item still leaves on rout.
//
// Timing: all updates at the rising edge of clk; rst_n is an asynchronous
// power-on clear (the original design starts with all contents at zero; the
// asynchronous input is this design's own).
module sort_cell #(
  parameter int unsigned W = scam_pkg::DEF_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shl,    // SReg := rin
  input  logic         shr,    // SReg := lin
  input  logic         load,   // SReg := bin
  input  logic         reset,  // SReg := 0
  input  logic [W-1:0] lin,    // item of the left neighbour
  input  logic [W-1:0] rin,    // item of the right neighbour
  input  logic [W-1:0] bin,    // input sample
  output logic [W-1:0] lout,   // own item, to the left neighbour
  output logic [W-1:0] rout,   // own item, to the right neighbour
  output logic [W-1:0] bout    // own item, to compare-cell / selection
);

  logic [W-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sreg <= '0;
    else if (shl)    sreg <= rin;
    else if (load)   sreg <= bin;
    else if (shr)    sreg <= lin;
    else if (reset)  sreg <= '0;
  end

  assign lout = sreg;
  assign rout = sreg;
  assign bout = sreg;

endmodule
