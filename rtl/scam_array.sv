// scam_array: the shiftable content-addressable memory (SCAM) sorter.
//
// N processor elements hold up to N samples in descending order, PE 0 holding
// the largest. Every cycle with en high, the input sample din is compared with
// all stored items at once. With shc = insert, every item less than or equal
// to din (the LE group) moves one PE to the right and din is written into the
// first LE position; the item in the last PE leaves on min_out. With
// shc = delete, every LE item moves one PE to the left, which removes the
// largest item not above din (the item equal to din when it is present) and
// pulls casc_rin into the last PE. One insert or delete completes per clock,
// and the new order is visible on 'items' right after that edge.
//
// Cascading: the boundary signals of PE 0 (casc_cin = C_{-1}, casc_lin) and of
// PE N-1 (casc_cout = C_{N-1}, casc_rin) are ports, so two arrays in a row act
// as one array of 2N items. For a single array tie casc_cin and casc_lin to 0
// (an imaginary "infinite" item left of PE 0) and casc_rin to 0 (the reset
// value that fills from the right on delete).
//
// Clear: clr resets all items to zero (used before a new input set); it
// blocks a simultaneous operation. The structure (PE row, shift directions,
// zero start) follows the described architecture; the clear priority and the
// cascade port names are this design's own.
module scam_array
  import scam_pkg::*;
#(
  parameter int unsigned N = DEF_N,
  parameter int unsigned W = DEF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  scam_op_e            shc,
  input  logic                clr,
  input  logic [W-1:0]        din,
  input  logic                casc_cin,   // C_{-1}: 0 for the first array
  input  logic [W-1:0]        casc_lin,   // item shifted in at PE 0 on insert
  input  logic [W-1:0]        casc_rin,   // item shifted in at PE N-1 on delete
  output logic                casc_cout,  // C_{N-1}, to the next array
  output logic [W-1:0]        max_out,    // PE 0 item (left shift port)
  output logic [W-1:0]        min_out,    // PE N-1 item (right shift port)
  output logic [N-1:0][W-1:0] items       // all items, index 0 = largest
);

  logic [N:0]        c;  // c[i] = C_{i-1}; c[0] = casc_cin
  logic [N:0][W-1:0] d;  // d[i] = sample seen by PE i, handed on PE to PE
  logic              op_en;

  assign op_en = en && !clr;
  assign c[0]  = casc_cin;
  assign d[0]  = din;

  for (genvar i = 0; i < int'(N); i++) begin : g_pe
    logic [W-1:0] lin, rin;
    if (i == 0) begin : g_l
      assign lin = casc_lin;
    end else begin : g_l
      assign lin = items[i-1];
    end
    if (i == int'(N) - 1) begin : g_r
      assign rin = casc_rin;
    end else begin : g_r
      assign rin = items[i+1];
    end

    scam_pe #(.W(W)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (op_en),
      .shc   (shc),
      .clr   (clr),
      .din   (d[i]),
      .c_prev(c[i]),
      .lin   (lin),
      .rin   (rin),
      .c     (c[i+1]),
      .dout  (d[i+1]),
      .item  (items[i])
    );
  end

  assign casc_cout = c[N];
  assign max_out   = items[0];
  assign min_out   = items[N-1];

`ifndef SYNTHESIS
  // The items must stay in descending order; otherwise the C bits are not
  // monotonic and an insert could load at two positions.
  always @(posedge clk or negedge rst_n)
    if (rst_n)
      for (int i = 1; i < int'(N); i++)
        a_sorted: assert (items[i-1] >= items[i])
          else $error("scam_array: items %0d and %0d out of order", i-1, i);
`endif

endmodule
