// selection_unit: picks the item of a requested order from the sorted row.
//
// The sorted items arrive in descending order (index 0 = largest). 'order'
// names the rank to output: 0 gives the maximum, k-1 the minimum of k stored
// samples, and (k-1)/2 their median. The prototype's selection circuit is only
// named as a dynamic selection circuit; here it is a plain N-to-1 multiplexer,
// so the selected value is valid in the same cycle the items change (zero
// clocks of latency after the last sample's clock edge). An order at or above
// N returns zero.
module selection_unit #(
  parameter int unsigned N = scam_pkg::DEF_N,
  parameter int unsigned W = scam_pkg::DEF_W,
  localparam int unsigned OW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] items,
  input  logic [OW-1:0]       order,
  output logic [W-1:0]        sel_out
);

  always_comb begin
    sel_out = '0;
    for (int unsigned k = 0; k < N; k++)
      if (order == OW'(k)) sel_out = items[k];
  end

endmodule
