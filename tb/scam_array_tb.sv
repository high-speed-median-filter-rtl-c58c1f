// scam_array_tb: self-check of the shiftable CAM sorter.
//
// Part 1 replays the insert/delete example of a five-entry row holding
// 25 16 10 2 0: inserting 20 gives 25 20 16 10 2, deleting 16 gives
// 25 10 2 0 0. Part 2 runs random inserts, deletes, idle cycles and clears on
// an eight-entry row, with small values so that ties are common, and compares
// every item, both shift ports and the cascade carry with a sorted-list model
// after each clock. Each operation must finish in the one clock it is given.
module scam_array_tb;
  import scam_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned N = 8;
  localparam int unsigned N5 = 5;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // five-entry instance for the worked example
  logic en5, clr5, cout5;
  scam_op_e shc5;
  logic [W-1:0] din5, max5, min5;
  logic [N5-1:0][W-1:0] items5;
  scam_array #(.N(N5), .W(W)) dut5 (
    .clk, .rst_n, .en(en5), .shc(shc5), .clr(clr5), .din(din5),
    .casc_cin(1'b0), .casc_lin('0), .casc_rin('0), .casc_cout(cout5),
    .max_out(max5), .min_out(min5), .items(items5));

  // eight-entry instance for the random test
  logic en, clr, cout;
  scam_op_e shc;
  logic [W-1:0] din, maxo, mino;
  logic [N-1:0][W-1:0] items;
  scam_array #(.N(N), .W(W)) dut (
    .clk, .rst_n, .en, .shc, .clr, .din,
    .casc_cin(1'b0), .casc_lin('0), .casc_rin('0), .casc_cout(cout),
    .max_out(maxo), .min_out(mino), .items);

  logic [W-1:0] model [N];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // model of one operation on a descending list (boundary item = infinity)
  function automatic void model_op(scam_op_e op, logic [W-1:0] v);
    int p = N;
    for (int i = N - 1; i >= 0; i--) if (model[i] <= v) p = i;
    if (p == int'(N)) return;
    if (op == OP_INSERT) begin
      for (int i = N - 1; i > p; i--) model[i] = model[i-1];
      model[p] = v;
    end else begin
      for (int i = p; i < int'(N) - 1; i++) model[i] = model[i+1];
      model[N-1] = '0;
    end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref5 [N5];
    int seq [5] = '{0, 2, 10, 16, 25};
    en5 = 0; clr5 = 0; shc5 = OP_INSERT; din5 = 0;
    en = 0; clr = 0; shc = OP_INSERT; din = 0;
    @(negedge clk); rst_n = 1;
    // build 25 16 10 2 0 by inserting in any order
    foreach (seq[k]) begin
      en5 = 1; shc5 = OP_INSERT; din5 = W'(seq[k]);
      @(negedge clk);
    end
    ref5 = '{25, 16, 10, 2, 0};
    for (int i = 0; i < int'(N5); i++) chk($sformatf("example fill %0d", i), items5[i], ref5[i]);
    din5 = 20; @(negedge clk);   // one clock: insert 20
    ref5 = '{25, 20, 16, 10, 2};
    for (int i = 0; i < int'(N5); i++) chk($sformatf("insert 20, PE %0d", i), items5[i], ref5[i]);
    // restore and delete 16
    clr5 = 1; @(negedge clk); clr5 = 0;
    chk("clear", items5[0], 0);
    foreach (seq[k]) begin din5 = W'(seq[k]); @(negedge clk); end
    shc5 = OP_DELETE; din5 = 16; @(negedge clk);
    en5 = 0;
    ref5 = '{25, 10, 2, 0, 0};
    for (int i = 0; i < int'(N5); i++) chk($sformatf("delete 16, PE %0d", i), items5[i], ref5[i]);

    // random test
    foreach (model[i]) model[i] = '0;
    for (int t = 0; t < 3000; t++) begin
      en  = ($urandom % 6) != 0;
      clr = ($urandom % 64) == 0;
      shc = (($urandom % 3) == 0) ? OP_DELETE : OP_INSERT;
      din = W'($urandom % 16);
      if (shc == OP_DELETE && ($urandom % 2) == 1) din = model[$urandom % N];
      #1;
      chk("cascade carry", cout, int'(model[N-1] <= din));
      if (clr) foreach (model[i]) model[i] = '0;
      else if (en) model_op(shc, din);
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) chk($sformatf("t%0d item %0d", t, i), items[i], model[i]);
      chk("max_out", maxo, model[0]);
      chk("min_out", mino, model[N-1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
