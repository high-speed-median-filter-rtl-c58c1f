// scam_pe_tb: self-check of one processor element with modelled neighbours.
//
// The testbench plays both neighbours: it drives random left/right items,
// the left neighbour's comparison bit and random insert/delete/clear
// operations, and checks the PE's comparison bit and next stored item
// against a model: delete and LE -> right item; insert, LE and left neighbour
// not LE -> the sample; insert and LE -> left item; otherwise clear -> zero;
// else hold. (The row above the PE blocks operations during a clear.)
module scam_pe_tb;
  import scam_pkg::*;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0;
  logic en, clr, c_prev, c;
  scam_op_e shc;
  logic [W-1:0] din, lin, rin, item, dout, model;
  int checks = 0, failures = 0;

  scam_pe #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; c_prev = 0; shc = OP_INSERT; din = 0; lin = 0; rin = 0;
    @(posedge clk); #1 check("power-on clear", item, '0);
    @(negedge clk); rst_n = 1;
    model = '0;
    for (int t = 0; t < 1000; t++) begin
      logic le;
      @(negedge clk);
      en = ($urandom % 8) != 0;
      clr = ($urandom % 16) == 0;
      shc = scam_op_e'($urandom % 2);
      c_prev = $urandom % 2;
      din = W'($urandom); lin = W'($urandom); rin = W'($urandom);
      if (t % 7 == 0) din = model;
      #1;
      le = (model <= din);
      check("C_i", W'(c), W'(le));
      check("dout", dout, din);
      if (en && le && shc == OP_DELETE)            model = rin;
      else if (en && le && !c_prev)                model = din;
      else if (en && le)                           model = lin;
      else if (clr)                                model = '0;
      @(posedge clk); #1;
      check("item", item, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
