// sort_cell_tb: random self-check of one sort-cell word.
//
// Drives random shl/shr/load/reset patterns and neighbour/input words and
// compares the stored word with a model of the priority shl > load > shr >
// reset > hold. Also checks the asynchronous power-on clear and that all three
// outputs show the stored word.
module sort_cell_tb;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 0;
  logic shl, shr, load, reset;
  logic [W-1:0] lin, rin, bin, lout, rout, bout, model;
  int checks = 0, failures = 0;

  sort_cell #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {shl, shr, load, reset} = '0;
    lin = 0; rin = 0; bin = 0;
    @(posedge clk); #1;
    check("power-on clear", bout, '0);
    @(negedge clk); rst_n = 1;
    model = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      {shl, shr, load, reset} = 4'($urandom);
      lin = W'($urandom); rin = W'($urandom); bin = W'($urandom);
      if (shl)        model = rin;
      else if (load)  model = bin;
      else if (shr)   model = lin;
      else if (reset) model = '0;
      @(posedge clk); #1;
      check("bout", bout, model);
      check("lout", lout, model);
      check("rout", rout, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
