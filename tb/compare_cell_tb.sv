// compare_cell_tb: self-check of the compare-cell control equations.
//
// Sweeps random sample/item pairs (and the equal case) for every combination
// of en, shc and C_{i-1}, and compares C_i, shr, shl, load and the passed-on
// sample with values computed here from the cell's definition: C_i is high
// when the stored item is less than or equal to the sample.
module compare_cell_tb;
  import scam_pkg::*;
  localparam int unsigned W = 8;
  logic en, c_prev, c;
  scam_op_e shc;
  logic [W-1:0] din, tin, dout;
  sort_ctrl_t ctrl;
  int checks = 0, failures = 0;

  compare_cell #(.W(W)) dut (.*);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: din=%0d tin=%0d en=%0b shc=%0b cp=%0b got %0b exp %0b",
               what, din, tin, en, shc, c_prev, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      din = W'($urandom);
      tin = (t % 5 == 0) ? din : W'($urandom);
      for (int m = 0; m < 8; m++) begin
        logic le;
        en = m[0]; shc = scam_op_e'(m[1]); c_prev = m[2];
        #1;
        le = (int'(tin) <= int'(din));
        check("C_i", c, le);
        check("shr", ctrl.shr, en & le & (shc == OP_INSERT));
        check("shl", ctrl.shl, en & le & (shc == OP_DELETE));
        check("load", ctrl.load, en & le & ~c_prev & (shc == OP_INSERT));
        checks++;
        if (dout !== din) begin failures++; $display("FAIL dout"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
