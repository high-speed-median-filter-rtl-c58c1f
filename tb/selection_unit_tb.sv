// selection_unit_tb: self-check of the order-selection multiplexer.
//
// Fills the item row with random words and checks that every order value
// returns the item of that rank.
module selection_unit_tb;
  localparam int unsigned N = 16;
  localparam int unsigned W = 8;
  logic [N-1:0][W-1:0] items;
  logic [$clog2(N)-1:0] order;
  logic [W-1:0] sel_out;
  int checks = 0, failures = 0;

  selection_unit #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < N; k++) items[k] = W'($urandom);
      for (int k = 0; k < N; k++) begin
        order = k[$clog2(N)-1:0];
        #1;
        checks++;
        if (sel_out !== items[k]) begin
          failures++;
          $display("FAIL order %0d: got %0d expected %0d", k, sel_out, items[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
