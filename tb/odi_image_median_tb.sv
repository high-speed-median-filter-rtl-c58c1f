// odi_image_median_tb: 2-D running-window median filtering on the chip.
//
// A random 8-bit image with salt-and-pepper impulses is filtered with square
// windows of 3x3, 5x5, 7x7 and 8x8 samples (the last one fills all 64 PEs).
// Along each image row the window slides one column at a time: the k samples
// of the column that leaves are deleted and the k samples of the column that
// enters are inserted, 2k clocks per output pixel; at the start of a row the
// chip is cleared and filled with k*k samples. The testbench plays the role
// of the line delays by reading the image from an array. After the last
// insert of each window, median_out (order (k*k-1)/2) must equal the median
// computed directly from the window, with no extra clock. The cycle count per
// output pixel is checked as well.
module odi_image_median_tb;
  import scam_pkg::*;
  localparam int unsigned N  = DEF_N;
  localparam int unsigned W  = DEF_W;
  localparam int unsigned OW = $clog2(N);
  localparam int IMG = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  logic en, clr, cout;
  scam_op_e shc;
  logic [W-1:0] din, med, maxo, mino;
  logic [OW-1:0] order;
  odi_chip dut (
    .clk, .rst_n, .en, .shc, .clr, .din, .order,
    .median_out(med), .max_out(maxo), .min_out(mino),
    .casc_cin(1'b0), .casc_lin('0), .casc_rin('0), .casc_cout(cout));

  int img [IMG][IMG];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic op(scam_op_e o, int v);
    en = 1; shc = o; din = W'(v);
    @(negedge clk);
    en = 0;
  endtask

  function automatic int window_median(int r, int c, int k);
    int s [$];
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) s.push_back(img[r+i][c+j]);
    s.rsort();
    return s[(k*k - 1) / 2];
  endfunction

  task automatic filter(int k);
    longint t0;
    int outputs = 0;
    order = OW'((k*k - 1) / 2);
    for (int r = 0; r + k <= IMG; r++) begin
      clr = 1; @(negedge clk); clr = 0;
      for (int i = 0; i < k; i++)
        for (int j = 0; j < k; j++) op(OP_INSERT, img[r+i][j]);
      chk($sformatf("k=%0d row %0d col 0", k, r), med, window_median(r, 0, k));
      for (int c = 1; c + k <= IMG; c++) begin
        t0 = cycles;
        for (int i = 0; i < k; i++) op(OP_DELETE, img[r+i][c-1]);
        for (int i = 0; i < k; i++) op(OP_INSERT, img[r+i][c+k-1]);
        chk($sformatf("k=%0d row %0d col %0d", k, r, c), med, window_median(r, c, k));
        chk($sformatf("k=%0d clocks per pixel", k), cycles - t0, 2 * k);
        outputs++;
      end
    end
    $display("window %0dx%0d: %0d sliding outputs checked", k, k, outputs);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial run();

  task automatic run();
    en = 0; clr = 0; shc = OP_INSERT; din = 0; order = 0;
    foreach (img[i, j]) begin
      int u = $urandom % 100;
      img[i][j] = (u < 5) ? 0 : (u < 10) ? 255 : 100 + ($urandom % 40);
    end
    @(negedge clk); @(negedge clk); rst_n = 1;
    filter(3);
    filter(5);
    filter(7);
    filter(8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
