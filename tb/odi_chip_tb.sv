// odi_chip_tb: end-to-end self-check of the median filter chip at its
// default size (64 samples of 8 bits), plus two chips cascaded as a
// 128-entry sorter.
//
// Phases:
//   1. insert 64 random samples, one per clock; right after each clock edge
//      median_out (order = (k-1)/2 for k samples) must equal the median of a
//      model list: the order is ready with no extra cycle;
//   2. sweep every order on the full chip, check both shift ports;
//   3. insert into the full chip: the smallest item must leave on min_out;
//   4. delete present and absent values, and hold on idle cycles;
//   5. running median with a 9-sample window (one delete + one insert per
//      new sample), then clear;
//   6. two cascaded chips: random inserts and deletes against a 128-entry
//      model, checked on both chips' items through their order selectors.
// Every mechanism is counted; one that never happened is a failure.
module odi_chip_tb;
  import scam_pkg::*;
  localparam int unsigned N  = DEF_N;
  localparam int unsigned W  = DEF_W;
  localparam int unsigned OW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- single chip (no parameter override: default size) ----
  logic en, clr, cout;
  scam_op_e shc;
  logic [W-1:0] din, med, maxo, mino;
  logic [OW-1:0] order;
  odi_chip dut (
    .clk, .rst_n, .en, .shc, .clr, .din, .order,
    .median_out(med), .max_out(maxo), .min_out(mino),
    .casc_cin(1'b0), .casc_lin('0), .casc_rin('0), .casc_cout(cout));

  // ---- two cascaded chips ----
  logic c_en, c_clr, ca_cout, cb_cout;
  scam_op_e c_shc;
  logic [W-1:0] c_din, ca_med, ca_max, ca_min, cb_med, cb_max, cb_min;
  logic [OW-1:0] ca_order, cb_order;
  odi_chip chip_a (
    .clk, .rst_n, .en(c_en), .shc(c_shc), .clr(c_clr), .din(c_din),
    .order(ca_order), .median_out(ca_med), .max_out(ca_max), .min_out(ca_min),
    .casc_cin(1'b0), .casc_lin('0), .casc_rin(cb_max), .casc_cout(ca_cout));
  odi_chip chip_b (
    .clk, .rst_n, .en(c_en), .shc(c_shc), .clr(c_clr), .din(c_din),
    .order(cb_order), .median_out(cb_med), .max_out(cb_max), .min_out(cb_min),
    .casc_cin(ca_cout), .casc_lin(ca_min), .casc_rin('0), .casc_cout(cb_cout));

  // ---- reference: descending list of fixed length, zero filled ----
  int m1 [N];
  int m2 [2*N];

  // mechanism counters
  int n_insert, n_delete, n_load_top, n_load_bottom, n_tie, n_overflow;
  int n_del_absent, n_idle, n_clear, n_median, n_running, n_casc_cross;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // apply one operation to a descending list; returns insert/delete position
  function automatic int list_op(ref int m [], input int len, input bit del,
                                 input int v);
    int p = len;
    for (int i = len - 1; i >= 0; i--) if (m[i] <= v) p = i;
    if (p == len) return p;
    if (!del) begin
      for (int i = len - 1; i > p; i--) m[i] = m[i-1];
      m[p] = v;
    end else begin
      for (int i = p; i < len - 1; i++) m[i] = m[i+1];
      m[len-1] = 0;
    end
    return p;
  endfunction

  function automatic bit present(int v);
    foreach (m1[i]) if (m1[i] == v) return 1;
    return 0;
  endfunction

  // one operation on the single chip, model kept in step
  task automatic op1(bit del, int v);
    int dyn [];
    int p;
    dyn = new[N];
    foreach (m1[i]) dyn[i] = m1[i];
    if (!del && present(v)) n_tie++;
    if (del && !present(v)) n_del_absent++;
    p = list_op(dyn, N, del, v);
    if (!del && p == 0) n_load_top++;
    if (!del && p == int'(N) - 1) n_load_bottom++;
    if (del) n_delete++; else n_insert++;
    foreach (m1[i]) m1[i] = dyn[i];
    en = 1; shc = del ? OP_DELETE : OP_INSERT; din = W'(v);
    @(negedge clk);
    en = 0;
  endtask

  task automatic check_all1(string tag);
    for (int k = 0; k < int'(N); k++) begin
      order = OW'(k); #1;
      chk($sformatf("%s order %0d", tag, k), med, m1[k]);
    end
    chk({tag, " max_out"}, maxo, m1[0]);
    chk({tag, " min_out"}, mino, m1[N-1]);
    @(negedge clk);
  endtask

  task automatic seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  function automatic int median_of(int q [$]);
    int s [$];
    s = q;
    s.rsort();
    return s[(s.size() - 1) / 2];
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial run();

  task automatic run();
    int samples [$];
    int win [$];
    en = 0; clr = 0; shc = OP_INSERT; din = 0; order = 0;
    c_en = 0; c_clr = 0; c_shc = OP_INSERT; c_din = 0; ca_order = 0; cb_order = 0;
    foreach (m1[i]) m1[i] = 0;
    foreach (m2[i]) m2[i] = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    check_all1("after reset");

    // 1. fill, median ready right after the clock edge of each sample
    for (int k = 1; k <= int'(N); k++) begin
      int v = 1 + ($urandom % 200);
      if (k == 5) v = 255;        // new maximum
      if (k == 9) v = samples[2]; // tie
      samples.push_back(v);
      order = OW'((k - 1) / 2);
      op1(0, v);
      chk($sformatf("median after %0d samples", k), med, median_of(samples));
      n_median++;
    end
    check_all1("full");

    // 2/3. overflow: a sample smaller than all pushes nothing useful out; a
    // large one pushes the smallest out of the right shift port
    begin
      int smallest = m1[N-1];
      chk("min_out before overflow", mino, smallest);
      op1(0, 250);
      n_overflow++;
      chk("smallest dropped", mino, m1[N-1]);
      op1(0, 0);                 // below every item of a full row: dropped
      // equal to the smallest item but below the next: lands in the last PE
      if (m1[N-2] > m1[N-1]) op1(0, m1[N-1]);
    end
    check_all1("overflow");

    // 4. deletes (present, absent) and idle hold
    op1(1, m1[10]);
    op1(1, m1[0]);
    op1(1, 201);                 // 201 is never inserted
    check_all1("delete");
    en = 0; din = 0;
    repeat (3) begin @(negedge clk); n_idle++; end
    check_all1("idle");

    // 5. running median, 9-sample window
    clr = 1; @(negedge clk); clr = 0; n_clear++;
    foreach (m1[i]) m1[i] = 0;
    check_all1("clear");
    order = OW'(4);
    for (int t = 0; t < 300; t++) begin
      int v = $urandom % 256;
      if (win.size() == 9) begin
        op1(1, win.pop_front());
      end
      op1(0, v);
      win.push_back(v);
      if (win.size() == 9) begin
        chk($sformatf("running median %0d", t), med, median_of(win));
        n_running++;
      end
    end

    // 6. cascade of two chips as one 128-entry row
    for (int t = 0; t < 600; t++) begin
      int dyn [];
      int v;
      bit del;
      del = (t > 200) && (($urandom % 3) == 0);
      v = $urandom % 256;
      if (del && ($urandom % 2)) v = m2[$urandom % (2 * N)];
      dyn = new[2 * N];
      foreach (m2[i]) dyn[i] = m2[i];
      void'(list_op(dyn, 2 * N, del, v));
      c_en = 1; c_shc = del ? OP_DELETE : OP_INSERT; c_din = W'(v);
      #1;
      if (ca_cout && m2[N-1] != 0) n_casc_cross++;  // an item crosses the chips
      chk($sformatf("cascade carry t=%0d", t), ca_cout, int'(m2[N-1] <= v));
      foreach (m2[i]) m2[i] = dyn[i];
      @(negedge clk);
      c_en = 0;
      if (t % 50 == 49 || t == 127) begin
        for (int k = 0; k < int'(N); k++) begin
          ca_order = OW'(k); cb_order = OW'(k); #1;
          chk($sformatf("cascade A order %0d", k), ca_med, m2[k]);
          chk($sformatf("cascade B order %0d", k), cb_med, m2[N + k]);
        end
        @(negedge clk);
      end
    end

    $display("mechanisms: insert=%0d delete=%0d load_top=%0d load_bottom=%0d tie=%0d overflow=%0d",
             n_insert, n_delete, n_load_top, n_load_bottom, n_tie, n_overflow);
    $display("            delete_absent=%0d idle=%0d clear=%0d median=%0d running=%0d cascade=%0d",
             n_del_absent, n_idle, n_clear, n_median, n_running, n_casc_cross);
    seen("insert", n_insert);             seen("delete", n_delete);
    seen("load at PE 0", n_load_top);     seen("load at last PE", n_load_bottom);
    seen("insert of a tie", n_tie);       seen("overflow", n_overflow);
    seen("delete of absent", n_del_absent); seen("idle hold", n_idle);
    seen("clear", n_clear);               seen("median", n_median);
    seen("running median", n_running);    seen("cascade carry", n_casc_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
