// tb_acs_pm_unit: self-checking test of the merged ACS / path metric unit.
//
// Two instances run side by side on the same random received symbols: one
// with the default threshold 0 and one with threshold 2. Frames of random
// length start with `first`. Before every clock edge the decisions and the
// pruned / compare counts are compared with the reference step; after it the
// active flags, the metrics (as distances from the best metric) and the best
// state. Counts that each pruning and selection case happened.
module tb_acs_pm_unit;
  import vd_pkg::*;
  import vd_ref_pkg::*;

  localparam int unsigned T0 = 0;
  localparam int unsigned T2 = 2;

  logic clk = 0;
  logic rst_n;
  logic in_valid;
  logic first;
  code_t rx;
  bm_t  bm [1 << CODE_W];

  logic [NUM_STATES-1:0] dec0, dec2, act0, act2;
  logic [$clog2(T0+3)-1:0] pm0 [NUM_STATES];
  logic [$clog2(T2+3)-1:0] pm2 [NUM_STATES];
  state_t best0, best2;
  logic [2:0] np0, np2, nc0, nc2;

  int checks = 0;
  int failures = 0;
  int n_prune_events = 0;
  int n_cmp_events = 0;
  int n_dec_j = 0;

  always #5 clk = ~clk;

  always_comb
    for (int c = 0; c < 4; c++) bm[c] = bm_t'($countones(rx ^ code_t'(c)));

  acs_pm_unit u0 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .first(first), .bm(bm),
    .dec(dec0), .pm(pm0), .active(act0), .best_state(best0),
    .n_pruned(np0), .n_compared(nc0));

  acs_pm_unit #(.THRESHOLD(T2)) u2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .first(first), .bm(bm),
    .dec(dec2), .pm(pm2), .active(act2), .best_state(best2),
    .n_pruned(np2), .n_compared(nc2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Compare one instance's registered state with the reference metrics.
  task automatic check_regs(metrics_t m, logic [NUM_STATES-1:0] act, int pmv [4],
                            state_t best, string tag);
    int mn, eb;
    mn = 1 << 30;
    for (int s = 0; s < 4; s++) if (m.act[s] && m.pm[s] < mn) mn = m.pm[s];
    eb = 0;
    for (int s = 3; s >= 0; s--) if (m.act[s] && m.pm[s] == mn) eb = s;
    for (int s = 0; s < 4; s++) begin
      check(act[s] == m.act[s], $sformatf("%s active[%0d]", tag, s));
      if (m.act[s]) check(pmv[s] == m.pm[s] - mn, $sformatf("%s pm[%0d]=%0d exp %0d", tag, s, pmv[s], m.pm[s] - mn));
    end
    check(int'(best) == eb, $sformatf("%s best state %0d exp %0d", tag, best, eb));
  endtask

  initial begin
    metrics_t r0, r2, n0, n2;
    bit d0 [4];
    bit d2 [4];
    int p0, p2, c0, c2, left;
    int pv [4];
    rst_n = 0;
    in_valid = 0;
    first = 0;
    rx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    r0 = ref_start();
    r2 = ref_start();
    left = 0;
    for (int n = 0; n < 4000; n++) begin
      in_valid = ($urandom_range(4) != 0);
      first = in_valid && (left == 0);
      rx = code_t'($urandom());
      if (first) begin
        r0 = ref_start();
        r2 = ref_start();
        left = $urandom_range(12, 1);
      end
      #1;
      ref_step(r0, int'(rx), T0, n0, d0, p0, c0);
      ref_step(r2, int'(rx), T2, n2, d2, p2, c2);
      if (in_valid) begin
        for (int s = 0; s < 4; s++) begin
          if (n0.act[s]) check(dec0[s] == d0[s], $sformatf("T0 dec[%0d]", s));
          if (n2.act[s]) check(dec2[s] == d2[s], $sformatf("T2 dec[%0d]", s));
          if (n0.act[s] && d0[s]) n_dec_j++;
        end
        check(int'(np0) == p0, $sformatf("T0 pruned %0d exp %0d", np0, p0));
        check(int'(np2) == p2, $sformatf("T2 pruned %0d exp %0d", np2, p2));
        check(int'(nc0) == c0, $sformatf("T0 compared %0d exp %0d", nc0, c0));
        check(int'(nc2) == c2, $sformatf("T2 compared %0d exp %0d", nc2, c2));
        n_prune_events += p0;
        n_cmp_events += c2;
      end
      @(negedge clk);
      if (in_valid) begin
        r0 = n0;
        r2 = n2;
        left--;
      end
      for (int s = 0; s < 4; s++) pv[s] = int'(pm0[s]);
      check_regs(r0, act0, pv, best0, "T0");
      for (int s = 0; s < 4; s++) pv[s] = int'(pm2[s]);
      check_regs(r2, act2, pv, best2, "T2");
    end
    $display("pruned states %0d, comparisons %0d, j-branch selections %0d",
             n_prune_events, n_cmp_events, n_dec_j);
    check(n_prune_events > 0 && n_cmp_events > 0 && n_dec_j > 0, "every case happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
