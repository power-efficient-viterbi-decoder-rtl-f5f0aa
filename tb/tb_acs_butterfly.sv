// tb_acs_butterfly: self-checking test of the add-compare-select butterfly.
//
// Applies random metrics, branch metrics and active flags and compares the two
// destination metrics, active flags, decisions and compare flags with the
// selection worked out here: the smaller sum wins, a tie keeps source i, a
// single active source is taken without comparison.
module tb_acs_butterfly;
  import vd_pkg::*;

  localparam int unsigned PM_W = 4;

  logic [PM_W-1:0] pm_i, pm_j, pm_p, pm_q;
  logic            act_i, act_j, act_p, act_q, dec_p, dec_q, cmp_p, cmp_q;
  bm_t             bm_ip, bm_jp, bm_iq, bm_jq;
  int              checks = 0;
  int              failures = 0;
  int              seen_j = 0;
  int              seen_single = 0;

  acs_butterfly #(.PM_W(PM_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_node(int a, bit aa, int ba, int b, bit ab, int bb,
                             logic [PM_W-1:0] pm, logic act, logic dec, logic cmp);
    int  epm;
    bit  eact, edec, ecmp;
    eact = aa | ab;
    ecmp = aa & ab;
    if (aa && ab) edec = (b + bb) < (a + ba);
    else          edec = ab;
    epm = !eact ? 0 : (edec ? b + bb : a + ba);
    checks++;
    if (act !== eact || dec !== edec || cmp !== ecmp || int'(pm) != epm) begin
      failures++;
      $display("FAIL a=%0d/%0d/%0d b=%0d/%0d/%0d -> pm=%0d act=%0d dec=%0d cmp=%0d, expected %0d %0d %0d %0d",
               a, aa, ba, b, ab, bb, pm, act, dec, cmp, epm, eact, edec, ecmp);
    end
    if (edec) seen_j++;
    if (eact && !ecmp) seen_single++;
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      pm_i  = PM_W'($urandom_range(12));
      pm_j  = PM_W'($urandom_range(12));
      act_i = 1'($urandom());
      act_j = 1'($urandom());
      bm_ip = bm_t'($urandom_range(2));
      bm_jp = bm_t'($urandom_range(2));
      bm_iq = bm_t'($urandom_range(2));
      bm_jq = bm_t'($urandom_range(2));
      #1;
      expect_node(int'(pm_i), act_i, int'(bm_ip), int'(pm_j), act_j, int'(bm_jp),
                  pm_p, act_p, dec_p, cmp_p);
      expect_node(int'(pm_i), act_i, int'(bm_iq), int'(pm_j), act_j, int'(bm_jq),
                  pm_q, act_q, dec_q, cmp_q);
    end
    checks++;
    if (seen_j == 0 || seen_single == 0) begin
      failures++;
      $display("FAIL a selection case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
