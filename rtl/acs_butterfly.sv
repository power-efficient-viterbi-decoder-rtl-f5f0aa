// acs_butterfly: add-compare-select butterfly of the Viterbi decoder.
//
// Two source states i and j feed two destination states p and q. For each
// destination the unit adds the branch metrics to the source path metrics and
// keeps the smaller sum:
//   pm_p = min(pm_i + bm_ip, pm_j + bm_jp)
//   pm_q = min(pm_i + bm_iq, pm_j + bm_jq)
// The decision bit dec_p / dec_q is 0 when the path from i survives and 1 when
// the path from j survives; ties keep i (this design's choice).
//
// For the threshold (T-algorithm) decoder every source carries an active
// flag. A destination fed by two active sources is compared as above; one fed
// by a single active source takes that path with no comparison (cmp_* low);
// one fed by none is inactive, and its metric and decision are zero. This
// follows the idea that paths above the threshold take no part in the
// comparisons.
//
// Interface and timing: purely combinational. PM_W must hold pm + bm without
// overflow; the caller sizes it.
module acs_butterfly
  import vd_pkg::*;
#(
  parameter int unsigned PM_W = 2
) (
  input  logic [PM_W-1:0] pm_i,
  input  logic [PM_W-1:0] pm_j,
  input  logic            act_i,
  input  logic            act_j,
  input  bm_t             bm_ip,
  input  bm_t             bm_jp,
  input  bm_t             bm_iq,
  input  bm_t             bm_jq,
  output logic [PM_W-1:0] pm_p,
  output logic [PM_W-1:0] pm_q,
  output logic            act_p,
  output logic            act_q,
  output logic            dec_p,
  output logic            dec_q,
  output logic            cmp_p,
  output logic            cmp_q
);

  // One add-compare-select node: both candidate sums, then the selection.
  function automatic logic [PM_W+1:0] acs_node(
      input logic [PM_W-1:0] pa, input logic aa, input bm_t ba,
      input logic [PM_W-1:0] pb, input logic ab, input bm_t bb);
    // Result packed as {active, decision, metric}.
    logic [PM_W-1:0] sa, sb;
    logic            d;
    sa = pa + PM_W'(ba);
    sb = pb + PM_W'(bb);
    if (aa && ab) d = (sb < sa);
    else          d = ab;
    return {(aa | ab), d, d ? sb : sa};
  endfunction

  logic [PM_W+1:0] node_p, node_q;

  always_comb begin
    node_p = acs_node(pm_i, act_i, bm_ip, pm_j, act_j, bm_jp);
    node_q = acs_node(pm_i, act_i, bm_iq, pm_j, act_j, bm_jq);
    act_p  = node_p[PM_W+1];
    act_q  = node_q[PM_W+1];
    dec_p  = node_p[PM_W] & act_p;
    dec_q  = node_q[PM_W] & act_q;
    pm_p   = act_p ? node_p[PM_W-1:0] : '0;
    pm_q   = act_q ? node_q[PM_W-1:0] : '0;
    cmp_p  = act_i & act_j;
    cmp_q  = act_i & act_j;
  end

endmodule
