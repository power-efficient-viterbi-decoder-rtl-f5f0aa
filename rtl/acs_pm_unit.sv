// acs_pm_unit: merged add-compare-select and path metric unit of the
// power-efficient (T-algorithm) Viterbi decoder.
//
// In the power-efficient decoder the ACSU and the PMU form a single unit, and
// the threshold that prunes paths sits inside it. Each trellis step:
//   1. Two acs_butterfly instances extend the four stored path metrics by the
//      branch metrics from the BMU. Only active (unpruned) states take part;
//      a destination reached from a single active state needs no comparison.
//   2. The smallest new metric is found and subtracted from all of them, so
//      the stored metrics are distances from the best path.
//   3. Every state whose distance exceeds THRESHOLD is pruned: its active
//      flag is cleared and it is excluded from the next step's arithmetic.
// With the default THRESHOLD of 0 only the states tied with the best path
// survive each step, so every stored metric is 0 and the metric registers
// reduce to the four active flags.
//
// Measuring the threshold against the best path metric (step 2) is this
// design's reading of the T-algorithm; it lets the stored metric be compared
// with a constant and keeps the registers a few bits wide with no overflow.
//
// Interface and timing: bm[] comes from the BMU for the current symbol. When
// in_valid is high the new metrics and active flags are registered at the
// clock edge. With first high the previous metrics are replaced by the start
// condition of the encoder (state 00 active with metric 0, all others
// pruned), so a frame may follow the previous one directly. dec[s] is the
// survivor decision of destination state s for the current symbol
// (combinational, 1 = predecessor {s[0],1}), to be stored by the SPMU.
// best_state is the lowest-numbered active state of the registered metrics
// with distance 0. n_pruned and n_compared count, for the current symbol, the
// states removed by the threshold and the comparisons made. Reset is
// synchronous, active low, and loads the start condition.
module acs_pm_unit
  import vd_pkg::*;
#(
  parameter int unsigned THRESHOLD = 0,
  localparam int unsigned PM_W     = $clog2(THRESHOLD + 3)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  first,
  input  bm_t                   bm       [1 << CODE_W],
  output logic [NUM_STATES-1:0] dec,
  output logic [PM_W-1:0]       pm       [NUM_STATES],
  output logic [NUM_STATES-1:0] active,
  output state_t                best_state,
  output logic [2:0]            n_pruned,
  output logic [2:0]            n_compared
);

  logic [PM_W-1:0]       pm_q   [NUM_STATES];
  logic [NUM_STATES-1:0] act_q;

  // Metrics entering this step.
  logic [PM_W-1:0]       pm_in  [NUM_STATES];
  logic [NUM_STATES-1:0] act_in;

  // Butterfly results, indexed by destination state.
  logic [PM_W-1:0]       cand   [NUM_STATES];
  logic [NUM_STATES-1:0] cand_act;
  logic [NUM_STATES-1:0] cmp;

  // After normalisation and pruning.
  logic [PM_W-1:0]       pm_nxt [NUM_STATES];
  logic [NUM_STATES-1:0] act_nxt;
  logic [PM_W-1:0]       pm_min;

  always_comb begin
    for (int s = 0; s < NUM_STATES; s++) begin
      pm_in[s]  = first ? '0 : pm_q[s];
      act_in[s] = first ? (s == 0) : act_q[s];
    end
  end

  // Butterfly k joins sources {k,0} and {k,1} to destinations {0,k} and {1,k}.
  for (genvar k = 0; k < NUM_STATES / 2; k++) begin : g_bfly
    localparam state_t SI = state_t'(2 * k);
    localparam state_t SJ = state_t'(2 * k + 1);
    localparam state_t SP = state_t'(k);
    localparam state_t SQ = state_t'(NUM_STATES / 2 + k);

    acs_butterfly #(.PM_W(PM_W)) u_bfly (
      .pm_i  (pm_in[SI]),
      .pm_j  (pm_in[SJ]),
      .act_i (act_in[SI]),
      .act_j (act_in[SJ]),
      .bm_ip (bm[branch_code(SI, 1'b0)]),
      .bm_jp (bm[branch_code(SJ, 1'b0)]),
      .bm_iq (bm[branch_code(SI, 1'b1)]),
      .bm_jq (bm[branch_code(SJ, 1'b1)]),
      .pm_p  (cand[SP]),
      .pm_q  (cand[SQ]),
      .act_p (cand_act[SP]),
      .act_q (cand_act[SQ]),
      .dec_p (dec[SP]),
      .dec_q (dec[SQ]),
      .cmp_p (cmp[SP]),
      .cmp_q (cmp[SQ])
    );
  end

  // Best new metric, normalisation and threshold pruning.
  always_comb begin
    pm_min = '1;
    for (int s = 0; s < NUM_STATES; s++)
      if (cand_act[s] && cand[s] < pm_min) pm_min = cand[s];
    n_pruned   = '0;
    n_compared = '0;
    for (int s = 0; s < NUM_STATES; s++) begin
      pm_nxt[s]  = cand[s] - pm_min;
      act_nxt[s] = cand_act[s] && (pm_nxt[s] <= PM_W'(THRESHOLD));
      if (!act_nxt[s]) pm_nxt[s] = '0;
      if (cand_act[s] && !act_nxt[s]) n_pruned = n_pruned + 3'd1;
      if (cmp[s]) n_compared = n_compared + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STATES; s++) pm_q[s] <= '0;
      act_q <= NUM_STATES'(1);
    end else if (in_valid) begin
      pm_q  <= pm_nxt;
      act_q <= act_nxt;
    end
  end

  always_comb begin
    pm         = pm_q;
    active     = act_q;
    best_state = '0;
    for (int s = NUM_STATES - 1; s >= 0; s--)
      if (act_q[s] && pm_q[s] == '0) best_state = state_t'(s);
  end

endmodule
