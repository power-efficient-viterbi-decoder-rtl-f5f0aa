// viterbi_decoder: power-efficient hard-decision Viterbi decoder for the
// Cconv(2,1,3) code, using the T-algorithm.
//
// The decoder has the three units of the power-efficient architecture:
//   bmu          Hamming-distance branch metrics of the received symbol;
//   acs_pm_unit  add-compare-select and path metric storage as one unit, with
//                the threshold that prunes paths whose metric exceeds the
//                best one by more than THRESHOLD (default 0);
//   spmu         survivor decisions of a frame and trace-back from the state
//                with the lowest path metric.
// One received symbol (two hard bits) is processed per clock. The decoder
// works on frames of FRAME_LEN symbols, each starting in encoder state 00;
// the last K-1 = 2 message bits of a frame are the encoder's zero tail bits.
//
// Interface and timing: in_code = {c1,c2} is accepted when in_valid and
// in_ready are high. After the last symbol of a frame in_ready is low for
// FRAME_LEN cycles of trace-back, and out_valid pulses FRAME_LEN+1 cycles
// after the last symbol was accepted, with out_bits[t] the decoded message
// bit of symbol t (tail bits included). active_states, n_pruned and
// n_compared show, for observation, which trellis states are currently kept
// and how many states the threshold removed and how many comparisons were made
// for the symbol on the input. The frame length is this design's choice
// (default 8: six message bits and two tail bits, the size of the worked
// example of this decoder); reset is synchronous and active low.
module viterbi_decoder
  import vd_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 8,
  parameter int unsigned THRESHOLD = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  code_t                 in_code,
  output logic                  out_valid,
  output logic [FRAME_LEN-1:0]  out_bits,
  output logic [NUM_STATES-1:0] active_states,
  output logic [2:0]            n_pruned,
  output logic [2:0]            n_compared
);


  bm_t                   bm [1 << CODE_W];
  logic [NUM_STATES-1:0] dec;
  state_t                best_state;
  logic                  first;
  logic                  step;

  assign step = in_valid && in_ready;

  bmu u_bmu (
    .rx_code (in_code),
    .bm      (bm)
  );

  acs_pm_unit #(.THRESHOLD(THRESHOLD)) u_acs_pm (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (step),
    .first      (first),
    .bm         (bm),
    .dec        (dec),
    .pm         (),
    .active     (active_states),
    .best_state (best_state),
    .n_pruned   (n_pruned),
    .n_compared (n_compared)
  );

  spmu #(.FRAME_LEN(FRAME_LEN)) u_spmu (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en       (step),
    .wr_dec      (dec),
    .wr_ready    (in_ready),
    .wr_first    (first),
    .start_state (best_state),
    .out_valid   (out_valid),
    .out_bits    (out_bits)
  );

endmodule
