// viterbi_system: the Viterbi decoder system, a Cconv(2,1,3) convolutional
// encoder and the power-efficient (T-algorithm) hard-decision Viterbi decoder.
//
// The encoder turns each message bit into a two-bit code word; the code words
// cross a noisy channel, which is not part of the hardware, and the decoder
// recovers the message by the Viterbi algorithm, pruning at each step every
// path whose metric exceeds the best one by more than THRESHOLD. The encoder
// side and the decoder side therefore stand side by side with their own
// ports; a test bench or the surrounding system provides the channel between
// enc_code and dec_code.
//
// Interface and timing: see conv_encoder (one code word per message bit, same
// cycle) and viterbi_decoder (one symbol per cycle, frames of FRAME_LEN
// symbols, decoded frame FRAME_LEN+1 cycles after its last symbol).
module viterbi_system
  import vd_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 8,
  parameter int unsigned THRESHOLD = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // encoder side
  input  logic                  enc_valid,
  input  logic                  enc_bit,
  output logic                  enc_code_valid,
  output code_t                 enc_code,
  output state_t                enc_state,
  // decoder side
  input  logic                  dec_valid,
  output logic                  dec_ready,
  input  code_t                 dec_code,
  output logic                  dec_out_valid,
  output logic [FRAME_LEN-1:0]  dec_out_bits,
  output logic [NUM_STATES-1:0] dec_active_states,
  output logic [2:0]            dec_n_pruned,
  output logic [2:0]            dec_n_compared
);

  conv_encoder u_encoder (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_valid),
    .in_bit    (enc_bit),
    .out_valid (enc_code_valid),
    .out_code  (enc_code),
    .state     (enc_state)
  );

  viterbi_decoder #(
    .FRAME_LEN (FRAME_LEN),
    .THRESHOLD (THRESHOLD)
  ) u_decoder (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (dec_valid),
    .in_ready      (dec_ready),
    .in_code       (dec_code),
    .out_valid     (dec_out_valid),
    .out_bits      (dec_out_bits),
    .active_states (dec_active_states),
    .n_pruned      (dec_n_pruned),
    .n_compared    (dec_n_compared)
  );

endmodule
