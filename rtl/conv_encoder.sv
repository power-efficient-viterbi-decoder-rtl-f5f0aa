// conv_encoder: Cconv(2,1,3) convolutional encoder, rate 1/2, constraint
// length 3.
//
// Two D flip-flops form the shift register {S1,S2}. Each message bit enters
// S1 while S1 moves to S2; the two code bits are modulo-2 sums of the message
// bit and the register contents (c1 = m^S2, c2 = m^S1^S2), so they reproduce
// the encoder's state table exactly. The encoder starts in the all-zero state
// after reset; the user closes a frame with K-1 = 2 zero tail bits, which
// brings it back to the zero state.
//
// Interface and timing: in_bit is sampled when in_valid is high. The code
// word out_code = {c1,c2} is combinational from in_bit and the current state
// and is valid in the same cycle (out_valid = in_valid), as in a gate-level
// encoder; the state advances at the clock edge. state is brought out for
// observation. Reset is synchronous and active low (a choice of this design).
module conv_encoder
  import vd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_bit,
  output logic   out_valid,
  output code_t  out_code,
  output state_t state
);

  state_t state_q;

  always_ff @(posedge clk) begin
    if (!rst_n)        state_q <= '0;
    else if (in_valid) state_q <= next_state(state_q, in_bit);
  end

  always_comb begin
    out_valid = in_valid;
    out_code  = branch_code(state_q, in_bit);
    state     = state_q;
  end

endmodule
