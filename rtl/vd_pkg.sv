// vd_pkg: constants, types and trellis functions shared by the encoder and
// the Viterbi decoder of the Cconv(2,1,3) hard-decision system.
//
// The code is rate 1/2 with constraint length 3 (two memory flip-flops, four
// trellis states). A state is written {S1,S2}: S1 holds the most recent
// message bit and S2 the one before it. From the encoder state table the two
// code bits for message bit m in state {S1,S2} are
//   c1 = m ^ S2            (generator 101)
//   c2 = m ^ S1 ^ S2       (generator 111)
// and the next state is {m,S1}. A code word is packed as {c1,c2}, c1 being
// the first bit sent on the channel. These polynomials and the bit order
// follow the encoder's state table; the packing into a 2-bit vector is this
// design's own choice.
package vd_pkg;

  localparam int unsigned K          = 3;            // constraint length
  localparam int unsigned NUM_STATES = 1 << (K - 1); // trellis states
  localparam int unsigned CODE_W     = 2;            // code bits per message bit
  localparam int unsigned BM_W       = 2;            // Hamming distance 0..2

  typedef logic [K-2:0]     state_t;  // {S1,S2}
  typedef logic [CODE_W-1:0] code_t;   // {c1,c2}
  typedef logic [BM_W-1:0]  bm_t;

  // Code word produced when message bit m enters the encoder in state s.
  function automatic code_t branch_code(input state_t s, input logic m);
    return {m ^ s[0], m ^ s[1] ^ s[0]};
  endfunction

  // State reached from state s with message bit m.
  function automatic state_t next_state(input state_t s, input logic m);
    return {m, s[1]};
  endfunction

endpackage
