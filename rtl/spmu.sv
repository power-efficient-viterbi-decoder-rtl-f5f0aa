// spmu: survivor path memory unit with trace-back.
//
// The memory holds one word of NUM_STATES survivor decisions per trellis step
// of a frame (FRAME_LEN steps). While a frame is received the words are
// written in order. After the last step the unit traces back, one step per
// clock, from the state with the lowest path metric (start_state, supplied by
// the path metric unit): at step t the current state {m,S1} yields the
// decoded message bit m, and the stored decision d of that state gives the
// predecessor {S1,d}. Bits are therefore recovered in reverse order and are
// placed into out_bits so that out_bits[t] is the message bit of step t.
// The frame includes the K-1 zero tail bits that return the encoder to state
// 00; they appear in out_bits[FRAME_LEN-1:FRAME_LEN-K+1].
//
// Interface and timing: a word is written when wr_en and wr_ready are high;
// wr_first is high while the next write starts a frame. The write of word
// FRAME_LEN-1 ends the frame; start_state is sampled in the next cycle, which
// begins FRAME_LEN trace-back cycles with wr_ready low. out_valid is high for
// one cycle after the last trace-back step, FRAME_LEN+1 cycles after the
// cycle that wrote the last word, and wr_ready rises in that same cycle.
// The block-wise trace-back with a full frame buffer, the single-port
// sequencing and the synchronous active-low reset are this design's choices.
module spmu
  import vd_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 8,
  localparam int unsigned AW       = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [NUM_STATES-1:0] wr_dec,
  output logic                  wr_ready,
  output logic                  wr_first,
  input  state_t                start_state,
  output logic                  out_valid,
  output logic [FRAME_LEN-1:0]  out_bits
);

  typedef enum logic {S_FILL, S_TRACE} phase_t;

  localparam logic [AW-1:0] LAST = AW'(FRAME_LEN - 1);

  logic [NUM_STATES-1:0] mem [FRAME_LEN];
  phase_t                phase_q;
  logic [AW-1:0]         ptr_q;
  logic                  tb_first_q;
  state_t                tb_state_q;
  state_t                cur_state;
  logic [FRAME_LEN-1:0]  bits_q;
  logic                  out_valid_q;

  always_comb begin
    wr_ready  = (phase_q == S_FILL);
    wr_first  = (phase_q == S_FILL) && (ptr_q == '0);
    cur_state = tb_first_q ? start_state : tb_state_q;
    out_valid = out_valid_q;
    out_bits  = bits_q;
  end

  always_ff @(posedge clk) begin
    if (wr_en && phase_q == S_FILL) mem[ptr_q] <= wr_dec;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q     <= S_FILL;
      ptr_q       <= '0;
      tb_first_q  <= 1'b0;
      tb_state_q  <= '0;
      bits_q      <= '0;
      out_valid_q <= 1'b0;
    end else begin
      out_valid_q <= 1'b0;
      unique case (phase_q)
        S_FILL: begin
          if (wr_en) begin
            if (ptr_q == LAST) begin
              phase_q    <= S_TRACE;
              tb_first_q <= 1'b1;
            end else begin
              ptr_q <= ptr_q + AW'(1);
            end
          end
        end
        S_TRACE: begin
          tb_first_q     <= 1'b0;
          bits_q[ptr_q]  <= cur_state[K-2];
          tb_state_q     <= {cur_state[K-3:0], mem[ptr_q][cur_state]};
          if (ptr_q == '0) begin
            phase_q     <= S_FILL;
            out_valid_q <= 1'b1;
          end else begin
            ptr_q <= ptr_q - AW'(1);
          end
        end
        default: phase_q <= S_FILL;
      endcase
    end
  end

  // A decoded frame is announced for exactly one cycle, and only when a
  // trace-back has just finished.
  a_out_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                out_valid |=> !out_valid);
  a_out_after_trace: assert property (@(posedge clk) disable iff (!rst_n)
                                      out_valid |-> $past(phase_q == S_TRACE && ptr_q == '0));

endmodule
