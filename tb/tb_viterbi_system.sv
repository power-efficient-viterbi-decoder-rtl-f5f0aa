// tb_viterbi_system: end-to-end test of the Viterbi decoder system at its
// default parameters (frames of 8 symbols, threshold 0).
//
// The hardware encoder encodes each frame; a channel model here flips chosen
// or random code bits; the decoder decodes the frame. First the worked example
// is run: message 100011 plus two tail bits must encode to
// 11 01 11 00 11 10 10 11 and decode to itself, both error-free and with the
// 9th code bit flipped (received 11 01 11 00 01 10 10 11). Then random frames
// with zero, one or several errors are streamed back to back and every
// decoded frame is compared with the reference T-algorithm decoder.
//
// The test counts, and requires at least once, each mechanism of the design:
// paths removed by the threshold, states reached from a single surviving path
// without a comparison, decoder stalls
// (in_ready low during trace-back while a symbol waits) and corrected channel
// errors. It also checks the FRAME_LEN+1 cycle output latency, and that at
// threshold 0 the add-compare-select comparison is never needed.
module tb_viterbi_system;
  import vd_pkg::*;
  import vd_ref_pkg::*;

  localparam int FL = 8;
  localparam int NFRAMES = 300;

  logic clk = 0;
  logic rst_n;
  logic enc_valid, enc_bit, enc_code_valid;
  code_t enc_code;
  state_t enc_state;
  logic dec_valid, dec_ready, dec_out_valid;
  code_t dec_code;
  logic [FL-1:0] dec_out_bits;
  logic [NUM_STATES-1:0] dec_active_states;
  logic [2:0] dec_n_pruned, dec_n_compared;

  viterbi_system dut (.*);

  typedef struct {
    int rx [MAXLEN];
    int msg;
    int exp;
    int nerr;
  } frame_t;

  frame_t frames [$];

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int sym_in_frame = 0;
  logic [3:0] prev_act;
  int n_pruned = 0, n_compared = 0, n_single = 0, n_stall = 0, n_corrected = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
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

  // Mechanism counters, sampled on every accepted decoder symbol.
  always @(posedge clk) begin
    if (rst_n && dec_valid && dec_ready) begin
      int reached;
      n_pruned += int'(dec_n_pruned);
      n_compared += int'(dec_n_compared);
      // states reached this step = survivors + pruned; those not compared
      // came from a single surviving predecessor
      reached = 0;
      prev_act = (sym_in_frame == 0) ? 4'b0001 : dec_active_states;
      for (int s = 0; s < 4; s++) begin
        int p0, p1;
        p0 = ((s & 1) << 1);
        p1 = p0 | 1;
        if (prev_act[p0] ^ prev_act[p1]) reached++;
      end
      n_single += reached;
      sym_in_frame = (sym_in_frame + 1) % FL;
    end
    if (rst_n && dec_valid && !dec_ready) n_stall++;
  end

  // Encode one frame with the hardware encoder; returns the code words.
  task automatic encode_frame(input bit m [FL], output int code [MAXLEN]);
    for (int t = 0; t < FL; t++) begin
      enc_valid = 1;
      enc_bit = m[t];
      #1;
      check(enc_code_valid, "encoder output valid");
      check(int'(enc_code) == ref_code(int'(enc_state), m[t]), "encoder code word");
      code[t] = int'(enc_code);
      @(negedge clk);
    end
    enc_valid = 0;
    #1;
    check(enc_state == 2'b00, "encoder back in state 00 after the tail");
  endtask

  // Feed one frame to the decoder; returns the cycle of its last symbol.
  task automatic feed_frame(input int rx [MAXLEN], output int last_cycle);
    for (int t = 0; t < FL; t++) begin
      dec_valid = 1;
      dec_code = code_t'(rx[t]);
      while (!dec_ready) @(negedge clk);
      last_cycle = cycle;
      @(negedge clk);
    end
    dec_valid = 0;
  endtask

  task automatic wait_output(input int last_cycle, output int bits);
    int guard;
    guard = 0;
    while (!dec_out_valid && guard < 100) begin
      @(negedge clk);
      guard++;
    end
    check(dec_out_valid, "decoder output arrived");
    check(cycle - last_cycle == FL + 1, $sformatf("latency %0d", cycle - last_cycle));
    bits = int'(dec_out_bits);
  endtask

  initial begin
    automatic bit ex [FL] = '{1, 0, 0, 0, 1, 1, 0, 0};
    automatic int paper_code [FL] = '{3, 1, 3, 0, 3, 2, 2, 3};
    int code [MAXLEN];
    int rx [MAXLEN];
    int lc, got, exp_msg;
    rst_n = 0;
    enc_valid = 0;
    enc_bit = 0;
    dec_valid = 0;
    dec_code = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // Worked example, error-free and with the 9th code bit flipped.
    encode_frame(ex, code);
    exp_msg = 0;
    for (int t = 0; t < FL; t++) begin
      check(code[t] == paper_code[t], $sformatf("example code word %0d = %0d", t, code[t]));
      exp_msg |= int'(ex[t]) << t;
    end
    for (int v = 0; v < 2; v++) begin
      rx = code;
      if (v == 1) rx[4] ^= 2;  // 9th bit = c1 of the 5th symbol: 11 -> 01
      feed_frame(rx, lc);
      wait_output(lc, got);
      check(got == exp_msg, $sformatf("example %s decoded %b", (v == 1) ? "with error" : "error-free",
                                      got[FL-1:0]));
      if (v == 1 && got == exp_msg) n_corrected++;
      @(negedge clk);
    end

    // Random frames: the encoder side runs ahead of the decoder, so symbols
    // wait at the decoder input while it traces back.
    fork
      begin : producer
        for (int f = 0; f < NFRAMES; f++) begin
          bit m [FL];
          int ne, mv, pt, ev;
          bit o [MAXLEN];
          frame_t fr;
          mv = 0;
          for (int t = 0; t < FL; t++) begin
            m[t] = (t < FL - 2) ? bit'($urandom()) : 1'b0;
            mv |= int'(m[t]) << t;
          end
          encode_frame(m, code);
          rx = code;
          ne = (f % 5 == 4) ? $urandom_range(3, 2) : (f % 2);
          for (int e = 0; e < ne; e++) begin
            int p;
            p = $urandom_range(2 * FL - 1);
            rx[p / 2] ^= ((p % 2) != 0) ? 1 : 2;
          end
          ref_decode(rx, FL, 0, o, pt);
          ev = 0;
          for (int t = 0; t < FL; t++) ev |= int'(o[t]) << t;
          fr.rx = rx;
          fr.msg = mv;
          fr.exp = ev;
          fr.nerr = ne;
          frames.push_back(fr);
          while (frames.size() > 4) @(negedge clk);
        end
      end
      begin : consumer
        for (int f = 0; f < NFRAMES; f++) begin
          frame_t fr;
          while (frames.size() == 0) @(negedge clk);
          fr = frames.pop_front();
          feed_frame(fr.rx, lc);
          fork
            automatic int l = lc;
            automatic frame_t cf = fr;
            begin
              int g;
              wait_output(l, g);
              check(g == cf.exp, $sformatf("random frame decoded %b expected %b", g[FL-1:0], cf.exp[FL-1:0]));
              if (cf.nerr <= 1) check(g == cf.msg, "frame with at most one error gives the message");
              if (cf.nerr == 1 && g == cf.msg) n_corrected++;
            end
          join_none
        end
        repeat (FL + 4) @(negedge clk);
      end
    join

    $display("threshold prunes %0d, comparisons %0d, single-path states %0d, stall cycles %0d, corrected frames %0d",
             n_pruned, n_compared, n_single, n_stall, n_corrected);
    check(n_pruned > 0, "threshold pruning happened");
    // With threshold 0 only paths tied with the best one survive, and no
    // destination state is then ever reached by two of them: the compare
    // step of the ACS is never used (the threshold-3 decoder test uses it).
    check(n_compared == 0, "no comparison needed at threshold 0");
    check(n_single > 0, "compare-free selections happened");
    check(n_stall > 0, "decoder stalled during trace-back");
    check(n_corrected > 0, "channel errors were corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
