// tb_viterbi_decoder: self-checking test of the power-efficient Viterbi
// decoder.
//
// Two decoders, threshold 0 (default) and threshold 3, receive the same
// stream of frames: random six-bit messages with two zero tail bits, encoded
// by the reference encoder and hit by zero, one or several random bit
// errors. Every decoded frame is compared with the reference T-algorithm
// decoder, and frames with at most one error must give back the message.
// Symbols are offered with random gaps and back to back; the test checks that
// in_ready drops for FRAME_LEN cycles and that each frame's output appears
// FRAME_LEN+1 cycles after its last symbol.
module tb_viterbi_decoder;
  import vd_pkg::*;
  import vd_ref_pkg::*;

  localparam int unsigned FL = 8;
  localparam int NFRAMES = 400;

  logic clk = 0;
  logic rst_n;
  logic in_valid;
  code_t in_code;
  logic rdy0, rdy3, ov0, ov3;
  logic [FL-1:0] ob0, ob3;
  logic [NUM_STATES-1:0] as0, as3;
  logic [2:0] np0, np3, nc0, nc3;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int last_sym_cycle [$];
  int exp0 [$];
  int exp3 [$];
  int msgs [$];
  int nerr [$];
  int corrected = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  viterbi_decoder dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(rdy0), .in_code(in_code),
    .out_valid(ov0), .out_bits(ob0), .active_states(as0), .n_pruned(np0), .n_compared(nc0));

  viterbi_decoder #(.FRAME_LEN(FL), .THRESHOLD(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(rdy3), .in_code(in_code),
    .out_valid(ov3), .out_bits(ob3), .active_states(as3), .n_pruned(np3), .n_compared(nc3));

  initial begin
    repeat (40000) @(posedge clk);
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

  // Driver: builds frames, computes the expected results, feeds symbols.
  initial begin
    rst_n = 0;
    in_valid = 0;
    in_code = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int rx [MAXLEN];
      bit m [MAXLEN];
      bit o [MAXLEN];
      int st, pt, ne, mv, e0, e3;
      st = 0;
      mv = 0;
      for (int t = 0; t < FL; t++) begin
        m[t] = (t < FL - 2) ? bit'($urandom()) : 1'b0;
        rx[t] = ref_code(st, m[t]);
        st = ref_next(st, m[t]);
        mv |= int'(m[t]) << t;
      end
      ne = ((f % 4) == 3) ? $urandom_range(4, 2) : f % 2;
      for (int e = 0; e < ne; e++) begin
        int p;
        p = $urandom_range(2 * FL - 1);
        rx[p / 2] ^= ((p % 2) != 0) ? 1 : 2;
      end
      ref_decode(rx, FL, 0, o, pt);
      e0 = 0;
      for (int t = 0; t < FL; t++) e0 |= int'(o[t]) << t;
      ref_decode(rx, FL, 3, o, pt);
      e3 = 0;
      for (int t = 0; t < FL; t++) e3 |= int'(o[t]) << t;
      exp0.push_back(e0);
      exp3.push_back(e3);
      msgs.push_back(mv);
      nerr.push_back(ne);
      for (int t = 0; t < FL; t++) begin
        while (((f % 3) == 1) && $urandom_range(2) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_code = code_t'(rx[t]);
        while (!rdy0) begin
          check(!rdy3, "both decoders stall together");
          @(negedge clk);
        end
        if (t == FL - 1) last_sym_cycle.push_back(cycle);
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // Checker: compares each output with the expectation and its latency.
  initial begin
    int got, lat;
    @(posedge rst_n);
    for (int f = 0; f < NFRAMES; f++) begin
      do @(negedge clk); while (!ov0);
      check(ov3, "both outputs in the same cycle");
      lat = cycle - last_sym_cycle.pop_front();
      check(lat == FL + 1, $sformatf("frame %0d latency %0d", f, lat));
      got = int'(ob0);
      check(got == exp0[0], $sformatf("frame %0d T=0 got %b exp %b", f, ob0, exp0[0][FL-1:0]));
      check(int'(ob3) == exp3[0], $sformatf("frame %0d T=3 got %b exp %b", f, ob3, exp3[0][FL-1:0]));
      if (nerr[0] <= 1) begin
        check(got == msgs[0], $sformatf("frame %0d with %0d errors decoded to the message", f, nerr[0]));
        if (nerr[0] == 1 && got == msgs[0]) corrected++;
      end
      void'(exp0.pop_front());
      void'(exp3.pop_front());
      void'(msgs.pop_front());
      void'(nerr.pop_front());
    end
    $display("frames %0d, single errors corrected %0d", NFRAMES, corrected);
    check(corrected > 0, "errors were corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
