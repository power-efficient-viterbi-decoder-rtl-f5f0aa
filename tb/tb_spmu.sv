// tb_spmu: self-checking test of the survivor path memory and trace-back.
//
// Writes frames of random survivor decisions (with random idle cycles), gives
// a random start state, and compares the decoded bits with a trace-back done
// here. Checks the timing: wr_ready low for exactly FRAME_LEN cycles, and
// out_valid FRAME_LEN+1 cycles after the last write, for one cycle.
module tb_spmu;
  import vd_pkg::*;

  localparam int unsigned FL = 8;

  logic                  clk = 0;
  logic                  rst_n;
  logic                  wr_en;
  logic [NUM_STATES-1:0] wr_dec;
  logic                  wr_ready;
  logic                  wr_first;
  state_t                start_state;
  logic                  out_valid;
  logic [FL-1:0]         out_bits;

  int checks = 0;
  int failures = 0;

  spmu #(.FRAME_LEN(FL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    logic [3:0] hist [FL];
    logic [FL-1:0] expb;
    int st, busy_cycles;
    rst_n = 0;
    wr_en = 0;
    wr_dec = '0;
    start_state = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < 300; f++) begin
      for (int t = 0; t < FL; t++) begin
        while ($urandom_range(3) == 0) begin
          wr_en = 0;
          @(negedge clk);
        end
        check(wr_ready, "ready while filling");
        check(wr_first == (t == 0), "wr_first");
        wr_en = 1;
        wr_dec = 4'($urandom());
        hist[t] = wr_dec;
        @(negedge clk);
      end
      wr_en = 0;
      st = $urandom_range(3);
      start_state = state_t'(st);
      for (int t = FL - 1; t >= 0; t--) begin
        expb[t] = st[1];
        st = ((st & 1) << 1) | int'(hist[t][st]);
      end
      busy_cycles = 0;
      while (!wr_ready) begin
        check(!out_valid, "no output during trace-back");
        busy_cycles++;
        @(negedge clk);
        start_state = state_t'($urandom());
        if (busy_cycles > 100) break;
      end
      check(busy_cycles == FL, $sformatf("trace-back took %0d cycles", busy_cycles));
      check(out_valid, "out_valid after trace-back");
      check(out_bits == expb, $sformatf("bits %b expected %b", out_bits, expb));
      @(negedge clk);
      check(!out_valid, "out_valid one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
