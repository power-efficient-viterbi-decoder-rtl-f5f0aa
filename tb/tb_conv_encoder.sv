// tb_conv_encoder: self-checking test of the Cconv(2,1,3) encoder.
//
// Encodes the message 100011 with two zero tail bits and checks the code
// sequence 11 01 11 00 11 10 10 11 and the return to state 00. Then encodes
// random bits, with random idle cycles, and compares every code word and
// state with the reference parity model. The code word must be valid in the
// same cycle as its message bit.
module tb_conv_encoder;
  import vd_pkg::*;
  import vd_ref_pkg::*;

  logic   clk = 0;
  logic   rst_n;
  logic   in_valid;
  logic   in_bit;
  logic   out_valid;
  code_t  out_code;
  state_t state;
  int     checks = 0;
  int     failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    automatic bit msg [8] = '{1, 0, 0, 0, 1, 1, 0, 0};
    automatic int exp_code [8] = '{3, 1, 3, 0, 3, 2, 2, 3};
    int   rs;
    rst_n = 0;
    in_valid = 0;
    in_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 2'b00, "reset state");
    for (int t = 0; t < 8; t++) begin
      in_valid = 1;
      in_bit = msg[t];
      #1;
      check(out_valid == 1'b1, "out_valid with in_valid");
      check(out_code == code_t'(exp_code[t]), $sformatf("example code word %0d: got %b", t, out_code));
      @(negedge clk);
    end
    in_valid = 0;
    #1;
    check(out_valid == 1'b0, "out_valid idle");
    check(state == 2'b00, "tail returns to state 00");

    rs = 0;
    for (int t = 0; t < 2000; t++) begin
      in_valid = ($urandom_range(3) != 0);
      in_bit = 1'($urandom());
      #1;
      check(state == state_t'(rs), "state matches reference");
      if (in_valid) check(out_code == code_t'(ref_code(rs, in_bit)), "random code word");
      @(negedge clk);
      if (in_valid) rs = ref_next(rs, in_bit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
