// tb_des_round: self-checking test of one DES round.
// Uses the first two rounds of the widely published worked example
// (key 133457799BBCDFF1, block 0123456789ABCDEF), checks that the round with
// last = 1 returns the halves unexchanged, and checks on random data that a
// second round instance with the same key and last = 1 undoes the first
// (Feistel inversion), which ties every bit of f(R, K) to the output.
module tb_des_round;
  import des_pkg::*;

  block_t  s_in, s_out, s_back, s_last;
  subkey_t k;
  int      checks = 0, failures = 0;

  des_round dut  (.state_i(s_in), .subkey_i(k), .last_i(1'b0), .state_o(s_out));
  des_round dutl (.state_i(s_in), .subkey_i(k), .last_i(1'b1), .state_o(s_last));
  des_round inv  (.state_i({s_out[31:0], s_out[63:32]}), .subkey_i(k), .last_i(1'b1),
                  .state_o(s_back));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = {32'hCC00CCFF, 32'hF0AAF0AA};  // L0, R0 after IP
    k    = 48'h1B02EFFC7072;              // K1
    #1;
    check(s_out == {32'hF0AAF0AA, 32'hEF4A6544}, $sformatf("round 1: %h", s_out));
    check(s_last == {32'hEF4A6544, 32'hF0AAF0AA}, $sformatf("round 1 last: %h", s_last));
    s_in = {32'hF0AAF0AA, 32'hEF4A6544};
    k    = 48'h79AED9DBC9E5;              // K2
    #1;
    check(s_out == {32'hEF4A6544, 32'hCC017709}, $sformatf("round 2: %h", s_out));
    for (int n = 0; n < 200; n++) begin
      s_in = {$urandom, $urandom};
      k    = {$urandom, $urandom};
      #1;
      check(s_out[63:32] == s_in[31:0], "left output is not the right input");
      check(s_back == s_in, $sformatf("inverse round failed for %h", s_in));
      check(s_last == {s_out[31:0], s_out[63:32]}, "last round must not exchange");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
