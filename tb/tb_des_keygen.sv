// tb_des_keygen: self-checking test of the round-key generator.
// Checks K1, K2 and K16 of the published worked example (key
// 133457799BBCDFF1), then for random keys that the 16 encryption keys equal a
// table computed in the testbench with cumulative rotations, and that the 16
// decryption keys are the same table in reverse order.
module tb_des_keygen;
  import des_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load = 1'b0, step = 1'b0, dec = 1'b0;
  logic [63:0] key = '0;
  logic [3:0]  rnd = '0;
  subkey_t     sk;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  des_keygen dut (.clk(clk), .rst_n(rst_n), .load_i(load), .step_i(step),
                  .key_i(key), .decrypt_i(dec), .round_i(rnd), .subkey_o(sk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected schedule, built with explicit single-place rotations
  function automatic void schedule(input logic [63:0] k, output subkey_t ks [16]);
    logic [55:0] cd = pc1(k);
    logic [27:0] c = cd[55:28], d = cd[27:0];
    int total = 0;
    for (int i = 0; i < 16; i++) begin
      total += int'(SHIFT_T[i]);
      c = cd[55:28]; d = cd[27:0];
      for (int s = 0; s < total; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = pc2({c, d});
    end
  endfunction

  task automatic pass(input logic [63:0] k, input bit decrypt, output subkey_t got [16]);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      key = (i == 0) ? k : ~k;   // key is only read with load
      load = (i == 0);
      step = (i != 0);
      dec = decrypt;
      rnd = 4'(i);
      #1 got[i] = sk;
    end
    @(negedge clk);
    load = 1'b0; step = 1'b0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    subkey_t got [16], expv [16];
    logic [63:0] k;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pass(64'h133457799BBCDFF1, 0, got);
    check(got[0]  == 48'h1B02EFFC7072, $sformatf("K1 %h", got[0]));
    check(got[1]  == 48'h79AED9DBC9E5, $sformatf("K2 %h", got[1]));
    check(got[15] == 48'hCB3D8B0E17F5, $sformatf("K16 %h", got[15]));
    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom};
      schedule(k, expv);
      pass(k, 0, got);
      for (int i = 0; i < 16; i++)
        check(got[i] == expv[i], $sformatf("enc K%0d %h expected %h", i + 1, got[i], expv[i]));
      pass(k, 1, got);
      for (int i = 0; i < 16; i++)
        check(got[i] == expv[15-i], $sformatf("dec step %0d %h expected %h", i, got[i], expv[15-i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
