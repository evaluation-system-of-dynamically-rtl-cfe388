// tb_des_core: self-checking test of the DES loop core.
// Checks published known-answer vectors (FIPS/NBS examples) in both
// directions, then random blocks and keys against the software model in
// des_ref_pkg (itself first checked on the same vectors). Every operation must
// raise done exactly 16 cycles after the start cycle, the latency of the loop
// architecture (one round per clock).
module tb_des_core;
  import des_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0, decrypt = 1'b0;
  logic [63:0] key = '0, din = '0, dout;
  logic        busy, done;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  des_core dut (.clk(clk), .rst_n(rst_n), .start_i(start), .decrypt_i(decrypt),
                .key_i(key), .din_i(din), .busy_o(busy), .done_o(done),
                .dout_o(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [63:0] k, input logic [63:0] d, input bit dec,
                     input logic [63:0] expect_v);
    int cycles;
    @(negedge clk);
    key = k; din = d; decrypt = dec; start = 1'b1;
    @(negedge clk);
    start = 1'b0; key = '1; din = '1;   // inputs only matter in the start cycle
    cycles = 1;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 16, $sformatf("latency %0d cycles, expected 16", cycles));
    check(dout == expect_v, $sformatf("key %h in %h dec %0d: got %h expected %h",
                                      k, d, dec, dout, expect_v));
  endtask

  // known-answer vectors: key, plaintext, ciphertext
  localparam logic [63:0] KAT [6][3] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815},
    '{64'h0101010101010101, 64'h8000000000000000, 64'h95F8A5E5DD31D900},
    '{64'h0000000000000000, 64'h0000000000000000, 64'h8CA64DE9C1B123A7},
    '{64'h0101010101010101, 64'h0000000000000000, 64'h8CA64DE9C1B123A7}
  };

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] k, p;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (KAT[i]) begin
      check(des_ref(KAT[i][0], KAT[i][1], 0) == KAT[i][2], "reference model encrypt KAT");
      check(des_ref(KAT[i][0], KAT[i][2], 1) == KAT[i][1], "reference model decrypt KAT");
    end
    foreach (KAT[i]) begin
      run(KAT[i][0], KAT[i][1], 0, KAT[i][2]);
      run(KAT[i][0], KAT[i][2], 1, KAT[i][1]);
    end
    for (int n = 0; n < 40; n++) begin
      k = {$urandom, $urandom};
      p = {$urandom, $urandom};
      run(k, p, n[0], des_ref(k, p, n[0]));
    end
    // back-to-back: start in the cycle right after done
    run(KAT[0][0], KAT[0][1], 0, KAT[0][2]);
    run(KAT[0][0], KAT[0][2], 1, KAT[0][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
