// tb_tdes_core: self-checking test of the Triple-DES loop core.
// Checks that K1 = K2 reduces to single DES on published vectors, that
// encryption and decryption of random blocks with random two-key pairs match
// the software model (E_K1 D_K2 E_K1 and its inverse), that decryption
// inverts encryption, and that every operation takes exactly 48 cycles.
module tb_tdes_core;
  import des_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0, decrypt = 1'b0;
  logic [63:0] k1 = '0, k2 = '0, din = '0, dout;
  logic        busy, done;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  tdes_core dut (.clk(clk), .rst_n(rst_n), .start_i(start), .decrypt_i(decrypt),
                 .key1_i(k1), .key2_i(k2), .din_i(din), .busy_o(busy),
                 .done_o(done), .dout_o(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [63:0] a, input logic [63:0] b,
                     input logic [63:0] d, input bit dec,
                     input logic [63:0] expect_v, output logic [63:0] got);
    int cycles;
    @(negedge clk);
    k1 = a; k2 = b; din = d; decrypt = dec; start = 1'b1;
    @(negedge clk);
    start = 1'b0; k1 = '1; k2 = '0; din = '1; decrypt = !dec;
    cycles = 1;
    while (!done && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    got = dout;
    check(cycles == 48, $sformatf("latency %0d cycles, expected 48", cycles));
    check(dout == expect_v, $sformatf("k1 %h k2 %h in %h dec %0d: got %h expected %h",
                                      a, b, d, dec, dout, expect_v));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b, p, c, back;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // K1 = K2: EDE collapses to one DES encryption
    run(64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 0,
        64'h85E813540F0AB405, c);
    run(64'h0123456789ABCDEF, 64'h0123456789ABCDEF, 64'h3FA40E8A984D4815, 1,
        64'h4E6F772069732074, c);
    for (int n = 0; n < 30; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      p = {$urandom, $urandom};
      run(a, b, p, 0, tdes_ref(a, b, p, 0), c);
      run(a, b, c, 1, tdes_ref(a, b, c, 1), back);
      check(back == p, "decryption does not invert encryption");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
