// tb_crypto_fpga: self-checking test of the FPGA cipher slot with a short
// image (CFG_BYTES = 40) so that reconfiguration is quick. It drives the
// SelectMAP port directly and checks: INIT_n and DONE through PROGRAM_n, the
// clear time and exactly CFG_BYTES byte writes (bytes offered with CS_n high
// are not counted); a DES image followed by DES operations checked against the
// software model, with the 16-cycle latency; a switch to a Triple-DES image,
// which must wipe keys and results, followed by Triple-DES operations (48
// cycles); and an image with an unknown identifier, which must end with
// INIT_n low and DONE low.
module tb_crypto_fpga;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int unsigned NB    = 40;
  localparam int unsigned INITC = 5;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       program_n = 1'b1, cs_n = 1'b1, write_n = 1'b1;
  logic [7:0] cfg_d = '0;
  logic       init_n, done;
  logic       bus_cs = 1'b0, bus_wr = 1'b0;
  logic [4:0] bus_a = '0;
  logic [7:0] bus_wdata = '0, bus_rdata;
  alg_e       alg;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  crypto_fpga #(.CFG_BYTES(NB), .INIT_CYCLES(INITC)) dut (
    .clk(clk), .rst_n(rst_n),
    .program_n_i(program_n), .cfg_cs_n_i(cs_n), .cfg_write_n_i(write_n),
    .cfg_d_i(cfg_d), .init_n_o(init_n), .done_o(done),
    .bus_cs_i(bus_cs), .bus_wr_i(bus_wr), .bus_a_i(bus_a),
    .bus_wdata_i(bus_wdata), .bus_rdata_o(bus_rdata), .alg_o(alg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic configure(input logic [7:0] id, input bit expect_ok);
    int cyc;
    @(negedge clk);
    program_n = 1'b0;
    repeat (3) @(negedge clk);
    check(!init_n && !done, "INIT_n and DONE must be low during PROGRAM_n");
    program_n = 1'b1;
    cyc = 0;
    while (!init_n && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == INITC + 1, $sformatf("INIT_n released after %0d cycles", cyc));
    for (int i = 0; i < int'(NB); i++) begin
      // a byte offered with CS_n high must not count
      cs_n = 1'b1; write_n = 1'b0; cfg_d = 8'h55;
      @(negedge clk);
      cs_n = 1'b0; cfg_d = (i == 0) ? id : 8'($urandom);
      @(negedge clk);
      if (expect_ok && i < int'(NB) - 1)
        check(!done, $sformatf("DONE early after %0d bytes", i + 1));
    end
    cs_n = 1'b1; write_n = 1'b1;
    check(done == expect_ok, $sformatf("DONE %0d after image %h", done, id));
    check(init_n == expect_ok, $sformatf("INIT_n %0d after image %h", init_n, id));
  endtask

  task automatic bus_write(input logic [4:0] a, input logic [7:0] d);
    @(negedge clk);
    bus_cs = 1'b1; bus_wr = 1'b1; bus_a = a; bus_wdata = d;
    @(negedge clk);
    bus_cs = 1'b0; bus_wr = 1'b0;
  endtask

  task automatic bus_read(input logic [4:0] a, output logic [7:0] d);
    @(negedge clk);
    bus_cs = 1'b1; bus_wr = 1'b0; bus_a = a;
    #1 d = bus_rdata;
    @(negedge clk);
    bus_cs = 1'b0;
  endtask

  task automatic put64(input logic [4:0] base, input logic [63:0] v);
    for (int i = 0; i < 8; i++) bus_write(base + 5'(i), v[8*(7-i) +: 8]);
  endtask

  task automatic get64(input logic [4:0] base, output logic [63:0] v);
    logic [7:0] b;
    for (int i = 0; i < 8; i++) begin
      bus_read(base + 5'(i), b);
      v[8*(7-i) +: 8] = b;
    end
  endtask

  task automatic operate(input logic [63:0] k1, input logic [63:0] k2,
                         input logic [63:0] blk, input bit dec, input int lat,
                         input logic [63:0] expect_v);
    logic [7:0]  st;
    logic [63:0] res;
    int          cyc;
    put64(5'h08, k1);
    put64(5'h10, k2);
    put64(5'h00, blk);
    bus_write(5'h18, {6'b0, dec, 1'b1});
    // the start register is set by the write edge; count until valid
    cyc = 0;
    st = 8'h01;
    while (!st[1] && cyc < 200) begin
      bus_read(5'h19, st);
      cyc++;
    end
    check(st[1], "result never valid");
    get64(5'h00, res);
    check(res == expect_v, $sformatf("result %h expected %h", res, expect_v));
    // exact latency: core done pulse relative to start register
    check(lat == measured_lat, $sformatf("latency %0d expected %0d", measured_lat, lat));
  endtask

  // measure cycles from the start register to the core's done pulse
  int measured_lat = 0;
  int lat_cnt = 0;
  always @(posedge clk) begin
    if (dut.start_q) lat_cnt <= 1;
    else if (lat_cnt != 0) lat_cnt <= lat_cnt + 1;
    if (dut.des_done || dut.tdes_done) begin
      measured_lat <= lat_cnt;
      lat_cnt <= 0;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  st;
    logic [63:0] k1, k2, p, v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!done && alg == ALG_NONE, "slot must start unconfigured");

    configure(8'h01, 1);
    check(alg == ALG_DES, "DES image must select DES");
    bus_read(5'h19, st);
    check(st[5:4] == 2'(ALG_DES) && st[1:0] == 2'b00, $sformatf("status %h", st));
    operate(64'h133457799BBCDFF1, '0, 64'h0123456789ABCDEF, 0, 16, 64'h85E813540F0AB405);
    operate(64'h133457799BBCDFF1, '0, 64'h85E813540F0AB405, 1, 16, 64'h0123456789ABCDEF);
    for (int n = 0; n < 6; n++) begin
      k1 = {$urandom, $urandom}; p = {$urandom, $urandom};
      operate(k1, '0, p, n[0], 16, des_ref(k1, p, n[0]));
    end

    // switch algorithm: everything of the old one must be gone
    configure(8'h02, 1);
    check(alg == ALG_TDES, "Triple-DES image must select Triple-DES");
    get64(5'h08, v);
    check(v == '0, "key 1 must be cleared by reconfiguration");
    bus_read(5'h19, st);
    check(st[1] == 1'b0, "result valid must be cleared by reconfiguration");
    for (int n = 0; n < 6; n++) begin
      k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; p = {$urandom, $urandom};
      operate(k1, k2, p, n[0], 48, tdes_ref(k1, k2, p, n[0]));
    end

    configure(8'hFF, 0);
    check(alg == ALG_NONE, "unknown image must leave the slot empty");
    bus_write(5'h18, 8'h01);
    repeat (60) @(negedge clk);
    bus_read(5'h19, st);
    check(st == 8'h00, $sformatf("unconfigured slot must not run, status %h", st));

    configure(8'h01, 1);
    check(alg == ALG_DES, "back to DES");
    operate(64'h0123456789ABCDEF, '0, 64'h4E6F772069732074, 0, 16, 64'h3FA40E8A984D4815);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
