// tb_sebsw1: end-to-end test of the board logic at its default sizes
// (512K x 8 SRAM, 218,976-byte FPGA images, 16 MHz local-bus clock). The
// PCI controller is replaced by tasks that issue local-bus transactions, the
// SRAM and the IO controller by behavioural models.
//
// Scenario: two cipher images are placed in the SRAM (bulk contents preloaded,
// the headers written by the host through the SRAM data port and read back);
// the host points the controller at the DES image, raises the configuration
// signal through IO port C and polls DONE through IO port B; it then encrypts
// and decrypts known-answer vectors and random blocks through the FPGA
// window. It switches to the Triple-DES image and repeats with two-key
// Triple-DES, tries an image with an unknown identifier (load must fail and
// leave the slot empty), and switches back to DES. A host SRAM access issued
// during a configuration must wait for it. The configuration time is
// measured from the configuration signal to DONE and must be about one image
// byte per clock. Every block operation, from the first input byte to the
// last result byte over the local bus (key already loaded), must sustain at
// least 10 Mbit/s at 16 MHz even with this testbench's two-clock host accesses.
// Each mechanism is counted and must have occurred.
module tb_sebsw1;
  timeunit 1ns;
  timeprecision 1ps;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int unsigned AW     = 19;
  localparam int unsigned NBYTES = 218_976;
  localparam int unsigned DES_BASE  = 32'h00000;
  localparam int unsigned TDES_BASE = 32'h40000;
  localparam int unsigned BAD_BASE  = 32'h7F000;   // short image, never completes

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          hs_req = 1'b0, hs_wr = 1'b0;
  logic [5:0]    hs_addr = '0;
  logic [7:0]    hs_wdata = '0, hs_rdata;
  logic          hs_ack, hs_ready;
  logic [AW-1:0] sram_a;
  logic          sram_cs_n, sram_oe_n, sram_we_n;
  logic [7:0]    sram_wd, sram_rd;
  logic          io_cs_n, io_rd_n, io_wr_n;
  logic [1:0]    io_a;
  logic [7:0]    io_wd, io_rd, pa, pc;
  logic          fpga_done, cfg_busy;
  alg_e          alg;
  int            checks = 0, failures = 0;

  // mechanism counters
  int n_sram_wr = 0, n_sram_rd = 0, n_io = 0, n_cfg_ok = 0, n_cfg_fail = 0;
  int n_burst = 0, n_switch = 0, n_stall = 0, n_des_enc = 0, n_des_dec = 0, n_tdes_enc = 0,
      n_tdes_dec = 0;

  always #31.25 clk = ~clk;   // 16 MHz

  sebsw1 dut (
    .clk(clk), .rst_n(rst_n),
    .hs_req_i(hs_req), .hs_wr_i(hs_wr), .hs_addr_i(hs_addr), .hs_wdata_i(hs_wdata),
    .hs_rdata_o(hs_rdata), .hs_ack_o(hs_ack), .hs_ready_o(hs_ready),
    .sram_a_o(sram_a), .sram_cs_n_o(sram_cs_n), .sram_oe_n_o(sram_oe_n),
    .sram_we_n_o(sram_we_n), .sram_d_o(sram_wd), .sram_d_i(sram_rd),
    .io_cs_n_o(io_cs_n), .io_rd_n_o(io_rd_n), .io_wr_n_o(io_wr_n), .io_a_o(io_a),
    .io_d_o(io_wd), .io_d_i(io_rd), .cfg_req_i(pc[0]),
    .fpga_done_o(fpga_done), .cfg_busy_o(cfg_busy), .alg_o(alg));

  sram_model #(.AW(AW)) u_sram (.clk(clk), .a_i(sram_a), .cs_n_i(sram_cs_n),
    .oe_n_i(sram_oe_n), .we_n_i(sram_we_n), .d_i(sram_wd), .d_o(sram_rd));

  ppi_model u_io (.clk(clk), .rst_n(rst_n), .cs_n_i(io_cs_n), .rd_n_i(io_rd_n),
    .wr_n_i(io_wr_n), .a_i(io_a), .d_i(io_wd), .d_o(io_rd),
    .pb_i({7'b0, fpga_done}), .pa_o(pa), .pc_o(pc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic xfer(input bit wr, input logic [5:0] a, input logic [7:0] wd,
                      output logic [7:0] rd, output int cyc);
    @(negedge clk);
    hs_req = 1'b1; hs_wr = wr; hs_addr = a; hs_wdata = wd;
    @(negedge clk);
    hs_req = 1'b0;
    cyc = 1;
    while (!hs_ack && cyc < 1_000_000) begin
      @(negedge clk);
      cyc++;
    end
    rd = hs_rdata;
    if (a == 6'h03) begin
      if (wr) n_sram_wr++; else n_sram_rd++;
    end
    if (a[5:2] == 4'h1) n_io++;
  endtask

  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    logic [7:0] r;
    int c;
    xfer(1, a, d, r, c);
  endtask

  task automatic rd(input logic [5:0] a, output logic [7:0] d);
    int c;
    xfer(0, a, 8'h00, d, c);
  endtask

  // back-to-back SRAM data-port transfers with the request held high: n bytes
  // must take n clocks (16 MB/s at 16 MHz); reads are checked against the
  // write pattern i ^ 5A
  task automatic burst(input bit wr, input int n);
    int acks = 0, t = 0;
    @(negedge clk);
    hs_req = 1'b1; hs_wr = wr; hs_addr = 6'h03; hs_wdata = 8'h5A;
    while (acks < n && t < 10 * n) begin
      @(posedge clk);
      #1;
      t++;
      if (hs_ack) begin
        if (!wr) check(hs_rdata == 8'(acks ^ 8'h5A), $sformatf("burst read byte %0d", acks));
        acks++;
      end
      hs_wdata = 8'(t ^ 8'h5A);
      if (t >= n) hs_req = 1'b0;
    end
    hs_req = 1'b0;
    check(acks == n && t == n, $sformatf("burst of %0d bytes took %0d clocks", n, t));
    if (acks == n && t == n) n_burst++;
    if (wr) n_sram_wr += n; else n_sram_rd += n;
  endtask

  task automatic set_reg24(input logic [5:0] a, input int unsigned v);
    wr(a, v[7:0]); wr(a + 6'd1, v[15:8]); wr(a + 6'd2, v[23:16]);
  endtask

  // load the image at base through the configuration signal; returns cycles
  task automatic load(input int unsigned base, input bit expect_ok, input bit poke_sram);
    logic [7:0] r;
    int         cyc, c;
    alg_e       alg_before;
    alg_before = alg;
    set_reg24(6'h08, base);
    wr(6'h07, 8'h01);                          // port C bit 0 = 1
    cyc = 0;
    if (poke_sram) begin
      repeat (20) @(negedge clk);
      xfer(0, 6'h03, 8'h00, r, c);             // must wait for the load
      check(!cfg_busy, "SRAM access completed during configuration");
      if (c > 1000) n_stall++;
    end
    do begin
      rd(6'h0B, r);                            // configuration status
      cyc++;
    end while (r[0] && cyc < 2_000_000);
    wr(6'h07, 8'h00);                          // port C bit 0 = 0
    rd(6'h05, r);                              // DONE through IO port B
    check(r[0] == expect_ok, $sformatf("DONE via IO port B = %0d", r[0]));
    rd(6'h0B, r);
    check(r[2:1] == (expect_ok ? 2'b01 : 2'b10), $sformatf("configuration status %h", r));
    if (expect_ok) n_cfg_ok++; else n_cfg_fail++;
    if (expect_ok && alg != alg_before && alg_before != ALG_NONE) n_switch++;
  endtask

  task automatic put64(input logic [5:0] base, input logic [63:0] v);
    for (int i = 0; i < 8; i++) wr(base + 6'(i), v[8*(7-i) +: 8]);
  endtask

  task automatic get64(input logic [5:0] base, output logic [63:0] v);
    logic [7:0] b;
    for (int i = 0; i < 8; i++) begin
      rd(base + 6'(i), b);
      v[8*(7-i) +: 8] = b;
    end
  endtask

  task automatic cipher(input logic [63:0] k1, input logic [63:0] k2,
                        input logic [63:0] blk, input bit dec,
                        input logic [63:0] expect_v);
    logic [7:0]  st;
    logic [63:0] res;
    int          n;
    longint      t0, clocks;
    put64(6'h28, k1);
    put64(6'h30, k2);
    t0 = cyc_now;
    put64(6'h20, blk);
    wr(6'h38, {6'b0, dec, 1'b1});
    n = 0;
    do begin
      rd(6'h39, st);
      n++;
    end while (!st[1] && n < 1000);
    get64(6'h20, res);
    // block in, start, poll, block out over the 16 MHz local bus, with the key
    // already loaded and two clocks per host access: at least 10 Mbit/s
    clocks = cyc_now - t0;
    check(clocks * 10 <= 64 * 16, $sformatf("block took %0d clocks, below 10 Mbit/s", clocks));
    if (clocks > worst_clocks) worst_clocks = clocks;
    check(res == expect_v, $sformatf("alg %0d dec %0d: %h expected %h", st[5:4], dec, res, expect_v));
    if (alg == ALG_DES) begin if (dec) n_des_dec++; else n_des_enc++; end
    if (alg == ALG_TDES) begin if (dec) n_tdes_dec++; else n_tdes_enc++; end
  endtask

  longint worst_clocks = 0;

  // configuration time: configuration signal to DONE, in clocks
  longint cfg_t0 = 0, cfg_cycles = 0, cyc_now = 0;
  logic   pc0_q = 1'b0;
  always @(posedge clk) begin
    cyc_now <= cyc_now + 1;
    pc0_q   <= pc[0];
    if (pc[0] && !pc0_q) cfg_t0 <= cyc_now;
  end
  always @(posedge fpga_done) cfg_cycles = cyc_now - cfg_t0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  r;
    logic [63:0] k1, k2, p, c;
    // image bodies preloaded; headers written by the host below
    for (int i = 0; i < int'(NBYTES); i++) begin
      u_sram.mem[DES_BASE + i]  = 8'($urandom);
      u_sram.mem[TDES_BASE + i] = 8'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!fpga_done && alg == ALG_NONE, "FPGA must start unconfigured");

    // image headers through the SRAM data port, then read back
    set_reg24(6'h00, DES_BASE);  wr(6'h03, 8'h01);
    set_reg24(6'h00, TDES_BASE); wr(6'h03, 8'h02);
    set_reg24(6'h00, BAD_BASE);  wr(6'h03, 8'h7E);
    set_reg24(6'h00, DES_BASE);  rd(6'h03, r); check(r == 8'h01, "DES header");
    set_reg24(6'h00, TDES_BASE); rd(6'h03, r); check(r == 8'h02, "Triple-DES header");

    // burst write and burst read of 256 bytes: one byte per clock
    set_reg24(6'h00, 32'h7E000);
    burst(1, 256);
    for (int i = 0; i < 256; i++)
      check(u_sram.mem[32'h7E000 + i] == 8'(i ^ 8'h5A), $sformatf("burst write byte %0d", i));
    set_reg24(6'h00, 32'h7E000);
    burst(0, 256);

    wr(6'h07, 8'h83);                         // IO: A out, B in, C out

    // ---- DES
    load(DES_BASE, 1, 1);
    check(alg == ALG_DES, "DES loaded");
    check(cfg_cycles >= NBYTES && cfg_cycles < NBYTES + 200,
          $sformatf("configuration took %0d clocks for %0d bytes", cfg_cycles, NBYTES));
    $display("configuration time %0d clocks = %0d us at 16 MHz", cfg_cycles, cfg_cycles / 16);
    cipher(64'h133457799BBCDFF1, '0, 64'h0123456789ABCDEF, 0, 64'h85E813540F0AB405);
    cipher(64'h0123456789ABCDEF, '0, 64'h3FA40E8A984D4815, 1, 64'h4E6F772069732074);
    for (int n = 0; n < 4; n++) begin
      k1 = {$urandom, $urandom}; p = {$urandom, $urandom};
      cipher(k1, '0, p, 0, des_ref(k1, p, 0));
      cipher(k1, '0, des_ref(k1, p, 0), 1, p);
    end

    // ---- switch to Triple-DES
    load(TDES_BASE, 1, 0);
    check(alg == ALG_TDES, "Triple-DES loaded");
    for (int n = 0; n < 4; n++) begin
      k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom}; p = {$urandom, $urandom};
      c = tdes_ref(k1, k2, p, 0);
      cipher(k1, k2, p, 0, c);
      cipher(k1, k2, c, 1, p);
    end

    // ---- unknown image: load fails, slot empty
    load(BAD_BASE, 0, 0);
    check(alg == ALG_NONE, "failed load leaves no cipher");

    // ---- back to DES
    load(DES_BASE, 1, 0);
    if (alg == ALG_DES) n_switch++;           // switch from the failed state
    cipher(64'h133457799BBCDFF1, '0, 64'h0123456789ABCDEF, 0, 64'h85E813540F0AB405);

    $display("slowest block over the local bus: %0d clocks = %0d kbit/s at 16 MHz",
             worst_clocks, 64 * 16000 / worst_clocks);
    $display("mechanisms: burst=%0d sram_wr=%0d sram_rd=%0d io=%0d cfg_ok=%0d cfg_fail=%0d switch=%0d stall=%0d des_enc=%0d des_dec=%0d tdes_enc=%0d tdes_dec=%0d",
             n_burst, n_sram_wr, n_sram_rd, n_io, n_cfg_ok, n_cfg_fail, n_switch, n_stall,
             n_des_enc, n_des_dec, n_tdes_enc, n_tdes_dec);
    check(n_sram_wr > 0, "host SRAM write never happened");
    check(n_sram_rd > 0, "host SRAM read never happened");
    check(n_io > 0, "IO controller access never happened");
    check(n_burst == 2, "one-byte-per-clock bursts");
    check(n_cfg_ok >= 3, "successful configuration count");
    check(n_cfg_fail > 0, "failed configuration never happened");
    check(n_switch >= 2, "algorithm switch count");
    check(n_stall > 0, "SRAM access stall during configuration never happened");
    check(n_des_enc > 0 && n_des_dec > 0, "DES encryption and decryption");
    check(n_tdes_enc > 0 && n_tdes_dec > 0, "Triple-DES encryption and decryption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
