// tb_lbus_ctrl: self-checking test of the local bus controller with a small
// SRAM (SRAM_AW = 12). Around it sit the SRAM and IO-controller models and a
// SelectMAP sink written here that records every configuration byte. Checks:
// pointer and base registers; SRAM writes and reads through the data port
// with auto-increment and the SRAM strobe length; IO controller writes, reads
// and strobe length, and the configuration signal set through port C; FPGA
// window strobes; a configuration run that must pulse PROGRAM_n for
// PROG_CYCLES, wait for INIT_n, send exactly the SRAM bytes from the base
// address one per clock until DONE, and report the count; a host SRAM access
// during configuration that must wait; a run ended by INIT_n falling; and a
// run that never sees DONE and must stop at the end of the SRAM.
module tb_lbus_ctrl;
  localparam int unsigned AW    = 12;
  localparam int unsigned IMG   = 300;   // bytes the sink needs for DONE
  localparam int unsigned PROGC = 8;

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
  logic          fpga_cs, fpga_wr;
  logic [4:0]    fpga_a;
  logic [7:0]    fpga_wdata;
  logic          program_n, cfg_cs_n, cfg_write_n, cfg_busy;
  logic [7:0]    cfg_d;
  logic          init_n = 1'b1, done = 1'b0;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  lbus_ctrl #(.SRAM_AW(AW), .IO_CYCLES(4), .PROG_CYCLES(PROGC)) dut (
    .clk(clk), .rst_n(rst_n),
    .hs_req_i(hs_req), .hs_wr_i(hs_wr), .hs_addr_i(hs_addr), .hs_wdata_i(hs_wdata),
    .hs_rdata_o(hs_rdata), .hs_ack_o(hs_ack), .hs_ready_o(hs_ready),
    .sram_a_o(sram_a), .sram_cs_n_o(sram_cs_n), .sram_oe_n_o(sram_oe_n),
    .sram_we_n_o(sram_we_n), .sram_d_o(sram_wd), .sram_d_i(sram_rd),
    .io_cs_n_o(io_cs_n), .io_rd_n_o(io_rd_n), .io_wr_n_o(io_wr_n), .io_a_o(io_a),
    .io_d_o(io_wd), .io_d_i(io_rd), .cfg_req_i(pc[0]),
    .fpga_cs_o(fpga_cs), .fpga_wr_o(fpga_wr), .fpga_a_o(fpga_a),
    .fpga_wdata_o(fpga_wdata), .fpga_rdata_i({3'b101, fpga_a}),
    .program_n_o(program_n), .cfg_cs_n_o(cfg_cs_n), .cfg_write_n_o(cfg_write_n),
    .cfg_d_o(cfg_d), .init_n_i(init_n), .done_i(done), .cfg_busy_o(cfg_busy));

  sram_model #(.AW(AW)) u_sram (.clk(clk), .a_i(sram_a), .cs_n_i(sram_cs_n),
    .oe_n_i(sram_oe_n), .we_n_i(sram_we_n), .d_i(sram_wd), .d_o(sram_rd));

  ppi_model u_io (.clk(clk), .rst_n(rst_n), .cs_n_i(io_cs_n), .rd_n_i(io_rd_n),
    .wr_n_i(io_wr_n), .a_i(io_a), .d_i(io_wd), .d_o(io_rd), .pb_i(8'hC3),
    .pa_o(pa), .pc_o(pc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one host transaction; returns read data and the cycles until ack
  task automatic xfer(input bit wr, input logic [5:0] a, input logic [7:0] wd,
                      output logic [7:0] rd, output int cyc);
    @(negedge clk);
    hs_req = 1'b1; hs_wr = wr; hs_addr = a; hs_wdata = wd;
    @(negedge clk);
    hs_req = 1'b0; hs_wdata = 8'hEE;
    cyc = 1;
    while (!hs_ack && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    rd = hs_rdata;
  endtask

  // back-to-back SRAM data-port reads, request held high; returns the clocks
  // until the n-th ack (n for one byte per clock), -1 if acks are missing
  logic [7:0] burst_data [$];
  task automatic burst_read(input int n, output int clocks);
    int acks = 0, t = 0;
    burst_data.delete();
    @(negedge clk);
    hs_req = 1'b1; hs_wr = 1'b0; hs_addr = 6'h03;
    while (acks < n && t < 1000) begin
      @(posedge clk);
      #1;
      t++;
      if (hs_ack) begin
        acks++;
        burst_data.push_back(hs_rdata);
      end
      if (t >= n) hs_req = 1'b0;
      check(hs_ready, "ready dropped during burst");
    end
    hs_req = 1'b0;
    clocks = (acks == n) ? t : -1;
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

  // strobe-length monitors
  int sram_we_len = 0, sram_we_last = 0, io_len = 0, io_last = 0, prog_len = 0, prog_last = 0;
  int fpga_strobes = 0;
  always @(posedge clk) begin
    if (!sram_we_n) sram_we_len <= sram_we_len + 1;
    else if (sram_we_len != 0) begin sram_we_last <= sram_we_len; sram_we_len <= 0; end
    if (!io_cs_n) io_len <= io_len + 1;
    else if (io_len != 0) begin io_last <= io_len; io_len <= 0; end
    if (!program_n) prog_len <= prog_len + 1;
    else if (prog_len != 0) begin prog_last <= prog_len; prog_len <= 0; end
    if (fpga_cs) fpga_strobes <= fpga_strobes + 1;
  end

  // SelectMAP sink: INIT_n low while PROGRAM_n low and 3 cycles after; DONE
  // after IMG bytes; records the bytes and the cycles between them
  logic [7:0] got [$];
  int         gaps = 0, last_byte = -1, now = 0;
  int         init_hold = 0;
  bit         sink_fail = 0, sink_never_done = 0;
  always @(posedge clk) begin
    now <= now + 1;
    if (!program_n) begin
      init_n <= 1'b0; done <= 1'b0; init_hold <= 3; got.delete(); last_byte <= -1;
    end else if (init_hold != 0) begin
      init_hold <= init_hold - 1;
      if (init_hold == 1) init_n <= 1'b1;
    end else if (!cfg_cs_n && !cfg_write_n && !done) begin
      if (!sink_fail) check(init_n, "byte written while INIT_n low");
      got.push_back(cfg_d);
      if (last_byte >= 0 && now - last_byte != 1) gaps <= gaps + 1;
      last_byte <= now;
      if (sink_fail && got.size() == 10) init_n <= 1'b0;
      if (!sink_never_done && got.size() == IMG) done <= 1'b1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // pointer register round trip
    wr(6'h00, 8'h34); wr(6'h01, 8'h02); wr(6'h02, 8'h00);
    rd(6'h00, r); check(r == 8'h34, "pointer low");
    rd(6'h01, r); check(r == 8'h02, "pointer mid");

    // SRAM writes through the data port, with auto-increment
    for (int i = 0; i < 16; i++) wr(6'h03, 8'(i * 7 + 1));
    check(sram_we_last == 1, $sformatf("SRAM WE_n low %0d cycles", sram_we_last));
    for (int i = 0; i < 16; i++)
      check(u_sram.mem[12'h234 + i] == 8'(i * 7 + 1), $sformatf("SRAM byte %0d", i));
    rd(6'h00, r); check(r == 8'h44, "pointer after 16 writes");
    wr(6'h00, 8'h34); wr(6'h01, 8'h02);
    for (int i = 0; i < 16; i++) begin
      xfer(0, 6'h03, 8'h00, r, c);
      check(r == 8'(i * 7 + 1), $sformatf("SRAM read %0d got %h", i, r));
      check(c == 1, $sformatf("SRAM read took %0d cycles", c));
    end

    // burst: a request in every clock, one byte per clock
    wr(6'h00, 8'h34); wr(6'h01, 8'h02);
    burst_read(16, c);
    check(c == 16, $sformatf("burst of 16 reads took %0d clocks", c));
    for (int i = 0; i < 16; i++)
      check(burst_data[i] == 8'(i * 7 + 1), $sformatf("burst byte %0d got %h", i, burst_data[i]));

    // IO controller: port A write/read, port B input, strobe length
    wr(6'h07, 8'h82);                 // mode word
    wr(6'h04, 8'hA5);
    check(pa == 8'hA5, "IO port A write");
    check(io_last == 4, $sformatf("IO strobe %0d cycles", io_last));
    rd(6'h04, r); check(r == 8'hA5, "IO port A read");
    rd(6'h05, r); check(r == 8'hC3, "IO port B read");

    // FPGA window
    rd(6'h2B, r); check(r == 8'hAB, $sformatf("FPGA window read %h", r));
    check(fpga_strobes == 1, "FPGA strobe length");

    // image in SRAM at base 0x400
    for (int i = 0; i < 1024; i++) u_sram.mem[12'h400 + i] = 8'($urandom);
    wr(6'h08, 8'h00); wr(6'h09, 8'h04); wr(6'h0A, 8'h00);
    wr(6'h07, 8'h01);                 // port C bit 0 set: configuration signal
    repeat (4) @(negedge clk);
    check(cfg_busy, "configuration must start on the signal");
    // a host SRAM read now has to wait for the end of configuration
    xfer(0, 6'h03, 8'h00, r, c);
    check(c > int'(IMG), $sformatf("SRAM access during configuration waited only %0d", c));
    check(!cfg_busy, "configuration finished");
    check(prog_last == int'(PROGC), $sformatf("PROGRAM_n low %0d cycles", prog_last));
    check(got.size() == IMG, $sformatf("%0d bytes delivered", got.size()));
    for (int i = 0; i < got.size(); i++)
      if (got[i] != u_sram.mem[12'h400 + i]) begin
        check(0, $sformatf("configuration byte %0d", i));
        break;
      end
    check(gaps == 0, "bytes must arrive one per clock");
    rd(6'h0B, r); check(r[2:0] == 3'b010, $sformatf("status after load %h", r));
    rd(6'h0C, r); c = r;
    rd(6'h0D, r); c += 256 * r;
    check(c >= int'(IMG) && c <= int'(IMG) + 2, $sformatf("sent count %0d", c));
    wr(6'h07, 8'h00);                 // release the configuration signal

    // INIT_n falling ends the run as failed
    sink_fail = 1;
    wr(6'h07, 8'h01);
    while (!cfg_busy) @(negedge clk);
    while (cfg_busy) @(negedge clk);
    rd(6'h0B, r); check(r[2:0] == 3'b100, $sformatf("status after INIT_n error %h", r));
    wr(6'h07, 8'h00);

    // no DONE at all: stops after the whole SRAM
    sink_fail = 0; sink_never_done = 1;
    wr(6'h07, 8'h01);
    while (!cfg_busy) @(negedge clk);
    while (cfg_busy) @(negedge clk);
    rd(6'h0B, r); check(r[2:0] == 3'b100, $sformatf("status after overrun %h", r));
    rd(6'h0D, r); c = 256 * r;
    rd(6'h0E, r); c += 65536 * r;
    check(c == (1 << AW), $sformatf("overrun count %0d", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
