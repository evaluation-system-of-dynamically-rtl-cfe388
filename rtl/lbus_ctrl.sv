// lbus_ctrl: the local bus controller of the board (two XC95108 CPLDs in the
// reference hardware). It sits between the PCI controller's 8-bit local-bus
// side and the devices on the local bus, and produces the two kinds of
// control signals the board needs: the address/data-bus strobes of the SRAM,
// the IO controller and the FPGA, and the configuration signals of the FPGA.
//
// Host side: hs_req_i is a one-cycle request with hs_wr_i, hs_addr_i and
// hs_wdata_i, allowed in any cycle in which hs_ready_o is high. hs_ack_o
// pulses one cycle after the access completes, with read data on hs_rdata_o
// (held until the next ack). Register, FPGA-window and SRAM data-port
// accesses complete in the request cycle and keep hs_ready_o high, so a burst
// moves one byte per clock (16 MB/s at 16 MHz); IO-controller accesses, and
// SRAM accesses while the configuration sequencer owns the SRAM, drop
// hs_ready_o until they are done. Address map:
//   0x00-0x02  SRAM address pointer, bits 7:0, 15:8, 18:16 (read/write)
//   0x03       SRAM data port; each access increments the pointer
//   0x04-0x07  IO controller registers (its A1:A0 = address bits 1:0)
//   0x08-0x0A  configuration image base address in SRAM (read/write)
//   0x0B       configuration status (read): bit 0 busy, bit 1 loaded
//              (DONE seen), bit 2 failed (INIT_n low or SRAM end reached)
//   0x0C-0x0E  bytes sent to the FPGA by the last configuration (read)
//   0x20-0x3F  FPGA register window (offset = address bits 4:0)
// The SRAM is an asynchronous 512K x 8 device; a host access drives address
// and OE_n or WE_n for SRAM_CYCLES clocks (one by default, straight from the
// request; more go through a registered wait path). The IO controller gets
// CS_n and RD_n or WR_n for IO_CYCLES clocks. An FPGA window access is the
// request cycle itself: fpga_cs_o, fpga_a_o and fpga_wdata_o follow the host
// inputs combinationally and the window's read data is taken at the clock.
//
// Configuration: a rising edge on cfg_req_i (the configuration signal driven
// by the IO controller, synchronised here) starts the sequencer. It pulls
// PROGRAM_n low for PROG_CYCLES clocks, waits for INIT_n to go high, then
// reads the image from SRAM starting at the base address, one byte per clock,
// and presents each byte registered on the SelectMAP data lines with CS_n and
// WRITE_n low; CCLK is this clock. It stops when DONE rises (loaded), when
// INIT_n falls (failed) or when the pointer has run through the whole SRAM
// (failed). Host accesses to the SRAM data port wait while the sequencer owns
// the SRAM; every other register stays accessible, so the host can poll.
//
// Clock: the 16 MHz local-bus clock. The division of work (bus control and
// FPGA configuration control), SelectMAP and DONE follow the board
// description; the register map, the strobe lengths and the one-byte-per-clock
// streaming are this design's choices.
module lbus_ctrl #(
  parameter int unsigned SRAM_AW     = 19,  // 512K x 8 SRAM
  parameter int unsigned SRAM_CYCLES = 1,   // host SRAM strobe length
  parameter int unsigned IO_CYCLES   = 4,   // IO controller strobe length
  parameter int unsigned PROG_CYCLES = 8    // PROGRAM_n low time
) (
  input  logic               clk,
  input  logic               rst_n,
  // PCI controller local-bus side
  input  logic               hs_req_i,
  input  logic               hs_wr_i,
  input  logic [5:0]         hs_addr_i,
  input  logic [7:0]         hs_wdata_i,
  output logic [7:0]         hs_rdata_o,
  output logic               hs_ack_o,
  output logic               hs_ready_o,
  // SRAM
  output logic [SRAM_AW-1:0] sram_a_o,
  output logic               sram_cs_n_o,
  output logic               sram_oe_n_o,
  output logic               sram_we_n_o,
  output logic [7:0]         sram_d_o,    // write data, driven when WE_n low
  input  logic [7:0]         sram_d_i,
  // IO controller
  output logic               io_cs_n_o,
  output logic               io_rd_n_o,
  output logic               io_wr_n_o,
  output logic [1:0]         io_a_o,
  output logic [7:0]         io_d_o,
  input  logic [7:0]         io_d_i,
  input  logic               cfg_req_i,   // configuration signal from IO
  // FPGA register window
  output logic               fpga_cs_o,
  output logic               fpga_wr_o,
  output logic [4:0]         fpga_a_o,
  output logic [7:0]         fpga_wdata_o,
  input  logic [7:0]         fpga_rdata_i,
  // FPGA SelectMAP configuration
  output logic               program_n_o,
  output logic               cfg_cs_n_o,
  output logic               cfg_write_n_o,
  output logic [7:0]         cfg_d_o,
  input  logic               init_n_i,
  input  logic               done_i,
  // status
  output logic               cfg_busy_o
);
  localparam int unsigned SCW = $clog2(SRAM_CYCLES + 1);
  localparam int unsigned ICW = $clog2(IO_CYCLES + 1);
  localparam int unsigned PCW = $clog2(PROG_CYCLES + 1);

  typedef enum logic [1:0] {H_IDLE, H_SRAM_WAIT, H_SRAM, H_IO} host_state_e;
  typedef enum logic [1:0] {C_IDLE, C_PROG, C_INIT, C_STREAM} cfg_state_e;

  // ------------------------------------------------------------ registers
  host_state_e        hst_q;
  cfg_state_e         cst_q;
  logic [SRAM_AW-1:0] ptr_q, base_q;
  logic [SRAM_AW:0]   sent_q;          // bytes read from SRAM for the FPGA
  logic [SCW-1:0]     scnt_q;
  logic [ICW-1:0]     icnt_q;
  logic [PCW-1:0]     pcnt_q;
  logic               wr_q;
  logic [1:0]         addr_q;   // IO register select
  logic [7:0]         wdata_q;
  logic [2:0]         req_sync_q;
  logic               loaded_q, failed_q;
  logic               cfg_wr_q;
  logic [7:0]         cfg_d_q;

  logic cfg_start, cfg_owns_sram, host_sram;
  assign cfg_start     = req_sync_q[1] && !req_sync_q[2];
  assign cfg_owns_sram = (cst_q == C_STREAM);
  assign host_sram     = (hst_q == H_SRAM);
  assign cfg_busy_o    = (cst_q != C_IDLE);

  // byte access to the 24-bit address registers (bits above SRAM_AW are 0)
  function automatic logic [23:0] set_byte(input logic [23:0] v, input logic [1:0] i,
                                           input logic [7:0] b);
    logic [23:0] r = v;
    r[8*i +: 8] = b;
    return r;
  endfunction

  function automatic logic [7:0] get_byte(input logic [23:0] v, input logic [1:0] i);
    return v[8*i +: 8];
  endfunction

  // ----------------------------------------------------- host transactions
  logic req_ok, fast_sram, fast_fpga, ack_q;
  assign hs_ready_o = (hst_q == H_IDLE);
  assign req_ok     = hs_req_i && hs_ready_o;
  // single-clock paths: the FPGA window always, the SRAM data port when the
  // SRAM needs one clock and the configuration sequencer does not own it
  assign fast_fpga  = req_ok && hs_addr_i[5];
  assign fast_sram  = req_ok && hs_addr_i == 6'h03 && SRAM_CYCLES == 1 && !cfg_busy_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hst_q      <= H_IDLE;
      ptr_q      <= '0;
      base_q     <= '0;
      scnt_q     <= '0;
      icnt_q     <= '0;
      wr_q       <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      hs_rdata_o <= '0;
      ack_q      <= 1'b0;
    end else begin
      ack_q <= 1'b0;
      unique case (hst_q)
        H_IDLE: if (hs_req_i) begin
          wr_q    <= hs_wr_i;
          addr_q  <= hs_addr_i[1:0];
          wdata_q <= hs_wdata_i;
          scnt_q  <= '0;
          icnt_q  <= '0;
          if (hs_addr_i[5]) begin
            if (!hs_wr_i) hs_rdata_o <= fpga_rdata_i;
            ack_q <= 1'b1;
          end else unique case (hs_addr_i[4:0])
            5'h03: if (fast_sram) begin
              if (!hs_wr_i) hs_rdata_o <= sram_d_i;
              ptr_q <= ptr_q + 1'b1;
              ack_q <= 1'b1;
            end else begin
              hst_q <= H_SRAM_WAIT;
            end
            5'h04, 5'h05, 5'h06, 5'h07: hst_q <= H_IO;
            default: begin
              ack_q <= 1'b1;
              if (hs_wr_i) begin
                unique case (hs_addr_i[4:0])
                  5'h00, 5'h01, 5'h02:
                    ptr_q  <= SRAM_AW'(set_byte(24'(ptr_q), hs_addr_i[1:0], hs_wdata_i));
                  5'h08, 5'h09, 5'h0A:
                    base_q <= SRAM_AW'(set_byte(24'(base_q), hs_addr_i[1:0], hs_wdata_i));
                  default: ;
                endcase
              end else begin
                unique case (hs_addr_i[4:0])
                  5'h00, 5'h01, 5'h02:
                    hs_rdata_o <= get_byte(24'(ptr_q), hs_addr_i[1:0]);
                  5'h08, 5'h09, 5'h0A:
                    hs_rdata_o <= get_byte(24'(base_q), hs_addr_i[1:0]);
                  5'h0B:   hs_rdata_o <= {5'b0, failed_q, loaded_q, cfg_busy_o};
                  5'h0C, 5'h0D, 5'h0E:
                    hs_rdata_o <= get_byte(24'(sent_q), hs_addr_i[1:0]);
                  default: hs_rdata_o <= 8'h00;
                endcase
              end
            end
          endcase
        end
        H_SRAM_WAIT: if (!cfg_busy_o) hst_q <= H_SRAM;
        H_SRAM: begin
          if (scnt_q == SCW'(SRAM_CYCLES - 1)) begin
            if (!wr_q) hs_rdata_o <= sram_d_i;
            ptr_q <= ptr_q + 1'b1;
            ack_q <= 1'b1;
            hst_q <= H_IDLE;
          end
          scnt_q <= scnt_q + 1'b1;
        end
        H_IO: begin
          if (icnt_q == ICW'(IO_CYCLES - 1)) begin
            if (!wr_q) hs_rdata_o <= io_d_i;
            ack_q <= 1'b1;
            hst_q <= H_IDLE;
          end
          icnt_q <= icnt_q + 1'b1;
        end
        default: hst_q <= H_IDLE;
      endcase
    end
  end

  assign hs_ack_o = ack_q;

  // IO controller strobes (registered request) and FPGA window (direct)
  assign io_cs_n_o    = !(hst_q == H_IO);
  assign io_rd_n_o    = !(hst_q == H_IO && !wr_q);
  assign io_wr_n_o    = !(hst_q == H_IO && wr_q);
  assign io_a_o       = addr_q;
  assign io_d_o       = wdata_q;
  assign fpga_cs_o    = fast_fpga;
  assign fpga_wr_o    = hs_wr_i;
  assign fpga_a_o     = hs_addr_i[4:0];
  assign fpga_wdata_o = hs_wdata_i;

  // --------------------------------------------------- configuration control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst_q      <= C_IDLE;
      req_sync_q <= '0;
      pcnt_q     <= '0;
      sent_q     <= '0;
      loaded_q   <= 1'b0;
      failed_q   <= 1'b0;
      cfg_wr_q   <= 1'b0;
      cfg_d_q    <= '0;
    end else begin
      req_sync_q <= {req_sync_q[1:0], cfg_req_i};
      cfg_wr_q   <= 1'b0;
      unique case (cst_q)
        C_IDLE: if (cfg_start) begin
          cst_q    <= C_PROG;
          pcnt_q   <= '0;
          sent_q   <= '0;
          loaded_q <= 1'b0;
          failed_q <= 1'b0;
        end
        C_PROG: begin
          pcnt_q <= pcnt_q + 1'b1;
          if (pcnt_q == PCW'(PROG_CYCLES - 1)) cst_q <= C_INIT;
        end
        C_INIT: if (init_n_i && !host_sram) cst_q <= C_STREAM;
        C_STREAM: begin
          if (done_i) begin
            loaded_q <= 1'b1;
            cst_q    <= C_IDLE;
          end else if (!init_n_i || sent_q[SRAM_AW]) begin
            failed_q <= 1'b1;
            cst_q    <= C_IDLE;
          end else begin
            cfg_d_q  <= sram_d_i;
            cfg_wr_q <= 1'b1;
            sent_q   <= sent_q + 1'b1;
          end
        end
        default: cst_q <= C_IDLE;
      endcase
    end
  end

  assign program_n_o   = !(cst_q == C_PROG);
  assign cfg_cs_n_o    = !cfg_wr_q;
  assign cfg_write_n_o = !cfg_wr_q;
  assign cfg_d_o       = cfg_d_q;

  // -------------------------------------------------------------- SRAM bus
  always_comb begin
    if (cfg_owns_sram) begin
      sram_a_o    = base_q + sent_q[SRAM_AW-1:0];
      sram_cs_n_o = 1'b0;
      sram_oe_n_o = 1'b0;
      sram_we_n_o = 1'b1;
    end else begin
      sram_a_o    = ptr_q;
      sram_cs_n_o = !(host_sram || fast_sram);
      sram_oe_n_o = !((host_sram && !wr_q) || (fast_sram && !hs_wr_i));
      sram_we_n_o = !((host_sram && wr_q) || (fast_sram && hs_wr_i));
    end
  end
  assign sram_d_o = fast_sram ? hs_wdata_i : wdata_q;

  // ------------------------------------------------------------ assertions
  a_sram_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !(cfg_owns_sram && host_sram));
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    hs_req_i |-> hs_ready_o);
endmodule
