// agc_top: the FPGA side of the AGC recreation: CPU core, erasable RAM,
// fixed ROM, I/O unit, CPU clock enable and performance counters.
//
// The board clock clk (50 MHz) drives everything; the CPU, RAM and ROM
// advance only on ce, one cycle in CLK_DIV (5 MHz with the defaults), while
// the I/O unit runs at the full board rate so that it can keep up with the
// serial link. The CPU reads instructions from ROM port A and constants from
// ROM port B, reads RAM in decode and writes it in writeback, and exchanges
// I/O channel values with the I/O unit. The I/O unit's byte interface is
// brought out to the ports; it connects to a bit-level UART transceiver
// (outside this design) that talks to the DSKY controller. The counters
// give cycles and retired instructions for an IPC figure.
// ROM contents come from ROM_INIT ($readmemh, indexed from physical address
// 04000 octal). Reset is active-low and asynchronous.
// The block structure and clock rates follow the document; the status
// outputs and the counter clear input are this design's additions.
module agc_top
  import agc_pkg::*;
#(
  parameter int    CLK_DIV  = 10,
  parameter int    IN_BASE  = 8,
  parameter string ROM_INIT = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  // byte interface to the UART transceiver
  output logic [7:0]  uart_tx_data,
  output logic        uart_tx_valid,
  input  logic        uart_tx_ready,
  input  logic        uart_rx_valid,
  input  logic [7:0]  uart_rx_data,
  output logic        uart_rx_dropped,
  // performance counters
  input  logic        perf_clear,
  output logic [31:0] perf_cycles,
  output logic [31:0] perf_instrs,
  // status pulses from the CPU (see agc_cpu)
  output logic        cpu_ce,
  output logic        cpu_retired,
  output logic        cpu_illegal,
  output logic        cpu_stall,
  output logic        cpu_redirect,
  output logic        cpu_serialize,
  output logic        cpu_indexed,
  output logic        cpu_extended,
  output word_t       cpu_a,
  output word_t       cpu_l,
  output word_t       cpu_q,
  output addr_t       cpu_pc_w
);
  logic              ce;
  logic [ROM_PW-1:0] rom_addr_a, rom_addr_b;
  word_t             rom_data_a, rom_data_b;
  logic [RAM_AW-1:0] ram_rd_addr, ram_wr_addr;
  word_t             ram_rd_data, ram_wr_data;
  logic              ram_wr_en;
  word_t             in_regs  [NUM_CH];
  word_t             out_regs [NUM_CH];
  logic              io_wr_strobe;
  logic [CH_W-1:0]   io_wr_ch;

  clk_enable #(.DIV(CLK_DIV)) u_ce (.clk, .rst_n, .ce);

  agc_rom #(.INIT_FILE(ROM_INIT)) u_rom (
    .clk, .en(ce), .addr_a(rom_addr_a), .data_a(rom_data_a),
    .addr_b(rom_addr_b), .data_b(rom_data_b)
  );

  agc_ram u_ram (
    .clk, .en(ce), .rd_addr(ram_rd_addr), .rd_data(ram_rd_data),
    .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data)
  );

  agc_cpu #(.IN_BASE(IN_BASE)) u_cpu (
    .clk, .rst_n, .ce,
    .rom_addr_a, .rom_data_a, .rom_addr_b, .rom_data_b,
    .ram_rd_addr, .ram_rd_data, .ram_wr_en, .ram_wr_addr, .ram_wr_data,
    .in_regs, .out_regs, .io_wr_strobe, .io_wr_ch,
    .retired(cpu_retired), .illegal(cpu_illegal), .stall(cpu_stall),
    .redirect(cpu_redirect), .serialize(cpu_serialize),
    .indexed(cpu_indexed), .extended(cpu_extended),
    .dbg_a(cpu_a), .dbg_l(cpu_l), .dbg_q(cpu_q), .dbg_pc_w(cpu_pc_w)
  );

  io_unit #(.IN_BASE(IN_BASE)) u_io (
    .clk, .rst_n,
    .out_regs, .wr_strobe(io_wr_strobe), .wr_ch(io_wr_ch), .in_regs,
    .tx_data(uart_tx_data), .tx_valid(uart_tx_valid), .tx_ready(uart_tx_ready),
    .rx_valid(uart_rx_valid), .rx_data(uart_rx_data), .rx_dropped(uart_rx_dropped)
  );

  perf_counters u_perf (
    .clk, .rst_n, .ce, .clear(perf_clear), .retired(cpu_retired),
    .cycles(perf_cycles), .instrs(perf_instrs)
  );

  assign cpu_ce = ce;
endmodule
