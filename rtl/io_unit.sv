// io_unit: the I/O unit between the CPU and the serial link to the DSKY
// controller.
//
// It holds the input channel registers (channels IN_BASE-14; the output
// channel registers are inside the CPU) and the byte-level UART logic: the
// transmit framer sends every output channel the CPU writes, the receive
// parser writes incoming frames into the input registers. Its byte ports
// connect to a bit-level UART transceiver (8 data bits, 115200 baud in the
// document's system), which is not part of this design. Input registers
// reset to zero and are updated one cycle after the frame's last byte.
// See uart_tx_framer and uart_rx_parser for the frame format.
// The split into input registers here and output registers in the CPU
// follows the document; channel numbering and frame format are this design's.
module io_unit
  import agc_pkg::*;
#(
  parameter int IN_BASE = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU side
  input  word_t           out_regs [NUM_CH],
  input  logic            wr_strobe,
  input  logic [CH_W-1:0] wr_ch,
  output word_t           in_regs  [NUM_CH],
  // byte interface to the UART transceiver
  output logic [7:0]      tx_data,
  output logic            tx_valid,
  input  logic            tx_ready,
  input  logic            rx_valid,
  input  logic [7:0]      rx_data,
  output logic            rx_dropped
);
  logic            in_wr;
  logic [CH_W-1:0] in_ch;
  word_t           in_data;
  word_t           regs [NUM_CH];

  uart_tx_framer #(.IN_BASE(IN_BASE)) u_tx (
    .clk, .rst_n, .wr_strobe, .wr_ch, .out_regs, .tx_data, .tx_valid, .tx_ready
  );

  uart_rx_parser #(.IN_BASE(IN_BASE)) u_rx (
    .clk, .rst_n, .rx_valid, .rx_data,
    .wr_en(in_wr), .wr_ch(in_ch), .wr_data(in_data), .dropped(rx_dropped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CH; i++) regs[i] <= '0;
    end else if (in_wr) begin
      regs[in_ch] <= in_data;
    end
  end

  assign in_regs = regs;
endmodule
